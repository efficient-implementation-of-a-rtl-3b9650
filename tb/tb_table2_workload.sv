// tb_table2_workload: the four channel configurations of the detector's
// throughput evaluation, run on mimo_detector_top at its defaults, all four
// lanes at once:
//   case 1  PCICH   QPSK     NData 288     2,400 transactions
//   case 2  PDCCH   QPSK     NData 4,800   2,400 transactions
//   case 3  PDSCH0  64-QAM   NData 33,120  2,400 transactions
//   case 4  PDSCH1  64-QAM   NData 33,120  2,400 transactions
// Each transaction is a freshly seeded codeword of NData LLRs fed one symbol
// per clock. Every descrambled LLR is compared with a bit-serial gold sequence
// model, and every transaction must take exactly NData / bits-per-symbol
// clocks. Case 4 reaches the descrambler through the SIC path in the full
// detector; here its LLRs are driven directly, as for the other cases.
module tb_table2_workload;
  import tb_ref_pkg::*;
  import gsg_pkg::*;

  localparam int NTRANS = 2400;
  localparam int NDATA[4] = '{288, 4800, 33120, 33120};
  localparam int BPS[4]   = '{2, 2, 6, 6};

  logic sclk = 1'b0, srstb = 1'b0;
  logic [3:0] seed_in = '0;
  logic [3:0][24:0] dataseed0 = '0, dataseed1 = '0;
  mod_order_e [1:0] pdsch_mod = '{MOD_64QAM, MOD_64QAM};
  logic [3:0] dm_valid = '0;
  logic [3:0][5:0][7:0] dm_llr = '0;
  logic [3:0] llr_valid;
  logic [3:0][5:0][7:0] llr_out;
  logic enc_seed_in = 1'b0;
  logic [24:0] enc_dataseed0 = 25'h1, enc_dataseed1 = 25'h1;
  mod_order_e enc_mod = MOD_QPSK;
  logic enc_valid = 1'b0;
  logic [5:0] enc_bits = '0;
  logic scr_valid;
  logic [5:0] scr_bits;

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint lane_cycles[4] = '{0, 0, 0, 0};
  logic [5:0][7:0] expd[4];
  logic exp_valid[4] = '{1'b0, 1'b0, 1'b0, 1'b0};

  always #5 sclk = ~sclk;
  always @(posedge sclk) cycle++;

  mimo_detector_top dut (.*);

  function automatic logic [7:0] tog(logic t, logic [7:0] v);
    if (!t) return v;
    if (v == 8'h80) return 8'h7f;
    return -v;
  endfunction

  task automatic lane(int ch);
    gold_ref_t r;
    logic [24:0] a, b;
    longint t0;
    r = new(25'h9, 25'hF);
    for (int t = 0; t < NTRANS; t++) begin
      a = 25'($urandom()) | 25'h1;
      b = 25'($urandom()) | 25'h1;
      dataseed0[ch] = a;
      dataseed1[ch] = b;
      seed_in[ch] = 1'b1;
      @(negedge sclk);
      seed_in[ch] = 1'b0;
      r.seed(a, b);
      t0 = cycle;
      for (int s = 0; s < NDATA[ch] / BPS[ch]; s++) begin
        dm_valid[ch] = 1'b1;
        for (int i = 0; i < 6; i++) dm_llr[ch][i] = 8'($urandom());
        expd[ch] = '0;
        for (int i = 0; i < BPS[ch]; i++) expd[ch][i] = tog(r.next_bit(), dm_llr[ch][i]);
        exp_valid[ch] = 1'b1;
        @(negedge sclk);
        // The registered result of the symbol driven before this edge.
        checks++;
        if (!llr_valid[ch] || llr_out[ch] !== expd[ch]) begin
          failures++;
          if (failures < 10) $display("case %0d transaction %0d symbol %0d: got %h exp %h", ch + 1, t, s, llr_out[ch], expd[ch]);
        end
      end
      dm_valid[ch] = 1'b0;
      checks++;
      if (cycle - t0 != NDATA[ch] / BPS[ch]) begin
        failures++;
        $display("case %0d: transaction took %0d clocks", ch + 1, cycle - t0);
      end
      lane_cycles[ch] += cycle - t0;
    end
  endtask

  initial begin
    repeat (2) @(negedge sclk);
    srstb = 1'b1;
    @(negedge sclk);
    fork
      lane(0);
      lane(1);
      lane(2);
      lane(3);
    join
    for (int ch = 0; ch < 4; ch++)
      $display("case %0d: %0d transactions x %0d LLRs in %0d clocks (%0d LLRs per clock)",
               ch + 1, NTRANS, NDATA[ch], lane_cycles[ch],
               longint'(NTRANS) * NDATA[ch] / lane_cycles[ch]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14_000_000) @(posedge sclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
