// tb_mimo_detector_top: end-to-end test of the detector's descrambler and SIC
// scrambler, with the top at its default configuration.
//
// Phase 1 runs short codewords with random idle gaps: PDSCH0 and PDSCH1 switch
// between QPSK, 16-QAM and 64-QAM from codeword to codeword, -128 LLRs are
// injected to force the saturating negation, and the scrambler runs all three
// modulation orders. Phase 2 runs one transaction of each published channel
// configuration at once, back to back without gaps: PCICH 288 LLRs (QPSK),
// PDCCH 4,800 LLRs (QPSK), PDSCH0 and PDSCH1 33,120 LLRs each (64-QAM), and
// checks that each takes NData / bits-per-symbol clocks. Every output is
// compared with a bit-serial gold sequence model; the count of each mechanism
// (mode, reseed, gap, saturation) must be non-zero.
module tb_mimo_detector_top;
  import tb_ref_pkg::*;
  import gsg_pkg::*;

  logic sclk = 1'b0, srstb = 1'b0;
  logic [3:0] seed_in = '0;
  logic [3:0][24:0] dataseed0 = '0, dataseed1 = '0;
  mod_order_e [1:0] pdsch_mod = '{MOD_QPSK, MOD_QPSK};
  logic [3:0] dm_valid = '0;
  logic [3:0][5:0][7:0] dm_llr = '0;
  logic [3:0] llr_valid;
  logic [3:0][5:0][7:0] llr_out;
  logic enc_seed_in = 1'b0;
  logic [24:0] enc_dataseed0 = '0, enc_dataseed1 = '0;
  mod_order_e enc_mod = MOD_QPSK;
  logic enc_valid = 1'b0;
  logic [5:0] enc_bits = '0;
  logic scr_valid;
  logic [5:0] scr_bits;

  int checks = 0, failures = 0;
  int n_mode[3] = '{0, 0, 0};
  int n_reseed = 0, n_gap = 0, n_sat = 0, n_scr_mode[3] = '{0, 0, 0};
  longint cycle = 0;

  always #5 sclk = ~sclk;
  always @(posedge sclk) cycle++;

  mimo_detector_top dut (.*);

  gold_ref_t rl[4];
  gold_ref_t rs;
  logic [5:0][7:0] q_llr[4][$];
  logic [5:0]      q_scr[$];

  function automatic logic [7:0] tog(logic t, logic [7:0] v);
    if (!t) return v;
    if (v == 8'h80) return 8'h7f;
    return -v;
  endfunction

  // One codeword on lane ch; returns the clocks from first to last symbol.
  task automatic lane_codeword(int ch, mod_order_e m, int nsym, bit gaps, output longint span);
    logic [24:0] a, b;
    logic [5:0][7:0] e;
    int bps;
    longint t0;
    bps = (ch >= 2) ? bits_per_symbol(m) : 2;
    a = 25'($urandom()) | 25'h1;
    b = 25'($urandom()) | 25'h1;
    @(negedge sclk);
    if (ch >= 2) pdsch_mod[ch-2] = m;
    dataseed0[ch] = a;
    dataseed1[ch] = b;
    seed_in[ch] = 1'b1;
    @(negedge sclk);
    seed_in[ch] = 1'b0;
    rl[ch].seed(a, b);
    n_reseed++;
    t0 = cycle;
    for (int s = 0; s < nsym; ) begin
      if (gaps && $urandom_range(0, 4) == 0) begin
        dm_valid[ch] = 1'b0;
        n_gap++;
      end else begin
        dm_valid[ch] = 1'b1;
        for (int i = 0; i < 6; i++) dm_llr[ch][i] = 8'($urandom());
        if (gaps && $urandom_range(0, 7) == 0) dm_llr[ch][$urandom_range(0, bps - 1)] = 8'h80;
        e = '0;
        for (int i = 0; i < bps; i++) begin
          logic t;
          t = rl[ch].next_bit();
          if (t && dm_llr[ch][i] == 8'h80) n_sat++;
          e[i] = tog(t, dm_llr[ch][i]);
        end
        q_llr[ch].push_back(e);
        n_mode[(ch >= 2) ? int'(m) : 0]++;
        s++;
      end
      @(negedge sclk);
    end
    dm_valid[ch] = 1'b0;
    span = cycle - t0;
  endtask

  task automatic scr_codeword(mod_order_e m, int nsym);
    logic [24:0] a, b;
    logic [5:0] e;
    a = 25'($urandom()) | 25'h2;
    b = 25'($urandom()) | 25'h2;
    @(negedge sclk);
    enc_mod = m; enc_dataseed0 = a; enc_dataseed1 = b; enc_seed_in = 1'b1;
    @(negedge sclk);
    enc_seed_in = 1'b0;
    rs.seed(a, b);
    for (int s = 0; s < nsym; s++) begin
      enc_valid = 1'b1;
      enc_bits = 6'($urandom());
      e = '0;
      for (int i = 0; i < bits_per_symbol(m); i++) e[i] = enc_bits[i] ^ rs.next_bit();
      q_scr.push_back(e);
      n_scr_mode[int'(m)]++;
      @(negedge sclk);
    end
    enc_valid = 1'b0;
  endtask

  // Output monitor: the registered outputs are sampled just after each edge.
  always @(posedge sclk) begin
    #1;
    for (int ch = 0; ch < 4; ch++) if (llr_valid[ch]) begin
      checks++;
      if (q_llr[ch].size() == 0) begin
        failures++;
        $display("lane %0d: unexpected output", ch);
      end else begin
        logic [5:0][7:0] e;
        e = q_llr[ch].pop_front();
        if (llr_out[ch] !== e) begin
          failures++;
          if (failures < 10) $display("lane %0d: got %h exp %h", ch, llr_out[ch], e);
        end
      end
    end
    if (scr_valid) begin
      checks++;
      if (q_scr.size() == 0 || scr_bits !== q_scr.pop_front()) begin
        failures++;
        if (failures < 10) $display("scrambler mismatch");
      end
    end
  end

  localparam int NDATA[4] = '{288, 4800, 33120, 33120};

  initial begin
    longint span[4];
    longint dummy;
    for (int ch = 0; ch < 4; ch++) rl[ch] = new(25'h9, 25'hF);
    rs = new(25'h9, 25'hF);
    repeat (2) @(negedge sclk);
    srstb = 1'b1;

    // Phase 1: short codewords, all mechanisms.
    fork
      begin lane_codeword(0, MOD_QPSK, 60, 1'b1, dummy); lane_codeword(0, MOD_QPSK, 40, 1'b1, dummy); end
      begin lane_codeword(1, MOD_QPSK, 80, 1'b1, dummy); end
      begin
        lane_codeword(2, MOD_QPSK, 30, 1'b1, dummy);
        lane_codeword(2, MOD_64QAM, 30, 1'b1, dummy);
        lane_codeword(2, MOD_16QAM, 30, 1'b1, dummy);
      end
      begin
        lane_codeword(3, MOD_16QAM, 30, 1'b1, dummy);
        lane_codeword(3, MOD_QPSK, 30, 1'b1, dummy);
        lane_codeword(3, MOD_64QAM, 30, 1'b1, dummy);
      end
      begin
        scr_codeword(MOD_QPSK, 20);
        scr_codeword(MOD_16QAM, 20);
        scr_codeword(MOD_64QAM, 20);
      end
    join
    repeat (3) @(negedge sclk);

    // Phase 2: one transaction of each published channel configuration.
    fork
      lane_codeword(0, MOD_QPSK,  NDATA[0] / 2, 1'b0, span[0]);
      lane_codeword(1, MOD_QPSK,  NDATA[1] / 2, 1'b0, span[1]);
      lane_codeword(2, MOD_64QAM, NDATA[2] / 6, 1'b0, span[2]);
      lane_codeword(3, MOD_64QAM, NDATA[3] / 6, 1'b0, span[3]);
    join
    repeat (3) @(negedge sclk);

    for (int ch = 0; ch < 4; ch++) begin
      int bps;
      bps = (ch >= 2) ? 6 : 2;
      checks++;
      if (span[ch] != NDATA[ch] / bps) begin
        failures++;
        $display("lane %0d: %0d LLRs took %0d clocks, expected %0d", ch, NDATA[ch], span[ch], NDATA[ch] / bps);
      end else
        $display("lane %0d: %0d LLRs in %0d clocks", ch, NDATA[ch], span[ch]);
      checks++;
      if (q_llr[ch].size() != 0) begin failures++; $display("lane %0d: outputs missing", ch); end
    end
    checks++;
    if (q_scr.size() != 0) begin failures++; $display("scrambler outputs missing"); end

    $display("mechanisms: qpsk=%0d 16qam=%0d 64qam=%0d reseed=%0d gap=%0d saturate=%0d scr=%0d/%0d/%0d",
             n_mode[0], n_mode[1], n_mode[2], n_reseed, n_gap, n_sat,
             n_scr_mode[0], n_scr_mode[1], n_scr_mode[2]);
    foreach (n_mode[i]) begin checks++; if (n_mode[i] == 0) begin failures++; $display("mode %0d never ran", i); end end
    foreach (n_scr_mode[i]) begin checks++; if (n_scr_mode[i] == 0) begin failures++; $display("scrambler mode %0d never ran", i); end end
    checks++; if (n_reseed == 0) failures++;
    checks++; if (n_gap == 0) failures++;
    checks++; if (n_sat == 0) begin failures++; $display("saturation never happened"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge sclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
