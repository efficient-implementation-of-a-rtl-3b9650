// tb_descrambler: checks a data-channel lane (QPSK, 16-QAM and 64-QAM
// codewords, each freshly seeded) and a control-channel lane (QPSK) against a
// bit-serial gold sequence model. Symbols of random LLRs arrive with random
// gaps; each must come out one clock later with every used LLR negated where
// the sequence bit is 1 (saturating -128 to +127) and every unused LLR zero.
// The number of symbols per mode and a one-clock latency are checked too.
module tb_descrambler;
  import tb_ref_pkg::*;
  import gsg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic seed_in = 1'b0;
  logic [24:0] dataseed0 = '0, dataseed1 = '0;
  mod_order_e mod_order = MOD_QPSK;
  logic in_valid = 1'b0;
  logic [5:0][7:0] in_llr = '0;
  logic d_valid, c_valid;
  logic [5:0][7:0] d_llr, c_llr;
  int checks = 0, failures = 0;
  int mode_symbols[3] = '{0, 0, 0};

  always #5 clk = ~clk;

  descrambler                 u_data (.clk, .rst_n, .seed_in, .dataseed0, .dataseed1, .mod_order,
                                      .in_valid, .in_llr, .out_valid(d_valid), .out_llr(d_llr));
  descrambler #(.DATA_CH(0))  u_ctrl (.clk, .rst_n, .seed_in, .dataseed0, .dataseed1, .mod_order,
                                      .in_valid, .in_llr, .out_valid(c_valid), .out_llr(c_llr));

  gold_ref_t rd, rc;

  function automatic logic [7:0] tog(logic t, logic [7:0] v);
    if (!t) return v;
    if (v == 8'h80) return 8'h7f;
    return -v;
  endfunction

  task automatic codeword(mod_order_e m, int nsym);
    logic [24:0] a, b;
    logic [5:0][7:0] exp_d, exp_c;
    logic was_valid;
    int bps;
    bps = bits_per_symbol(m);
    a = 25'($urandom()) | 25'h1;
    b = 25'($urandom()) | 25'h1;
    @(negedge clk);
    mod_order = m; dataseed0 = a; dataseed1 = b; seed_in = 1'b1;
    @(negedge clk);
    seed_in = 1'b0;
    rd.seed(a, b);
    rc.seed(a, b);
    for (int s = 0; s < nsym; ) begin
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < 6; i++) in_llr[i] = 8'($urandom());
      if (($urandom_range(0, 15)) == 0) in_llr[0] = 8'h80;
      exp_d = '0;
      exp_c = '0;
      if (in_valid) begin
        for (int i = 0; i < bps; i++) exp_d[i] = tog(rd.next_bit(), in_llr[i]);
        for (int i = 0; i < 2; i++)   exp_c[i] = tog(rc.next_bit(), in_llr[i]);
        s++;
        mode_symbols[int'(m)]++;
      end
      was_valid = in_valid;
      @(negedge clk);
      in_valid = 1'b0;
      checks += 2;
      if (d_valid !== was_valid || c_valid !== was_valid) begin
        failures++;
        $display("valid latency wrong");
      end
      if (was_valid) begin
        checks += 2;
        if (d_llr !== exp_d) begin
          failures++;
          if (failures < 10) $display("data lane mode %0d: got %h exp %h", m, d_llr, exp_d);
        end
        if (c_llr !== exp_c) begin
          failures++;
          if (failures < 10) $display("ctrl lane: got %h exp %h", c_llr, exp_c);
        end
      end
    end
  endtask

  initial begin
    rd = new(25'h9, 25'hF);
    rc = new(25'h9, 25'hF);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    codeword(MOD_64QAM, 300);
    codeword(MOD_QPSK, 300);
    codeword(MOD_16QAM, 300);
    codeword(MOD_64QAM, 100);
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (mode_symbols[m] == 0) begin
        failures++;
        $display("mode %0d never exercised", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
