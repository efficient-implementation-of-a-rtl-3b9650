// tb_prsg_par: checks the parallel pseudorandom sequence generator against a
// bit-serial LFSR, for M = 1, M = 6 (default) and M = 30 (more outputs than
// register bits, where mask stack B rows are no longer plain selections).
// The generators advance on random cycles; on each advance cycle all M outputs
// must equal the next M bits of the serial reference. The register is also
// reseeded in mid-run. Both published polynomials are used. A fourth
// instance (M = 6, DELAY = 40) must give the reference sequence 40 samples
// ahead.
module tb_prsg_par;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic seed_load = 1'b0;
  logic advance = 1'b0;
  logic [24:0] seed = '0;
  logic [0:0]  out1;
  logic [5:0]  out6;
  logic [29:0] out30;
  logic [5:0]  out6d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prsg_par #(.M(1))                            u_m1  (.clk, .rst_n, .seed_load, .seed, .advance, .data_out(out1));
  prsg_par                                     u_m6  (.clk, .rst_n, .seed_load, .seed, .advance, .data_out(out6));
  prsg_par #(.M(30), .TAPS(25'h000_000F))      u_m30 (.clk, .rst_n, .seed_load, .seed, .advance, .data_out(out30));
  prsg_par #(.M(6), .DELAY(40))                u_m6d (.clk, .rst_n, .seed_load, .seed, .advance, .data_out(out6d));

  // Serial reference states.
  logic [24:0] r1, r6, r30;

  task automatic check_all();
    logic [24:0] s;
    logic [29:0] exp30;
    logic [5:0]  exp6;
    s = r1;
    checks++;
    if (out1[0] !== s[0]) begin failures++; $display("M=1 mismatch"); end
    s = r6;
    for (int i = 0; i < 6; i++) begin exp6[i] = s[0]; s = lfsr_step(s, 25'h9); end
    checks++;
    if (out6 !== exp6) begin failures++; $display("M=6 mismatch %h %h", out6, exp6); end
    s = r6;
    repeat (40) s = lfsr_step(s, 25'h9);
    for (int i = 0; i < 6; i++) begin exp6[i] = s[0]; s = lfsr_step(s, 25'h9); end
    checks++;
    if (out6d !== exp6) begin failures++; $display("M=6 DELAY=40 mismatch %h %h", out6d, exp6); end
    s = r30;
    for (int i = 0; i < 30; i++) begin exp30[i] = s[0]; s = lfsr_step(s, 25'hF); end
    checks++;
    if (out30 !== exp30) begin failures++; $display("M=30 mismatch %h %h", out30, exp30); end
  endtask

  task automatic step_ref();
    r1 = lfsr_step(r1, 25'h9);
    repeat (6)  r6  = lfsr_step(r6, 25'h9);
    repeat (30) r30 = lfsr_step(r30, 25'hF);
  endtask

  task automatic load(input logic [24:0] v);
    @(negedge clk);
    seed = v; seed_load = 1'b1; advance = 1'b1;   // load has priority
    @(negedge clk);
    seed_load = 1'b0; advance = 1'b0;
    r1 = v; r6 = v; r30 = v;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load(25'h1);
    for (int n = 0; n < 400; n++) begin
      if (n == 200) load(25'($urandom()) | 25'h100);
      @(negedge clk);
      advance = ($urandom_range(0, 3) != 0);
      #1 check_all();
      @(posedge clk);
      if (advance) step_ref();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
