// tb_scrambler: checks the SIC scrambler for QPSK, 16-QAM and 64-QAM codewords
// against a bit-serial gold sequence model. Random bits arrive with random
// gaps; each symbol must come out one clock later XORed with the next bps
// sequence bits, with unused bit positions zero.
module tb_scrambler;
  import tb_ref_pkg::*;
  import gsg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic seed_in = 1'b0;
  logic [24:0] dataseed0 = '0, dataseed1 = '0;
  mod_order_e mod_order = MOD_QPSK;
  logic in_valid = 1'b0;
  logic [5:0] in_bits = '0;
  logic out_valid;
  logic [5:0] out_bits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scrambler dut (.clk, .rst_n, .seed_in, .dataseed0, .dataseed1, .mod_order,
                 .in_valid, .in_bits, .out_valid, .out_bits);

  gold_ref_t r;

  task automatic codeword(mod_order_e m, int nsym);
    logic [24:0] a, b;
    logic [5:0] e;
    logic was_valid;
    @(negedge clk);
    a = 25'($urandom()) | 25'h4;
    b = 25'($urandom()) | 25'h4;
    mod_order = m; dataseed0 = a; dataseed1 = b; seed_in = 1'b1;
    @(negedge clk);
    seed_in = 1'b0;
    r.seed(a, b);
    for (int s = 0; s < nsym; ) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_bits = 6'($urandom());
      e = '0;
      if (in_valid) begin
        for (int i = 0; i < bits_per_symbol(m); i++) e[i] = in_bits[i] ^ r.next_bit();
        s++;
      end
      was_valid = in_valid;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (out_valid !== was_valid) begin failures++; $display("latency wrong"); end
      if (was_valid) begin
        checks++;
        if (out_bits !== e) begin
          failures++;
          if (failures < 10) $display("mode %0d got %b exp %b", m, out_bits, e);
        end
      end
    end
  endtask

  initial begin
    r = new(25'h9, 25'hF);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    codeword(MOD_QPSK, 200);
    codeword(MOD_16QAM, 200);
    codeword(MOD_64QAM, 200);
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
