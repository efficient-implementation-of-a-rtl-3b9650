// scrambler: scrambling stage of the symbol encoder on the SIC feedback path.
//
// The decoded bits of the first codeword are re-encoded so that their
// interference can be cancelled; after interleaving they are scrambled before
// being mapped back to symbols. Scrambling XORs each bit with the gold
// sequence; the generator emits as many bits per clock as the symbol mapper
// takes per symbol (2, 4 or 6), so one symbol's bits are scrambled per clock.
// The feedback path is only named in the published design; the bitwise XOR
// with a parallel gold sequence generator and the handshake below are this
// design's own choices.
//
// Interface and timing:
//   seed_in/dataseed0/dataseed1  start a codeword.
//   in_valid, in_bits            one symbol's interleaved bits, bit 0 first;
//                                bits at and above bps are ignored.
//   out_valid, out_bits          scrambled bits one clock later; unused bits 0.
module scrambler
  import gsg_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 seed_in,
  input  logic [GSG_K-1:0]     dataseed0,
  input  logic [GSG_K-1:0]     dataseed1,
  input  mod_order_e           mod_order,
  input  logic                 in_valid,
  input  logic [MAX_BPS-1:0]   in_bits,
  output logic                 out_valid,
  output logic [MAX_BPS-1:0]   out_bits
);

  logic [MAX_BPS-1:0] seq;
  logic [MAX_BPS-1:0] used;

  gsg_multirate #(.DATA_CH(1'b1)) u_gen (
    .srstb    (rst_n),
    .sclk     (clk),
    .seed_in  (seed_in),
    .din_valid(in_valid),
    .mod_order(mod_order),
    .dataseed0(dataseed0),
    .dataseed1(dataseed1),
    .data_out (seq)
  );

  always_comb begin
    for (int unsigned i = 0; i < MAX_BPS; i++)
      used[i] = (i < bits_per_symbol(mod_order));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bits <= (in_bits ^ seq) & used;
    end
  end

  a_seed_idle: assert property (@(posedge clk) disable iff (!rst_n)
    seed_in |-> !in_valid);

endmodule
