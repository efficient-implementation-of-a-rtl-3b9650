// descrambler: one channel lane of the detector's descrambler.
//
// The symbol demapper delivers, per symbol, the scrambled bit LLRs of that
// symbol: 2 for QPSK, 4 for 16-QAM, 6 for 64-QAM. A gold sequence generator
// with as many parallel outputs as the symbol has bits supplies the matching
// sequence bits in the same clock, and a sign toggler negates each LLR whose
// sequence bit is 1. One whole symbol is thus descrambled per clock, with no
// buffer that pre-computes the sequence serially. A control-channel lane
// (DATA_CH = 0: PCICH, PDCCH) is fixed to QPSK and uses GSG_2; a data-channel
// lane (PDSCH0, PDSCH1) selects GSG_2, GSG_4 or GSG_6 by mod_order.
//
// Interface and timing (register stage and handshake are this design's own
// choices):
//   seed_in/dataseed0/dataseed1  start a codeword: load the generators.
//   in_valid, in_llr             one symbol of LLRs; in_llr[i] for i >= bps
//                                are ignored. The sequence steps by bps on
//                                each in_valid.
//   out_valid, out_llr           the descrambled symbol, one clock after
//                                in_valid (registered); unused LLRs are zero.
// Throughput is one symbol per clock; latency is one clock.
module descrambler
  import gsg_pkg::*;
#(
  parameter bit DATA_CH = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        seed_in,
  input  logic [GSG_K-1:0]            dataseed0,
  input  logic [GSG_K-1:0]            dataseed1,
  input  mod_order_e                  mod_order,
  input  logic                        in_valid,
  input  logic [MAX_BPS-1:0][LLR_W-1:0] in_llr,
  output logic                        out_valid,
  output logic [MAX_BPS-1:0][LLR_W-1:0] out_llr
);

  logic [MAX_BPS-1:0]              seq;
  logic [MAX_BPS-1:0][LLR_W-1:0]   masked, toggled;

  gsg_multirate #(.DATA_CH(DATA_CH)) u_gen (
    .srstb    (rst_n),
    .sclk     (clk),
    .seed_in  (seed_in),
    .din_valid(in_valid),
    .mod_order(mod_order),
    .dataseed0(dataseed0),
    .dataseed1(dataseed1),
    .data_out (seq)
  );

  // Zero the LLR positions the current modulation order does not use.
  always_comb begin
    int unsigned bps;
    bps = DATA_CH ? bits_per_symbol(mod_order) : 2;
    for (int unsigned i = 0; i < MAX_BPS; i++)
      masked[i] = (i < bps) ? in_llr[i] : '0;
  end

  sign_toggler #(.N(MAX_BPS), .W(LLR_W)) u_tog (
    .toggle (seq),
    .llr_in (masked),
    .llr_out(toggled)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_llr   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_llr <= toggled;
    end
  end

  // A codeword is seeded while no symbol is being descrambled.
  a_seed_idle: assert property (@(posedge clk) disable iff (!rst_n)
    seed_in |-> !in_valid);

endmodule
