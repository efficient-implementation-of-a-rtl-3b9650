// sign_toggler: descrambles bit LLRs by toggling their signs.
//
// Scrambling XORs each coded bit with a gold sequence bit. On the receive
// side the same operation, done on soft values, is a sign flip: a bit LLR whose
// gold sequence bit is 1 is negated, the others pass unchanged. N LLRs are
// handled in parallel, one per gold sequence bit, so a symbol's worth of LLRs
// is descrambled at once.
//
// Purely combinational. The LLRs are two's complement; negating the most
// negative value saturates to the most positive one, so that the result stays
// representable (this saturation is this design's own choice).
module sign_toggler #(
  parameter int unsigned N = gsg_pkg::MAX_BPS,
  parameter int unsigned W = gsg_pkg::LLR_W
) (
  input  logic [N-1:0]                toggle,
  input  logic [N-1:0][W-1:0]         llr_in,
  output logic [N-1:0][W-1:0]         llr_out
);

  localparam logic [W-1:0] MOST_NEG = {1'b1, {(W-1){1'b0}}};
  localparam logic [W-1:0] MOST_POS = {1'b0, {(W-1){1'b1}}};

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      if (!toggle[i])                 llr_out[i] = llr_in[i];
      else if (llr_in[i] == MOST_NEG) llr_out[i] = MOST_POS;
      else                            llr_out[i] = -llr_in[i];
    end
  end

endmodule
