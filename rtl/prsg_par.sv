// prsg_par: pseudorandom sequence generator with M output bits per clock.
//
// A degree-K linear feedback shift register normally yields one bit c(n) per
// clock. Here the register holds the K-sample window
//   state[k] = c(Mn + k),  k = 0..K-1,
// and each clock jumps it M samples ahead at once, state <- A^M * state over
// GF(2), where A is the K-by-K companion matrix of the recurrence
//   c(n+K) = sum_k a_k c(n+k) (mod 2).
// Row i of A^M is the "mask" of register bits whose XOR gives the new bit i
// (mask stack A^M). The outputs c(Mn), ..., c(Mn+M-1) come from a second mask
// stack B whose row r is row 0 of A^r, i.e. the mask for a shift of r
// samples. A constant output delay DELAY (default 0) is obtained by using
// rows of A^(DELAY+r) instead, which moves the outputs to c(Mn+DELAY+r) with
// no extra registers; for DELAY > 0 the B rows become XOR masks. For
// M <= K and DELAY = 0 every B row selects a single register bit and every
// A^M row with i < K-M selects one bit too, so only the last M rows of A^M
// cost XOR gates. Both stacks are worked out at elaboration time from TAPS
// and M, so the generator needs no control logic, memory or switches at
// run time. The jump-by-A^M structure and the two mask stacks follow the
// published architecture.
//
// Interface and timing (this design's own choices):
//   seed_load  loads seed into the register (seed bit k = c(k)); it wins over
//              advance. The register is cleared by rst_n, and a cleared LFSR
//              stays at zero until it is seeded.
//   advance    steps the register M samples at the next rising edge.
//   data_out   combinational from the register: data_out[r] = c(Mn+DELAY+r) for
//              the current window, so the bits are valid in the cycle in which
//              advance is high and M new bits follow every clock.
module prsg_par #(
  parameter int unsigned     K    = gsg_pkg::GSG_K,
  parameter int unsigned     M    = 6,
  parameter int unsigned     DELAY = 0,
  parameter logic [K-1:0]    TAPS = gsg_pkg::GSG_TAPS0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic [K-1:0] seed,
  input  logic         advance,
  output logic [M-1:0] data_out
);

  typedef logic [K-1:0][K-1:0] mat_t;

  // One multiplication by the companion matrix: (A * p), row by row.
  function automatic mat_t mul_a(input mat_t p);
    mat_t q;
    for (int unsigned i = 0; i < K - 1; i++) q[i] = p[i+1];
    q[K-1] = '0;
    for (int unsigned j = 0; j < K; j++)
      if (TAPS[j]) q[K-1] = q[K-1] ^ p[j];
    return q;
  endfunction

  function automatic mat_t identity();
    mat_t p;
    for (int unsigned i = 0; i < K; i++) begin
      p[i]    = '0;
      p[i][i] = 1'b1;
    end
    return p;
  endfunction

  // Mask stack A^M (feedback path).
  function automatic mat_t mask_a();
    mat_t p = identity();
    for (int unsigned s = 0; s < M; s++) p = mul_a(p);
    return p;
  endfunction

  // Mask stack B (forward path): row r is row 0 of A^(DELAY+r).
  function automatic logic [M-1:0][K-1:0] mask_b();
    logic [M-1:0][K-1:0] b;
    mat_t p = identity();
    for (int unsigned s = 0; s < DELAY; s++) p = mul_a(p);
    for (int unsigned r = 0; r < M; r++) begin
      b[r] = p[0];
      p    = mul_a(p);
    end
    return b;
  endfunction

  localparam mat_t                MASK_A = mask_a();
  localparam logic [M-1:0][K-1:0] MASK_B = mask_b();

  logic [K-1:0] state, state_nxt;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) state_nxt[i] = ^(MASK_A[i] & state);
  end

  always_comb begin
    for (int unsigned r = 0; r < M; r++) data_out[r] = ^(MASK_B[r] & state);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= '0;
    else if (seed_load) state <= seed;
    else if (advance)   state <= state_nxt;
  end

  // A maximal-length sequence needs a nonzero seed.
  a_seed_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    seed_load |-> seed != '0);

endmodule
