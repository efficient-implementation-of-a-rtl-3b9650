// tb_ref_pkg: bit-serial reference models used by the testbenches.
//
// lfsr_step advances a degree-25 Fibonacci LFSR by one sample, straight from
// the recurrence c(n+25) = sum_k a_k c(n+k) mod 2, with state[k] = c(n+k).
// gold_ref_t keeps the two register states of a gold sequence generator and
// returns one bit d(n) = x0(n) xor x1(n) per call, one sample at a time, so it
// shares nothing with the matrix-based RTL.
package tb_ref_pkg;

  localparam int unsigned K = 25;

  function automatic logic [K-1:0] lfsr_step(input logic [K-1:0] s,
                                             input logic [K-1:0] taps);
    logic fb;
    fb = 1'b0;
    for (int k = 0; k < K; k++) if (taps[k]) fb ^= s[k];
    return {fb, s[K-1:1]};
  endfunction

  class gold_ref_t;
    logic [K-1:0] s0, s1, t0, t1;

    function new(logic [K-1:0] taps0, logic [K-1:0] taps1);
      t0 = taps0;
      t1 = taps1;
      s0 = '0;
      s1 = '0;
    endfunction

    function void seed(logic [K-1:0] a, logic [K-1:0] b);
      s0 = a;
      s1 = b;
    endfunction

    // Next bit of the upper sequence alone.
    function logic next_x0();
      logic b = s0[0];
      s0 = lfsr_step(s0, t0);
      return b;
    endfunction

    // Next gold sequence bit.
    function logic next_bit();
      logic b = s0[0] ^ s1[0];
      s0 = lfsr_step(s0, t0);
      s1 = lfsr_step(s1, t1);
      return b;
    endfunction
  endclass

endpackage
