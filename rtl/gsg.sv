// gsg: gold sequence generator with M output bits per clock (GSG_M).
//
// A gold sequence d(n) = x0(n) xor x1(n) is the modulo-2 sum of a preferred
// pair of maximal-length sequences. Each of the two is produced by a parallel
// pseudorandom sequence generator (prsg_par) that advances M samples per
// clock, and M two-input XOR gates combine their outputs, so
//   data_out[r] = d(Mn + r),  r = 0..M-1.
// With the default polynomials x^25+x^3+1 (upper) and x^25+x^3+x^2+x+1
// (lower) and M = 6 this is the 6-output, degree-25 generator; M = 1 gives the
// conventional one-bit generator and M = 2 and 4 the other published variants.
// DELAY0 and DELAY1 (default 0) select the relative phases of the two
// sequences through their forward mask stacks: data_out[r] =
// x0(Mn+DELAY0+r) xor x1(Mn+DELAY1+r). Port names follow the published block
// diagrams.
//
// Interface and timing:
//   srstb      asynchronous active-low reset (clears both registers).
//   seed_in    loads dataseed0 into the upper and dataseed1 into the lower
//              register at the rising edge of sclk (seed bit k = x(k)).
//   din_valid  marks the cycles in which data_out is taken; in each such cycle
//              both registers step M samples at the rising edge.
//   data_out   combinational from the registers; valid while din_valid is high.
// A run of N sequence bits therefore takes N/M cycles of din_valid.
// How seed_in and din_valid act on the registers, the bit order of the seeds
// and the reset behaviour are this design's own choices.
module gsg #(
  parameter int unsigned  K     = gsg_pkg::GSG_K,
  parameter int unsigned  M     = 6,
  parameter logic [K-1:0] TAPS0 = gsg_pkg::GSG_TAPS0,
  parameter logic [K-1:0] TAPS1 = gsg_pkg::GSG_TAPS1,
  parameter int unsigned  DELAY0 = 0,
  parameter int unsigned  DELAY1 = 0
) (
  input  logic         srstb,
  input  logic         sclk,
  input  logic         seed_in,
  input  logic         din_valid,
  input  logic [K-1:0] dataseed0,
  input  logic [K-1:0] dataseed1,
  output logic [M-1:0] data_out
);

  logic [M-1:0] x0, x1;

  prsg_par #(.K(K), .M(M), .DELAY(DELAY0), .TAPS(TAPS0)) u_upper (
    .clk      (sclk),
    .rst_n    (srstb),
    .seed_load(seed_in),
    .seed     (dataseed0),
    .advance  (din_valid),
    .data_out (x0)
  );

  prsg_par #(.K(K), .M(M), .DELAY(DELAY1), .TAPS(TAPS1)) u_lower (
    .clk      (sclk),
    .rst_n    (srstb),
    .seed_load(seed_in),
    .seed     (dataseed1),
    .advance  (din_valid),
    .data_out (x1)
  );

  assign data_out = x0 ^ x1;

endmodule
