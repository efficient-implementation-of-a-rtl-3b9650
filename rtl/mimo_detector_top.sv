// mimo_detector_top: the descrambling and SIC re-scrambling logic of a 2x2
// MIMO detector for an LTE-style receiver.
//
// The detector turns lattice points into bit LLRs for four physical channels
// and descrambles them before they reach the channel decoder. Descrambling
// usually forces the LLRs into a serial stream, one gold sequence bit per
// clock; here each channel has a gold sequence generator with as many
// parallel outputs as its symbols carry bits, so a whole symbol is
// descrambled per clock:
//   channel 0  PCICH   QPSK only                 GSG_2
//   channel 1  PDCCH   QPSK only                 GSG_2
//   channel 2  PDSCH0  QPSK / 16-QAM / 64-QAM    GSG_2 / GSG_4 / GSG_6
//   channel 3  PDSCH1  QPSK / 16-QAM / 64-QAM    GSG_2 / GSG_4 / GSG_6
// The symbol encoder on the successive interference cancellation (SIC)
// feedback path has a scrambler, also built on parallel generators.
//
// The lattice decoder, the symbol demapper, the turbo encoder, rate matcher,
// block interleaver and symbol mapper are not part of this RTL: the demapper
// outputs (dm_*) enter as ports, the descrambled LLRs (llr_*) leave towards
// the channel decoder, and the scrambler takes its bits from the interleaver
// (enc_*) and hands them to the symbol mapper (scr_*).
//
// All lanes use the same 6-LLR bus, so LLR positions 2..5 of the two control
// lanes are constant zero.
// Timing: each lane and the scrambler has one clock of latency and accepts one
// symbol per clock. Seeds are loaded per channel by seed_in[ch]. Channel order
// on the array ports, the seed ports and the handshakes are this design's
// own choices.
module mimo_detector_top
  import gsg_pkg::*;
(
  input  logic                                  sclk,
  input  logic                                  srstb,
  // Per-channel gold sequence seeds (0 PCICH, 1 PDCCH, 2 PDSCH0, 3 PDSCH1).
  input  logic [3:0]                            seed_in,
  input  logic [3:0][GSG_K-1:0]                 dataseed0,
  input  logic [3:0][GSG_K-1:0]                 dataseed1,
  // Modulation orders of PDSCH0 and PDSCH1.
  input  mod_order_e [1:0]                      pdsch_mod,
  // Scrambled bit LLRs from the symbol demapper, one symbol per channel.
  input  logic [3:0]                            dm_valid,
  input  logic [3:0][MAX_BPS-1:0][LLR_W-1:0]    dm_llr,
  // Descrambled bit LLRs towards the channel decoder.
  output logic [3:0]                            llr_valid,
  output logic [3:0][MAX_BPS-1:0][LLR_W-1:0]    llr_out,
  // SIC symbol encoder: interleaved bits in, scrambled bits to the mapper.
  input  logic                                  enc_seed_in,
  input  logic [GSG_K-1:0]                      enc_dataseed0,
  input  logic [GSG_K-1:0]                      enc_dataseed1,
  input  mod_order_e                            enc_mod,
  input  logic                                  enc_valid,
  input  logic [MAX_BPS-1:0]                    enc_bits,
  output logic                                  scr_valid,
  output logic [MAX_BPS-1:0]                    scr_bits
);

  for (genvar ch = 0; ch < 4; ch++) begin : g_lane
    localparam bit IS_DATA = (ch >= 2);

    descrambler #(.DATA_CH(IS_DATA)) u_desc (
      .clk      (sclk),
      .rst_n    (srstb),
      .seed_in  (seed_in[ch]),
      .dataseed0(dataseed0[ch]),
      .dataseed1(dataseed1[ch]),
      .mod_order(IS_DATA ? pdsch_mod[ch-2] : MOD_QPSK),
      .in_valid (dm_valid[ch]),
      .in_llr   (dm_llr[ch]),
      .out_valid(llr_valid[ch]),
      .out_llr  (llr_out[ch])
    );
  end

  scrambler u_scr (
    .clk      (sclk),
    .rst_n    (srstb),
    .seed_in  (enc_seed_in),
    .dataseed0(enc_dataseed0),
    .dataseed1(enc_dataseed1),
    .mod_order(enc_mod),
    .in_valid (enc_valid),
    .in_bits  (enc_bits),
    .out_valid(scr_valid),
    .out_bits (scr_bits)
  );

endmodule
