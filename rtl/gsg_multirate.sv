// gsg_multirate: gold sequence source for a channel whose modulation order can
// be QPSK, 16-QAM or 64-QAM.
//
// A data channel needs 2, 4 or 6 sequence bits per symbol. One gold sequence
// generator is provided per rate (GSG_2, GSG_4 and GSG_6), as the published
// scheme assigns GSG_2, GSG_4 and GSG_6 to the three modulation orders. All
// three are seeded together by seed_in; only the one selected by mod_order is
// stepped by din_valid, and its bits appear on data_out[0 .. bps-1] while
// the upper bits are zero. For a control channel (DATA_CH = 0) only GSG_2
// exists and mod_order is ignored.
//
// Timing as gsg: data_out is combinational from the generator registers and
// valid in the cycle din_valid is high. mod_order must stay constant between a
// seed_in and the end of the codeword; keeping the three generators separate
// rather than sharing one register is this design's own choice.
module gsg_multirate
  import gsg_pkg::*;
#(
  parameter bit DATA_CH = 1'b1
) (
  input  logic                 srstb,
  input  logic                 sclk,
  input  logic                 seed_in,
  input  logic                 din_valid,
  input  mod_order_e           mod_order,
  input  logic [GSG_K-1:0]     dataseed0,
  input  logic [GSG_K-1:0]     dataseed1,
  output logic [MAX_BPS-1:0]   data_out
);

  logic [1:0] d2;

  if (DATA_CH) begin : g_data
    logic [3:0] d4;
    logic [5:0] d6;

    gsg #(.M(2)) u_gsg2 (
      .srstb, .sclk, .seed_in, .dataseed0, .dataseed1,
      .din_valid(din_valid && mod_order == MOD_QPSK),
      .data_out (d2)
    );

    gsg #(.M(4)) u_gsg4 (
      .srstb, .sclk, .seed_in, .dataseed0, .dataseed1,
      .din_valid(din_valid && mod_order == MOD_16QAM),
      .data_out (d4)
    );

    gsg #(.M(6)) u_gsg6 (
      .srstb, .sclk, .seed_in, .dataseed0, .dataseed1,
      .din_valid(din_valid && mod_order == MOD_64QAM),
      .data_out (d6)
    );

    always_comb begin
      case (mod_order)
        MOD_QPSK:  data_out = {4'b0, d2};
        MOD_16QAM: data_out = {2'b0, d4};
        default:   data_out = d6;
      endcase
    end

    a_mod_known: assert property (@(posedge sclk) disable iff (!srstb)
      din_valid |-> mod_order inside {MOD_QPSK, MOD_16QAM, MOD_64QAM});
  end else begin : g_ctrl
    gsg #(.M(2)) u_gsg2 (
      .srstb, .sclk, .seed_in, .dataseed0, .dataseed1,
      .din_valid,
      .data_out (d2)
    );

    assign data_out = {{(MAX_BPS-2){1'b0}}, d2};
  end

endmodule
