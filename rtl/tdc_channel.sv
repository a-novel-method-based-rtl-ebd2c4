// tdc_channel: the digital part of one carry-chain TDC channel.
//
// The taps of the channel's delay line are saved at every rising clock edge
// (tdc_capture_reg), the saved vector is decoded into at most one leading
// and one trailing edge position (thermo_decoder), and each edge found is
// registered as a hit carrying the coarse count saved with the vector and
// the fine code. The edge happened less than one element delay before
//   t = coarse * CLK_PS - fine * TAP_PS.
//
// Interface: tap_i from the delay line, coarse_i from the shared
// coarse_counter. Outputs rise_* and fall_* are one-cycle valid strobes with
// their timestamps; both may fire in the same cycle when a pulse shorter
// than one clock period lies wholly inside one window.
// Latency: a hit appears two clock edges after the edge that saved it.
`timescale 1ps / 1fs
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned WIN    = WINDOW,
  parameter int unsigned N_TAPS = WINDOW + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_TAPS-1:0] tap_i,
  input  coarse_t           coarse_i,
  output logic              rise_valid_o,
  output tstamp_t           rise_ts_o,
  output logic              fall_valid_o,
  output tstamp_t           fall_ts_o
);

  logic [N_TAPS-1:0] vec;
  coarse_t           vec_coarse;
  logic              rv, fv;
  fine_t             rf, ff;

  tdc_capture_reg #(.N_TAPS(N_TAPS)) u_capture (
    .clk, .rst_n, .tap_i, .coarse_i,
    .vec_o(vec), .coarse_o(vec_coarse)
  );

  thermo_decoder #(.WIN(WIN), .N_TAPS(N_TAPS)) u_decode (
    .vec_i(vec),
    .rise_valid_o(rv), .rise_fine_o(rf),
    .fall_valid_o(fv), .fall_fine_o(ff)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rise_valid_o <= 1'b0;
      fall_valid_o <= 1'b0;
      rise_ts_o    <= '0;
      fall_ts_o    <= '0;
    end else begin
      rise_valid_o <= rv;
      fall_valid_o <= fv;
      rise_ts_o    <= '{coarse: vec_coarse, fine: rf};
      fall_ts_o    <= '{coarse: vec_coarse, fine: ff};
    end
  end

endmodule
