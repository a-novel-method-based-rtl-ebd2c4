// pet_adc_tdc_top: FPGA-only sampler of fast PET detector pulses in the
// voltage domain.
//
// The detector pulse, split into N_THRESH copies and shifted to the input
// range of the FPGA, enters N_THRESH LVDS input buffers used as comparators
// against N_THRESH threshold voltages (A, B, C, D from low to high at the
// default of four). Every comparator output runs through its own carry-chain
// delay line, and a TDC channel timestamps each crossing: the leading edge
// when the pulse rises through the threshold and the trailing edge when it
// falls back. The set of crossing times samples the pulse shape at known
// voltages, for an offline fit of the pulse start; the time over each
// threshold (tot_meter) measures the charge. One more LVDS buffer and TDC
// channel measure a reference signal, so the board can be synchronised with
// others and the crossing times can be taken relative to a known instant.
// All hits leave through one readout stream.
//
// Channel numbers: 0 .. N_THRESH-1 are the threshold channels in the order
// of vth_i, channel N_THRESH is the reference. Timestamps are in coarse
// clock periods and fine delay elements (see tdc_pkg); the system clock must
// be WIN * TAP_DELAY ps long (5010 ps at the defaults, about 200 MHz).
//
// Interface:
//   sig_i          measured pulse after splitting and level shift, volts
//   vth_i[k]       threshold voltage of channel k from the DAC, volts
//   ref_p_i/ref_n_i differential reference signal, volts
//   hit_*          merged hit stream with valid/ready handshake
//   lost_o         hits dropped at full readout FIFOs
//   tot_*[k]       time over threshold of channel k, in ps, with its
//                  leading-edge timestamp
// Latency: a hit reaches hit_o three clock edges after the clock edge whose
// saved tap vector contains it, if the stream is not back-pressured.
//
// The comparators and delay lines are behavioural models of FPGA resources
// (analog buffers and placed carry chains); everything else is synthesizable.
// Four thresholds, the LVDS comparators, the ~15 ps carry-chain elements and
// the reference channel follow the document; the clock period, widths,
// bubble filter, readout FIFOs and pairing rules are this design's choices.
`timescale 1ps / 1fs
module pet_adc_tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned N_THRESH   = 4,
  parameter int unsigned WIN        = WINDOW,
  parameter int unsigned TAP_DELAY  = TAP_PS,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  real                       sig_i,
  input  real                       vth_i [N_THRESH],
  input  real                       ref_p_i,
  input  real                       ref_n_i,
  output logic                      hit_valid_o,
  input  logic                      hit_ready_i,
  output hit_t                      hit_o,
  output logic [15:0]               lost_o,
  output logic    [N_THRESH-1:0]    tot_valid_o,
  output logic    [N_THRESH-1:0][TOT_W-1:0] tot_ps_o,
  output tstamp_t [N_THRESH-1:0]    lead_ts_o
);

  localparam int unsigned N_CH   = N_THRESH + 1;
  localparam int unsigned N_TAPS = WIN + 2;

  coarse_t coarse;
  logic    [N_CH-1:0] disc;
  logic    [N_CH-1:0] rise_valid, fall_valid;
  tstamp_t [N_CH-1:0] rise_ts, fall_ts;

  coarse_counter u_coarse (.clk, .rst_n, .count_o(coarse));

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [N_TAPS-1:0] taps;

    if (c < N_THRESH) begin : g_thr
      lvds_discriminator u_disc (.vp(sig_i), .vn(vth_i[c]), .out(disc[c]));
    end else begin : g_ref
      lvds_discriminator u_disc (.vp(ref_p_i), .vn(ref_n_i), .out(disc[c]));
    end

    carry_chain_delay_line #(.N_TAPS(N_TAPS), .TAP_PS(TAP_DELAY)) u_chain (
      .din(disc[c]), .tap(taps)
    );

    tdc_channel #(.WIN(WIN), .N_TAPS(N_TAPS)) u_tdc (
      .clk, .rst_n, .tap_i(taps), .coarse_i(coarse),
      .rise_valid_o(rise_valid[c]), .rise_ts_o(rise_ts[c]),
      .fall_valid_o(fall_valid[c]), .fall_ts_o(fall_ts[c])
    );

    if (c < N_THRESH) begin : g_tot
      tot_meter #(.WIN(WIN), .TAP_DELAY(TAP_DELAY)) u_tot (
        .clk, .rst_n,
        .rise_valid_i(rise_valid[c]), .rise_ts_i(rise_ts[c]),
        .fall_valid_i(fall_valid[c]), .fall_ts_i(fall_ts[c]),
        .tot_valid_o(tot_valid_o[c]), .tot_ps_o(tot_ps_o[c]),
        .lead_ts_o(lead_ts_o[c])
      );
    end
  end

  hit_readout #(.N_CH(N_CH), .FIFO_DEPTH(FIFO_DEPTH)) u_readout (
    .clk, .rst_n,
    .rise_valid_i(rise_valid), .rise_ts_i(rise_ts),
    .fall_valid_i(fall_valid), .fall_ts_i(fall_ts),
    .hit_valid_o, .hit_ready_i, .hit_o, .lost_o
  );

endmodule
