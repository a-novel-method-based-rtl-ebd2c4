// tot_meter: time over threshold of one discriminator channel.
//
// Each threshold channel reports the leading edge (signal rises above the
// threshold) and the trailing edge (it falls below again). The interval
// between them grows with the pulse amplitude and, taken over several
// thresholds, with the pulse charge. This block pairs each trailing edge
// with the leading edge before it and outputs the interval in picoseconds,
// using the nominal (uncalibrated) element delay:
//   tot = (coarse_f - coarse_r) * CLK_PS - (fine_f - fine_r) * TAP_PS,
// with CLK_PS = WIN * TAP_PS. The result saturates at 2**TOT_W - 1 ps.
//
// Pairing rules (choices of this implementation): a trailing edge without a
// pending leading edge is dropped; a new leading edge replaces a pending
// one. When both edges come from the same saved vector, the one with the
// larger fine code happened first.
//
// Interface: the rise/fall hit strobes of a tdc_channel. Outputs: a one-cycle
// tot_valid_o with tot_ps_o and the leading-edge timestamp lead_ts_o.
// Latency: one clock after the trailing-edge hit.
`timescale 1ps / 1fs
module tot_meter
  import tdc_pkg::*;
#(
  parameter int unsigned WIN        = WINDOW,
  parameter int unsigned TAP_DELAY  = TAP_PS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rise_valid_i,
  input  tstamp_t            rise_ts_i,
  input  logic               fall_valid_i,
  input  tstamp_t            fall_ts_i,
  output logic               tot_valid_o,
  output logic [TOT_W-1:0]   tot_ps_o,
  output tstamp_t            lead_ts_o
);

  localparam longint unsigned CLK_DELAY = longint'(WIN) * longint'(TAP_DELAY);
  localparam longint          TOT_MAX   = (longint'(1) << TOT_W) - 1;

  logic    pending_q;
  tstamp_t lead_q;

  // Interval from leading edge a to trailing edge b, saturated.
  function automatic logic [TOT_W-1:0] interval(tstamp_t a, tstamp_t b);
    coarse_t dc;
    longint  d;
    dc = b.coarse - a.coarse;
    d  = longint'(dc) * longint'(CLK_DELAY)
       - (longint'(b.fine) - longint'(a.fine)) * longint'(TAP_DELAY);
    if (d < 0)            return '0;
    else if (d > TOT_MAX) return TOT_W'(TOT_MAX);
    else                  return TOT_W'(d);
  endfunction

  // The trailing edge belongs to a leading edge of the same vector when the
  // leading edge is older, i.e. has the larger fine code.
  logic same_vector_pulse;
  assign same_vector_pulse = rise_valid_i && fall_valid_i &&
                             (rise_ts_i.fine > fall_ts_i.fine);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending_q   <= 1'b0;
      lead_q      <= '0;
      tot_valid_o <= 1'b0;
      tot_ps_o    <= '0;
      lead_ts_o   <= '0;
    end else begin
      tot_valid_o <= 1'b0;
      if (same_vector_pulse) begin
        tot_valid_o <= 1'b1;
        tot_ps_o    <= interval(rise_ts_i, fall_ts_i);
        lead_ts_o   <= rise_ts_i;
        pending_q   <= 1'b0;
      end else begin
        if (fall_valid_i && pending_q) begin
          tot_valid_o <= 1'b1;
          tot_ps_o    <= interval(lead_q, fall_ts_i);
          lead_ts_o   <= lead_q;
        end
        if (fall_valid_i) pending_q <= 1'b0;
        if (rise_valid_i) begin
          pending_q <= 1'b1;
          lead_q    <= rise_ts_i;
        end
      end
    end
  end

endmodule
