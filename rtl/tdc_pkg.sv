// tdc_pkg: types and constants shared by the carry-chain TDC and its readout.
//
// A timestamp is a coarse count of system-clock periods plus a fine count of
// carry-chain delay elements. At the clock edge that saved the tap vector the
// edge had run through `fine` delay elements but not through the next one,
// so in nominal units
//   coarse * CLK_PS - (fine + 1) * TAP_PS < t_edge <= coarse * CLK_PS - fine * TAP_PS
// (picoseconds, with `coarse` the count saved at that clock edge), where CLK_PS = WINDOW * TAP_PS: the delay line is taken to be calibrated so
// that WINDOW taps span exactly one clock period. The 15 ps element delay is
// the figure the design is built around; the widths below are choices of this
// implementation.
`timescale 1ps / 1fs
package tdc_pkg;

  // Nominal delay of one carry-chain element, in ps.
  localparam int unsigned TAP_PS   = 15;
  // Default number of taps searched per clock period (334 * 15 ps = 5010 ps,
  // a system clock of about 200 MHz).
  localparam int unsigned WINDOW   = 334;

  localparam int unsigned COARSE_W = 24;  // coarse counter width
  localparam int unsigned FINE_W   = 9;   // fine code width, WINDOW <= 511
  localparam int unsigned CH_W     = 3;   // channel number width
  localparam int unsigned TOT_W    = 20;  // time-over-threshold width, ps

  typedef logic [COARSE_W-1:0] coarse_t;
  typedef logic [FINE_W-1:0]   fine_t;

  // Edge polarity of a hit, as seen on the discriminator output.
  typedef enum logic {
    EDGE_FALLING = 1'b0,  // trailing edge: signal drops below threshold
    EDGE_RISING  = 1'b1   // leading edge: signal rises above threshold
  } edge_e;

  // One timestamp of one edge.
  typedef struct packed {
    coarse_t coarse;
    fine_t   fine;
  } tstamp_t;

  // One hit as delivered by the readout.
  typedef struct packed {
    logic [CH_W-1:0] channel;
    edge_e           pol;
    tstamp_t         ts;
  } hit_t;

endpackage
