// tdc_capture_reg: the row of D flip-flops that saves the carry-chain taps.
//
// On every rising edge of the system clock (the START of the measurement)
// all N_TAPS tap outputs of the delay line are written into flip-flops, and
// the coarse count current at that edge is saved next to them, so the saved
// vector and its coarse time always belong together. The registers are
// cleared by the synchronous active-low reset; this is a choice of this
// implementation (in an FPGA the capture flip-flops need no reset).
//
// Interface: tap_i (asynchronous to clk), coarse_i; vec_o and coarse_o hold
// the values saved at the latest clock edge. Latency: one clock.
// The tap inputs are asynchronous by nature; a flip-flop that samples a tap
// just as it changes may go metastable, which shows up as the bubbles the
// decoder must tolerate.
`timescale 1ps / 1fs
module tdc_capture_reg
  import tdc_pkg::*;
#(
  parameter int unsigned N_TAPS = WINDOW + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_TAPS-1:0] tap_i,
  input  coarse_t           coarse_i,
  output logic [N_TAPS-1:0] vec_o,
  output coarse_t           coarse_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vec_o    <= '0;
      coarse_o <= '0;
    end else begin
      vec_o    <= tap_i;
      coarse_o <= coarse_i;
    end
  end

endmodule
