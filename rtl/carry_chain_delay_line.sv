// carry_chain_delay_line: behavioural model of the carry chain of an FPGA
// used as a tapped delay line. Not synthesizable logic: in an FPGA this is a
// chain of adder carry elements placed by constraints.
//
// The measured signal (STOP) enters the first delay element; the output of
// element j is tap[j], so tap[j] follows the input after (j+1)*TAP_PS. A
// transition therefore runs along the taps at one element per TAP_PS, and the
// capture flip-flops that sample all taps at a clock edge see a run of the
// new level followed by the old one (the thermometer code).
//
// Interface: din is the discriminator output; tap[N_TAPS-1:0] are the element
// outputs. Timing: transport delay of TAP_PS per element (default 15 ps).
// Every element has the same nominal delay; real chains differ from element
// to element, which is what a nonlinearity calibration corrects.
`timescale 1ps / 1fs
module carry_chain_delay_line #(
  parameter int unsigned N_TAPS = 336,
  parameter int unsigned TAP_PS = 15
) (
  input  logic              din,
  output logic [N_TAPS-1:0] tap
);

  initial tap = '0;

  always @(din) tap[0] <= #(TAP_PS) din;

  for (genvar j = 1; j < N_TAPS; j++) begin : g_elem
    always @(tap[j-1]) tap[j] <= #(TAP_PS) tap[j-1];
  end

endmodule
