// lvds_discriminator: behavioural model of an FPGA LVDS differential input
// buffer used as a voltage comparator. Not synthesizable logic: it stands for
// the analog input buffer of the FPGA.
//
// The output is 1 while the voltage on the positive input is above the one on
// the negative input and 0 otherwise, exactly as a differential receiver
// decides. The measured signal is applied to the positive input and a
// threshold (DAC level or constant voltage) to the negative one. The usable
// input range of such a buffer is roughly 0 V to 2 V, which is why the signal
// is level-shifted before it reaches the FPGA.
//
// Interface: vp, vn are voltages in volts (real); out is the logic decision.
// Timing: the decision follows the inputs after PROP_PS picoseconds. The
// buffer's own delay and any hysteresis are not known, so the delay is a
// parameter (default 0) and there is no hysteresis.
`timescale 1ps / 1fs
module lvds_discriminator #(
  parameter int unsigned PROP_PS = 0
) (
  input  real  vp,
  input  real  vn,
  output logic out
);

  initial out = 1'b0;

  always @(vp or vn) begin
    if (PROP_PS == 0) out = (vp > vn);
    else              out <= #(PROP_PS) (vp > vn);
  end

endmodule
