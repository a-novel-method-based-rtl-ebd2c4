// coarse_counter: free-running count of system-clock periods.
//
// The carry chain resolves time only within one clock period; this counter
// supplies the number of the period. It is shared by all TDC channels of the
// device so that their timestamps share one time base. It counts up by one
// on every rising clock edge, wraps around at 2**COARSE_W and is cleared by
// the synchronous active-low reset. Time differences between channels are
// taken modulo 2**COARSE_W * CLK_PS (about 84 ms at the defaults).
//
// The document names the system clock as the START of every measurement but
// gives no counter; width and reset are choices of this implementation.
`timescale 1ps / 1fs
module coarse_counter
  import tdc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  output coarse_t count_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) count_o <= '0;
    else        count_o <= count_o + 1'b1;
  end

endmodule
