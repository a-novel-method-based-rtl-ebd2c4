// tb_tdc_capture_reg: checks that the capture flip-flops save the tap vector
// and the coarse count at each rising clock edge, hold them for a full
// cycle, and clear on reset.
`timescale 1ps / 1fs
module tb_tdc_capture_reg;
  import tdc_pkg::*;
  localparam int N = 336;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] tap, vec;
  coarse_t coarse_i, coarse_o;
  int checks = 0, failures = 0;

  tdc_capture_reg #(.N_TAPS(N)) dut (.clk, .rst_n, .tap_i(tap), .coarse_i, .vec_o(vec), .coarse_o);

  always #2505 clk = ~clk;

  function automatic logic [N-1:0] rnd_vec();
    logic [N-1:0] v;
    for (int j = 0; j < N; j += 32) v[j +: 32] = 32'($urandom);
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_v;
    coarse_t      exp_c;
    tap = rnd_vec(); coarse_i = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (vec !== '0 || coarse_o !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      exp_v = rnd_vec(); exp_c = coarse_t'($urandom);
      tap = exp_v; coarse_i = exp_c;
      @(posedge clk); #1;
      tap = rnd_vec(); coarse_i = coarse_t'($urandom);  // changes after the edge are not saved
      #1000;
      checks++;
      if (vec !== exp_v || coarse_o !== exp_c) begin
        failures++; $display("FAIL capture %0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
