// tb_coarse_counter: checks reset to zero, one count per clock and the
// wrap-around from all ones to zero.
`timescale 1ps / 1fs
module tb_coarse_counter;
  import tdc_pkg::*;
  logic clk = 0, rst_n = 0;
  coarse_t cnt;
  int checks = 0, failures = 0;

  coarse_counter dut (.clk, .rst_n, .count_o(cnt));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coarse_t exp;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (cnt !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1;
    exp = '0;
    for (int k = 0; k < 500; k++) begin
      @(posedge clk); #1; exp = exp + 1'b1;
      checks++;
      if (cnt !== exp) begin failures++; $display("FAIL count %0d: %0d", k, cnt); end
    end
    // Force near the top and watch the wrap.
    @(negedge clk);
    force dut.count_o = '1 - 2;
    @(negedge clk);
    release dut.count_o;
    begin
      bit seen_wrap = 0;
      coarse_t prev;
      prev = cnt;
      repeat (4) begin
        @(posedge clk); #1;
        if (prev == '1 && cnt == '0) seen_wrap = 1;
        prev = cnt;
      end
      checks++; if (!seen_wrap) begin failures++; $display("FAIL wrap not seen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
