// tb_carry_chain_delay_line: checks the delay-line model. A rising and then
// a falling step is sent in; at a series of observation times the tap
// vector must show the new level on exactly the taps whose delay
// (j+1) * 15 ps has elapsed, i.e. the thermometer code of Figure-1 type
// "111...1000...0".
`timescale 1ps / 1fs
module tb_carry_chain_delay_line;
  localparam int N = 336;
  localparam int D = 15;
  logic         din;
  logic [N-1:0] tap;
  int checks = 0, failures = 0;

  carry_chain_delay_line #(.N_TAPS(N), .TAP_PS(D)) dut (.din, .tap);

  // Expected taps at age `a` ps after a step from `old` to `nw`.
  function automatic logic [N-1:0] expect_vec(int a, logic old, logic nw);
    logic [N-1:0] v;
    for (int j = 0; j < N; j++) v[j] = ((j + 1) * D <= a) ? nw : old;
    return v;
  endfunction

  task automatic probe(int a, logic old, logic nw);
    checks++;
    if (tap !== expect_vec(a, old, nw)) begin
      failures++;
      $display("FAIL at age %0d: ones=%0d", a, $countones(tap));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    din = 1'b0;
    #10000;
    checks++;
    if (tap !== '0) begin failures++; $display("FAIL not settled low"); end
    din = 1'b1;
    a = 0;
    for (int k = 0; k < 60; k++) begin
      int step;
      step = 7 + $urandom_range(100);
      #(step); a += step;
      if (a % D == 0) begin #1; a += 1; end  // not at the instant a tap switches
      probe(a, 1'b0, 1'b1);
    end
    #10000;
    din = 1'b0;
    a = 0;
    for (int k = 0; k < 60; k++) begin
      int step;
      step = 7 + $urandom_range(100);
      #(step); a += step;
      if (a % D == 0) begin #1; a += 1; end  // not at the instant a tap switches
      probe(a, 1'b1, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
