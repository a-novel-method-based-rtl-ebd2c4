// tb_thermo_decoder: checks the decoding of saved tap vectors at the default
// window of 334 taps. Vectors are built from edge ages: bit j shows the
// signal (j+1) delay elements before the clock edge. Covered: empty
// vectors, single leading and trailing edges at every window position, a
// pulse wholly inside one window, edges that belong to the previous period
// (ignored), isolated wrong bits near the boundary, and a multi-bubble
// pattern of the kind metastability produces.
`timescale 1ps / 1fs
module tb_thermo_decoder;
  import tdc_pkg::*;
  localparam int W = WINDOW;
  localparam int N = WINDOW + 2;
  logic [N-1:0] vec;
  logic rv, fv;
  fine_t rf, ff;
  int checks = 0, failures = 0;

  thermo_decoder dut (.vec_i(vec), .rise_valid_o(rv), .rise_fine_o(rf),
                      .fall_valid_o(fv), .fall_fine_o(ff));

  // Signal level `a` elements back: start at `old`, edges at ages e1 > e2
  // (e2 = 0: only one edge).
  function automatic logic [N-1:0] mk(logic old, int e1, int e2);
    logic [N-1:0] v;
    for (int j = 0; j < N; j++) begin
      int a; a = j + 1;
      v[j] = old;
      if (a <= e1) v[j] = ~old;
      if (e2 > 0 && a <= e2) v[j] = old;
    end
    return v;
  endfunction

  task automatic expect_dec(bit erv, int erf, bit efv, int eff, string what);
    #1;
    checks++;
    if (rv !== erv || (erv && rf !== fine_t'(erf)) || fv !== efv || (efv && ff !== fine_t'(eff))) begin
      failures++;
      $display("FAIL %s: rise %b/%0d fall %b/%0d, expected %b/%0d %b/%0d",
               what, rv, rf, fv, ff, erv, erf, efv, eff);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec = '0;  expect_dec(0, 0, 0, 0, "all zero");
    vec = '1;  expect_dec(0, 0, 0, 0, "all one");
    // Every position of a single edge, both polarities.
    for (int f = 1; f <= W; f++) begin
      vec = mk(1'b0, f, 0); expect_dec(1, f, 0, 0, "single rise");
      vec = mk(1'b1, f, 0); expect_dec(0, 0, 1, f, "single fall");
    end
    // Edges from the previous period lie beyond the window.
    vec = mk(1'b0, W + 1, 0); expect_dec(0, 0, 0, 0, "old rise");
    vec = mk(1'b1, W + 1, 0); expect_dec(0, 0, 0, 0, "old fall");
    // Pulse inside the window: rose at age fr, fell at age ff (fr > ff+1).
    for (int k = 0; k < 300; k++) begin
      int fr, fa;
      fa = 1 + $urandom_range(W - 4);
      fr = fa + 2 + $urandom_range(W - fa - 2);
      vec = mk(1'b0, fr, fa); expect_dec(1, fr, 1, fa, "pulse");
      vec = mk(1'b1, fr, fa); expect_dec(1, fa, 1, fr, "gap");
    end
    // An isolated wrong bit three or more places from the boundary is
    // removed exactly; one right beside the boundary may move it by one.
    for (int k = 0; k < 300; k++) begin
      int f, b;
      f = 8 + $urandom_range(W - 16);
      vec = mk(1'b0, f, 0);
      b = $urandom_range(1) ? f + 2 + $urandom_range(3) : f - 4 - $urandom_range(3);
      vec[b] = ~vec[b];
      expect_dec(1, f, 0, 0, "distant bubble");
      vec = mk(1'b0, f, 0);
      b = $urandom_range(1) ? f + 1 : f - 2;
      vec[b] = ~vec[b];
      #1;
      checks++;
      if (!(rv && !fv && int'(rf) >= f - 1 && int'(rf) <= f + 1)) begin
        failures++;
        $display("FAIL near bubble: rise %b/%0d fall %b, edge at %0d", rv, rf, fv, f);
      end
    end
    // Multi-bubble pattern (older side to newer side): 0000000 1 00 1 0 1111111
    // i.e. around the boundary at age 100: taps 101..107 = 0, 100 = 1, 99,98 = 0,
    // 97 = 1, 96 = 0, 95..0 = 1. Majority filtering leaves one clean boundary.
    vec = mk(1'b0, 100, 0);
    vec[99] = 1'b1; vec[98] = 1'b0; vec[97] = 1'b0; vec[96] = 1'b1; vec[95] = 1'b0;
    #1;
    checks++;
    if (!(rv && !fv && rf >= 95 && rf <= 101)) begin
      failures++;
      $display("FAIL multi-bubble: rise %b/%0d fall %b", rv, rf, fv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
