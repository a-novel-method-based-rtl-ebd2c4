// tb_lvds_discriminator: checks the LVDS comparator model. Drives voltage
// pairs on both inputs and checks that the output is 1 exactly when the
// positive input is higher, including the threshold levels used in the
// measurements (0.4 V to 1.6 V) and a slow ramp crossing a fixed level.
`timescale 1ps / 1fs
module tb_lvds_discriminator;
  real  vp, vn;
  logic out;
  int   checks = 0, failures = 0;

  lvds_discriminator dut (.vp, .vn, .out);

  task automatic expect_out(logic exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: vp=%f vn=%f out=%b expected %b", what, vp, vn, out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vp = 0.0; vn = 0.5; #10;
    expect_out(1'b0, "below");
    vp = 0.6; #10;
    expect_out(1'b1, "above");
    // Threshold levels of the measurement table, signal just above/below.
    for (int k = 1; k <= 4; k++) begin
      vn = 0.4 * k;
      vp = vn - 0.001; #10; expect_out(1'b0, "just below level");
      vp = vn + 0.001; #10; expect_out(1'b1, "just above level");
    end
    // Ramp 0 -> 2 V in 2.5 ns against 1.0 V: must switch at 1250 ps.
    vn = 1.0;
    for (int t = 0; t <= 2500; t += 5) begin
      vp = 2.0 * t / 2500.0;
      #1;
      expect_out((t > 1250) ? 1'b1 : 1'b0, "ramp");
      #4;
    end
    // Random pairs.
    for (int k = 0; k < 200; k++) begin
      vp = $urandom_range(2000) / 1000.0;
      vn = $urandom_range(2000) / 1000.0;
      #10;
      expect_out((vp > vn) ? 1'b1 : 1'b0, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
