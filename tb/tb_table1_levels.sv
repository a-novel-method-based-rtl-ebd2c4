// tb_table1_levels: the discriminator-plus-TDC measurement of Figure 4 type
// run on the full design at its default parameters.
//
// A voltage ramp from 0 V to 2 V over 2.5 ns is applied to the measured
// input while the four thresholds are held at 400, 800, 1200 and 1600 mV;
// a reference signal rises at the start of the ramp. For each threshold the
// time from the reference edge to the threshold crossing is measured from
// the hit timestamps, over 40 ramps at random phases to the clock. The
// ideal delay is 2500 ps * level / 2 V (500, 1000, 1500, 2000 ps); each
// single measurement must be within one delay element (15 ps) of it and
// the mean within 8 ps. The bench prints the measured means next to the
// reported laboratory values (2551, 3034, 3535, 4125 ps, which include a
// fixed cable and buffer offset not modelled here) and their step per
// 400 mV.
`timescale 1ps / 1fs
module tb_table1_levels;
  import tdc_pkg::*;
  localparam int  NT = 4, RAMPS = 40;
  localparam real CLK_PS = 5010.0, TAPD = 15.0, TR = 2500.0;

  logic clk = 0, rst_n = 0;
  real  sig = 0.0, ref_p = 0.0, ref_n = 0.5;
  real  vth [NT];
  logic hv;
  hit_t hit;
  logic [15:0] lost;
  logic [NT-1:0] tv;
  logic [NT-1:0][TOT_W-1:0] tot;
  tstamp_t [NT-1:0] lead;
  int checks = 0, failures = 0;

  pet_adc_tdc_top dut (
    .clk, .rst_n, .sig_i(sig), .vth_i(vth), .ref_p_i(ref_p), .ref_n_i(ref_n),
    .hit_valid_o(hv), .hit_ready_i(1'b1), .hit_o(hit), .lost_o(lost),
    .tot_valid_o(tv), .tot_ps_o(tot), .lead_ts_o(lead));

  initial begin
    #0.5;
    forever #2505 clk = ~clk;
  end

  function automatic real t_of(tstamp_t ts);
    return real'(ts.coarse) * CLK_PS - real'(ts.fine) * TAPD;
  endfunction

  // Leading-edge times of the current ramp.
  real t_ref, t_lvl [NT];
  int  got;
  real sum [NT];
  int  n [NT];

  always @(posedge clk) if (rst_n && hv && hit.pol == EDGE_RISING) begin
    if (int'(hit.channel) == NT) t_ref = t_of(hit.ts);
    else                         t_lvl[hit.channel] = t_of(hit.ts);
    got++;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real paper [NT] = '{2551.0, 3034.0, 3535.0, 4125.0};
    for (int c = 0; c < NT; c++) begin vth[c] = 0.4 * (c + 1); sum[c] = 0; n[c] = 0; end
    #20000;
    rst_n = 1;
    for (int r = 0; r < RAMPS; r++) begin
      #(20000 + $urandom_range(5009));
      got = 0;
      ref_p = 1.0;
      for (int t = 1; t <= int'(TR); t++) begin #1; sig = 2.0 * t / TR; end
      #80000;   // five hits leave one per clock after a 3-clock latency
      checks++;
      if (got != NT + 1) begin
        failures++; $display("FAIL ramp %0d: %0d leading edges", r, got);
      end else begin
        for (int c = 0; c < NT; c++) begin
          real d, e;
          d = t_lvl[c] - t_ref;
          e = d - TR * vth[c] / 2.0;
          checks++;
          if (e <= -TAPD || e >= TAPD) begin
            failures++; $display("FAIL ramp %0d level %0.1f V: %0.1f ps", r, vth[c], d);
          end
          sum[c] += d; n[c]++;
        end
      end
      ref_p = 0.0; sig = 0.0;
    end
    $display("level_mV  measured_ps  ideal_ps  lab_ps  step_measured  step_lab");
    for (int c = 0; c < NT; c++) begin
      real m;
      m = sum[c] / n[c];
      checks++;
      if (m < TR * vth[c] / 2.0 - 8.0 || m > TR * vth[c] / 2.0 + 8.0) begin
        failures++; $display("FAIL mean at %0.1f V: %0.1f", vth[c], m);
      end
      $display("%8.0f  %11.1f  %8.1f  %6.0f  %13.1f  %8.0f", vth[c] * 1000.0, m,
               TR * vth[c] / 2.0, paper[c],
               c ? m - sum[c-1] / n[c-1] : 0.0, c ? paper[c] - paper[c-1] : 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
