// tb_pet_adc_tdc_top: end-to-end test of the four-threshold sampler with all
// parameters at their defaults (4 thresholds, 334-tap window, 15 ps taps,
// 4-deep readout FIFOs).
//
// The bench plays the analog front end: it produces triangular detector
// pulses (random amplitude 0.9-1.8 V, rise 0.3-3 ns, fall 1-8 ns) on the
// measured-signal input in 1 ps steps, holds the four thresholds at 0.2,
// 0.4, 0.6 and 0.8 V, and raises a reference signal at the start of every
// pulse. While stepping the signal it notes, independently of the design,
// every instant at which the signal crosses a threshold. Every hit that
// leaves the readout is turned back into time,
//   t = T(coarse) - fine * 15 ps,
// with T(coarse) the time of the clock edge that saved it, and must lie
// less than one delay element after the true crossing (the edge has run
// through `fine` elements but not through the next one). Every time-over-
// threshold result must match the true interval within one element.
//
// Phases: (A) pulses with random back-pressure on the readout, nothing may
// be lost; (B) a pulse train with the readout blocked, so the FIFOs
// overflow; afterwards every hit must be either delivered or counted lost.
// The mechanisms seen (leading/trailing hits per channel, reference hits,
// pulses inside one clock period, edges in different periods, stalls,
// overflow, ToT results) are counted and each must occur.
// The clock runs at 5010 ps, offset by half a picosecond so that no
// tap ever switches exactly at a clock edge.
`timescale 1ps / 1fs
module tb_pet_adc_tdc_top;
  import tdc_pkg::*;
  localparam int  NT = 4, NCH = NT + 1;
  localparam real CLK_PS = 5010.0, TAPD = 15.0;

  logic clk = 0, rst_n = 0;
  real  sig = 0.0, ref_p = 0.0, ref_n = 0.5;
  real  vth [NT];
  logic hv, hr;
  hit_t hit;
  logic [15:0] lost;
  logic [NT-1:0] tv;
  logic [NT-1:0][TOT_W-1:0] tot;
  tstamp_t [NT-1:0] lead;

  int checks = 0, failures = 0;

  pet_adc_tdc_top dut (
    .clk, .rst_n, .sig_i(sig), .vth_i(vth), .ref_p_i(ref_p), .ref_n_i(ref_n),
    .hit_valid_o(hv), .hit_ready_i(hr), .hit_o(hit), .lost_o(lost),
    .tot_valid_o(tv), .tot_ps_o(tot), .lead_ts_o(lead));

  initial begin
    #0.5;
    forever #2505 clk = ~clk;
  end

  // Time of the clock edge at which coarse value c was saved.
  real     t0_edge;
  coarse_t c0;
  bit      have_t0 = 0;
  always @(posedge clk) if (rst_n && !have_t0) begin
    t0_edge = $realtime; c0 = dut.coarse; have_t0 = 1;
  end
  function automatic real t_of(tstamp_t ts);
    return t0_edge + real'(int'(ts.coarse - c0)) * CLK_PS - real'(ts.fine) * TAPD;
  endfunction

  // Expected crossings per source (2*channel + polarity) and expected ToT.
  real exp_q [2*NCH][$];
  real tot_q [NT][$];
  real last_rise [NT];
  bit  above [NCH];
  int  generated = 0, delivered = 0, unmatched = 0;
  bit  allow_gaps = 0;

  // Mechanism counters.
  int n_rise [NCH], n_fall [NCH];
  int n_same_period = 0, n_multi_period = 0, n_stall = 0, n_tot = 0;
  tstamp_t last_rise_ts [NCH];

  task automatic note(int c, bit pol);
    exp_q[2*c + int'(pol)].push_back($realtime);
    generated++;
    if (c < NT) begin
      if (pol) last_rise[c] = $realtime;
      else     tot_q[c].push_back($realtime - last_rise[c]);
    end
  endtask

  task automatic set_sig(real v);
    for (int c = 0; c < NT; c++) begin
      bit a; a = (v > vth[c]);
      if (a != above[c]) note(c, a);
      above[c] = a;
    end
    sig = v;
  endtask

  task automatic set_ref(real v);
    bit a; a = (v > ref_n);
    if (a != above[NT]) note(NT, a);
    above[NT] = a;
    ref_p = v;
  endtask

  // Triangular pulse: rises to amp over tr ps, falls back over tf ps.
  task automatic pulse(real amp, int tr, int tf);
    set_ref(1.0);
    for (int t = 1; t <= tr; t++) begin #1; set_sig(amp * t / tr); end
    for (int t = 1; t <= tf; t++) begin #1; set_sig(amp * (tf - t) / tf); end
    set_ref(0.0);
  endtask

  // Scoreboard on the readout stream.
  always @(posedge clk) if (rst_n && hv && hr) begin
    int  s, c;
    real tr_, err;
    bit  ok;
    s = 2 * int'(hit.channel) + int'(hit.pol);
    c = int'(hit.channel);
    tr_ = t_of(hit.ts);
    delivered++;
    ok = 0;
    while (exp_q[s].size() > 0) begin
      err = tr_ - exp_q[s][0];
      if (err >= 0.0 && err < TAPD) begin ok = 1; void'(exp_q[s].pop_front()); break; end
      if (!allow_gaps || err < 0.0) break;  // hit older than the crossing: no match
      void'(exp_q[s].pop_front());   // this crossing was dropped at a full FIFO
      unmatched++;
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL hit ch=%0d pol=%0d t=%0.1f expected %0.1f", c, hit.pol, tr_,
               exp_q[s].size() ? exp_q[s][0] : -1.0);
    end
    if (hit.pol == EDGE_RISING) begin
      n_rise[c]++;
      last_rise_ts[c] = hit.ts;
    end else begin
      n_fall[c]++;
      if (hit.ts.coarse == last_rise_ts[c].coarse) n_same_period++;
      else n_multi_period++;
    end
  end
  always @(posedge clk) if (rst_n && hv && !hr) n_stall++;

  // ToT results.
  for (genvar c = 0; c < NT; c++) begin : g_tot
    always @(posedge clk) if (rst_n && tv[c]) begin
      real e;
      checks++;
      n_tot++;
      if (tot_q[c].size() == 0) begin
        failures++; $display("FAIL unexpected ToT on channel %0d", c);
      end else begin
        e = real'(tot[c]) - tot_q[c].pop_front();
        if (e <= -TAPD || e >= TAPD) begin
          failures++; $display("FAIL ToT channel %0d: %0d ps, error %0.1f", c, tot[c], e);
        end
      end
    end
  end

  initial begin
    #30000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NT; c++) vth[c] = 0.2 * (c + 1);
    foreach (above[i]) above[i] = 0;
    foreach (n_rise[i]) begin n_rise[i] = 0; n_fall[i] = 0; end
    hr = 1;
    // The main thread waits in whole picoseconds only, so the signal never
    // changes at a clock edge (edges fall on half picoseconds).
    #20000;
    rst_n = 1;
    #20000;
    // Phase A: random pulses, random back-pressure.
    fork
      begin : ready_gen
        forever begin @(negedge clk); hr = ($urandom_range(9) < 6); end
      end
      begin
        for (int k = 0; k < 30; k++) begin
          #(100000 + $urandom_range(100000));  // far below the readout rate
          pulse(0.9 + 0.9 * $urandom_range(1000) / 1000.0,
                300 + $urandom_range(2700), 1000 + $urandom_range(7000));
        end
        #20000;
      end
    join_any
    disable fork;
    hr = 1;
    #100000;
    checks++;
    if (lost != 0 || delivered != generated) begin
      failures++;
      $display("FAIL phase A: generated %0d delivered %0d lost %0d", generated, delivered, lost);
    end
    // Phase B: readout blocked while a train of pulses arrives.
    allow_gaps = 1;
    hr = 0;
    for (int k = 0; k < 8; k++) begin
      #10000;
      pulse(1.5, 1000, 3000);
    end
    #20000;
    hr = 1;
    #500000;   // drain: up to 41 hits at one per clock
    checks++;
    if (delivered + int'(lost) != generated) begin
      failures++;
      $display("FAIL conservation: generated %0d delivered %0d lost %0d", generated, delivered, lost);
    end
    // Every mechanism must have happened.
    for (int c = 0; c < NCH; c++) begin
      checks += 2;
      if (n_rise[c] == 0) begin failures++; $display("FAIL no leading hit on channel %0d", c); end
      if (n_fall[c] == 0) begin failures++; $display("FAIL no trailing hit on channel %0d", c); end
    end
    checks++; if (n_same_period == 0)  begin failures++; $display("FAIL no pulse inside one period"); end
    checks++; if (n_multi_period == 0) begin failures++; $display("FAIL no pulse across periods"); end
    checks++; if (n_stall == 0)        begin failures++; $display("FAIL no back-pressure"); end
    checks++; if (lost == 0)           begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_tot == 0)          begin failures++; $display("FAIL no ToT result"); end
    $display("mechanisms: hits=%0d lost=%0d same_period=%0d multi_period=%0d stalls=%0d tot=%0d",
             delivered, lost, n_same_period, n_multi_period, n_stall, n_tot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
