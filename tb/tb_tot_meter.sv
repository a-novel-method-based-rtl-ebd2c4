// tb_tot_meter: checks the time-over-threshold pairing and arithmetic.
// Random leading/trailing timestamp pairs are fed as hits, in separate
// cycles and in one cycle (pulse inside one window), plus a trailing edge
// of a previous pulse together with a new leading edge, an orphan trailing
// edge and an interval beyond the output range. The expected interval is
// computed in picoseconds from the nominal 5010 ps clock and 15 ps element.
`timescale 1ps / 1fs
module tb_tot_meter;
  import tdc_pkg::*;
  localparam longint CLKPS = 5010, TAP = 15;
  logic clk = 0, rst_n = 0;
  logic rv = 0, fv = 0;
  tstamp_t rts, fts, lead;
  logic tv;
  logic [TOT_W-1:0] tot;
  int checks = 0, failures = 0;

  tot_meter dut (.clk, .rst_n, .rise_valid_i(rv), .rise_ts_i(rts),
                 .fall_valid_i(fv), .fall_ts_i(fts),
                 .tot_valid_o(tv), .tot_ps_o(tot), .lead_ts_o(lead));

  always #5 clk = ~clk;

  function automatic longint tps(tstamp_t t);
    return longint'(t.coarse) * CLKPS - longint'(t.fine) * TAP;
  endfunction

  task automatic expect_tot(bit ev, longint eps, tstamp_t elead, string what);
    @(posedge clk); #1;
    checks++;
    if (tv !== ev || (ev && (longint'(tot) != eps || lead !== elead))) begin
      failures++;
      $display("FAIL %s: valid=%b tot=%0d lead=%0d/%0d expected %b %0d", what, tv, tot,
               lead.coarse, lead.fine, ev, eps);
    end
  endtask

  function automatic tstamp_t rnd_ts(int c0, int span);
    tstamp_t t;
    t.coarse = coarse_t'(c0 + $urandom_range(span));
    t.fine   = fine_t'(1 + $urandom_range(333));
    return t;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tstamp_t a, b, c;
    rts = '0; fts = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // Separate cycles.
    for (int k = 0; k < 200; k++) begin
      a = rnd_ts(100 + k * 50, 0);
      b.coarse = a.coarse + coarse_t'($urandom_range(30));
      b.fine   = fine_t'(1 + $urandom_range(333));
      if (tps(b) <= tps(a)) b.coarse = a.coarse + 1'b1;
      if (tps(b) <= tps(a)) b.fine = 1;
      @(negedge clk); rv = 1; rts = a;
      @(negedge clk); rv = 0;
      @(negedge clk); fv = 1; fts = b;
      @(negedge clk); fv = 0;
      #1;
      checks++;
      if (!(longint'(tot) == tps(b) - tps(a) && lead == a)) begin
        failures++; $display("FAIL separate %0d: tot=%0d exp %0d", k, tot, tps(b) - tps(a));
      end
    end
    // Pulse within one saved vector: leading edge older (larger fine).
    for (int k = 0; k < 100; k++) begin
      a.coarse = coarse_t'(7000 + k); a.fine = fine_t'(50 + $urandom_range(284));
      b.coarse = a.coarse;            b.fine = fine_t'(1 + $urandom_range(int'(a.fine) - 2));
      @(negedge clk); rv = 1; rts = a; fv = 1; fts = b;
      expect_tot(1, (longint'(a.fine) - longint'(b.fine)) * TAP, a, "same vector");
      @(negedge clk); rv = 0; fv = 0;
    end
    // Trailing edge of the pending pulse plus a new leading edge in one vector.
    a.coarse = 20000; a.fine = 100;
    @(negedge clk); rv = 1; rts = a;
    @(negedge clk); rv = 0;
    b.coarse = 20003; b.fine = 200;   // trailing edge, older
    c.coarse = 20003; c.fine = 20;    // new leading edge, newer
    @(negedge clk); fv = 1; fts = b; rv = 1; rts = c;
    expect_tot(1, tps(b) - tps(a), a, "fall then new rise");
    @(negedge clk); fv = 0; rv = 0;
    b.coarse = 20005; b.fine = 7;
    @(negedge clk); fv = 1; fts = b;
    expect_tot(1, tps(b) - tps(c), c, "second pulse");
    @(negedge clk); fv = 0;
    // Orphan trailing edge.
    @(negedge clk); fv = 1; fts = b;
    expect_tot(0, 0, a, "orphan fall");
    @(negedge clk); fv = 0;
    // Saturation.
    a.coarse = 30000; a.fine = 10;
    b.coarse = 30000 + 1000; b.fine = 10;  // 5.01 us > 2^20 - 1 ps
    @(negedge clk); rv = 1; rts = a;
    @(negedge clk); rv = 0; fv = 1; fts = b;
    expect_tot(1, (longint'(1) << TOT_W) - 1, a, "saturate");
    @(negedge clk); fv = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
