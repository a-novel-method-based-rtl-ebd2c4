// tb_hit_readout: checks the merging of hit sources into one stream for the
// default five channels (ten sources) with 4-deep FIFOs.
//  1. Sparse random hits with random back-pressure: every hit must come out
//     once, labelled with its channel and edge, in order per source, and
//     nothing may be lost. The handshake hold rule is asserted in the block.
//  2. All ten sources hit in one cycle: the next ten outputs must serve each
//     source exactly once, in rotation; and after source 3 was served, the
//     arbiter must prefer source 5 over source 1 (round robin, not fixed
//     priority).
//  3. Overflow: one source is flooded while the output is blocked; exactly
//     DEPTH + 1 hits are kept (FIFO plus output register) and the rest are
//     counted as lost.
`timescale 1ps / 1fs
module tb_hit_readout;
  import tdc_pkg::*;
  localparam int NCH = 5, NS = 2 * NCH, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic    [NCH-1:0] rv, fv;
  tstamp_t [NCH-1:0] rts, fts;
  logic hv, hr;
  hit_t hit;
  logic [15:0] lost;
  int checks = 0, failures = 0;
  tstamp_t q [NS][$];
  int n_out = 0, n_in = 0, stalls = 0;

  hit_readout #(.N_CH(NCH), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .rise_valid_i(rv), .rise_ts_i(rts), .fall_valid_i(fv), .fall_ts_i(fts),
    .hit_valid_o(hv), .hit_ready_i(hr), .hit_o(hit), .lost_o(lost));

  always #5 clk = ~clk;

  // Scoreboard on every accepted output hit.
  always @(posedge clk) if (rst_n && hv && hr) begin
    int s;
    s = 2 * int'(hit.channel) + int'(hit.pol);
    checks++;
    n_out++;
    if (q[s].size() == 0 || q[s][0] !== hit.ts) begin
      failures++;
      $display("FAIL unexpected hit ch=%0d pol=%0d ts=%0d/%0d", hit.channel, hit.pol,
               hit.ts.coarse, hit.ts.fine);
    end else void'(q[s].pop_front());
  end
  always @(posedge clk) if (rst_n && hv && !hr) stalls++;

  function automatic tstamp_t rnd_ts();
    tstamp_t t;
    t.coarse = coarse_t'($urandom);
    t.fine = fine_t'($urandom_range(333) + 1);
    return t;
  endfunction

  task automatic push(int s, tstamp_t t);
    if (s % 2 == 1) begin rv[s/2] = 1; rts[s/2] = t; end
    else            begin fv[s/2] = 1; fts[s/2] = t; end
    q[s].push_back(t);
    n_in++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv = '0; fv = '0; rts = '0; fts = '0; hr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // 1. Sparse traffic, random ready.
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      rv = '0; fv = '0;
      hr = ($urandom_range(3) != 0);
      if ($urandom_range(5) == 0) begin
        int s; s = $urandom_range(NS - 1);
        if (q[s].size() < DEPTH - 1) push(s, rnd_ts());
      end
    end
    @(negedge clk); rv = '0; fv = '0; hr = 1;
    repeat (40) @(negedge clk);
    checks++;
    if (n_out != n_in || lost != 0) begin
      failures++; $display("FAIL sparse: in=%0d out=%0d lost=%0d", n_in, n_out, lost);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure seen"); end
    // 2. Round robin: all sources at once.
    begin
      bit seen [NS];
      int order [NS];
      int got;
      foreach (seen[i]) seen[i] = 0;
      @(negedge clk);
      for (int s = 0; s < NS; s++) push(s, rnd_ts());
      @(negedge clk); rv = '0; fv = '0;
      got = 0;
      while (got < NS) begin
        @(posedge clk);
        if (hv && hr) begin
          order[got] = 2 * int'(hit.channel) + int'(hit.pol);
          got++;
        end
      end
      for (int i = 0; i < NS; i++) seen[order[i]] = 1;
      checks++;
      if (seen.sum() with (int'(item)) != NS) begin
        failures++; $display("FAIL round robin did not serve every source once");
      end
      for (int i = 1; i < NS; i++) begin
        checks++;
        if (order[i] != (order[i-1] + 1) % NS) begin
          failures++; $display("FAIL round robin order %0d after %0d", order[i], order[i-1]);
        end
      end
    end
    // 2b. Rotation, not fixed priority: after source 3 is served, sources 1
    // and 5 arriving together must be served 5 first.
    begin
      int first;
      repeat (3) @(negedge clk);
      push(3, rnd_ts());
      @(negedge clk); rv = '0; fv = '0;
      repeat (5) @(negedge clk);
      push(1, rnd_ts()); push(5, rnd_ts());
      @(negedge clk); rv = '0; fv = '0;
      while (!(hv && hr)) @(posedge clk);
      first = 2 * int'(hit.channel) + int'(hit.pol);
      checks++;
      if (first != 5) begin failures++; $display("FAIL rotation: served %0d before 5", first); end
      repeat (5) @(negedge clk);
    end
    // 3. Overflow of one source while the output is blocked.
    begin
      int m = 12, s = 5;
      tstamp_t sent [$];
      repeat (5) @(negedge clk);
      hr = 0;
      for (int k = 0; k < m; k++) begin
        tstamp_t t;
        @(negedge clk);
        rv = '0; fv = '0;
        t = rnd_ts();
        sent.push_back(t);
        rts[s/2] = t; rv[s/2] = 1;   // not pushed into the scoreboard yet
      end
      @(negedge clk); rv = '0;
      // Kept: the first DEPTH + 1 hits.
      for (int k = 0; k <= DEPTH; k++) q[s].push_back(sent[k]);
      n_in += DEPTH + 1;
      repeat (3) @(negedge clk);
      checks++;
      if (int'(lost) != m - DEPTH - 1) begin
        failures++; $display("FAIL lost=%0d expected %0d", lost, m - DEPTH - 1);
      end
      hr = 1;
      repeat (20) @(negedge clk);
      checks++;
      if (q[s].size() != 0 || hv) begin
        failures++; $display("FAIL overflow drain: %0d left", q[s].size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
