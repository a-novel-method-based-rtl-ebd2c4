// tb_tdc_channel: checks one TDC channel end to end at the digital level.
// Tap vectors for edges at random ages are presented before a clock edge;
// two clock edges later the channel must report a hit of the right polarity
// whose coarse part is the coarse count saved at that edge and whose fine
// part is the edge's age in delay elements. Quiet cycles must give no hit.
`timescale 1ps / 1fs
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam int W = WINDOW;
  localparam int N = WINDOW + 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] tap;
  coarse_t coarse;
  logic rv, fv;
  tstamp_t rts, fts;
  int checks = 0, failures = 0;

  tdc_channel dut (.clk, .rst_n, .tap_i(tap), .coarse_i(coarse),
                   .rise_valid_o(rv), .rise_ts_o(rts), .fall_valid_o(fv), .fall_ts_o(fts));

  always #2505 clk = ~clk;
  always @(posedge clk) coarse <= coarse + 1'b1;

  function automatic logic [N-1:0] mk(logic old, int e1, int e2);
    logic [N-1:0] v;
    for (int j = 0; j < N; j++) begin
      v[j] = old;
      if (j + 1 <= e1) v[j] = ~old;
      if (e2 > 0 && j + 1 <= e2) v[j] = old;
    end
    return v;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coarse = coarse_t'(1000);
    tap = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      int kind, e1, e2;
      bit  erv, efv;
      int  erf, eff;
      coarse_t c_at;
      kind = $urandom_range(3);
      e1 = 1 + $urandom_range(W - 1);
      e2 = 0;
      @(negedge clk);
      case (kind)
        0: begin tap = '0; erv = 0; efv = 0; end
        1: begin tap = mk(1'b0, e1, 0); erv = 1; erf = e1; efv = 0; end
        2: begin tap = mk(1'b1, e1, 0); efv = 1; eff = e1; erv = 0; end
        default: begin
          e1 = 3 + $urandom_range(W - 3);
          e2 = 1 + $urandom_range(e1 - 3);
          tap = mk(1'b0, e1, e2); erv = 1; erf = e1; efv = 1; eff = e2;
        end
      endcase
      @(posedge clk);
      c_at = coarse;          // value saved at this edge (coarse updates with NBA)
      @(negedge clk); tap = '0;
      @(posedge clk); #1;
      checks++;
      if (rv !== erv || fv !== efv ||
          (erv && (rts.coarse !== c_at || rts.fine !== fine_t'(erf))) ||
          (efv && (fts.coarse !== c_at || fts.fine !== fine_t'(eff)))) begin
        failures++;
        $display("FAIL case %0d kind %0d: rv=%b %0d/%0d fv=%b %0d/%0d exp c=%0d r=%0d f=%0d",
                 k, kind, rv, rts.coarse, rts.fine, fv, fts.coarse, fts.fine, c_at, erf, eff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
