// hit_readout: merges the hits of all TDC channels into one stream.
//
// Every channel delivers up to two hits per clock (one leading, one
// trailing edge), so there are N_SRC = 2 * N_CH hit sources; source 2*c+1 is
// the leading edge and 2*c the trailing edge of channel c. Each source writes
// into a FIFO of FIFO_DEPTH hits. A round-robin arbiter, starting after the
// source it served last, moves one hit per clock from a non-empty FIFO into
// the output register, labelled with its channel number and edge. A hit that
// arrives at a full FIFO is dropped and counted in lost_o (saturating).
//
// The output follows a valid/ready handshake: hit_o is held stable while
// hit_valid_o is high and hit_ready_i low, and a hit is taken on a clock
// edge where both are high. Throughput: one hit per clock.
//
// The document assigns the management of the data flow to a separate FPGA
// but describes no mechanism; the per-source FIFOs and round-robin merging
// are this implementation's choice.
`timescale 1ps / 1fs
module hit_readout
  import tdc_pkg::*;
#(
  parameter int unsigned N_CH       = 5,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic    [N_CH-1:0]   rise_valid_i,
  input  tstamp_t [N_CH-1:0]   rise_ts_i,
  input  logic    [N_CH-1:0]   fall_valid_i,
  input  tstamp_t [N_CH-1:0]   fall_ts_i,
  output logic                 hit_valid_o,
  input  logic                 hit_ready_i,
  output hit_t                 hit_o,
  output logic    [15:0]       lost_o
);

  localparam int unsigned N_SRC = 2 * N_CH;
  localparam int unsigned SW    = (N_SRC > 1) ? $clog2(N_SRC) : 1;

  logic    [N_SRC-1:0] src_valid, fifo_full, fifo_empty, fifo_rd;
  tstamp_t [N_SRC-1:0] src_ts, fifo_head;

  for (genvar c = 0; c < N_CH; c++) begin : g_src
    assign src_valid[2*c]   = fall_valid_i[c];
    assign src_ts[2*c]      = fall_ts_i[c];
    assign src_valid[2*c+1] = rise_valid_i[c];
    assign src_ts[2*c+1]    = rise_ts_i[c];
  end

  for (genvar s = 0; s < N_SRC; s++) begin : g_fifo
    sync_fifo #(.WIDTH($bits(tstamp_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en_i(src_valid[s]), .wr_data_i(src_ts[s]),
      .rd_en_i(fifo_rd[s]),   .rd_data_o(fifo_head[s]),
      .full_o(fifo_full[s]),  .empty_o(fifo_empty[s])
    );
  end

  // Output register is free when empty or being emptied this cycle.
  logic          out_free;
  logic          grant_valid;
  logic [SW-1:0] grant, last_q;

  assign out_free = !hit_valid_o || hit_ready_i;

  // Round robin: first non-empty source after last_q.
  always_comb begin
    grant_valid = 1'b0;
    grant       = '0;
    for (int unsigned k = 1; k <= N_SRC; k++) begin
      logic [SW-1:0] s;
      s = SW'((int'(last_q) + k) % N_SRC);
      if (!grant_valid && !fifo_empty[s]) begin
        grant_valid = 1'b1;
        grant       = s;
      end
    end
  end

  always_comb begin
    fifo_rd = '0;
    if (out_free && grant_valid) fifo_rd[grant] = 1'b1;
  end

  // Hits lost this cycle.
  logic [SW:0] n_lost;
  always_comb begin
    n_lost = '0;
    for (int unsigned s = 0; s < N_SRC; s++)
      if (src_valid[s] && fifo_full[s]) n_lost = n_lost + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hit_valid_o <= 1'b0;
      hit_o       <= '0;
      last_q      <= SW'(N_SRC - 1);
      lost_o      <= '0;
    end else begin
      if (out_free) begin
        hit_valid_o <= grant_valid;
        if (grant_valid) begin
          hit_o.channel <= CH_W'(grant >> 1);
          hit_o.pol     <= edge_e'(grant[0]);
          hit_o.ts      <= fifo_head[grant];
          last_q        <= grant;
        end
      end
      if (n_lost != 0) begin
        if (32'(lost_o) + 32'(n_lost) > 32'hFFFF) lost_o <= '1;
        else                                      lost_o <= lost_o + 16'(n_lost);
      end
    end
  end

  // Handshake rule: a pending hit stays unchanged until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (hit_valid_o && !hit_ready_i) |=> (hit_valid_o && $stable(hit_o));
  endproperty
  a_hold: assert property (p_hold);

  initial assert (N_CH <= (1 << CH_W)) else $error("hit_readout: N_CH too large for CH_W");

endmodule
