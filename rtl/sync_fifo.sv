// sync_fifo: small single-clock first-in first-out buffer.
//
// A memory of DEPTH words of WIDTH bits with read and write pointers one bit
// wider than the address, so full and empty are told apart by the extra bit.
// A write when full and a read when empty are ignored (the caller checks
// full_o / empty_o). The head word is always visible on rd_data_o
// (first-word fall-through). DEPTH must be a power of two.
// Interface: wr_en_i/wr_data_i, rd_en_i/rd_data_o, full_o, empty_o.
// Timing: a word written at one clock edge can be read after it.
`timescale 1ps / 1fs
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en_i,
  input  logic [WIDTH-1:0] wr_data_i,
  input  logic             rd_en_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             full_o,
  output logic             empty_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  assign empty_o   = (wp == rp);
  assign full_o    = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign rd_data_o = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en_i && !full_o) mem[wp[AW-1:0]] <= wr_data_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en_i && !full_o) wp <= wp + 1'b1;
      if (rd_en_i && !empty_o) rp <= rp + 1'b1;
    end
  end

  initial assert (DEPTH == (1 << AW)) else $error("sync_fifo: DEPTH must be a power of two");

endmodule
