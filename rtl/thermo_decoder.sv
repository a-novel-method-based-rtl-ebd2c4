// thermo_decoder: turns one saved carry-chain bit vector into edge positions.
//
// Bit j of the vector is the state of the measured signal (j+1) delay
// elements before the clock edge, so walking up the vector walks back in
// time. An edge that happened between two clock edges leaves a boundary
// inside the first WINDOW taps:
//   rising edge  (leading):  bits 0..i are 1, bit i+1 is 0  ->  "...0 1...1"
//   falling edge (trailing): bits 0..i are 0, bit i+1 is 1
// and its fine code is i+1, the number of elements it has run through (it
// happened between i+1 and i+2 element delays before the clock edge). The
// boundary of an edge from the previous clock period lies at or beyond tap
// WINDOW and is not searched, so each edge is reported exactly once.
//
// Bubble correction: metastable capture flip-flops and unequal routing can
// break the run of ones and zeros near the boundary (e.g. ...0100101111...).
// Every bit is first replaced by the majority of itself and its two
// neighbours, which removes isolated wrong bits, then the lowest boundary of
// each polarity is taken. One rising and one falling edge per clock period
// can be found; if a polarity appears twice the most recent one (lowest
// position) is reported. The 3-bit majority filter and the lowest-boundary
// rule are choices of this implementation.
//
// Purely combinational. Interface: vec_i[N_TAPS-1:0] with
// N_TAPS >= WINDOW + 2; rise_valid_o/rise_fine_o and fall_valid_o/fall_fine_o.
`timescale 1ps / 1fs
module thermo_decoder
  import tdc_pkg::*;
#(
  parameter int unsigned WIN    = WINDOW,
  parameter int unsigned N_TAPS = WINDOW + 2
) (
  input  logic [N_TAPS-1:0] vec_i,
  output logic              rise_valid_o,
  output fine_t             rise_fine_o,
  output logic              fall_valid_o,
  output fine_t             fall_fine_o
);

  // Majority-filtered vector, bits 0..WIN (bit WIN+1 of the input is only a
  // neighbour). Bit 0 has no lower neighbour and is kept as sampled.
  logic [WIN:0] m;

  always_comb begin
    m[0] = vec_i[0];
    for (int unsigned j = 1; j <= WIN; j++) begin
      m[j] = (vec_i[j-1] & vec_i[j]) | (vec_i[j] & vec_i[j+1]) |
             (vec_i[j-1] & vec_i[j+1]);
    end
  end

  // Lowest boundary of each polarity: search from the top down so the last
  // assignment wins.
  always_comb begin
    rise_valid_o = 1'b0;
    rise_fine_o  = '0;
    fall_valid_o = 1'b0;
    fall_fine_o  = '0;
    for (int j = int'(WIN) - 1; j >= 0; j--) begin
      if (m[j] && !m[j+1]) begin
        rise_valid_o = 1'b1;
        rise_fine_o  = fine_t'(j + 1);
      end
      if (!m[j] && m[j+1]) begin
        fall_valid_o = 1'b1;
        fall_fine_o  = fine_t'(j + 1);
      end
    end
  end

  initial begin
    assert (N_TAPS >= WIN + 2) else $error("thermo_decoder: N_TAPS must be >= WIN + 2");
    assert (WIN < (1 << FINE_W)) else $error("thermo_decoder: WIN too large for fine_t");
  end

endmodule
