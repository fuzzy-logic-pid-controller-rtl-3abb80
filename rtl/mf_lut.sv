// mf_lut: membership-function look-up table shared by the two fuzzifiers.
//
// The seven input membership functions are identical triangles that overlap
// pairwise, so one table serves every label: entry a (a = 0..7) is the degree of
// the rising edge of a triangle at the a-th eighth of the distance between two
// neighbouring centres, round(15*a/8), on a 4-bit scale. The falling edge of the
// neighbouring label is the complement 15 - entry, formed by the fuzzifier.
// The table is shared between the error and error-change fuzzifiers as in the
// block diagram of the fuzzy processor; it has one combinational read port per
// fuzzifier. The 3-bit address and 4-bit data follow the fuzzification diagram;
// the table contents (a linear triangle edge) are this design's choice.
module mf_lut
  import fpid_pkg::*;
(
  input  logic [2:0]      addr_a,
  output logic [MU_W-1:0] data_a,
  input  logic [2:0]      addr_b,
  output logic [MU_W-1:0] data_b
);

  function automatic logic [MU_W-1:0] edge_degree(input logic [2:0] a);
    return MU_W'((2 * MU_MAX * int'(a) + 8) / 16);
  endfunction

  logic [MU_W-1:0] rom [8];

  always_comb begin
    for (int a = 0; a < 8; a++) rom[a] = edge_degree(3'(a));
  end

  assign data_a = rom[addr_a];
  assign data_b = rom[addr_b];

endmodule
