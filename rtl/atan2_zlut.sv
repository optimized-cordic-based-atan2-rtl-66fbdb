// atan2_zlut: one z-path block, a look-up table of precomputed rotation
// angles for a group of consecutive CORDIC directions, followed by the adder
// that accumulates it onto the angle of the earlier groups:
//   z_o = LUT(d[s] .. d[s+LEN-1]) + z_i
// Entry idx of the table is -sum_k d[s+k]*atan(2^-(s+k)), expressed in turns
// with ZW = W+ZG fraction bits and rounded to nearest (see atan2_pkg). Bit k
// of idx is the direction bit of iteration s+k (1: d = +1). FIRST_DIR = -1
// means the group starts with the pi/2 pre-rotation.
//
// With ACCUMULATE = 0 the block is a bare table (the first group, where no
// angle has been accumulated yet); z_i is then ignored. ROUND = 1 adds the
// constant 2^-(W+1) to every entry so that the operator output can simply be
// truncated to W bits.
//
// On an FPGA with 5-input LUTs feeding the carry chain, each output bit of an
// accumulating block with LEN <= 5 maps to one LUT and one carry cell; a
// non-accumulating block with LEN <= 6 maps to one 6-input LUT per bit. The
// table is computed at elaboration time from the formula, so no data file is
// needed.
//
// Interface: combinational; z values are unsigned ZW-bit fractions of a full
// turn (arithmetic modulo one turn).
//
// Follows the published method (see atan2_cordic): the table contents, the
// grouping, the adder and the rounding constant. Design choice:
// round-to-nearest of each entry.
module atan2_zlut
  import atan2_pkg::*;
#(
  parameter int W          = 16,
  parameter int ZG         = 4,
  parameter int FIRST_DIR  = -1,
  parameter int LEN        = 6,
  parameter bit ACCUMULATE = 1'b0,
  parameter bit ROUND      = 1'b1
) (
  input  logic [LEN-1:0]    d,
  input  logic [W+ZG-1:0]   z_i,
  output logic [W+ZG-1:0]   z_o
);
  localparam int ZW = W + ZG;

  logic [ZW-1:0] table_q [2**LEN];

  for (genvar e = 0; e < 2**LEN; e++) begin : g_entry
    localparam longint VAL = lut_entry(ZW, ZG, FIRST_DIR, LEN, e, ROUND);
    assign table_q[e] = ZW'(VAL);
  end

  always_comb begin
    if (ACCUMULATE) z_o = table_q[d] + z_i;
    else            z_o = table_q[d];
  end
endmodule
