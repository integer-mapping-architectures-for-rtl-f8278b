// pre_mod_mult: pipelined modulo multiplier cell, z = (a * b) mod M.
//
// The default M = 7 is the mod 7 multiplier used as the example cell of the
// switching-tree module generator; the engine also instantiates it with
// M = 3 and M = 5 for the per-channel multiplications of the inner
// product. It is one 6-input, 3-output pipelined block whose table is
// computed from M at elaboration. The tree tests the inputs in the level
// order of the published mod 7 tree, output node first: B2, B1, A2, A1,
// A0, B0. The layout-level structure of the cell (transistor matrix,
// latches, clock buffers) is not modelled.
//
// Timing: one cycle from a, b to z; en is the clock enable.
module pre_mod_mult
  import pre_pkg::*;
#(
  parameter int unsigned M = 7
) (
  input  logic     clk,
  input  logic     en,
  input  residue_t a,
  input  residue_t b,
  output residue_t z
);

  // Bit positions in the input word {a, b}: A2..A0 = 5..3, B2..B0 = 2..0.
  localparam int unsigned TREE_ORDER [6] = '{2, 1, 5, 4, 3, 0};

  pre_lut6 #(.TABLE(mult_table(M)), .ORDER(TREE_ORDER)) u_lut (
    .clk(clk), .en(en), .a(a), .b(b), .z(z)
  );

endmodule
