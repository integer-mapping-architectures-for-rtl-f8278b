// pre_wmod_add: pipelined weighted modulo adder.
//
// Computes z = (WA*a + WB*b) mod M in one pipelined 6-input block. The
// forward and reverse polynomial maps and the mixed-radix CRT are built
// entirely from this block: a subtraction is an addition with weight M-1,
// a halving is a weight equal to the inverse of 2 modulo M. The operands
// are read as plain integers 0..7, so the same block can also combine
// residues of different moduli (as the CRT does).
//
// The weights are fixed per instance (parameters); the table of the
// underlying 6-input block is computed from M, WA and WB at elaboration.
//
// Timing: one cycle from a, b to z; en is the block's clock enable.
//
// The weighted modulo adder and its per-block weight option follow the
// source architecture; reading operands as unreduced integers and the
// enable are choices made here.
module pre_wmod_add
  import pre_pkg::*;
#(
  parameter int unsigned M  = 7,
  parameter int unsigned WA = 1,
  parameter int unsigned WB = 1
) (
  input  logic     clk,
  input  logic     en,
  input  residue_t a,
  input  residue_t b,
  output residue_t z
);

  pre_lut6 #(.TABLE(wmod_table(M, WA, WB))) u_lut (
    .clk(clk), .en(en), .a(a), .b(b), .z(z)
  );

endmodule
