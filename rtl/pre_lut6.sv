// pre_lut6: pipelined 6-input, 3-output switching block.
//
// This is the general computing unit of the engine: a switching tree that
// realises an arbitrary function of six input bits (two 3-bit residues),
// embedded in a clocked latch so that every block is also one pipeline
// stage. The tree is a binary-tree ROM over the six inputs: level 0 (the
// node at the output) selects on input bit ORDER[0], level 1 on ORDER[1],
// and so on down to the 64 leaves, which hold the table entries. The
// reduction of the tree (merging equal subtrees, removing redundant
// decisions) is left to synthesis. The dynamic circuit of the original
// cell (precharge/evaluate tree, single-phase clocked latch, p-channel
// output inverter) is not modelled: only its logic function and its
// one-cycle register are.
//
// Interface: a, b are the two 3-bit operands, forming the input word
// {a, b} (a in bits 5:3, b in bits 2:0); z is the registered table entry
// TABLE[{a, b}], whatever the variable order. en is a clock enable: with en
// low z holds. The original cells are free-running; the enable is this
// design's addition, used only where a block closes an accumulation loop.
//
// Timing: z is valid one clock after a, b (and en) are presented.
module pre_lut6
  import pre_pkg::*;
#(
  // Defaults: the mod 7 multiplier cell, inputs tested in the order
  // B2, B1, A2, A1, A0, B0 (A2..A0 = bits 5..3, B2..B0 = bits 2..0).
  parameter lut6_table_t TABLE = mult_table(7),
  // Input bit tested at each tree level, output node first.
  parameter int unsigned ORDER [6] = '{2, 1, 5, 4, 3, 0}
) (
  input  logic     clk,
  input  logic     en,
  input  residue_t a,
  input  residue_t b,
  output residue_t z
);

  // Leaf j of the tree: the path to it takes, at level l, the branch
  // given by bit (5-l) of j, so input bit ORDER[l] equals that bit.
  function automatic lut6_table_t leaves();
    lut6_table_t t;
    for (int unsigned j = 0; j < 64; j++) begin
      logic [5:0] addr;
      addr = '0;
      for (int unsigned l = 0; l < 6; l++) addr[ORDER[l]] = j[5 - l];
      t[j] = TABLE[addr];
    end
    return t;
  endfunction

  localparam lut6_table_t LEAF = leaves();

  logic [5:0] in_word;
  residue_t   tree_out;

  assign in_word = {a, b};

  // Binary tree of 2:1 selections, evaluated from the leaves upward:
  // after the pass for level l, node[j] is the subtree below path j.
  always_comb begin
    residue_t node [64];
    for (int unsigned j = 0; j < 64; j++) node[j] = LEAF[j];
    for (int l = 5; l >= 0; l--)
      for (int unsigned j = 0; j < (1 << l); j++)
        node[j] = in_word[ORDER[l]] ? node[2 * j + 1] : node[2 * j];
    tree_out = node[0];
  end

  always_ff @(posedge clk)
    if (en) z <= tree_out;

  initial begin
    automatic logic [5:0] seen = '0;
    for (int l = 0; l < 6; l++) seen[ORDER[l]] = 1'b1;
    assert (seen == '1) else $error("pre_lut6: ORDER is not a permutation");
  end

endmodule
