// pre_rev_map: reverse polynomial mapping for one modulus M.
//
// The channel results are the values of a result polynomial of degree at
// most two in each of X and Y, taken at the nine root pairs. Because the
// forward evaluation matrix is a tensor product, its inverse is the tensor
// product of the 1-D inverses, applied one indeterminate at a time:
//     stage A (along Y): for each X root, recover the Y coefficients;
//     stage B (along X): for each Y power, recover the X coefficients.
// Each stage is a row of three pre_inv3 units (full second-order
// inversion). No reduction modulo the root polynomials is needed, because
// the result degree never exceeds two.
//
// Interface: v[ix][iy] as produced by pre_fwd_map (root index 0, 1, 2 =
// -1, 0, +1); c[i][k] is the residue of the coefficient of X^i Y^k.
//
// Timing: REV_LAT = 4 cycles, one new set of values per cycle.
//
// The tensor-product inverse and its construction from weighted modulo
// adders follow the source architecture; the Y-then-X order and the two
// register rows per variable are choices made here.
module pre_rev_map
  import pre_pkg::*;
#(
  parameter int unsigned M = 7
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  residue_t [NROOT-1:0][NROOT-1:0] v,
  output logic                            out_valid,
  output residue_t [NROOT-1:0][NROOT-1:0] c
);

  // d[ix][k]: coefficient of Y^k of the slice at X root ix.
  residue_t [NROOT-1:0][NROOT-1:0] d;
  logic     [REV_LAT-1:0]          vpipe;

  for (genvar ix = 0; ix < NROOT; ix++) begin : g_a
    pre_inv3 #(.M(M)) u_inv (
      .clk(clk), .vm(v[ix][0]), .v0(v[ix][1]), .vp(v[ix][2]),
      .c0(d[ix][0]), .c1(d[ix][1]), .c2(d[ix][2])
    );
  end

  for (genvar k = 0; k < NROOT; k++) begin : g_b
    pre_inv3 #(.M(M)) u_inv (
      .clk(clk), .vm(d[0][k]), .v0(d[1][k]), .vp(d[2][k]),
      .c0(c[0][k]), .c1(c[1][k]), .c2(c[2][k])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[REV_LAT-2:0], in_valid};

  assign out_valid = vpipe[REV_LAT-1];

endmodule
