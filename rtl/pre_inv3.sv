// pre_inv3: one-variable inverse evaluation map modulo M (helper of
// pre_rev_map).
//
// Given the values of a polynomial c0 + c1*T + c2*T^2 at T = -1, 0, +1
// (inputs vm, v0, vp), it recovers the coefficients with the inverse of
// the 3x3 evaluation matrix:
//     c0 = v0
//     c1 = h*vp - h*vm               (h = inverse of 2 modulo M)
//     c2 = h*vp + h*vm - v0
// in two rows of weighted modulo adders: the first row forms c1 and the
// half-sum t = h*vp + h*vm, the second row forms c2 = t - v0. Values that
// skip a row pass through a pipeline register.
//
// Timing: 2 cycles, one new set of values per cycle.
//
// The inverse matrix follows from the evaluation matrix of the source
// architecture; splitting it into these two rows is a choice made here.
module pre_inv3
  import pre_pkg::*;
#(
  parameter int unsigned M = 7
) (
  input  logic     clk,
  input  residue_t vm,
  input  residue_t v0,
  input  residue_t vp,
  output residue_t c0,
  output residue_t c1,
  output residue_t c2
);

  localparam int unsigned H = mod_inv(2, M);

  residue_t c1_r, t_r, v0_r;

  // Row 1.
  pre_wmod_add #(.M(M), .WA(H), .WB(M - H)) u_c1 (
    .clk(clk), .en(1'b1), .a(vp), .b(vm), .z(c1_r)
  );
  pre_wmod_add #(.M(M), .WA(H), .WB(H)) u_t (
    .clk(clk), .en(1'b1), .a(vp), .b(vm), .z(t_r)
  );
  always_ff @(posedge clk) v0_r <= v0;

  // Row 2.
  pre_wmod_add #(.M(M), .WA(1), .WB(M - 1)) u_c2 (
    .clk(clk), .en(1'b1), .a(t_r), .b(v0_r), .z(c2)
  );
  always_ff @(posedge clk) begin
    c0 <= v0_r;
    c1 <= c1_r;
  end

endmodule
