// pre_fwd_map: forward polynomial mapping for one modulus M.
//
// The input sample is a polynomial of degree one in two indeterminates,
// X (binary weight 2) and Y (the complex operator j):
//     A(X,Y) = a00 + a10*X + a01*Y + a11*X*Y,
// whose coefficients are the bits of the complex sample
// (real = a00 + 2*a10, imaginary = a01 + 2*a11). Because every coefficient
// is already below M, the modulo reduction is a no-op and the bits enter
// as residues directly.
//
// The map evaluates A at all nine root pairs (x, y), x, y in {-1, 0, +1}
// modulo M. The evaluation matrix is the tensor product of the 1-D
// evaluation matrices, so it is done in two pipelined stages, one per
// indeterminate:
//     stage 1 (along X): P_k(x) = a0k + x*a1k        (k = 0, 1)
//     stage 2 (along Y): v(x,y) = P_0(x) + y*P_1(x)
// Each evaluation at a root of +1 or -1 is one weighted modulo adder
// (weights 1 and the root's residue); evaluation at 0 needs no block, only
// a pipeline register.
//
// Interface: coef[k][i] is the coefficient of X^i Y^k (one bit). v[ix][iy]
// is the channel for root index ix of X and iy of Y, root index 0, 1, 2
// meaning -1, 0, +1. in_valid is carried alongside as out_valid.
//
// Timing: FWD_LAT = 2 cycles, one new sample per cycle.
//
// The roots, the one-stage-per-indeterminate structure and the use of
// weighted modulo adders follow the source architecture; evaluating X
// before Y and the single register per stage are choices made here.
module pre_fwd_map
  import pre_pkg::*;
#(
  parameter int unsigned M = 7
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic     [1:0][1:0]                  coef,
  output logic                                 out_valid,
  output residue_t [NROOT-1:0][NROOT-1:0]      v
);

  // Stage 1 result: p[ix][k] = P_k(x_ix).
  residue_t [NROOT-1:0][1:0] p;
  logic                      valid1;

  for (genvar ix = 0; ix < NROOT; ix++) begin : g_x
    localparam int unsigned RX = root_res(ix, M);
    for (genvar k = 0; k < 2; k++) begin : g_k
      if (RX == 0) begin : g_latch
        always_ff @(posedge clk) p[ix][k] <= residue_t'(coef[k][0]);
      end else begin : g_add
        pre_wmod_add #(.M(M), .WA(1), .WB(RX)) u_add (
          .clk(clk), .en(1'b1),
          .a(residue_t'(coef[k][0])), .b(residue_t'(coef[k][1])),
          .z(p[ix][k])
        );
      end
    end
  end

  for (genvar ix = 0; ix < NROOT; ix++) begin : g_x2
    for (genvar iy = 0; iy < NROOT; iy++) begin : g_y
      localparam int unsigned RY = root_res(iy, M);
      if (RY == 0) begin : g_latch
        always_ff @(posedge clk) v[ix][iy] <= p[ix][0];
      end else begin : g_add
        pre_wmod_add #(.M(M), .WA(1), .WB(RY)) u_add (
          .clk(clk), .en(1'b1), .a(p[ix][0]), .b(p[ix][1]), .z(v[ix][iy])
        );
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      valid1    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      valid1    <= in_valid;
      out_valid <= valid1;
    end

endmodule
