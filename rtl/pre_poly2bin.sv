// pre_poly2bin: polynomial-to-binary output converter.
//
// Input: the nine reconstructed coefficients C[i][k] of X^i Y^k
// (i, k = 0..2), each an unsigned integer 0 .. M1*M2*M3-1. With X = 2 and
// Y = j (so Y^2 = -1) the complex result is
//     real = sum_i 2^i * (C[i][0] - C[i][2])
//     imag = sum_i 2^i *  C[i][1]
// Row 1 is a row of binary subtractors that separates the j^2 terms from
// the real-part coefficients; this is where the real part gets its sign
// bit. Row 2 is a pair of parallel shift adders, one for each part.
//
// Outputs are two's complement, OUT_W bits, wide enough for the largest
// sum the coefficients can form, so no result wraps in this block.
//
// Timing: P2B_LAT = 2 cycles, one new coefficient set per cycle.
//
// The subtractor row and the two parallel shift adders follow the source
// architecture; the output width and the register per row are chosen here.
module pre_poly2bin
  import pre_pkg::*;
(
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     in_valid,
  input  logic [NROOT-1:0][NROOT-1:0][COEF_W-1:0]  c,
  output logic                                     out_valid,
  output logic signed [OUT_W-1:0]                  re,
  output logic signed [OUT_W-1:0]                  im
);

  logic signed [COEF_W:0] r_diff [NROOT];
  logic        [COEF_W-1:0] i_coef [NROOT];
  logic       valid1;

  // Row 1: subtractors.
  always_ff @(posedge clk)
    for (int i = 0; i < NROOT; i++) begin
      r_diff[i] <= $signed({1'b0, c[i][0]}) - $signed({1'b0, c[i][2]});
      i_coef[i] <= c[i][1];
    end

  // Row 2: parallel shift adders.
  always_ff @(posedge clk) begin
    re <= OUT_W'(r_diff[0]) + (OUT_W'(r_diff[1]) <<< 1)
        + (OUT_W'(r_diff[2]) <<< 2);
    im <= $signed(OUT_W'(i_coef[0]) + (OUT_W'(i_coef[1]) << 1)
        + (OUT_W'(i_coef[2]) << 2));
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
