// pre_engine: Polynomial Ring Engine datapath for complex inner products.
//
// The engine computes, over a block of N sample pairs, the complex inner
// product  y = sum_n x_n * h_n  of Gaussian integers whose real and
// imaginary parts are 2-bit unsigned numbers (0..3). It never forms a
// binary product. Instead:
//   1. Binary to polynomial (wiring): each operand becomes the polynomial
//      a00 + a10*X + a01*Y + a11*X*Y of its bits, with X standing for 2 and
//      Y for j.
//   2. Modulo reduction: none is needed, the coefficients are bits.
//   3. Forward polynomial map (pre_fwd_map), per modulus 3, 5, 7: the
//      polynomial is evaluated at the 9 root pairs {-1,0,1}^2, giving
//      3 x 9 = 27 independent 3-bit ring channels.
//   4. Data processing (pre_channel_mac), per channel: multiply the two
//      operands' channel values and accumulate over the block.
//   5. Reverse polynomial map (pre_rev_map), per modulus: recover the nine
//      coefficients of the degree-2 result polynomial in X and Y.
//   6. CRT (pre_crt), one per coefficient: combine the residues mod 3, 5, 7
//      into the coefficient as an integer 0..104.
//   7. Polynomial to binary (pre_poly2bin): apply j^2 = -1 and X = 2.
// All arithmetic up to the CRT is done by pipelined 6-input, 3-output
// blocks; only the CRT's last row and the output converter use binary
// adders.
//
// Exactness: each result coefficient is a sum of at most 4 bit products
// per sample pair (the X*Y coefficient), so a block of up to 26 pairs keeps
// every coefficient below 3*5*7 = 105 and the result is exact (real part
// in -234..234, imaginary part in 0..468). Longer blocks are accepted;
// a coefficient that reaches 105 wraps modulo 105, and the output is then
// computed from the wrapped coefficient.
//
// Interface: on each cycle with in_valid, one pair (x, h) is taken; in_first
// marks the first pair of a block and in_last its last (both on a
// one-pair block). out_valid pulses once per block with the result on
// out_re / out_im (two's complement).
//
// Timing: out_valid follows the cycle that presents the last pair by
// FWD_LAT + MAC_LAT + REV_LAT + CRT_LAT + P2B_LAT = 13 cycles. One pair
// is accepted every cycle and blocks may follow each other without a gap.
//
// The moduli, the roots, the channel count, the staging of the maps and
// the output converter follow the example architecture of the engine; the
// inner-product channel, the block markers, the reset and the exact
// pipeline depths are this design's choices.
module pre_engine
  import pre_pkg::*;
#(
  parameter int unsigned MOD1 = 3,
  parameter int unsigned MOD2 = 5,
  parameter int unsigned MOD3 = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic                    in_last,
  input  logic [1:0]              x_re,
  input  logic [1:0]              x_im,
  input  logic [1:0]              h_re,
  input  logic [1:0]              h_im,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);

  localparam int unsigned MODS [NMOD] = '{MOD1, MOD2, MOD3};

  // Binary to polynomial: coef[k][i] is the coefficient of X^i Y^k.
  logic [1:0][1:0] x_coef, h_coef;
  assign x_coef = {x_im, x_re};
  assign h_coef = {h_im, h_re};

  // Block markers travel alongside the forward map.
  logic [FWD_LAT-1:0] first_pipe, last_pipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      first_pipe <= '0;
      last_pipe  <= '0;
    end else begin
      first_pipe <= {first_pipe[FWD_LAT-2:0], in_first};
      last_pipe  <= {last_pipe[FWD_LAT-2:0], in_last};
    end

  logic     [NMOD-1:0]                        fwd_valid, mac_valid, rev_valid;
  residue_t [NMOD-1:0][NROOT-1:0][NROOT-1:0]  xv, hv, acc, coef_res;
  logic     [NMOD-1:0][NROOT-1:0][NROOT-1:0]  ch_valid;

  for (genvar g = 0; g < NMOD; g++) begin : g_mod
    localparam int unsigned M = MODS[g];

    pre_fwd_map #(.M(M)) u_fwd_x (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .coef(x_coef),
      .out_valid(fwd_valid[g]), .v(xv[g])
    );

    // The h map's valid equals the x map's; it is left unused.
    logic h_valid_unused;
    pre_fwd_map #(.M(M)) u_fwd_h (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .coef(h_coef),
      .out_valid(h_valid_unused), .v(hv[g])
    );

    for (genvar ix = 0; ix < NROOT; ix++) begin : g_x
      for (genvar iy = 0; iy < NROOT; iy++) begin : g_y
        pre_channel_mac #(.M(M)) u_mac (
          .clk(clk), .rst_n(rst_n),
          .in_valid(fwd_valid[g]),
          .in_first(first_pipe[FWD_LAT-1]),
          .in_last(last_pipe[FWD_LAT-1]),
          .a(xv[g][ix][iy]), .b(hv[g][ix][iy]),
          .out_valid(ch_valid[g][ix][iy]), .acc(acc[g][ix][iy])
        );
      end
    end

    // All channels run in lock step; one of them paces the next stage.
    assign mac_valid[g] = ch_valid[g][0][0];

    pre_rev_map #(.M(M)) u_rev (
      .clk(clk), .rst_n(rst_n), .in_valid(mac_valid[g]), .v(acc[g]),
      .out_valid(rev_valid[g]), .c(coef_res[g])
    );
  end

  // One CRT per result coefficient.
  logic [NROOT-1:0][NROOT-1:0][COEF_W-1:0] coef_int;
  logic [NROOT-1:0][NROOT-1:0]             crt_valid;

  for (genvar i = 0; i < NROOT; i++) begin : g_ci
    for (genvar k = 0; k < NROOT; k++) begin : g_ck
      pre_crt #(.M1(MOD1), .M2(MOD2), .M3(MOD3)) u_crt (
        .clk(clk), .rst_n(rst_n), .in_valid(rev_valid[0]),
        .r1(coef_res[0][i][k]), .r2(coef_res[1][i][k]),
        .r3(coef_res[2][i][k]),
        .out_valid(crt_valid[i][k]), .x(coef_int[i][k])
      );
    end
  end

  pre_poly2bin u_p2b (
    .clk(clk), .rst_n(rst_n), .in_valid(crt_valid[0][0]), .c(coef_int),
    .out_valid(out_valid), .re(out_re), .im(out_im)
  );

  // The channels of all moduli must stay in lock step.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fwd_valid == {NMOD{fwd_valid[0]}} &&
                   mac_valid == {NMOD{mac_valid[0]}} &&
                   rev_valid == {NMOD{rev_valid[0]}})
    else $error("pre_engine: modulus pipelines out of step");

  // A block is opened by in_first before in_last closes it.
  logic in_block;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        in_block <= 1'b0;
    else if (in_valid) in_block <= !in_last;

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_first |-> in_block)
    else $error("pre_engine: sample outside a block (in_first missing)");

endmodule
