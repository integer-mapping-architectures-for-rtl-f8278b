// pre_crt: three-modulus Chinese Remainder reconstruction by mixed radix.
//
// From the residues r1, r2, r3 of an integer X (0 <= X < M1*M2*M3) it
// forms the mixed-radix digits
//     d1 = r1
//     d2 = (r2 - d1) * M1^-1            mod M2
//     d3 = ((r3 - d1) * M1^-1 - d2) * M2^-1   mod M3
// and then X = d1 + M1*d2 + M1*M2*d3. Every digit step is a weighted
// modulo adder, i.e. one pipelined 6-input, 3-output block; the last step
// is a small binary adder. The subtractions use the weight M-w for -w,
// and the digits of one modulus are used as plain integers in the next
// modulus, which the blocks allow because their inputs are any 0..7.
//
// Row 1: d2 and t3 = (r3 - r1)*M1^-1 mod M3, r1 registered.
// Row 2: d3 = (t3 - d2)*M2^-1 mod M3, d1 and d2 registered.
// Row 3: the binary sum, registered.
//
// Timing: CRT_LAT = 3 cycles, one new coefficient per cycle.
//
// A mixed-radix CRT built from 6-input blocks is what the source
// architecture calls for; the digit order (M1, M2, M3), the formulas and
// the register rows are worked out here.
module pre_crt
  import pre_pkg::*;
#(
  parameter int unsigned M1 = 3,
  parameter int unsigned M2 = 5,
  parameter int unsigned M3 = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  residue_t          r1,
  input  residue_t          r2,
  input  residue_t          r3,
  output logic              out_valid,
  output logic [COEF_W-1:0] x
);

  localparam int unsigned I12 = mod_inv(M1, M2);
  localparam int unsigned I13 = mod_inv(M1, M3);
  localparam int unsigned I23 = mod_inv(M2, M3);

  residue_t d1_a, d2_a, t3_a;     // after row 1
  residue_t d1_b, d2_b, d3_b;     // after row 2
  logic [CRT_LAT-1:0] vpipe;

  // Row 1.
  pre_wmod_add #(.M(M2), .WA(I12), .WB(M2 - I12)) u_d2 (
    .clk(clk), .en(1'b1), .a(r2), .b(r1), .z(d2_a)
  );
  pre_wmod_add #(.M(M3), .WA(I13), .WB(M3 - I13)) u_t3 (
    .clk(clk), .en(1'b1), .a(r3), .b(r1), .z(t3_a)
  );
  always_ff @(posedge clk) d1_a <= r1;

  // Row 2.
  pre_wmod_add #(.M(M3), .WA(I23), .WB(M3 - I23)) u_d3 (
    .clk(clk), .en(1'b1), .a(t3_a), .b(d2_a), .z(d3_b)
  );
  always_ff @(posedge clk) begin
    d1_b <= d1_a;
    d2_b <= d2_a;
  end

  // Row 3: binary adder.
  always_ff @(posedge clk)
    x <= COEF_W'(d1_b) + COEF_W'(M1) * COEF_W'(d2_b)
       + COEF_W'(M1 * M2) * COEF_W'(d3_b);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[CRT_LAT-2:0], in_valid};

  assign out_valid = vpipe[CRT_LAT-1];

  initial begin
    assert (M1 * M2 * M3 <= (1 << COEF_W))
      else $error("pre_crt: M1*M2*M3 does not fit in COEF_W bits");
    assert (I12 != 0 && I13 != 0 && I23 != 0)
      else $error("pre_crt: moduli are not pairwise prime");
  end

endmodule
