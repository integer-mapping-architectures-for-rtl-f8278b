// pre_channel_mac: inner-product computation of one ring channel.
//
// Each of the 27 channels computes, independently of all others, the sum
// over a block of products a_n * b_n modulo its modulus M. Because the
// forward map is a ring homomorphism, the channel value of a product is the
// product of the channel values, and likewise for sums, so the channel
// ends the block holding the value of the result polynomial at its root
// pair.
//
// Row 1 is a pipelined modulo multiplier. Row 2 is a weighted modulo adder
// (weights 1, 1) whose output register is the accumulator: its second
// operand is the accumulator itself, or 0 for the first product of a
// block. The accumulator only advances on valid products.
//
// Interface: in_first marks the first sample of a block, in_last its last;
// they are only looked at with in_valid. out_valid pulses for one cycle
// when acc holds the complete block sum; acc stays there until the next
// valid product.
//
// Timing: MAC_LAT = 2 cycles from the last sample to out_valid; one
// sample per cycle; blocks may follow each other without a gap.
module pre_channel_mac
  import pre_pkg::*;
#(
  parameter int unsigned M = 7
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  logic     in_first,
  input  logic     in_last,
  input  residue_t a,
  input  residue_t b,
  output logic     out_valid,
  output residue_t acc
);

  residue_t prod;
  logic     v1, f1, l1;

  pre_mod_mult #(.M(M)) u_mul (
    .clk(clk), .en(1'b1), .a(a), .b(b), .z(prod)
  );

  pre_wmod_add #(.M(M), .WA(1), .WB(1)) u_acc (
    .clk(clk), .en(v1), .a(prod), .b(f1 ? residue_t'(0) : acc), .z(acc)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1        <= 1'b0;
      f1        <= 1'b0;
      l1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      f1        <= in_first;
      l1        <= in_last;
      out_valid <= v1 & l1;
    end

endmodule
