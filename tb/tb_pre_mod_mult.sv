// tb_pre_mod_mult: self-checking testbench of the modulo multiplier cell.
// The default M = 7 cell and an M = 5 cell get every pair of residues in
// a back-to-back stream (one pair per cycle); each product is checked
// against (a*b) mod M one cycle after its operands.
module tb_pre_mod_mult;
  import pre_pkg::*;

  logic clk = 0;
  residue_t a, b, z7, z5;
  int checks = 0, failures = 0;

  pre_mod_mult dut7 (.clk(clk), .en(1'b1), .a(a), .b(b), .z(z7));
  pre_mod_mult #(.M(5)) dut5 (.clk(clk), .en(1'b1), .a(a), .b(b), .z(z5));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pa, pb;
    a = 0; b = 0; pa = -1; pb = 0;
    for (int i = 0; i <= 64; i++) begin
      @(negedge clk);
      if (i < 64) begin a = 3'(i / 8); b = 3'(i % 8); end
      @(posedge clk); #1;
      // Compare with the operands of this edge (one cycle latency).
      if (i < 64) begin
        checks++;
        if (int'(z7) != ((i / 8) * (i % 8)) % 7) begin
          failures++; $display("FAIL m7 %0d*%0d got %0d", i / 8, i % 8, z7);
        end
        if (i / 8 < 5 && i % 8 < 5) begin
          checks++;
          if (int'(z5) != ((i / 8) * (i % 8)) % 5) begin
            failures++; $display("FAIL m5 %0d*%0d got %0d", i / 8, i % 8, z5);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
