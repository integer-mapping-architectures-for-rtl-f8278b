// tb_pre_wmod_add: self-checking testbench of the weighted modulo adder.
// Three instances (M=3 weights 1,2; M=5 weights 2,3; M=7 weights 5,2) get
// every one of the 64 input words; each output is compared one cycle later
// with (WA*a + WB*b) mod M computed here.
module tb_pre_wmod_add;
  import pre_pkg::*;

  logic clk = 0;
  residue_t a, b, z3, z5, z7;
  int checks = 0, failures = 0;

  pre_wmod_add #(.M(3), .WA(1), .WB(2)) d3 (.clk(clk), .en(1'b1), .a(a), .b(b), .z(z3));
  pre_wmod_add #(.M(5), .WA(2), .WB(3)) d5 (.clk(clk), .en(1'b1), .a(a), .b(b), .z(z5));
  pre_wmod_add #(.M(7), .WA(5), .WB(2)) d7 (.clk(clk), .en(1'b1), .a(a), .b(b), .z(z7));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, residue_t got, int exp);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", name, a, b, got, exp);
    end
  endtask

  initial begin
    a = 0; b = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      a = 3'(i / 8); b = 3'(i % 8);
      @(posedge clk); #1;
      check("m3", z3, (1 * (i / 8) + 2 * (i % 8)) % 3);
      check("m5", z5, (2 * (i / 8) + 3 * (i % 8)) % 5);
      check("m7", z7, (5 * (i / 8) + 2 * (i % 8)) % 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
