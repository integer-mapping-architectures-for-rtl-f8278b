// tb_pre_lut6: self-checking testbench of the pipelined 6-input block.
// Loads a table whose entry i is (5*i + 3) mod 8 (an arbitrary function
// that uses all 64 entries), applies every input word, and checks that the
// output equals the table entry exactly one cycle later, and that the
// output holds while the enable is low. A second instance tests the
// inputs in a different tree order (least significant bit first) and must
// give the same function.
module tb_pre_lut6;
  import pre_pkg::*;

  function automatic lut6_table_t make_table();
    lut6_table_t t;
    for (int i = 0; i < 64; i++) t[i] = 3'((5 * i + 3) % 8);
    return t;
  endfunction

  logic clk = 0;
  logic en;
  residue_t a, b, z, z2;
  localparam int unsigned ORD2 [6] = '{0, 1, 2, 3, 4, 5};
  int checks = 0, failures = 0;

  pre_lut6 #(.TABLE(make_table())) dut (.clk(clk), .en(en), .a(a), .b(b), .z(z));
  pre_lut6 #(.TABLE(make_table()), .ORDER(ORD2)) dut2 (.clk(clk), .en(en), .a(a), .b(b), .z(z2));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    residue_t held;
    en = 1; a = 0; b = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      {a, b} = 6'(i);
      @(posedge clk); #1;
      checks++;
      if (z !== 3'((5 * i + 3) % 8)) begin
        failures++;
        $display("FAIL in=%0d z=%0d exp=%0d", i, z, (5 * i + 3) % 8);
      end
      checks++;
      if (z2 !== 3'((5 * i + 3) % 8)) begin
        failures++;
        $display("FAIL order2 in=%0d z=%0d exp=%0d", i, z2, (5 * i + 3) % 8);
      end
    end
    // Enable low: output must hold.
    held = z;
    @(negedge clk); en = 0; {a, b} = 6'd17;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (z !== held) begin failures++; $display("FAIL hold"); end
    @(negedge clk); en = 1;
    @(posedge clk); #1 checks++;
    if (z !== 3'((5 * 17 + 3) % 8)) begin failures++; $display("FAIL re-enable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
