// tb_pre_crt: self-checking testbench of the mixed-radix CRT.
// Streams the residues (X mod 3, X mod 5, X mod 7) of every X in 0..104,
// one per cycle in a shuffled order with a few idle cycles, and checks that
// X comes out CRT_LAT cycles later.
module tb_pre_crt;
  import pre_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  residue_t r1, r2, r3;
  logic ov;
  logic [COEF_W-1:0] x;
  int checks = 0, failures = 0;

  pre_crt dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .r1(r1), .r2(r2), .r3(r3), .out_valid(ov), .x(x));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist[int];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (hist.exists(cyc - CRT_LAT)) begin
        if (!ov || int'(x) != hist[cyc - CRT_LAT]) begin
          failures++; $display("FAIL valid=%0d x=%0d exp %0d", ov, x, hist[cyc - CRT_LAT]);
        end
      end else if (ov) begin
        failures++; $display("FAIL spurious valid");
      end
    end
  end

  initial begin
    int order[105];
    for (int i = 0; i < 105; i++) order[i] = i;
    order.shuffle();
    r1 = 0; r2 = 0; r3 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 105; i++) begin
      @(negedge clk);
      if (i % 23 == 11) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      r1 = 3'(order[i] % 3); r2 = 3'(order[i] % 5); r3 = 3'(order[i] % 7);
      hist[cyc] = order[i];
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
