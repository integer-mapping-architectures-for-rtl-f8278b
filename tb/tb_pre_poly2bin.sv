// tb_pre_poly2bin: self-checking testbench of the output converter.
// Streams random coefficient sets (each 0..104, plus the extreme sets with
// all coefficients 0 or 104 and with only the j^2 terms set) and checks
//   real = sum_i 2^i (C[i][0] - C[i][2]),  imag = sum_i 2^i C[i][1]
// P2B_LAT cycles later.
module tb_pre_poly2bin;
  import pre_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [2:0][2:0][COEF_W-1:0] c;
  logic ov;
  logic signed [OUT_W-1:0] re, im;
  int checks = 0, failures = 0;

  pre_poly2bin dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .c(c), .out_valid(ov), .re(re), .im(im));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hre[int], him[int];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (hre.exists(cyc - P2B_LAT)) begin
        if (!ov || int'(re) != hre[cyc - P2B_LAT] || int'(im) != him[cyc - P2B_LAT]) begin
          failures++;
          $display("FAIL valid=%0d re=%0d exp %0d im=%0d exp %0d", ov, re, hre[cyc - P2B_LAT], im, him[cyc - P2B_LAT]);
        end
      end else if (ov) begin
        failures++; $display("FAIL spurious valid");
      end
    end
  end

  initial begin
    c = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int er, ei, cv;
      @(negedge clk);
      if (t % 31 == 7) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      er = 0; ei = 0;
      for (int i = 0; i < 3; i++)
        for (int k = 0; k < 3; k++) begin
          case (t)
            0:       cv = 0;
            1:       cv = 104;
            2:       cv = (k == 2) ? 104 : 0;
            default: cv = int'($urandom_range(0, 104));
          endcase
          c[i][k] = COEF_W'(cv);
          if (k == 0) er += cv << i;
          if (k == 2) er -= cv << i;
          if (k == 1) ei += cv << i;
        end
      hre[cyc] = er;
      him[cyc] = ei;
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
