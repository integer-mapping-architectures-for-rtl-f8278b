// tb_pre_rev_map: self-checking testbench of the reverse polynomial map.
// For M = 3, 5, 7 it draws random coefficient sets c[i][k] (degree <= 2 in
// X and Y), evaluates the polynomial at the nine root pairs here, streams
// the evaluations one set per cycle, and checks that the coefficients come
// back REV_LAT cycles later.
module tb_pre_rev_map;
  import pre_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  residue_t [2:0][2:0] v3, v5, v7, c3, c5, c7;
  logic ov3, ov5, ov7;
  int checks = 0, failures = 0;

  pre_rev_map #(.M(3)) d3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v(v3), .out_valid(ov3), .c(c3));
  pre_rev_map #(.M(5)) d5 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v(v5), .out_valid(ov5), .c(c5));
  pre_rev_map          d7 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v(v7), .out_valid(ov7), .c(c7));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [2:0][2:0][2:0][2:0] coefs_t;   // [modulus][i][k]
  coefs_t hist[int];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int evalp(int c[3][3], int x, int y, int m);
    int s = 0;
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < 3; k++)
        s += c[i][k] * (x ** i) * (y ** k);
    return ((s % m) + m) % m;
  endfunction

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (hist.exists(cyc - REV_LAT)) begin
        coefs_t e;
        e = hist[cyc - REV_LAT];
        checks++;
        if (!(ov3 && ov5 && ov7)) begin failures++; $display("FAIL valid at %0d", cyc); end
        for (int i = 0; i < 3; i++)
          for (int k = 0; k < 3; k++) begin
            checks += 3;
            if (c3[i][k] != e[0][i][k]) begin failures++; $display("FAIL m3 c[%0d][%0d]=%0d exp %0d", i, k, c3[i][k], e[0][i][k]); end
            if (c5[i][k] != e[1][i][k]) begin failures++; $display("FAIL m5 c[%0d][%0d]=%0d exp %0d", i, k, c5[i][k], e[1][i][k]); end
            if (c7[i][k] != e[2][i][k]) begin failures++; $display("FAIL m7 c[%0d][%0d]=%0d exp %0d", i, k, c7[i][k], e[2][i][k]); end
          end
      end else begin
        checks++;
        if (ov3 || ov5 || ov7) begin failures++; $display("FAIL spurious valid"); end
      end
    end
  end

  initial begin
    int mods[3];
    mods = '{3, 5, 7};
    v3 = '0; v5 = '0; v7 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      coefs_t e;
      int cm[3][3];
      @(negedge clk);
      if (t % 17 == 5) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int g = 0; g < 3; g++) begin
        for (int i = 0; i < 3; i++)
          for (int k = 0; k < 3; k++) begin
            cm[i][k] = int'($urandom_range(0, mods[g] - 1));
            e[g][i][k] = 3'(cm[i][k]);
          end
        for (int ix = 0; ix < 3; ix++)
          for (int iy = 0; iy < 3; iy++) begin
            residue_t r;
            r = 3'(evalp(cm, ix - 1, iy - 1, mods[g]));
            case (g)
              0: v3[ix][iy] = r;
              1: v5[ix][iy] = r;
              default: v7[ix][iy] = r;
            endcase
          end
      end
      hist[cyc] = e;
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
