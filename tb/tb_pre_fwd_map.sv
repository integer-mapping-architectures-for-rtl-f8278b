// tb_pre_fwd_map: self-checking testbench of the forward polynomial map.
// For the moduli 3, 5 and 7 it streams all 16 coefficient-bit patterns,
// one per cycle, and checks each of the nine outputs against a direct
// evaluation of a00 + a10*x + a01*y + a11*x*y at x, y in {-1, 0, +1},
// reduced modulo M, exactly FWD_LAT cycles after the input.
module tb_pre_fwd_map;
  import pre_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0][1:0] coef;
  logic ov3, ov5, ov7;
  residue_t [2:0][2:0] v3, v5, v7;
  int checks = 0, failures = 0;

  pre_fwd_map #(.M(3)) d3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .coef(coef), .out_valid(ov3), .v(v3));
  pre_fwd_map #(.M(5)) d5 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .coef(coef), .out_valid(ov5), .v(v5));
  pre_fwd_map          d7 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .coef(coef), .out_valid(ov7), .v(v7));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int eval(int pat, int x, int y, int m);
    int s;
    s = (pat & 1) + ((pat >> 1) & 1) * x + ((pat >> 2) & 1) * y
      + ((pat >> 3) & 1) * x * y;
    return ((s % m) + m) % m;
  endfunction

  // pattern bit 0 = coef[0][0], 1 = coef[0][1], 2 = coef[1][0], 3 = coef[1][1]
  int cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
  end

  // Checker: samples outputs on every edge and matches them to inputs
  // sent FWD_LAT cycles earlier.
  int hist[int];
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (hist.exists(cyc - FWD_LAT)) begin
        int pat;
        pat = hist[cyc - FWD_LAT];
        checks++;
        if (!(ov3 && ov5 && ov7)) begin failures++; $display("FAIL valid at %0d", cyc); end
        for (int ix = 0; ix < 3; ix++)
          for (int iy = 0; iy < 3; iy++) begin
            int x, y;
            x = ix - 1; y = iy - 1;
            checks += 3;
            if (int'(v3[ix][iy]) != eval(pat, x, y, 3)) begin failures++; $display("FAIL m3 pat=%0d x=%0d y=%0d got %0d", pat, x, y, v3[ix][iy]); end
            if (int'(v5[ix][iy]) != eval(pat, x, y, 5)) begin failures++; $display("FAIL m5 pat=%0d x=%0d y=%0d got %0d", pat, x, y, v5[ix][iy]); end
            if (int'(v7[ix][iy]) != eval(pat, x, y, 7)) begin failures++; $display("FAIL m7 pat=%0d x=%0d y=%0d got %0d", pat, x, y, v7[ix][iy]); end
          end
      end else begin
        checks++;
        if (ov3 || ov5 || ov7) begin failures++; $display("FAIL spurious valid at %0d", cyc); end
      end
    end
  end

  initial begin
    coef = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < 16; p++) begin
      @(negedge clk);
      in_valid = 1;
      coef = {p[3], p[2], p[1], p[0]};
      hist[cyc] = p;
      if (p == 7) begin   // one idle cycle in the stream
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
