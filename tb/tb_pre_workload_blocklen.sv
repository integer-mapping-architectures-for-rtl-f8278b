// tb_pre_workload_blocklen: the engine on inner products of different block
// lengths, with uniformly random inputs (real and imaginary parts 0..3).
//
// Block lengths: 26 (the longest block that can never overflow), 27 (the
// X*Y coefficient may overflow), 52 (the last length at which only X*Y can
// overflow), 53, and 70 to 150 in steps of 10. Each length is run for a
// number of blocks; every result is compared with the coefficient-level
// model (coefficients of X^i Y^k summed, each taken modulo 105, then
// X = 2, Y = j applied) and, where no coefficient reached 105, also with
// the plain complex inner product. The testbench reports, per length, how
// many blocks overflowed and in which coefficients, and checks that none
// did at 26 and that only X*Y can at 27..52.
module tb_pre_workload_blocklen;
  import pre_pkg::*;

  localparam int LAT = FWD_LAT + MAC_LAT + REV_LAT + CRT_LAT + P2B_LAT;
  localparam int MPROD = 105;
  localparam int NBLK = 40;      // blocks per length

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [1:0] x_re = 0, x_im = 0, h_re = 0, h_im = 0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_re, out_im;
  int checks = 0, failures = 0;

  pre_engine dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_last(in_last), .x_re(x_re), .x_im(x_im), .h_re(h_re), .h_im(h_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_re[int], exp_im[int];
  int n_results = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (exp_re.exists(cyc - LAT)) begin
        checks++;
        n_results++;
        if (!out_valid || int'(out_re) != exp_re[cyc - LAT] ||
            int'(out_im) != exp_im[cyc - LAT]) begin
          failures++;
          $display("FAIL at %0d: re=%0d (exp %0d) im=%0d (exp %0d)",
                   cyc, out_re, exp_re[cyc - LAT], out_im, exp_im[cyc - LAT]);
        end
      end else if (out_valid) begin
        checks++; failures++;
        $display("FAIL spurious out_valid at %0d", cyc);
      end
    end
  end

  // Runs one block back to back with the next; returns overflow flags.
  task automatic run_block(int len, output bit ovf_xy, output bit ovf_other);
    int cf[3][3];
    int dre, dim, wre, wim;
    for (int i = 0; i < 3; i++) for (int k = 0; k < 3; k++) cf[i][k] = 0;
    dre = 0; dim = 0;
    for (int n = 0; n < len; n++) begin
      int xr, xi, hr, hi;
      @(negedge clk);
      xr = $urandom_range(0, 3); xi = $urandom_range(0, 3);
      hr = $urandom_range(0, 3); hi = $urandom_range(0, 3);
      in_valid = 1; in_first = (n == 0); in_last = (n == len - 1);
      x_re = 2'(xr); x_im = 2'(xi); h_re = 2'(hr); h_im = 2'(hi);
      dre += xr * hr - xi * hi;
      dim += xr * hi + xi * hr;
      for (int i1 = 0; i1 < 2; i1++) for (int k1 = 0; k1 < 2; k1++)
        for (int i2 = 0; i2 < 2; i2++) for (int k2 = 0; k2 < 2; k2++)
          cf[i1 + i2][k1 + k2] += ((((k1 != 0) ? xi : xr) >> i1) & 1)
                                * ((((k2 != 0) ? hi : hr) >> i2) & 1);
    end
    ovf_xy = (cf[1][1] >= MPROD);
    ovf_other = 0;
    wre = 0; wim = 0;
    for (int i = 0; i < 3; i++) for (int k = 0; k < 3; k++) begin
      if (cf[i][k] >= MPROD && !(i == 1 && k == 1)) ovf_other = 1;
      if (k == 0) wre += (cf[i][k] % MPROD) << i;
      if (k == 2) wre -= (cf[i][k] % MPROD) << i;
      if (k == 1) wim += (cf[i][k] % MPROD) << i;
    end
    if (!ovf_xy && !ovf_other) begin
      checks++;
      if (wre != dre || wim != dim) begin
        failures++; $display("FAIL model mismatch");
      end
    end
    exp_re[cyc] = wre;
    exp_im[cyc] = wim;
  endtask

  initial begin
    int lens[$];
    lens = '{26, 27, 52, 53, 70, 80, 90, 100, 110, 120, 130, 140, 150};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (lens[li]) begin
      int n_xy, n_other;
      n_xy = 0; n_other = 0;
      for (int b = 0; b < NBLK; b++) begin
        bit oxy, oot;
        run_block(lens[li], oxy, oot);
        n_xy += oxy;
        n_other += oot;
      end
      $display("block length %0d: %0d blocks, X*Y overflowed in %0d, other coefficients in %0d",
               lens[li], NBLK, n_xy, n_other);
      if (lens[li] <= 26) begin
        checks++;
        if (n_xy + n_other != 0) begin failures++; $display("FAIL overflow at length %0d", lens[li]); end
      end
      if (lens[li] <= 52) begin
        checks++;
        if (n_other != 0) begin failures++; $display("FAIL non-XY overflow at length %0d", lens[li]); end
      end
    end
    @(negedge clk) in_valid = 0; in_first = 0; in_last = 0;
    repeat (LAT + 4) @(posedge clk);
    #2;
    checks++;
    if (n_results != exp_re.num()) begin
      failures++; $display("FAIL %0d results for %0d blocks", n_results, exp_re.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
