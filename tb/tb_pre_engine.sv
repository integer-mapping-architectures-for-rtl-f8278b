// tb_pre_engine: end-to-end testbench of the engine at its default
// parameters (moduli 3, 5, 7).
//
// It streams blocks of complex sample pairs (x, h), real and imaginary
// parts 0..3, and checks every block result against two models kept here:
//   - the plain complex sum of products, for blocks whose result
//     coefficients all stay below 105 (always the case up to 26 pairs);
//   - the coefficient-level model: the nine coefficients of the product
//     polynomials in X = 2 and Y = j summed over the block, each taken
//     modulo 105, then combined with j^2 = -1; this is what the engine
//     must produce for longer blocks where a coefficient overflows.
// The result must appear exactly 13 cycles (FWD+MAC+REV+CRT+P2B) after
// the block's last pair, and out_valid must not pulse at any other time.
//
// Mechanisms counted (each must occur at least once): one-pair blocks,
// blocks of the full exact length 26 at the extremes of the output range
// (real +234 and -234, imaginary 468), negative real results, blocks that
// follow the previous block without a gap, idle cycles inside a block and
// blocks whose X*Y coefficient overflows and wraps modulo 105.
module tb_pre_engine;
  import pre_pkg::*;

  localparam int LAT = FWD_LAT + MAC_LAT + REV_LAT + CRT_LAT + P2B_LAT;
  localparam int MPROD = 105;

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

  // Mechanism counters.
  int n_single = 0, n_max_pos = 0, n_max_neg = 0, n_max_im = 0, n_neg = 0;
  int n_back2back = 0, n_gap = 0, n_overflow = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (exp_re.exists(cyc - LAT)) begin
        checks++;
        n_results++;
        if (!out_valid || int'(out_re) != exp_re[cyc - LAT] ||
            int'(out_im) != exp_im[cyc - LAT]) begin
          failures++;
          $display("FAIL at %0d: valid=%0d re=%0d (exp %0d) im=%0d (exp %0d)",
                   cyc, out_valid, out_re, exp_re[cyc - LAT], out_im, exp_im[cyc - LAT]);
        end
      end else if (out_valid) begin
        checks++; failures++;
        $display("FAIL spurious out_valid at %0d", cyc);
      end
    end
  end

  // Kind of block: 0 random, 1 all +3 (real max), 2 all 3j*3j (real min),
  // 3 all (3+3j)^2 (imag max).
  task automatic run_block(int len, int kind, bit gap_after, bit idle_inside);
    int cf[3][3];
    int dre, dim, wre, wim;
    bit ovf;
    for (int i = 0; i < 3; i++) for (int k = 0; k < 3; k++) cf[i][k] = 0;
    dre = 0; dim = 0;
    for (int n = 0; n < len; n++) begin
      int xr, xi, hr, hi;
      @(negedge clk);
      if (idle_inside && n == len / 2 && n > 0) begin
        in_valid = 0; in_first = 0; in_last = 0;
        n_gap++;
        @(negedge clk);
      end
      case (kind)
        1:       begin xr = 3; xi = 0; hr = 3; hi = 0; end
        2:       begin xr = 0; xi = 3; hr = 0; hi = 3; end
        3:       begin xr = 3; xi = 3; hr = 3; hi = 3; end
        default: begin
          xr = $urandom_range(0, 3); xi = $urandom_range(0, 3);
          hr = $urandom_range(0, 3); hi = $urandom_range(0, 3);
        end
      endcase
      in_valid = 1; in_first = (n == 0); in_last = (n == len - 1);
      x_re = 2'(xr); x_im = 2'(xi); h_re = 2'(hr); h_im = 2'(hi);
      // Direct complex arithmetic.
      dre += xr * hr - xi * hi;
      dim += xr * hi + xi * hr;
      // Coefficient-level model: bit (i, k) of an operand is coefficient
      // of X^i Y^k (k = 0 real, k = 1 imaginary).
      for (int i1 = 0; i1 < 2; i1++) for (int k1 = 0; k1 < 2; k1++)
        for (int i2 = 0; i2 < 2; i2++) for (int k2 = 0; k2 < 2; k2++) begin
          int ab, bb;
          ab = (((k1 != 0) ? xi : xr) >> i1) & 1;
          bb = (((k2 != 0) ? hi : hr) >> i2) & 1;
          cf[i1 + i2][k1 + k2] += ab * bb;
        end
      if (n == len - 1) begin
        ovf = 0; wre = 0; wim = 0;
        for (int i = 0; i < 3; i++) for (int k = 0; k < 3; k++) begin
          if (cf[i][k] >= MPROD) ovf = 1;
          if (k == 0) wre += (cf[i][k] % MPROD) << i;
          if (k == 2) wre -= (cf[i][k] % MPROD) << i;
          if (k == 1) wim += (cf[i][k] % MPROD) << i;
        end
        if (ovf) begin
          n_overflow++;
          if (cf[1][1] < MPROD) begin
            checks++; failures++;
            $display("FAIL model: overflow not in the X*Y coefficient");
          end
        end else begin
          // Without overflow the two models must agree.
          checks++;
          if (wre != dre || wim != dim) begin
            failures++; $display("FAIL model mismatch %0d/%0d vs %0d/%0d", wre, wim, dre, dim);
          end
        end
        if (len <= 26) begin
          checks++;
          if (ovf) begin failures++; $display("FAIL overflow within 26 pairs"); end
        end
        exp_re[cyc] = wre;
        exp_im[cyc] = wim;
        if (len == 1) n_single++;
        if (len == 26 && wre == 234) n_max_pos++;
        if (len == 26 && wre == -234) n_max_neg++;
        if (len == 26 && wim == 468) n_max_im++;
        if (wre < 0) n_neg++;
      end
    end
    if (gap_after) begin
      @(negedge clk);
      in_valid = 0; in_first = 0; in_last = 0;
      if ($urandom_range(0, 1) == 1) begin
        in_first = 1; in_last = 1;   // markers without valid are ignored
      end
    end else begin
      n_back2back++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_block(1, 0, 1, 0);
    run_block(26, 1, 0, 0);
    run_block(26, 2, 0, 0);
    run_block(26, 3, 1, 0);
    run_block(5, 0, 0, 1);
    // A long all-maximum block overflows the X*Y coefficient (4 per pair).
    run_block(27, 3, 1, 0);
    run_block(40, 0, 0, 0);
    for (int b = 0; b < 150; b++)
      run_block(1 + int'($urandom_range(0, 25)), 0, 1'($urandom_range(0, 1)),
                $urandom_range(0, 3) == 0);
    for (int b = 0; b < 20; b++)
      run_block(27 + int'($urandom_range(0, 30)), 0, 1'($urandom_range(0, 1)), 0);
    @(negedge clk) in_valid = 0; in_first = 0; in_last = 0;
    repeat (LAT + 4) @(posedge clk);
    #2;
    checks++;
    if (n_results != exp_re.num()) begin
      failures++; $display("FAIL %0d results for %0d blocks", n_results, exp_re.num());
    end
    $display("mechanisms: single=%0d real_max=%0d real_min=%0d imag_max=%0d negative=%0d back_to_back=%0d idle_inside=%0d overflow=%0d",
             n_single, n_max_pos, n_max_neg, n_max_im, n_neg, n_back2back, n_gap, n_overflow);
    begin
      int counts[8];
      counts = '{n_single, n_max_pos, n_max_neg, n_max_im, n_neg,
                 n_back2back, n_gap, n_overflow};
      for (int m = 0; m < 8; m++) begin
        checks++;
        if (counts[m] == 0) begin
          failures++; $display("FAIL mechanism %0d never exercised", m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
