// tb_pre_channel_mac: self-checking testbench of the per-channel inner
// product. Channels with M = 3, 5 and 7 get the same random stream of
// blocks (lengths 1..30, random residues below each modulus, random idle
// cycles, blocks back to back). A model here keeps the running sum of
// products modulo M; at each block end the channel must raise out_valid
// exactly MAC_LAT cycles after the last sample with acc equal to the
// model's sum, and must not raise it at any other time.
module tb_pre_channel_mac;
  import pre_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  residue_t a3, b3, a5, b5, a7, b7, acc3, acc5, acc7;
  logic ov3, ov5, ov7;
  int checks = 0, failures = 0;
  int blocks = 0;

  pre_channel_mac #(.M(3)) d3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last), .a(a3), .b(b3), .out_valid(ov3), .acc(acc3));
  pre_channel_mac #(.M(5)) d5 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last), .a(a5), .b(b5), .out_valid(ov5), .acc(acc5));
  pre_channel_mac          d7 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last), .a(a7), .b(b7), .out_valid(ov7), .acc(acc7));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Expected results, keyed by the cycle at which they must appear.
  int exp3[int], exp5[int], exp7[int];

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (exp3.exists(cyc)) begin
        if (!(ov3 && ov5 && ov7)) begin failures++; $display("FAIL missing valid at %0d", cyc); end
        checks += 3;
        if (int'(acc3) != exp3[cyc]) begin failures++; $display("FAIL m3 got %0d exp %0d", acc3, exp3[cyc]); end
        if (int'(acc5) != exp5[cyc]) begin failures++; $display("FAIL m5 got %0d exp %0d", acc5, exp5[cyc]); end
        if (int'(acc7) != exp7[cyc]) begin failures++; $display("FAIL m7 got %0d exp %0d", acc7, exp7[cyc]); end
      end else if (ov3 || ov5 || ov7) begin
        failures++; $display("FAIL spurious valid at %0d", cyc);
      end
    end
  end

  initial begin
    a3 = 0; b3 = 0; a5 = 0; b5 = 0; a7 = 0; b7 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int blk = 0; blk < 60; blk++) begin
      int len, s3, s5, s7;
      len = (blk == 0) ? 1 : 1 + int'($urandom_range(0, 29));
      s3 = 0; s5 = 0; s7 = 0;
      for (int n = 0; n < len; n++) begin
        @(negedge clk);
        if ($urandom_range(0, 5) == 0) begin   // idle cycle inside the stream
          in_valid = 0; in_first = 1'($urandom_range(0, 1)); in_last = 1'($urandom_range(0, 1));
          @(negedge clk);
        end
        in_valid = 1;
        in_first = (n == 0);
        in_last  = (n == len - 1);
        a3 = 3'($urandom_range(0, 2)); b3 = 3'($urandom_range(0, 2));
        a5 = 3'($urandom_range(0, 4)); b5 = 3'($urandom_range(0, 4));
        a7 = 3'($urandom_range(0, 6)); b7 = 3'($urandom_range(0, 6));
        s3 = (s3 + a3 * b3) % 3;
        s5 = (s5 + a5 * b5) % 5;
        s7 = (s7 + a7 * b7) % 7;
        if (n == len - 1) begin
          exp3[cyc + MAC_LAT] = s3;
          exp5[cyc + MAC_LAT] = s5;
          exp7[cyc + MAC_LAT] = s7;
          blocks++;
        end
      end
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk); in_valid = 0;
      end
    end
    @(negedge clk) in_valid = 0; in_first = 0; in_last = 0;
    repeat (5) @(posedge clk);
    #2;
    checks++;
    if (blocks != 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
