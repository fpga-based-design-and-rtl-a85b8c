// tb_fir4: random coefficients and samples against the integer sum
// y(n) = sat16((sum b_i x(n-i)) >> 7), with gaps in the input stream, a
// clear in the middle, and a one-cycle latency check.
module tb_fir4;
  import mrpma_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear, in_valid, out_valid;
  logic signed [7:0] coef[4];
  logic signed [15:0] x, y;
  int checks = 0, failures = 0, sats = 0;
  int hist[4];

  fir4 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; in_valid = 0; x = 0;
    for (int i = 0; i < 4; i++) coef[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) coef[i] = 8'($urandom);
      if (blk % 5 == 0) for (int i = 0; i < 4; i++) coef[i] = 8'sd127;
      clear = 1; in_valid = 0;
      for (int i = 0; i < 4; i++) hist[i] = 0;
      @(negedge clk); clear = 0;
      checks++; if (out_valid) begin failures++; $display("out_valid after clear"); end
      for (int s = 0; s < 50; s++) begin
        longint acc;
        int e;
        in_valid = ($urandom % 4) != 0;
        x = 16'($urandom);
        if (in_valid) begin
          for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
          hist[0] = int'(x);
          acc = 0;
          for (int i = 0; i < 4; i++) acc += longint'(hist[i]) * longint'(coef[i]);
          e = sat16(acc >>> 7);
          if (e == 32767 || e == -32768) sats++;
        end
        @(negedge clk);
        checks++;
        if (out_valid !== in_valid) begin failures++; $display("out_valid timing"); end
        if (in_valid) begin
          checks++;
          if (int'(y) != e) begin failures++; $display("y=%0d exp %0d", y, e); end
        end
      end
    end
    checks++; if (sats == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
