// tb_dct8: random blocks (plus a constant and a cosine) against a
// floating-point DCT-II scaled by 1/8, within 3 LSB; checks that done comes
// 65 cycles after start and that busy covers the run.
module tb_dct8;
  import mrpma_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic signed [15:0] x[8], y[8];
  int checks = 0, failures = 0;

  dct8 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int xs[8]);
    real ey[8];
    int lat;
    dct8(xs, ey);
    @(negedge clk);
    for (int n = 0; n < 8; n++) x[n] = 16'(xs[n]);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int n = 0; n < 8; n++) x[n] = 16'($urandom);   // must have been latched
    lat = 1;
    while (!done) begin
      checks++; if (!busy) begin failures++; $display("busy low during run"); end
      @(negedge clk); lat++;
    end
    checks++;
    if (lat != 65) begin failures++; $display("latency %0d", lat); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (rabs(real'(y[k]) - ey[k]) > 3.0) begin failures++; $display("k=%0d got %0d exp %f", k, y[k], ey[k]); end
    end
  endtask

  initial begin
    int xs[8];
    start = 0;
    for (int n = 0; n < 8; n++) x[n] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 8; n++) xs[n] = 32767;
    run(xs);
    for (int n = 0; n < 8; n++) xs[n] = int'(30000.0 * $cos(PI / 8.0 * (n + 0.5) * 3));
    run(xs);
    for (int t = 0; t < 100; t++) begin
      for (int n = 0; n < 8; n++) xs[n] = int'($signed(16'($urandom)));
      run(xs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
