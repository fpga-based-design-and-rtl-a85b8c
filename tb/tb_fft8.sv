// tb_fft8: random complex blocks (plus an impulse and a tone) against a
// floating-point DFT scaled by 1/8; each output must be within 4 LSB.
// Also checks the three-cycle latency and back-to-back blocks.
module tb_fft8;
  import mrpma_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic signed [15:0] in_re[8], in_im[8], out_re[8], out_im[8];
  int checks = 0, failures = 0;
  real er[256][8], ei[256][8];
  int issue_cyc[256];
  int n_issued = 0, n_checked = 0;
  int cyc = 0;

  fft8 dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // checker
  always @(negedge clk) if (rst_n && out_valid) begin
    real yr[8], yi[8];
    int c0;
    yr = er[n_checked]; yi = ei[n_checked]; c0 = issue_cyc[n_checked];
    n_checked++;
    checks++;
    if (cyc - c0 != 3) begin failures++; $display("latency %0d", cyc - c0); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (rabs(real'(out_re[k]) - yr[k]) > 4.0 || rabs(real'(out_im[k]) - yi[k]) > 4.0) begin
        failures++; $display("k=%0d got %0d,%0d exp %f,%f", k, out_re[k], out_im[k], yr[k], yi[k]);
      end
    end
  end

  task automatic issue(input int xr[8], input int xi[8]);
    real yr[8], yi[8];
    @(negedge clk);
    for (int n = 0; n < 8; n++) begin in_re[n] = 16'(xr[n]); in_im[n] = 16'(xi[n]); end
    in_valid = 1;
    dft8(xr, xi, yr, yi);
    er[n_issued] = yr; ei[n_issued] = yi; issue_cyc[n_issued] = cyc;
    n_issued++;
  endtask

  initial begin
    int xr[8], xi[8];
    in_valid = 0;
    for (int n = 0; n < 8; n++) begin in_re[n] = 0; in_im[n] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    // impulse
    for (int n = 0; n < 8; n++) begin xr[n] = (n == 0) ? 8000 : 0; xi[n] = 0; end
    issue(xr, xi);
    // tone at bin 1
    for (int n = 0; n < 8; n++) begin xr[n] = int'(20000.0 * $cos(2.0 * PI * n / 8.0)); xi[n] = int'(20000.0 * $sin(2.0 * PI * n / 8.0)); end
    issue(xr, xi);
    // full-scale constant
    for (int n = 0; n < 8; n++) begin xr[n] = 32767; xi[n] = -32768; end
    issue(xr, xi);
    for (int t = 0; t < 200; t++) begin
      for (int n = 0; n < 8; n++) begin xr[n] = int'($signed(16'($urandom))); xi[n] = int'($signed(16'($urandom))); end
      issue(xr, xi);
      if (t % 3 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++; if (n_checked != n_issued) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
