// tb_data_memory: random writes and reads against a model array; read data
// must appear one cycle after the read and hold while the port is idle.
module tb_data_memory;
  import mrpma_pkg::*;
  logic clk = 0, en, we;
  logic [7:0] addr;
  logic [31:0] wdata, rdata, model[256], hold;
  int checks = 0, failures = 0;

  data_memory #(.DEPTH(256)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 8'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int c = 0; c < 3000; c++) begin
      logic e, w; logic [7:0] a;
      @(negedge clk);
      e = ($urandom % 4) != 0; w = $urandom % 2; a = 8'($urandom);
      en = e; we = w; addr = a; wdata = $urandom;
      @(negedge clk);
      en = 0;
      if (e && w) model[a] = wdata;
      if (e && !w) begin
        checks++; if (rdata != model[a]) begin failures++; $display("read %0d", a); end
        hold = rdata;
        @(negedge clk);
        checks++; if (rdata != hold) begin failures++; $display("rdata changed while idle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
