// tb_context_memory: random writes against a model array; every entry is
// compared every cycle, and reset must clear the valid bits.
module tb_context_memory;
  import mrpma_pkg::*;
  logic clk = 0, rst_n = 0, we;
  logic [3:0] waddr;
  ctx_t wdata, ctx[NUM_PE], model[NUM_PE];
  int checks = 0, failures = 0;

  context_memory dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = '0;
    for (int i = 0; i < NUM_PE; i++) model[i] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NUM_PE; i++) begin checks++; if (ctx[i].valid) begin failures++; $display("valid after reset"); end end
    for (int c = 0; c < 500; c++) begin
      logic w; logic [3:0] a; ctx_t d;
      w = $urandom % 2; a = 4'($urandom); d = ctx_t'({$urandom, $urandom});
      we = w; waddr = a; wdata = d;
      @(negedge clk);
      if (w) model[a] = d;
      for (int i = 0; i < NUM_PE; i++) begin checks++; if (ctx[i] != model[i]) begin failures++; $display("entry %0d", i); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
