// tb_ctrl_gen: random eight-bit control words and context valid masks; the
// start pulses must go, one cycle after set and for one cycle only, to
// exactly the configured elements of the running columns, and func_en must
// follow the high bit of each column's pair.
module tb_ctrl_gen;
  import mrpma_pkg::*;
  logic clk = 0, rst_n = 0, set;
  logic [7:0] ctrl_in, ctrl;
  logic [15:0] ctx_valid, pe_start, pe_func_en;
  int checks = 0, failures = 0;

  ctrl_gen dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    set = 0; ctrl_in = 0; ctx_valid = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic [15:0] exp_start, exp_fen;
      logic [7:0] v;
      @(negedge clk);
      v = 8'($urandom); ctx_valid = 16'($urandom);
      set = 1; ctrl_in = v;
      #1;
      checks++; if (pe_start != 0) begin failures++; $display("early start"); end
      @(negedge clk);
      set = 0; ctrl_in = 8'($urandom);
      for (int p = 0; p < 16; p++) begin
        exp_start[p] = v[2 * (p / 4)] & ctx_valid[p];
        exp_fen[p]   = v[2 * (p / 4) + 1];
      end
      checks++; if (ctrl != v) begin failures++; $display("ctrl"); end
      checks++; if (pe_start != exp_start) begin failures++; $display("start %h exp %h", pe_start, exp_start); end
      checks++; if (pe_func_en != exp_fen) begin failures++; $display("func_en"); end
      @(negedge clk);
      checks++; if (pe_start != 0 || ctrl != v) begin failures++; $display("start held / ctrl lost"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
