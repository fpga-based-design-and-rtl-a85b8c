// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the full and empty flags, and that a full FIFO refuses writes.
module tb_sync_fifo;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, empty;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, fulls = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      out_ready = (c < 1000) ? (($urandom % 4) == 0) : (($urandom % 2) == 0);
      in_data   = W'($urandom);
      checks++;
      if (out_valid !== (q.size() != 0) || empty !== (q.size() == 0) || in_ready !== (q.size() < D)) begin
        failures++; $display("flag mismatch size=%0d", q.size());
      end
      if (q.size() == D) fulls++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("data %h exp %h", out_data, q[0]); end
      end
      begin
        logic do_pop, do_push;
        do_pop  = out_valid && out_ready;
        do_push = in_valid && in_ready;
        @(posedge clk);
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(in_data);
      end
    end
    checks++; if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
