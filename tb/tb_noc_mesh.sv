// tb_noc_mesh: first one flit through an empty mesh for each of the four
// source/destination pairs SW1->SW16, SW6->SW11, SW10->SW14, SW12->SW5
// (switch ids 0->15, 5->10, 9->13, 11->4), each of which must arrive after
// one cycle per link of the shortest path plus one. Then random all-to-all
// traffic with random back-pressure at the local outputs: every flit must
// reach its destination exactly once, in order per source/destination
// pair, and the mesh must drain to idle. Switch stalls must occur.
module tb_noc_mesh;
  import mrpma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  loc_in_valid[NUM_PE], loc_in_ready[NUM_PE], loc_out_valid[NUM_PE], loc_out_ready[NUM_PE];
  flit_t loc_in_flit[NUM_PE], loc_out_flit[NUM_PE];
  logic idle;
  logic [NUM_PE-1:0] stall;
  int checks = 0, failures = 0, stalls = 0, sent = 0, got = 0;
  int seq[NUM_PE];
  int last[NUM_PE][NUM_PE];
  int cyc = 0;

  noc_mesh #(.FIFO_DEPTH(2)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int hops(input int a, input int b);
    int dc = (a / 4) - (b / 4), dr = (a % 4) - (b % 4);
    return (dc < 0 ? -dc : dc) + (dr < 0 ? -dr : dr);
  endfunction

  task automatic single(input int s, input int d);
    int t0;
    @(negedge clk);
    loc_in_valid[s] = 1;
    loc_in_flit[s] = '{dst: 4'(d), src: 4'(s), idx: 3'd1, enc: 1'b0, payload: 32'hCAFE0000 | d};
    #1;
    checks++; if (!loc_in_ready[s]) begin failures++; $display("not ready"); end
    t0 = cyc;
    @(negedge clk);
    loc_in_valid[s] = 0;
    while (!loc_out_valid[d] && cyc - t0 < 40) @(negedge clk);
    checks++;
    if (cyc - t0 != hops(s, d) + 1) begin failures++; $display("%0d->%0d took %0d", s, d, cyc - t0); end
    checks++;
    if (loc_out_flit[d].payload != (32'hCAFE0000 | d) || loc_out_flit[d].src != 4'(s)) begin failures++; $display("bad flit"); end
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < NUM_PE; i++) begin
      loc_in_valid[i] = 0; loc_in_flit[i] = '0; loc_out_ready[i] = 1; seq[i] = 0;
      for (int j = 0; j < NUM_PE; j++) last[i][j] = -1;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    single(0, 15);
    single(5, 10);
    single(9, 13);
    single(11, 4);
    single(15, 0);
    @(negedge clk);
    for (int c = 0; c < 4000; c++) begin
      logic [NUM_PE-1:0] push;
      for (int i = 0; i < NUM_PE; i++) begin
        if (!loc_in_valid[i]) begin
          loc_in_valid[i] = (c < 3500) && ($urandom % 3 == 0);
          loc_in_flit[i].dst = 4'($urandom);
          loc_in_flit[i].src = 4'(i);
          loc_in_flit[i].idx = 3'($urandom);
          loc_in_flit[i].enc = 1'b0;
          loc_in_flit[i].payload = 32'(seq[i]);
        end
        loc_out_ready[i] = (c >= 3500) || ($urandom % 4 != 0);
      end
      #1;
      stalls += $countones(stall);
      for (int d = 0; d < NUM_PE; d++) if (loc_out_valid[d] && loc_out_ready[d]) begin
        int s, q;
        s = int'(loc_out_flit[d].src);
        q = int'(loc_out_flit[d].payload);
        checks++;
        if (loc_out_flit[d].dst != 4'(d)) begin failures++; $display("flit for %0d at %0d", loc_out_flit[d].dst, d); end
        checks++;
        if (q <= last[s][d]) begin failures++; $display("order %0d->%0d", s, d); end
        last[s][d] = q;
        got++;
      end
      for (int i = 0; i < NUM_PE; i++) push[i] = loc_in_valid[i] && loc_in_ready[i];
      @(posedge clk);
      for (int i = 0; i < NUM_PE; i++) if (push[i]) begin seq[i]++; sent++; end
      @(negedge clk);
      for (int i = 0; i < NUM_PE; i++) if (push[i]) loc_in_valid[i] = 0;
    end
    checks++; if (sent != got || sent < 1000) begin failures++; $display("sent %0d got %0d", sent, got); end
    checks++; if (!idle) begin failures++; $display("not idle"); end
    checks++; if (stalls == 0) begin failures++; $display("no stalls"); end
    $display("sent=%0d stalls=%0d", sent, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
