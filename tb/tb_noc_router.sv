// tb_noc_router: a switch in the middle of the mesh (column 1, row 1) gets
// random flits on all five inputs while its outputs accept at random. Each
// flit must leave exactly once, on the port given by column-first routing,
// and flits from one input to one output must keep their order. Stalls,
// contention on an output and every output port must all occur.
module tb_noc_router;
  import mrpma_pkg::*;
  localparam logic [3:0] ME = 4'd5;
  logic clk = 0, rst_n = 0;
  logic  in_valid[NPORTS], in_ready[NPORTS], out_valid[NPORTS], out_ready[NPORTS];
  flit_t in_flit[NPORTS], out_flit[NPORTS];
  logic idle, stall;
  int checks = 0, failures = 0, stalls = 0, contention = 0;
  int sent = 0, got = 0;
  int seq[NPORTS];
  int last[NPORTS][NPORTS];
  int port_hits[NPORTS];

  noc_router #(.MY_ID(ME), .FIFO_DEPTH(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int exp_port(input logic [3:0] d);
    int dc = d[3:2], dr = d[1:0];
    if (dc > 1) return 1;       // east
    if (dc < 1) return 3;       // west
    if (dr > 1) return 2;       // south
    if (dr < 1) return 0;       // north
    return 4;                   // local
  endfunction

  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = 0; in_flit[i] = '0; out_ready[i] = 0; seq[i] = 0; port_hits[i] = 0;
      for (int o = 0; o < NPORTS; o++) last[i][o] = -1;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 3000; c++) begin
      logic [NPORTS-1:0] push, pop;
      int nreq[NPORTS];
      for (int i = 0; i < NPORTS; i++) begin
        if (!in_valid[i]) begin                  // no flit held on this input
          in_valid[i] = (c < 2800) && ($urandom % 2);
          in_flit[i].dst = 4'($urandom);
          in_flit[i].src = 4'(i);
          in_flit[i].idx = 3'($urandom);
          in_flit[i].enc = 1'b0;
          in_flit[i].payload = {16'(i), 16'(seq[i])};
        end
        out_ready[i] = ($urandom % 3) != 0;
      end
      #1;
      if (stall) stalls++;
      for (int o = 0; o < NPORTS; o++) nreq[o] = 0;
      for (int i = 0; i < NPORTS; i++) if (dut.hd_valid[i]) nreq[dut.hd_route[i]]++;
      for (int o = 0; o < NPORTS; o++) if (nreq[o] > 1) contention++;
      for (int o = 0; o < NPORTS; o++) begin
        pop[o] = out_valid[o] && out_ready[o];
        if (pop[o]) begin
          int si, sq;
          si = int'(out_flit[o].payload[31:16]);
          sq = int'(out_flit[o].payload[15:0]);
          checks++;
          if (exp_port(out_flit[o].dst) != o) begin failures++; $display("flit to %0d left on port %0d", out_flit[o].dst, o); end
          checks++;
          if (sq <= last[si][o]) begin failures++; $display("order in %0d out %0d", si, o); end
          last[si][o] = sq;
          port_hits[o]++;
          got++;
        end
      end
      for (int i = 0; i < NPORTS; i++) push[i] = in_valid[i] && in_ready[i];
      @(posedge clk);
      for (int i = 0; i < NPORTS; i++) if (push[i]) begin seq[i]++; sent++; end
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) if (push[i]) in_valid[i] = 0;
    end
    repeat (50) begin
      @(negedge clk);
      for (int o = 0; o < NPORTS; o++) begin
        out_ready[o] = 1;
      end
      #1;
      for (int o = 0; o < NPORTS; o++) if (out_valid[o]) got++;
    end
    checks++; if (sent != got) begin failures++; $display("sent %0d got %0d", sent, got); end
    checks++; if (!idle) begin failures++; $display("not idle at end"); end
    checks++; if (stalls == 0) begin failures++; $display("no stall"); end
    checks++; if (contention == 0) begin failures++; $display("no contention"); end
    for (int o = 0; o < NPORTS; o++) begin checks++; if (port_hits[o] == 0) begin failures++; $display("port %0d unused", o); end end
    $display("sent=%0d stalls=%0d contention=%0d", sent, stalls, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
