// tb_mrpma_routes: the four single transfers SW1->SW16 (FFT), SW6->SW11
// (DCT), SW10->SW14 (FIR) and SW12->SW5 (FIR), each run alone on the whole
// array after a reset. For each, a random block is loaded into the source
// through the data memory, only that source is configured, and only its
// column is run with its arithmetic on. The destination's receive memory
// must hold the source's results (floating-point FFT/DCT within 4 LSB,
// exact FIR), no other element may have received anything, and the run
// must take no longer than the unit's compute time plus one cycle per flit
// and per link plus a small fixed overhead.
module tb_mrpma_routes;
  import mrpma_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid;
  host_cmd_t cmd;
  logic [31:0] rsp_data;
  logic [7:0] ctrl;
  logic [15:0] run_cycles;
  logic [15:0] pe_busy, pe_rx_event, pe_rx_decoded, pe_rx_corrected, sw_stall;
  int checks = 0, failures = 0;

  mrpma_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int rx_per_pe[16];
  always @(posedge clk) if (rst_n) for (int p = 0; p < 16; p++) if (pe_rx_event[p]) rx_per_pe[p]++;
  logic [31:0] last_rsp;
  always @(posedge clk) if (rsp_valid) last_rsp <= rsp_data;

  task automatic send(input cmd_op_e op, input int pe, input int addr, input logic [31:0] data);
    @(negedge clk);
    cmd_valid = 1; cmd = '{op: op, pe: 4'(pe), addr: 8'(addr), data: data};
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    while (!cmd_ready) @(negedge clk);
  endtask

  function automatic int hops(input int a, input int b);
    int dc = (a / 4) - (b / 4), dr = (a % 4) - (b % 4);
    return (dc < 0 ? -dc : dc) + (dr < 0 ? -dr : dr);
  endfunction

  task automatic transfer(input int s, input int d);
    int xa[8], xb[8];
    real yr[8], yi[8];
    logic [31:0] cw;
    logic signed [7:0] b[4];
    int budget, col;
    col = s / 4;
    @(negedge clk); rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 16; p++) rx_per_pe[p] = 0;
    for (int n = 0; n < 8; n++) begin
      xa[n] = int'($signed(16'($urandom)));
      xb[n] = int'($signed(16'($urandom)));
      send(CMD_DM_WRITE, 0, n, {16'(xa[n]), 16'(xb[n])});
    end
    send(CMD_LOAD, s, 0, 0);
    cw = $urandom;
    for (int i = 0; i < 4; i++) b[i] = cw[8*i +: 8];
    send(CMD_CONFIG, s, d, cw);
    send(CMD_RUN, 0, 0, 32'(2'b11 << (2 * col)));
    // reference
    if (col == 0) dft8(xa, xb, yr, yi);
    else if (col == 1) begin dct8(xa, yr); for (int n = 0; n < 8; n++) yi[n] = 0; end
    else for (int n = 0; n < 8; n++) begin
      longint acc = 0;
      for (int i = 0; i < 4; i++) if (n - i >= 0) acc += longint'(xa[n-i]) * longint'(b[i]);
      yr[n] = sat16(acc >>> 7); yi[n] = 0;
    end
    budget = ((col == 1) ? 66 : (col == 2) ? 10 : 5) + 8 + hops(s, d) + 6;
    $display("SW%0d -> SW%0d: %0d links, run took %0d cycles (bound %0d)", s + 1, d + 1, hops(s, d), run_cycles, budget);
    checks++; if (run_cycles > 16'(budget)) begin failures++; $display("run too long"); end
    for (int p = 0; p < 16; p++) begin
      checks++;
      if (rx_per_pe[p] != ((p == d) ? 8 : 0)) begin failures++; $display("SW%0d received %0d packets", p + 1, rx_per_pe[p]); end
    end
    send(CMD_STORE, d, 64, 0);
    for (int n = 0; n < 8; n++) begin
      real gr, gi;
      send(CMD_DM_READ, 0, 64 + n, 0);
      @(negedge clk);
      gr = real'(int'($signed(last_rsp[31:16])));
      gi = real'(int'($signed(last_rsp[15:0])));
      checks++;
      if (rabs(gr - yr[n]) > ((col == 2) ? 0.0 : 4.0) || rabs(gi - yi[n]) > ((col == 2) ? 0.0 : 4.0)) begin
        failures++; $display("SW%0d word %0d got %f,%f exp %f,%f", d + 1, n, gr, gi, yr[n], yi[n]);
      end
    end
  endtask

  initial begin
    cmd_valid = 0; cmd = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    transfer(0, 15);    // SW1  -> SW16
    transfer(5, 10);    // SW6  -> SW11
    transfer(9, 13);    // SW10 -> SW14
    transfer(11, 4);    // SW12 -> SW5
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
