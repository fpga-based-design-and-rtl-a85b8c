// tb_host_controller: drives every command through the controller, with the
// real data memory attached and the sixteen elements modelled by arrays.
// Checks read responses, the words a LOAD writes into an element memory,
// CONFIG and RUN outputs, that RUN holds cmd_ready low until the elements
// are idle and the network is empty, the run cycle count, STORE contents
// and PE_READ, and the LOAD (9 cycles) and STORE (8 cycles) durations.
module tb_host_controller;
  import mrpma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rsp_valid;
  host_cmd_t cmd;
  logic [31:0] rsp_data;
  logic [15:0] run_cycles;
  logic dm_en, dm_we;
  logic [7:0] dm_addr;
  logic [31:0] dm_wdata, dm_rdata;
  logic [15:0] pe_mem_we;
  logic [2:0] pe_mem_addr, pe_rx_raddr;
  logic [31:0] pe_mem_wdata, pe_rx_rdata[16];
  logic [15:0] pe_busy;
  logic noc_idle, ctx_we, ctrl_set;
  logic [3:0] ctx_waddr;
  ctx_t ctx_wdata;
  logic [7:0] ctrl_val;
  int checks = 0, failures = 0;

  logic [31:0] pe_mem [16][8];
  logic [31:0] rx_mem [16][8];
  logic [31:0] last_rsp;
  int n_rsp = 0, ctx_writes = 0, ctrl_sets = 0;

  host_controller dut (.*);
  data_memory #(.DEPTH(256)) u_dm (.clk, .en(dm_en), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata));

  always_comb for (int p = 0; p < 16; p++) pe_rx_rdata[p] = rx_mem[p][pe_rx_raddr];
  always @(posedge clk) begin
    for (int p = 0; p < 16; p++) if (pe_mem_we[p]) pe_mem[p][pe_mem_addr] <= pe_mem_wdata;
    if (rsp_valid) begin last_rsp <= rsp_data; n_rsp <= n_rsp + 1; end
    if (ctx_we) begin
      ctx_writes <= ctx_writes + 1;
      if (ctx_waddr != 4'd9 || ctx_wdata.dest != 4'd13 || ctx_wdata.coef != 32'h01020304 || !ctx_wdata.valid) failures <= failures + 1;
    end
    if (ctrl_set) begin
      ctrl_sets <= ctrl_sets + 1;
      if (ctrl_val != 8'hA5) failures <= failures + 1;
    end
  end

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // issue one command; dur - 1 is the number of cycles cmd_ready stays low
  // after the command is accepted
  task automatic send(input cmd_op_e op, input int pe, input int addr, input logic [31:0] data, output int dur);
    @(negedge clk);
    cmd_valid = 1; cmd = '{op: op, pe: 4'(pe), addr: 8'(addr), data: data};
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    dur = 1;
    while (!cmd_ready) begin @(negedge clk); dur++; end
  endtask

  initial begin
    int dur, n0;
    logic [31:0] w[256];
    cmd_valid = 0; cmd = '0; pe_busy = 0; noc_idle = 1;
    for (int p = 0; p < 16; p++) for (int i = 0; i < 8; i++) begin rx_mem[p][i] = $urandom; pe_mem[p][i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 64; a++) begin w[a] = $urandom; send(CMD_DM_WRITE, 0, a, w[a], dur); end
    for (int a = 0; a < 64; a += 5) begin
      n0 = n_rsp;
      send(CMD_DM_READ, 0, a, 0, dur);
      @(negedge clk);
      checks++; if (n_rsp != n0 + 1 || last_rsp != w[a]) begin failures++; $display("DM_READ %0d", a); end
    end
    // LOAD
    send(CMD_LOAD, 3, 4, 0, dur);
    checks++; if (dur - 1 != 9) begin failures++; $display("LOAD took %0d", dur); end
    for (int i = 0; i < 8; i++) begin checks++; if (pe_mem[3][i] != w[4 + i]) begin failures++; $display("LOAD word %0d", i); end end
    for (int i = 0; i < 8; i++) begin checks++; if (pe_mem[2][i] != 0) begin failures++; $display("LOAD wrote wrong PE"); end end
    // CONFIG
    send(CMD_CONFIG, 9, 13, 32'h01020304, dur);
    checks++; if (ctx_writes != 1) begin failures++; $display("CONFIG"); end
    // RUN: elements become busy, then network drains
    fork
      send(CMD_RUN, 0, 0, 32'hA5, dur);
      begin
        repeat (2) @(negedge clk);
        pe_busy = 16'h0101; noc_idle = 0;
        repeat (20) @(negedge clk);
        pe_busy = 16'h0001;
        repeat (10) @(negedge clk);
        pe_busy = 0;
        repeat (5) @(negedge clk);
        noc_idle = 1;
      end
    join
    checks++; if (ctrl_sets != 1) begin failures++; $display("RUN ctrl_set"); end
    checks++; if (dur < 37 || dur > 40) begin failures++; $display("RUN took %0d", dur); end
    checks++; if (run_cycles < 36 || run_cycles > 40) begin failures++; $display("run_cycles %0d", run_cycles); end
    // STORE and read back
    send(CMD_STORE, 5, 100, 0, dur);
    checks++; if (dur - 1 != 8) begin failures++; $display("STORE took %0d", dur); end
    for (int i = 0; i < 8; i++) begin
      send(CMD_DM_READ, 0, 100 + i, 0, dur);
      @(negedge clk);
      checks++; if (last_rsp != rx_mem[5][i]) begin failures++; $display("STORE word %0d", i); end
    end
    for (int i = 0; i < 8; i++) begin
      send(CMD_PE_READ, 12, i, 0, dur);
      @(negedge clk);
      checks++; if (last_rsp != rx_mem[12][i]) begin failures++; $display("PE_READ %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
