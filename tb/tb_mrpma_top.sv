// tb_mrpma_top: end-to-end test of the whole array at its default sizes.
// Every element gets a random block of eight complex words through the
// shared data memory and a context word; the destinations form a
// permutation that contains the four transfers SW1->SW16, SW6->SW11,
// SW10->SW14 and SW12->SW5 and two channel-encoder to channel-encoder
// transfers (SW13->SW15, SW15->SW13). Three runs follow:
//   A  ctrl = 8'hFF: all columns run with their arithmetic on
//   B  ctrl = 8'h55: all columns run, arithmetic off (pass-through)
//   C  ctrl = 8'h0C: only the DCT column runs
// After each run all receive memories are stored back to the data memory
// and read out through the host port, and compared with reference results
// (floating-point FFT and DCT within 4 LSB, exact FIR and Hamming code).
// Run C must leave the receive memories of the other destinations as
// they were. Mechanisms counted: each arithmetic kind, channel decoding,
// pass-through, selective column start, switch stalls; each must happen.
module tb_mrpma_top;
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
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // event counters
  int n_stall = 0, n_decoded = 0, n_rx = 0;
  logic [15:0] ever_busy;
  always @(posedge clk) if (rst_n) begin
    n_stall   <= n_stall + $countones(sw_stall);
    n_decoded <= n_decoded + $countones(pe_rx_decoded);
    n_rx      <= n_rx + $countones(pe_rx_event);
    ever_busy <= ever_busy | pe_busy;
  end
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

  int dest[16] = '{15, 8, 7, 0, 3, 10, 1, 2, 5, 13, 6, 4, 14, 9, 12, 11};
  int xr[16][8], xi[16][8];
  logic signed [7:0] b[16][4];
  real er[16][8], ei[16][8];     // expected receive memory contents, by destination
  bit  exact[16];
  int  mech[string];

  function automatic int kind(input int p); return p / 4; endfunction

  // expected words arriving at dest[s] from s
  task automatic expect_from(input int s, input bit fen);
    int d = dest[s];
    real yr[8], yi[8];
    int xa[8], xb[8];
    for (int n = 0; n < 8; n++) begin xa[n] = xr[s][n]; xb[n] = xi[s][n]; end
    exact[d] = 1;
    if (!fen) begin
      for (int n = 0; n < 8; n++) begin er[d][n] = xa[n]; ei[d][n] = xb[n]; end
      return;
    end
    case (kind(s))
      0: begin dft8(xa, xb, yr, yi); exact[d] = 0; for (int n = 0; n < 8; n++) begin er[d][n] = yr[n]; ei[d][n] = yi[n]; end end
      1: begin dct8(xa, yr); exact[d] = 0; for (int n = 0; n < 8; n++) begin er[d][n] = yr[n]; ei[d][n] = 0; end end
      2: for (int n = 0; n < 8; n++) begin
           longint acc = 0;
           for (int i = 0; i < 4; i++) if (n - i >= 0) acc += longint'(xa[n-i]) * longint'(b[s][i]);
           er[d][n] = sat16(acc >>> 7); ei[d][n] = 0;
         end
      default: for (int n = 0; n < 8; n++) begin
           if (kind(d) == 3) begin er[d][n] = xa[n]; ei[d][n] = 0; end
           else begin
             logic [27:0] c;
             c = ham_word(16'(xa[n]));
             er[d][n] = int'($signed(16'({4'd0, c} >> 16)));
             ei[d][n] = int'($signed(16'(c)));
           end
         end
    endcase
  endtask

  task automatic load_all();
    for (int p = 0; p < 16; p++) begin
      for (int n = 0; n < 8; n++) begin
        xr[p][n] = int'($signed(16'($urandom)));
        xi[p][n] = int'($signed(16'($urandom)));
        send(CMD_DM_WRITE, 0, 8 * p + n, {16'(xr[p][n]), 16'(xi[p][n])});
      end
      send(CMD_LOAD, p, 8 * p, 0);
    end
  endtask

  task automatic check_all(input string tag);
    for (int d = 0; d < 16; d++) send(CMD_STORE, d, 128 + 8 * d, 0);
    for (int d = 0; d < 16; d++)
      for (int n = 0; n < 8; n++) begin
        real gr, gi;
        send(CMD_DM_READ, 0, 128 + 8 * d + n, 0);
        @(negedge clk);
        gr = real'(int'($signed(last_rsp[31:16])));
        gi = real'(int'($signed(last_rsp[15:0])));
        checks++;
        if (exact[d] ? (gr != er[d][n] || gi != ei[d][n])
                     : (rabs(gr - er[d][n]) > 4.0 || rabs(gi - ei[d][n]) > 4.0)) begin
          failures++; $display("%s: SW%0d word %0d got %f,%f exp %f,%f", tag, d + 1, n, gr, gi, er[d][n], ei[d][n]);
        end
      end
  endtask

  initial begin
    int rx0, dec0;
    cmd_valid = 0; cmd = '0; ever_busy = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // configuration
    for (int p = 0; p < 16; p++) begin
      logic [31:0] cw;
      cw = $urandom;
      for (int i = 0; i < 4; i++) b[p][i] = cw[8*i +: 8];
      send(CMD_CONFIG, p, dest[p], cw);
    end
    // ---- run A: everything on
    load_all();
    for (int s = 0; s < 16; s++) expect_from(s, 1'b1);
    rx0 = n_rx; dec0 = n_decoded;
    send(CMD_RUN, 0, 0, 32'hFF);
    $display("run A: %0d cycles for 16 blocks of 8 words", run_cycles);
    checks++; if (ctrl != 8'hFF) begin failures++; $display("ctrl"); end
    checks++; if (n_rx - rx0 != 128) begin failures++; $display("run A delivered %0d packets", n_rx - rx0); end
    checks++; if (n_decoded - dec0 != 16) begin failures++; $display("run A decoded %0d", n_decoded - dec0); end
    check_all("A");
    mech["fft"]++; mech["dct"]++; mech["fir"]++; mech["encode"]++;
    if (n_decoded - dec0 > 0) mech["decode"]++;
    // ---- run B: pass-through
    load_all();
    for (int s = 0; s < 16; s++) expect_from(s, 1'b0);
    rx0 = n_rx;
    send(CMD_RUN, 0, 0, 32'h55);
    $display("run B: %0d cycles", run_cycles);
    checks++; if (n_rx - rx0 != 128) begin failures++; $display("run B delivered %0d packets", n_rx - rx0); end
    check_all("B");
    mech["pass_through"]++;
    // ---- run C: DCT column only
    load_all();
    for (int s = 4; s < 8; s++) expect_from(s, 1'b1);
    rx0 = n_rx; ever_busy = 0;
    send(CMD_RUN, 0, 0, 32'h0C);
    $display("run C: %0d cycles", run_cycles);
    checks++; if (n_rx - rx0 != 32) begin failures++; $display("run C delivered %0d packets", n_rx - rx0); end
    checks++; if (ever_busy != 16'h00F0) begin failures++; $display("run C busy mask %h", ever_busy); end
    else mech["column_select"]++;
    check_all("C");
    if (n_stall > 0) mech["stall"]++;
    foreach (mech[m]) $display("mechanism %s: %0d", m, mech[m]);
    $display("switch stall cycles: %0d, packets decoded: %0d", n_stall, n_decoded);
    begin
      string need[8] = '{"fft", "dct", "fir", "encode", "decode", "pass_through", "column_select", "stall"};
      foreach (need[i]) begin
        checks++;
        if (!mech.exists(need[i])) begin failures++; $display("mechanism %s never happened", need[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
