// tb_pe: one processing element of each kind (FFT, DCT, FIR, channel
// encoder). For each: random words are written into its internal memory,
// a context word with a random destination and FIR coefficients is given,
// and a start pulse runs it while its output is accepted at random. The
// eight packets must carry the right destination, source, index, encoded
// flag and result (floating-point DFT/DCT within 4 LSB, exact FIR sum,
// reference Hamming codeword). A second run with func_en low must send the
// words unchanged. Then packets are fed into its receive side; the
// channel-encoder element must decode them, correcting a flipped bit.
module tb_pe;
  import mrpma_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic              mem_we  [4];
  logic [2:0]        mem_addr[4];
  logic [31:0]       mem_wdata[4];
  logic [2:0]        rx_raddr[4];
  logic [31:0]       rx_rdata[4];
  ctx_t              ctx     [4];
  logic              start[4], func_en[4], busy[4];
  logic              tx_valid[4], tx_ready[4], rx_valid[4], rx_ready[4];
  flit_t             tx_flit[4], rx_flit[4];
  logic              rx_event[4], rx_decoded[4], rx_corrected[4];

  for (genvar k = 0; k < 4; k++) begin : g
    pe #(.KIND(pe_kind_e'(k)), .MY_ID(4'(4 * k + 1)), .FIFO_DEPTH(8)) dut (
      .clk, .rst_n,
      .mem_we(mem_we[k]), .mem_addr(mem_addr[k]), .mem_wdata(mem_wdata[k]),
      .rx_raddr(rx_raddr[k]), .rx_rdata(rx_rdata[k]),
      .ctx(ctx[k]), .start(start[k]), .func_en(func_en[k]), .busy(busy[k]),
      .tx_valid(tx_valid[k]), .tx_ready(tx_ready[k]), .tx_flit(tx_flit[k]),
      .rx_valid(rx_valid[k]), .rx_ready(rx_ready[k]), .rx_flit(rx_flit[k]),
      .rx_event(rx_event[k]), .rx_decoded(rx_decoded[k]), .rx_corrected(rx_corrected[k])
    );
  end

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int xr[8], xi[8];

  task automatic run_one(input int k, input bit fen);
    real er[8], ei[8];
    logic [27:0] ec[8];
    int ef[8];
    logic signed [7:0] b[4];
    int nrx, waited;
    // load memory
    for (int n = 0; n < 8; n++) begin
      xr[n] = int'($signed(16'($urandom)));
      xi[n] = int'($signed(16'($urandom)));
      @(negedge clk);
      mem_we[k] = 1; mem_addr[k] = 3'(n); mem_wdata[k] = {16'(xr[n]), 16'(xi[n])};
    end
    @(negedge clk);
    mem_we[k] = 0;
    ctx[k].valid = 1;
    ctx[k].dest = 4'($urandom);
    ctx[k].coef = $urandom;
    for (int i = 0; i < 4; i++) b[i] = ctx[k].coef[8*i +: 8];
    // expected results
    if (k == 0) dft8(xr, xi, er, ei);
    if (k == 1) dct8(xr, er);
    for (int n = 0; n < 8; n++) begin
      longint acc = 0;
      for (int i = 0; i < 4; i++) if (n - i >= 0) acc += longint'(xr[n-i]) * longint'(b[i]);
      ef[n] = sat16(acc >>> 7);
      ec[n] = ham_word(16'(xr[n]));
    end
    start[k] = 1; func_en[k] = fen;
    @(negedge clk);
    start[k] = 0; func_en[k] = 0;
    nrx = 0; waited = 0;
    while ((busy[k] || nrx < 8) && waited < 400) begin
      tx_ready[k] = ($urandom % 3) != 0;
      #1;
      if (tx_valid[k] && tx_ready[k]) begin
        flit_t f;
        int i, gr, gi;
        f = tx_flit[k];
        i = int'(f.idx);
        gr = int'($signed(f.payload[31:16]));
        gi = int'($signed(f.payload[15:0]));
        checks++;
        if (f.dst != ctx[k].dest || f.src != 4'(4 * k + 1) || i != nrx) begin failures++; $display("kind %0d header", k); end
        checks++;
        if (f.enc != (fen && k == 3)) begin failures++; $display("kind %0d enc flag", k); end
        checks++;
        if (!fen) begin
          if (gr != xr[i] || gi != xi[i]) begin failures++; $display("kind %0d pass-through", k); end
        end else if (k == 0) begin
          if (rabs(real'(gr) - er[i]) > 4.0 || rabs(real'(gi) - ei[i]) > 4.0) begin failures++; $display("fft %0d", i); end
        end else if (k == 1) begin
          if (rabs(real'(gr) - er[i]) > 4.0 || gi != 0) begin failures++; $display("dct %0d got %0d exp %f", i, gr, er[i]); end
        end else if (k == 2) begin
          if (gr != ef[i] || gi != 0) begin failures++; $display("fir %0d got %0d exp %0d", i, gr, ef[i]); end
        end else begin
          if (f.payload != {4'd0, ec[i]}) begin failures++; $display("ce %0d", i); end
        end
        nrx++;
      end
      @(negedge clk);
      waited++;
    end
    tx_ready[k] = 0;
    checks++;
    if (nrx != 8 || busy[k]) begin failures++; $display("kind %0d sent %0d", k, nrx); end
  endtask

  task automatic rx_one(input int k);
    logic [15:0] d[8];
    int corr = 0, dec = 0;
    for (int n = 0; n < 8; n++) begin
      logic [27:0] c;
      d[n] = 16'($urandom);
      c = ham_word(d[n]);
      if (n % 2 == 1) begin
        int pos;
        pos = int'($urandom % 28);
        c[pos] = ~c[pos];
      end
      @(negedge clk);
      rx_valid[k] = 1;
      rx_flit[k] = '{dst: 4'(4 * k + 1), src: 4'd7, idx: 3'(7 - n), enc: (k == 3), payload: (k == 3) ? {4'd0, c} : {d[n], 16'h1234}};
      #1;
      checks++; if (!rx_ready[k]) begin failures++; $display("rx not ready"); end
      if (rx_corrected[k]) corr++;
      if (rx_decoded[k]) dec++;
    end
    @(negedge clk);
    rx_valid[k] = 0;
    for (int n = 0; n < 8; n++) begin
      rx_raddr[k] = 3'(7 - n);
      #1;
      checks++;
      if (k == 3) begin
        if (rx_rdata[k] != {d[n], 16'h0}) begin failures++; $display("decode %0d", n); end
      end else if (rx_rdata[k] != {d[n], 16'h1234}) begin failures++; $display("rx store k=%0d", k); end
    end
    checks++;
    if (k == 3 && (corr != 4 || dec != 8)) begin failures++; $display("corrected %0d decoded %0d", corr, dec); end
    if (k != 3 && (corr != 0 || dec != 0)) begin failures++; $display("spurious decode"); end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      mem_we[k] = 0; mem_addr[k] = 0; mem_wdata[k] = 0; rx_raddr[k] = 0; ctx[k] = '0;
      start[k] = 0; func_en[k] = 0; tx_ready[k] = 0; rx_valid[k] = 0; rx_flit[k] = '0;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 10; rep++)
      for (int k = 0; k < 4; k++) begin
        run_one(k, 1'b1);
        if (rep % 3 == 0) run_one(k, 1'b0);
        rx_one(k);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
