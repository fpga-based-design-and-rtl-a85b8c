// pe: processing element of the 4x4 array, attached to the local port of
// its switch. It holds an internal memory of eight complex words, written by
// the host controller, and one arithmetic unit chosen by its column (KIND):
// an 8-point FFT, an 8-point DCT, a 4-tap FIR filter or a channel encoder.
// On a start pulse it runs its unit over the eight words, then sends the
// eight results, one single-flit packet each, through an output FIFO to the
// destination switch named in its context word. With func_en low the words
// are sent unchanged (pass-through). A channel-encoder element sends 28-bit
// codewords marked as encoded; when it receives such a packet it decodes and
// corrects it before storing it. Every packet received is stored in an
// eight-word receive memory at the sample index it carries, where the host
// controller reads it.
// Word layout: {re[15:0], im[15:0]}. DCT, FIR and channel encoder use the
// real half and send an imaginary half of zero.
// Timing: busy rises the cycle after start and falls when the last flit has
// left the output FIFO. The unit runs first (a few cycles for the FFT,
// FIR and encoder, 65 for the DCT), then one flit is sent per cycle while
// the switch accepts.
// The receive side accepts a flit every cycle.
// The column-to-function mapping, the internal memory, the FIFO towards the
// destination and decoding at the destination follow the document; the
// block size of eight, the packet format and the pass-through mode are
// choices of this design.
module pe
  import mrpma_pkg::*;
#(
  parameter pe_kind_e        KIND       = KIND_FFT,
  parameter logic [ID_W-1:0] MY_ID      = '0,
  parameter int unsigned     FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // host access
  input  logic              mem_we,
  input  logic [IDX_W-1:0]  mem_addr,
  input  logic [WORD_W-1:0] mem_wdata,
  input  logic [IDX_W-1:0]  rx_raddr,
  output logic [WORD_W-1:0] rx_rdata,
  // configuration and control
  input  ctx_t              ctx,
  input  logic              start,
  input  logic              func_en,
  output logic              busy,
  // network
  output logic              tx_valid,
  input  logic              tx_ready,
  output flit_t             tx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_flit,
  // events
  output logic              rx_event,
  output logic              rx_decoded,
  output logic              rx_corrected
);
  typedef enum logic [1:0] {S_IDLE, S_COMP, S_SEND, S_DRAIN} state_e;
  state_e st;

  logic [WORD_W-1:0] mem    [BLOCK_N];
  logic [WORD_W-1:0] res    [BLOCK_N];
  logic [WORD_W-1:0] rx_mem [BLOCK_N];
  logic [IDX_W:0]    cnt;
  logic              fen;          // func_en latched at start

  logic signed [DATA_W-1:0] m_re [BLOCK_N];
  logic signed [DATA_W-1:0] m_im [BLOCK_N];
  always_comb begin
    for (int i = 0; i < BLOCK_N; i++) begin
      m_re[i] = mem[i][WORD_W-1:DATA_W];
      m_im[i] = mem[i][DATA_W-1:0];
    end
  end

  // ------------------------------------------------------------------
  // Arithmetic unit of this column
  // ------------------------------------------------------------------
  logic              unit_go;       // first compute cycle
  logic              unit_busy_q;   // set once the unit has been started in this run
  logic              run_start;     // start accepted this cycle
  logic              unit_done;
  logic [WORD_W-1:0] unit_res [BLOCK_N];
  logic              unit_res_we  [BLOCK_N];

  logic [27:0]       ce_code;
  logic [DATA_W-1:0] ce_dec;
  logic              ce_corr;

  if (KIND == KIND_FFT) begin : g_fft
    logic                     fv;
    logic signed [DATA_W-1:0] f_re [BLOCK_N];
    logic signed [DATA_W-1:0] f_im [BLOCK_N];
    fft8 u_fft (
      .clk, .rst_n,
      .in_valid (unit_go),
      .in_re    (m_re),
      .in_im    (m_im),
      .out_valid(fv),
      .out_re   (f_re),
      .out_im   (f_im)
    );
    assign unit_done = fv;
    always_comb
      for (int i = 0; i < BLOCK_N; i++) begin
        unit_res[i]    = {f_re[i], f_im[i]};
        unit_res_we[i] = fv;
      end
    assign ce_code = '0;
    assign ce_dec  = '0;
    assign ce_corr = 1'b0;
  end else if (KIND == KIND_DCT) begin : g_dct
    logic                     dbusy, dd;
    logic signed [DATA_W-1:0] d_y [BLOCK_N];
    dct8 u_dct (
      .clk, .rst_n,
      .start(unit_go),
      .x    (m_re),
      .busy (dbusy),
      .done (dd),
      .y    (d_y)
    );
    assign unit_done = dd;
    always_comb
      for (int i = 0; i < BLOCK_N; i++) begin
        unit_res[i]    = {d_y[i], {DATA_W{1'b0}}};
        unit_res_we[i] = dd;
      end
    assign ce_code = '0;
    assign ce_dec  = '0;
    assign ce_corr = 1'b0;
  end else if (KIND == KIND_FIR) begin : g_fir
    logic                     fv, feed;
    logic signed [DATA_W-1:0] fy;
    logic signed [COEF_W-1:0] b [FIR_TAPS];
    logic [IDX_W:0]           ocnt;
    always_comb
      for (int i = 0; i < FIR_TAPS; i++) b[i] = ctx.coef[COEF_W*i +: COEF_W];
    assign feed = (st == S_COMP) && !cnt[IDX_W];
    fir4 u_fir (
      .clk, .rst_n,
      .clear   (run_start),
      .coef    (b),
      .in_valid(feed),
      .x       (m_re[cnt[IDX_W-1:0]]),
      .out_valid(fv),
      .y       (fy)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       ocnt <= '0;
      else if (run_start) ocnt <= '0;
      else if (fv)      ocnt <= ocnt + 1'b1;
    end
    assign unit_done = fv && (ocnt == (IDX_W+1)'(BLOCK_N - 1));
    always_comb
      for (int i = 0; i < BLOCK_N; i++) begin
        unit_res[i]    = {fy, {DATA_W{1'b0}}};
        unit_res_we[i] = fv && (ocnt[IDX_W-1:0] == IDX_W'(i));
      end
    assign ce_code = '0;
    assign ce_dec  = '0;
    assign ce_corr = 1'b0;
  end else begin : g_ce
    channel_codec u_codec (
      .enc_data (res[cnt[IDX_W-1:0]][WORD_W-1:DATA_W]),
      .enc_code (ce_code),
      .dec_code (rx_flit.payload[27:0]),
      .dec_data (ce_dec),
      .corrected(ce_corr)
    );
    assign unit_done = 1'b1;      // encoding happens while sending
    always_comb
      for (int i = 0; i < BLOCK_N; i++) begin
        unit_res[i]    = {m_re[i], {DATA_W{1'b0}}};
        unit_res_we[i] = 1'b1;
      end
  end

  // ------------------------------------------------------------------
  // Sequencing
  // ------------------------------------------------------------------
  logic  q_in_valid, q_in_ready, q_empty;
  flit_t q_in;
  logic [FLIT_W-1:0] q_out;

  assign unit_go    = (st == S_COMP) && (cnt == '0) && fen && !unit_busy_q;

  assign run_start  = (st == S_IDLE) && start;
  assign q_in_valid = (st == S_SEND);
  always_comb begin
    q_in.dst = ctx.dest;
    q_in.src = MY_ID;
    q_in.idx = cnt[IDX_W-1:0];
    if (KIND == KIND_CE && fen) begin
      q_in.enc     = 1'b1;
      q_in.payload = {{(WORD_W-28){1'b0}}, ce_code};
    end else begin
      q_in.enc     = 1'b0;
      q_in.payload = res[cnt[IDX_W-1:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      cnt         <= '0;
      fen         <= 1'b0;
      unit_busy_q <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          st          <= S_COMP;
          cnt         <= '0;
          fen         <= func_en;
          unit_busy_q <= 1'b0;
        end
        S_COMP: begin
          if (!fen) begin
            st  <= S_SEND;
            cnt <= '0;
          end else begin
            unit_busy_q <= 1'b1;
            if (!cnt[IDX_W]) cnt <= cnt + 1'b1;   // FIR feed index
            if (unit_busy_q && unit_done) begin
              st  <= S_SEND;
              cnt <= '0;
            end
          end
        end
        S_SEND: if (q_in_ready) begin
          if (cnt == (IDX_W+1)'(BLOCK_N - 1)) st <= S_DRAIN;
          cnt <= cnt + 1'b1;
        end
        S_DRAIN: if (q_empty) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // Result buffer: copy of the input (pass-through) or unit results.
  always_ff @(posedge clk) begin
    if (st == S_IDLE && start) begin
      res <= mem;
    end else if (st == S_COMP && fen) begin
      for (int i = 0; i < BLOCK_N; i++)
        if (unit_res_we[i]) res[i] <= unit_res[i];
    end
  end

  assign busy = (st != S_IDLE);

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_txq (
    .clk, .rst_n,
    .in_valid (q_in_valid),
    .in_ready (q_in_ready),
    .in_data  (q_in),
    .out_valid(tx_valid),
    .out_ready(tx_ready),
    .out_data (q_out),
    .empty    (q_empty)
  );
  assign tx_flit = flit_t'(q_out);

  // ------------------------------------------------------------------
  // Internal memory (host writes) and receive memory (network writes)
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BLOCK_N; i++) mem[i] <= '0;
    end else if (mem_we) begin
      mem[mem_addr] <= mem_wdata;
    end
  end

  logic do_decode;
  assign rx_ready  = 1'b1;
  assign do_decode = (KIND == KIND_CE) && rx_flit.enc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BLOCK_N; i++) rx_mem[i] <= '0;
    end else if (rx_valid) begin
      rx_mem[rx_flit.idx] <= do_decode ? {ce_dec, {DATA_W{1'b0}}} : rx_flit.payload;
    end
  end
  assign rx_rdata     = rx_mem[rx_raddr];
  assign rx_event     = rx_valid;
  assign rx_decoded   = rx_valid && do_decode;
  assign rx_corrected = rx_valid && do_decode && ce_corr;
endmodule
