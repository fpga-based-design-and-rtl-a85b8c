// fft8: 8-point radix-2 decimation-in-time FFT on complex 16-bit signed
// fixed-point samples, the arithmetic unit of the processing elements in the
// first column. It computes X(k) = sum_n x(n) W8^(nk) for k = 0..7, scaled by
// 1/8: each of the three butterfly stages halves its results (arithmetic
// shift, truncating), so the output is X(k)/8 and never overflows inside.
// Twiddle factors are Q1.14 constants (W8^1 real part = 11585 = 2^14/sqrt2).
// Internal values are 18 bits wide; the result is saturated to 16 bits.
// Interface: when in_valid is high the eight samples on in_re/in_im are taken;
// three cycles later out_valid is high for one cycle with X(0..7)/8 on
// out_re/out_im in natural order. A new block can be given every cycle.
// The transform and the block size of eight follow the document; radix,
// scaling, word widths and latency are choices of this design.
module fft8
  import mrpma_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_re [BLOCK_N],
  input  logic signed [DATA_W-1:0] in_im [BLOCK_N],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_re [BLOCK_N],
  output logic signed [DATA_W-1:0] out_im [BLOCK_N]
);
  localparam int unsigned IW = 18;   // internal width
  typedef logic signed [IW-1:0] iw_t;

  // W8^k, k = 0..3, Q1.14
  localparam logic signed [15:0] TW_RE [4] = '{16'sd16384, 16'sd11585, 16'sd0, -16'sd11585};
  localparam logic signed [15:0] TW_IM [4] = '{16'sd0, -16'sd11585, -16'sd16384, -16'sd11585};

  iw_t s_re [4][BLOCK_N];   // stage values; [0] = bit-reversed input
  iw_t s_im [4][BLOCK_N];
  logic [2:0] vld;

  function automatic int unsigned bitrev3(input int unsigned v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  function automatic iw_t half(input logic signed [IW+1:0] v);
    return iw_t'(v >>> 1);
  endfunction

  // Input stage: bit-reversed order, sign-extended.
  always_comb begin
    for (int n = 0; n < BLOCK_N; n++) begin
      s_re[0][n] = iw_t'(in_re[bitrev3(n)]);
      s_im[0][n] = iw_t'(in_im[bitrev3(n)]);
    end
  end

  // Three registered butterfly stages.
  for (genvar st = 0; st < 3; st++) begin : g_stage
    localparam int unsigned SPAN = 1 << st;
    iw_t n_re [BLOCK_N];
    iw_t n_im [BLOCK_N];
    always_comb begin
      for (int g = 0; g < BLOCK_N; g += 2 * SPAN) begin
        for (int j = 0; j < SPAN; j++) begin
          int unsigned a, b, tw;
          logic signed [IW+16:0] pr, pi;
          logic signed [IW+1:0]  tr, ti;
          a  = g + j;
          b  = g + j + SPAN;
          tw = j * (BLOCK_N / (2 * SPAN));
          pr = (IW+17)'(s_re[st][b]) * (IW+17)'(TW_RE[tw]) - (IW+17)'(s_im[st][b]) * (IW+17)'(TW_IM[tw]);
          pi = (IW+17)'(s_re[st][b]) * (IW+17)'(TW_IM[tw]) + (IW+17)'(s_im[st][b]) * (IW+17)'(TW_RE[tw]);
          tr = (IW+2)'(pr >>> 14);
          ti = (IW+2)'(pi >>> 14);
          n_re[a] = half((IW+2)'(s_re[st][a]) + tr);
          n_im[a] = half((IW+2)'(s_im[st][a]) + ti);
          n_re[b] = half((IW+2)'(s_re[st][a]) - tr);
          n_im[b] = half((IW+2)'(s_im[st][a]) - ti);
        end
      end
    end
    always_ff @(posedge clk) begin
      s_re[st+1] <= n_re;
      s_im[st+1] <= n_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end
  assign out_valid = vld[2];

  function automatic logic signed [DATA_W-1:0] sat16(input iw_t v);
    if (v > iw_t'(32767))       return 16'sd32767;
    else if (v < iw_t'(-32768)) return -16'sd32768;
    else                        return v[DATA_W-1:0];
  endfunction

  always_comb begin
    for (int k = 0; k < BLOCK_N; k++) begin
      out_re[k] = sat16(s_re[3][k]);
      out_im[k] = sat16(s_im[3][k]);
    end
  end
endmodule
