// fir4: 4-tap FIR filter y(n) = sum_{i=0..3} b_i x(n-i), the arithmetic unit
// of the processing elements in the third column. Samples are 16-bit signed,
// coefficients 8-bit signed with 7 fraction bits (b = 127 is just under 1).
// The sum is shifted right by 7 (truncating) and saturated to 16 bits.
// Interface: each cycle with in_valid high takes one sample; the filtered
// sample appears on y with out_valid one cycle later. clear empties the
// delay line (x(n-i) = 0 before the first sample). The four taps and the
// formula follow the document; widths, scaling and timing are this design's.
module fir4
  import mrpma_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic signed [COEF_W-1:0] coef [FIR_TAPS],
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] y
);
  localparam int unsigned FRAC = 7;
  localparam int unsigned SW   = DATA_W + COEF_W + 2;

  logic signed [DATA_W-1:0] dl [FIR_TAPS-1];   // x(n-1) .. x(n-3)
  logic signed [SW-1:0]     sum;

  always_comb begin
    sum = SW'(x) * SW'(coef[0]);
    for (int i = 1; i < FIR_TAPS; i++) sum += SW'(dl[i-1]) * SW'(coef[i]);
  end

  function automatic logic signed [DATA_W-1:0] sat16(input logic signed [SW-1:0] v);
    logic signed [SW-1:0] s;
    s = v >>> FRAC;
    if (s > SW'(32767))       return 16'sd32767;
    else if (s < -SW'(32768)) return -16'sd32768;
    else                      return s[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FIR_TAPS - 1; i++) dl[i] <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        for (int i = 0; i < FIR_TAPS - 1; i++) dl[i] <= '0;
      end else if (in_valid) begin
        dl[0] <= x;
        for (int i = 1; i < FIR_TAPS - 1; i++) dl[i] <= dl[i-1];
        y <= sat16(sum);
      end
    end
  end
endmodule
