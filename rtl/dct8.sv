// dct8: 8-point DCT-II, X(k) = sum_{n=0..7} x(n) cos(pi/8 (n + 1/2) k),
// the arithmetic unit of the processing elements in the second column.
// The cosine coefficients are held in a memory of eight locations,
// c[m] = round(2^14 cos(m pi / 16)) for m = 0..7. Every cosine the transform
// needs is one of them up to sign: with m = ((2n+1)k) mod 32, the value is
// +c[m] for m < 8, 0 for m = 8 or 24, -c[16-m] for 9..16, -c[m-16] for
// 17..23 and +c[32-m] for 25..31. One multiply-accumulate is done per cycle,
// so a block takes 64 cycles. The result is X(k)/8 (accumulator shifted
// right by 17, truncating), saturated to 16 bits.
// Interface: a start pulse latches x[0..7]; busy is high during the run;
// done pulses for one cycle 65 cycles after start with X(0..7)/8 on y,
// which then holds until the next run.
// The transform and the eight-location coefficient memory follow the
// document; the serial schedule, scaling and widths are this design's.
module dct8
  import mrpma_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] x [BLOCK_N],
  output logic                     busy,
  output logic                     done,
  output logic signed [DATA_W-1:0] y [BLOCK_N]
);
  localparam logic signed [15:0] COS_MEM [BLOCK_N] = '{
    16'sd16384, 16'sd16069, 16'sd15137, 16'sd13623,
    16'sd11585, 16'sd9102,  16'sd6270,  16'sd3196
  };
  localparam int unsigned ACC_W = 36;

  logic signed [DATA_W-1:0] xr [BLOCK_N];
  logic [2:0]               n_q, k_q;
  logic signed [ACC_W-1:0]  acc;
  logic signed [16:0]       coef;       // signed cosine for (n_q, k_q)
  logic [4:0]               m;
  logic [7:0]               prod_nk;

  assign prod_nk = ({4'd0, n_q, 1'b1}) * {5'd0, k_q};
  assign m       = prod_nk[4:0];

  always_comb begin
    if (m < 5'd8)                    coef =  17'(COS_MEM[m[2:0]]);
    else if (m == 5'd8 || m == 5'd24) coef = '0;
    else if (m <= 5'd16)             coef = -17'(COS_MEM[3'(5'd16 - m)]);
    else if (m < 5'd24)              coef = -17'(COS_MEM[3'(m - 5'd16)]);
    else                             coef =  17'(COS_MEM[3'(6'd32 - 6'(m))]);
  end

  function automatic logic signed [DATA_W-1:0] sat16(input logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] s;
    s = v >>> 17;
    if (s > ACC_W'(32767))       return 16'sd32767;
    else if (s < -ACC_W'(32768)) return -16'sd32768;
    else                         return s[DATA_W-1:0];
  endfunction

  logic signed [ACC_W-1:0] acc_next;
  assign acc_next = acc + ACC_W'(xr[n_q]) * ACC_W'(coef);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      n_q  <= '0;
      k_q  <= '0;
      acc  <= '0;
      for (int i = 0; i < BLOCK_N; i++) begin
        xr[i] <= '0;
        y[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        xr   <= x;
        n_q  <= '0;
        k_q  <= '0;
        acc  <= '0;
      end else if (busy) begin
        if (n_q == 3'd7) begin
          y[k_q] <= sat16(acc_next);
          acc    <= '0;
          n_q    <= '0;
          k_q    <= k_q + 1'b1;
          if (k_q == 3'd7) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          acc <= acc_next;
          n_q <= n_q + 1'b1;
        end
      end
    end
  end
endmodule
