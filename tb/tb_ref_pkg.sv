// tb_ref_pkg: reference models used by the testbenches, written from the
// defining formulas rather than from the RTL structure: DFT and DCT-II in
// floating point, the FIR sum in integers, and a Hamming(7,4) encoder built
// from the rule that parity bit 2^j covers every position with bit j set.
package tb_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  // X(k)/8 of an 8-point DFT
  function automatic void dft8(input int xr[8], input int xi[8], output real yr[8], output real yi[8]);
    for (int k = 0; k < 8; k++) begin
      yr[k] = 0.0; yi[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        real a;
        a = -2.0 * PI * n * k / 8.0;
        yr[k] += xr[n] * $cos(a) - xi[n] * $sin(a);
        yi[k] += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      yr[k] /= 8.0; yi[k] /= 8.0;
    end
  endfunction

  // X(k)/8 of an 8-point DCT-II
  function automatic void dct8(input int x[8], output real y[8]);
    for (int k = 0; k < 8; k++) begin
      y[k] = 0.0;
      for (int n = 0; n < 8; n++) y[k] += x[n] * $cos(PI / 8.0 * (n + 0.5) * k);
      y[k] /= 8.0;
    end
  endfunction

  function automatic int sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Hamming(7,4) of one nibble: positions 1..7, data at 3,5,6,7.
  function automatic logic [6:0] ham74(input logic [3:0] d);
    logic [6:0] c;
    int dpos[4] = '{3, 5, 6, 7};
    c = '0;
    for (int i = 0; i < 4; i++) c[dpos[i]-1] = d[i];
    for (int j = 0; j < 3; j++) begin
      logic p;
      p = 1'b0;
      for (int pos = 1; pos <= 7; pos++)
        if (((pos >> j) & 1) == 1 && pos != (1 << j)) p ^= c[pos-1];
      c[(1 << j) - 1] = p;
    end
    return c;
  endfunction

  function automatic logic [27:0] ham_word(input logic [15:0] d);
    logic [27:0] c;
    for (int j = 0; j < 4; j++) c[7*j +: 7] = ham74(d[4*j +: 4]);
    return c;
  endfunction
endpackage
