// ctrl_gen: control signal generation for the four columns. It holds eight
// control signals, two per column, in the order FFT (bits 1:0), DCT (3:2),
// FIR (5:4) and channel encoder (7:6). In each pair the low bit runs the
// column and the high bit turns its arithmetic on; with the high bit low the
// elements of a running column forward their data unchanged. When set
// pulses, ctrl takes ctrl_in and, one cycle later, every element of a
// running column whose context word is valid gets a one-cycle start pulse;
// func_en carries the high bit of its column to each element. The eight
// signals and their assignment to the columns follow the document; the
// meaning of each bit of a pair is this design's choice.
module ctrl_gen
  import mrpma_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              set,
  input  logic [CTRL_W-1:0] ctrl_in,
  input  logic [NUM_PE-1:0] ctx_valid,
  output logic [CTRL_W-1:0] ctrl,
  output logic [NUM_PE-1:0] pe_start,
  output logic [NUM_PE-1:0] pe_func_en
);
  logic set_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl  <= '0;
      set_q <= 1'b0;
    end else begin
      set_q <= set;
      if (set) ctrl <= ctrl_in;
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PE; p++) begin
      // element p sits in column p / 4
      pe_start[p]   = set_q && ctrl[2 * (p / MESH_DIM)] && ctx_valid[p];
      pe_func_en[p] = ctrl[2 * (p / MESH_DIM) + 1];
    end
  end
endmodule
