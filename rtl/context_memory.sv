// context_memory: configuration words of the sixteen processing elements,
// one register each. A word holds a valid bit, the destination switch of
// the element's results and four FIR coefficients. The host controller
// writes one word per cycle (we, waddr, wdata); every word is visible to
// its element at all times (ctx), since each element reads its own
// configuration in parallel with the others. Reset clears all valid bits.
// That the array has a context memory feeding the elements follows the
// document; what a context word contains is this design's choice.
module context_memory
  import mrpma_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [ID_W-1:0] waddr,
  input  ctx_t            wdata,
  output ctx_t            ctx [NUM_PE]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PE; i++) ctx[i] <= '0;
    end else if (we) begin
      ctx[waddr] <= wdata;
    end
  end
endmodule
