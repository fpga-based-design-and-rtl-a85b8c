// data_memory: shared data memory of the array. It holds the input blocks
// the host controller loads into the processing elements and the blocks it
// copies back from their receive memories. One port, synchronous: with en
// high, a write (we high) stores wdata at addr; a read returns the word at
// addr on rdata in the next cycle. DEPTH words of WORD_W bits. The contents
// are not reset. The shared memory itself follows the document; its size,
// single port and timing are choices of this design.
module data_memory
  import mrpma_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WORD_W-1:0]        wdata,
  output logic [WORD_W-1:0]        rdata
);
  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
