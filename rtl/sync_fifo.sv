// sync_fifo: single-clock first-in first-out buffer with valid/ready ports.
// A word is written when in_valid && in_ready and read when out_valid &&
// out_ready. in_ready is !full and does not look at a read in the same
// cycle, so no combinational path runs from out_ready to in_ready. The head
// word is shown on out_data while out_valid is high (first-word fall-through).
// The buffers between a processing element and its switch, and the input
// buffers of the switches, are instances of it; the depth is a parameter.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [PW:0]      count;
  logic             push, pop;

  assign in_ready  = (count < (PW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign empty     = (count == '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // Handshake rules: nothing is read from an empty buffer or written to a full one.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != '0);
  assert property (@(posedge clk) disable iff (!rst_n) push |-> count < (PW+1)'(DEPTH));
endmodule
