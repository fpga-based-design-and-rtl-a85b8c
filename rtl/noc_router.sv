// noc_router: one switch (SW) of the 4x4 mesh. It has five ports: north,
// east, south, west and the local processing element. Each input port has a
// small FIFO. The flit at the head of an input FIFO is routed by dimension
// order: first along the row of switches to the destination column (east or
// west), then along the column to the destination row (south or north), then
// out of the local port. On a mesh this always takes a shortest path, which
// is how this design reads the requirement that the route from source to
// destination switch be the shortest one. Every output port has a
// round-robin arbiter over the inputs that want it, so a flit that loses
// arbitration waits in its FIFO (a stall) and the loser is served next.
// An input FIFO pops when its head is granted and the receiver is ready;
// out_valid depends only on FIFO state, out_ready of the receiver only on
// its FIFO fill level, so chained routers have no combinational loop.
// A flit takes one cycle per switch. Packets are one flit long; FIFO depth,
// routing rule and arbitration are choices of this design.
module noc_router
  import mrpma_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID      = '0,
  parameter int unsigned     FIFO_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NPORTS],
  output logic  in_ready  [NPORTS],
  input  flit_t in_flit   [NPORTS],
  output logic  out_valid [NPORTS],
  input  logic  out_ready [NPORTS],
  output flit_t out_flit  [NPORTS],
  output logic  idle,          // all input FIFOs empty
  output logic  stall          // some head flit waited this cycle
);
  localparam logic [1:0] MY_COL = MY_ID[3:2];
  localparam logic [1:0] MY_ROW = MY_ID[1:0];

  logic  hd_valid [NPORTS];
  logic  hd_pop   [NPORTS];
  flit_t hd_flit  [NPORTS];
  logic  hd_empty [NPORTS];
  logic [2:0] hd_route [NPORTS];

  function automatic logic [2:0] route(input logic [ID_W-1:0] dst);
    if (dst[3:2] > MY_COL)      return 3'(PORT_E);
    else if (dst[3:2] < MY_COL) return 3'(PORT_W);
    else if (dst[1:0] > MY_ROW) return 3'(PORT_S);
    else if (dst[1:0] < MY_ROW) return 3'(PORT_N);
    else                        return 3'(PORT_L);
  endfunction

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [FLIT_W-1:0] q_data;
    sync_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_flit[i]),
      .out_valid(hd_valid[i]),
      .out_ready(hd_pop[i]),
      .out_data (q_data),
      .empty    (hd_empty[i])
    );
    assign hd_flit[i]  = flit_t'(q_data);
    assign hd_route[i] = route(hd_flit[i].dst);
  end

  // Round-robin arbitration per output port.
  logic [2:0] rr    [NPORTS];
  logic [2:0] gnt_in[NPORTS];   // input granted to each output
  logic       gnt_v [NPORTS];

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      gnt_v[o]  = 1'b0;
      gnt_in[o] = '0;
      for (int k = 0; k < NPORTS; k++) begin
        int unsigned i;
        i = (32'(rr[o]) + 32'(k)) % NPORTS;
        if (!gnt_v[o] && hd_valid[i] && hd_route[i] == 3'(o)) begin
          gnt_v[o]  = 1'b1;
          gnt_in[o] = 3'(i);
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) hd_pop[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = gnt_v[o];
      out_flit[o]  = hd_flit[gnt_in[o]];
      if (gnt_v[o] && out_ready[o]) hd_pop[gnt_in[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) rr[o] <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++)
        if (gnt_v[o] && out_ready[o])
          rr[o] <= (gnt_in[o] == 3'(NPORTS - 1)) ? '0 : gnt_in[o] + 1'b1;
    end
  end

  always_comb begin
    idle  = 1'b1;
    stall = 1'b0;
    for (int i = 0; i < NPORTS; i++) begin
      if (!hd_empty[i]) idle = 1'b0;
      if (hd_valid[i] && !hd_pop[i]) stall = 1'b1;
    end
  end
endmodule
