// noc_mesh: the 4x4 mesh of switches SW1..SW16. Switch id {col,row} is
// linked to its north (row-1), south (row+1), west (col-1) and east
// (col+1) neighbours; ports on the edge of the mesh are tied off, and the
// dimension-order routing of the switches never sends a flit towards them.
// Each switch's local port is brought out (loc_in_*: from the element into
// the network; loc_out_*: from the network to the element). idle is high
// when every switch buffer is empty; stall[k] is high when a flit waited in
// switch k. A flit crossing h switches arrives h cycles after it entered
// the first one's buffer, when it meets no contention.
module noc_mesh
  import mrpma_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  loc_in_valid  [NUM_PE],
  output logic  loc_in_ready  [NUM_PE],
  input  flit_t loc_in_flit   [NUM_PE],
  output logic  loc_out_valid [NUM_PE],
  input  logic  loc_out_ready [NUM_PE],
  output flit_t loc_out_flit  [NUM_PE],
  output logic  idle,
  output logic [NUM_PE-1:0] stall
);
  logic  iv [NUM_PE][NPORTS];
  logic  ir [NUM_PE][NPORTS];
  flit_t ifl[NUM_PE][NPORTS];
  logic  ov [NUM_PE][NPORTS];
  logic  orr[NUM_PE][NPORTS];
  flit_t ofl[NUM_PE][NPORTS];
  logic [NUM_PE-1:0] r_idle;

  for (genvar k = 0; k < NUM_PE; k++) begin : g_sw
    localparam int unsigned COL = k / MESH_DIM;
    localparam int unsigned ROW = k % MESH_DIM;

    noc_router #(.MY_ID(ID_W'(k)), .FIFO_DEPTH(FIFO_DEPTH)) u_sw (
      .clk, .rst_n,
      .in_valid (iv[k]),
      .in_ready (ir[k]),
      .in_flit  (ifl[k]),
      .out_valid(ov[k]),
      .out_ready(orr[k]),
      .out_flit (ofl[k]),
      .idle     (r_idle[k]),
      .stall    (stall[k])
    );

    // local port
    assign iv [k][PORT_L]  = loc_in_valid[k];
    assign ifl[k][PORT_L]  = loc_in_flit[k];
    assign loc_in_ready[k] = ir[k][PORT_L];
    assign loc_out_valid[k] = ov[k][PORT_L];
    assign loc_out_flit[k]  = ofl[k][PORT_L];
    assign orr[k][PORT_L]   = loc_out_ready[k];

    // north side: from the switch above (its south output)
    if (ROW > 0) begin : g_n
      assign iv [k][PORT_N] = ov [k-1][PORT_S];
      assign ifl[k][PORT_N] = ofl[k-1][PORT_S];
      assign orr[k][PORT_N] = ir [k-1][PORT_S];
    end else begin : g_n_edge
      assign iv [k][PORT_N] = 1'b0;
      assign ifl[k][PORT_N] = '0;
      assign orr[k][PORT_N] = 1'b0;
    end
    if (ROW < MESH_DIM - 1) begin : g_s
      assign iv [k][PORT_S] = ov [k+1][PORT_N];
      assign ifl[k][PORT_S] = ofl[k+1][PORT_N];
      assign orr[k][PORT_S] = ir [k+1][PORT_N];
    end else begin : g_s_edge
      assign iv [k][PORT_S] = 1'b0;
      assign ifl[k][PORT_S] = '0;
      assign orr[k][PORT_S] = 1'b0;
    end
    if (COL > 0) begin : g_w
      assign iv [k][PORT_W] = ov [k-MESH_DIM][PORT_E];
      assign ifl[k][PORT_W] = ofl[k-MESH_DIM][PORT_E];
      assign orr[k][PORT_W] = ir [k-MESH_DIM][PORT_E];
    end else begin : g_w_edge
      assign iv [k][PORT_W] = 1'b0;
      assign ifl[k][PORT_W] = '0;
      assign orr[k][PORT_W] = 1'b0;
    end
    if (COL < MESH_DIM - 1) begin : g_e
      assign iv [k][PORT_E] = ov [k+MESH_DIM][PORT_W];
      assign ifl[k][PORT_E] = ofl[k+MESH_DIM][PORT_W];
      assign orr[k][PORT_E] = ir [k+MESH_DIM][PORT_W];
    end else begin : g_e_edge
      assign iv [k][PORT_E] = 1'b0;
      assign ifl[k][PORT_E] = '0;
      assign orr[k][PORT_E] = 1'b0;
    end

    // No flit may leave through an edge of the mesh.
    assert property (@(posedge clk) disable iff (!rst_n)
      !((ROW == 0 && ov[k][PORT_N]) || (ROW == MESH_DIM-1 && ov[k][PORT_S]) ||
        (COL == 0 && ov[k][PORT_W]) || (COL == MESH_DIM-1 && ov[k][PORT_E])));
  end

  assign idle = &r_idle;
endmodule
