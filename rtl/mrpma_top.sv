// mrpma_top: multigrained reconfigurable 4x4 network on chip for DSP work.
// Sixteen processing elements sit on a 4x4 mesh of switches SW1..SW16,
// numbered down each column. Each column does one kind of arithmetic:
// column 1 (SW1-SW4) 8-point FFT, column 2 (SW5-SW8) 8-point DCT, column 3
// (SW9-SW12) 4-tap FIR, column 4 (SW13-SW16) channel encoding with decoding
// at the receiving switch. A host drives everything through the host
// controller: it fills the shared data memory, loads blocks of eight words
// into element memories, writes each element's context word (destination
// switch, FIR coefficients), then issues RUN with the eight column control
// signals. Every started element processes its block and sends the eight
// results as packets across the mesh to its destination, which stores
// them in its receive memory; the host then copies them back to the data
// memory and reads them out.
// Ports: the host command/response port of host_controller, the eight
// control signals, the cycle count of the last run, and per-switch event
// signals (element busy, packet received, packet decoded, bit corrected,
// switch stall) for observation.
module mrpma_top
  import mrpma_pkg::*;
#(
  parameter int unsigned DM_DEPTH       = 256,
  parameter int unsigned SW_FIFO_DEPTH  = 2,
  parameter int unsigned PE_FIFO_DEPTH  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  host_cmd_t         cmd,
  output logic              rsp_valid,
  output logic [WORD_W-1:0] rsp_data,
  output logic [CTRL_W-1:0] ctrl,
  output logic [15:0]       run_cycles,
  output logic [NUM_PE-1:0] pe_busy,
  output logic [NUM_PE-1:0] pe_rx_event,
  output logic [NUM_PE-1:0] pe_rx_decoded,
  output logic [NUM_PE-1:0] pe_rx_corrected,
  output logic [NUM_PE-1:0] sw_stall
);
  // data memory
  logic              dm_en, dm_we;
  logic [DM_AW-1:0]  dm_addr;
  logic [WORD_W-1:0] dm_wdata, dm_rdata;
  // element access
  logic [NUM_PE-1:0] pe_mem_we;
  logic [IDX_W-1:0]  pe_mem_addr, pe_rx_raddr;
  logic [WORD_W-1:0] pe_mem_wdata;
  logic [WORD_W-1:0] pe_rx_rdata [NUM_PE];
  // context and control
  logic              ctx_we, ctrl_set;
  logic [ID_W-1:0]   ctx_waddr;
  ctx_t              ctx_wdata;
  ctx_t              ctx [NUM_PE];
  logic [CTRL_W-1:0] ctrl_val;
  logic [NUM_PE-1:0] ctx_valid, pe_start, pe_func_en;
  // network
  logic  noc_idle;
  logic  tx_valid [NUM_PE];
  logic  tx_ready [NUM_PE];
  flit_t tx_flit  [NUM_PE];
  logic  rx_valid [NUM_PE];
  logic  rx_ready [NUM_PE];
  flit_t rx_flit  [NUM_PE];

  host_controller u_host (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_data, .run_cycles,
    .dm_en, .dm_we, .dm_addr, .dm_wdata, .dm_rdata,
    .pe_mem_we, .pe_mem_addr, .pe_mem_wdata, .pe_rx_raddr, .pe_rx_rdata,
    .pe_busy, .noc_idle,
    .ctx_we, .ctx_waddr, .ctx_wdata, .ctrl_set, .ctrl_val
  );

  data_memory #(.DEPTH(DM_DEPTH)) u_dm (
    .clk, .en(dm_en), .we(dm_we), .addr(dm_addr[$clog2(DM_DEPTH)-1:0]),
    .wdata(dm_wdata), .rdata(dm_rdata)
  );

  context_memory u_ctx (
    .clk, .rst_n, .we(ctx_we), .waddr(ctx_waddr), .wdata(ctx_wdata), .ctx
  );

  always_comb for (int p = 0; p < NUM_PE; p++) ctx_valid[p] = ctx[p].valid;

  ctrl_gen u_ctrl (
    .clk, .rst_n, .set(ctrl_set), .ctrl_in(ctrl_val), .ctx_valid,
    .ctrl, .pe_start, .pe_func_en
  );

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    localparam pe_kind_e KIND = pe_kind_e'(p / MESH_DIM);
    pe #(.KIND(KIND), .MY_ID(ID_W'(p)), .FIFO_DEPTH(PE_FIFO_DEPTH)) u_pe (
      .clk, .rst_n,
      .mem_we      (pe_mem_we[p]),
      .mem_addr    (pe_mem_addr),
      .mem_wdata   (pe_mem_wdata),
      .rx_raddr    (pe_rx_raddr),
      .rx_rdata    (pe_rx_rdata[p]),
      .ctx         (ctx[p]),
      .start       (pe_start[p]),
      .func_en     (pe_func_en[p]),
      .busy        (pe_busy[p]),
      .tx_valid    (tx_valid[p]),
      .tx_ready    (tx_ready[p]),
      .tx_flit     (tx_flit[p]),
      .rx_valid    (rx_valid[p]),
      .rx_ready    (rx_ready[p]),
      .rx_flit     (rx_flit[p]),
      .rx_event    (pe_rx_event[p]),
      .rx_decoded  (pe_rx_decoded[p]),
      .rx_corrected(pe_rx_corrected[p])
    );
  end

  noc_mesh #(.FIFO_DEPTH(SW_FIFO_DEPTH)) u_noc (
    .clk, .rst_n,
    .loc_in_valid (tx_valid),
    .loc_in_ready (tx_ready),
    .loc_in_flit  (tx_flit),
    .loc_out_valid(rx_valid),
    .loc_out_ready(rx_ready),
    .loc_out_flit (rx_flit),
    .idle         (noc_idle),
    .stall        (sw_stall)
  );
endmodule
