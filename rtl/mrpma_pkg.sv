// mrpma_pkg: types and constants shared by the multigrained reconfigurable
// 4x4 NoC. Switch SWn sits in column (n-1)/4 and row (n-1)%4, so the 4-bit
// switch id is {column, row}; this column-major numbering is the one of the
// array drawing of the design. Column 0 holds FFT elements, column 1 DCT,
// column 2 FIR and column 3 channel encoders. Data words are 16-bit signed
// fixed point; a sample moves through the network as one single-flit packet
// carrying a complex word (real in the high half, imaginary in the low half)
// or a channel codeword.
package mrpma_pkg;

  localparam int unsigned MESH_DIM = 4;              // 4x4 array
  localparam int unsigned NUM_PE   = MESH_DIM * MESH_DIM;
  localparam int unsigned ID_W     = 4;              // {col[1:0], row[1:0]}
  localparam int unsigned DATA_W   = 16;             // sample width
  localparam int unsigned WORD_W   = 2 * DATA_W;     // complex word {re, im}
  localparam int unsigned BLOCK_N  = 8;              // samples per block
  localparam int unsigned IDX_W    = 3;              // log2(BLOCK_N)
  localparam int unsigned COEF_W   = 8;              // FIR coefficient width
  localparam int unsigned FIR_TAPS = 4;
  localparam int unsigned CTRL_W   = 8;              // 2 control signals per column

  typedef enum logic [1:0] {
    KIND_FFT = 2'd0,
    KIND_DCT = 2'd1,
    KIND_FIR = 2'd2,
    KIND_CE  = 2'd3
  } pe_kind_e;

  // Router port order.
  typedef enum logic [2:0] {
    PORT_N = 3'd0,   // towards row - 1
    PORT_E = 3'd1,   // towards column + 1
    PORT_S = 3'd2,   // towards row + 1
    PORT_W = 3'd3,   // towards column - 1
    PORT_L = 3'd4    // local processing element
  } port_e;
  localparam int unsigned NPORTS = 5;

  typedef struct packed {
    logic [ID_W-1:0]   dst;
    logic [ID_W-1:0]   src;
    logic [IDX_W-1:0]  idx;      // sample position inside the block
    logic              enc;      // payload is a channel codeword
    logic [WORD_W-1:0] payload;
  } flit_t;
  localparam int unsigned FLIT_W = $bits(flit_t);

  // Context (configuration) word of one PE.
  typedef struct packed {
    logic                         valid;
    logic [ID_W-1:0]              dest;
    logic [FIR_TAPS*COEF_W-1:0]   coef;  // b3 in the top byte, b0 in the low byte
  } ctx_t;

  // Host command interface.
  typedef enum logic [2:0] {
    CMD_DM_WRITE = 3'd0,  // data memory[addr] <= data
    CMD_DM_READ  = 3'd1,  // response <= data memory[addr]
    CMD_LOAD     = 3'd2,  // PE[pe] input memory[0..7] <= data memory[addr..addr+7]
    CMD_CONFIG   = 3'd3,  // context[pe] <= {valid, dest = addr[3:0], coef = data}
    CMD_RUN      = 3'd4,  // control signals <= data[7:0]; wait until the run has drained
    CMD_STORE    = 3'd5,  // data memory[addr..addr+7] <= PE[pe] receive memory[0..7]
    CMD_PE_READ  = 3'd6   // response <= PE[pe] receive memory[addr[2:0]]
  } cmd_op_e;

  localparam int unsigned DM_AW = 8;

  typedef struct packed {
    cmd_op_e           op;
    logic [ID_W-1:0]   pe;
    logic [DM_AW-1:0]  addr;
    logic [WORD_W-1:0] data;
  } host_cmd_t;

  function automatic logic [ID_W-1:0] sw_id(input int unsigned col, input int unsigned row);
    return ID_W'((col << 2) | row);
  endfunction

endpackage
