// host_controller: executes the commands of an outside host on the array.
// Commands arrive on a valid/ready port, one at a time (cmd_ready is high
// only in the idle state); see cmd_op_e in mrpma_pkg for the set:
//   DM_WRITE  one word into the shared data memory (1 cycle)
//   DM_READ   one word of the data memory onto rsp_data (2 cycles)
//   LOAD      eight words of the data memory into a PE's internal memory
//             (9 cycles, one read ahead of each write)
//   CONFIG    a context word (dest = addr[3:0], FIR coefficients = data)
//   RUN       sets the eight control signals to data[7:0], then waits
//             until no element is busy and every switch buffer is empty;
//             run_cycles then holds the cycles the run took
//   STORE     a PE's receive memory into eight data memory words (8 cycles)
//   PE_READ   one receive-memory word of a PE onto rsp_data (1 cycle)
// rsp_valid pulses with rsp_data for the two read commands.
// That a host controller moves data between the shared memory and the
// elements and starts them follows the document; the command set, the
// encodings and the timing are this design's.
module host_controller
  import mrpma_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  host_cmd_t         cmd,
  output logic              rsp_valid,
  output logic [WORD_W-1:0] rsp_data,
  output logic [15:0]       run_cycles,
  // data memory
  output logic              dm_en,
  output logic              dm_we,
  output logic [DM_AW-1:0]  dm_addr,
  output logic [WORD_W-1:0] dm_wdata,
  input  logic [WORD_W-1:0] dm_rdata,
  // processing elements
  output logic [NUM_PE-1:0] pe_mem_we,
  output logic [IDX_W-1:0]  pe_mem_addr,
  output logic [WORD_W-1:0] pe_mem_wdata,
  output logic [IDX_W-1:0]  pe_rx_raddr,
  input  logic [WORD_W-1:0] pe_rx_rdata [NUM_PE],
  input  logic [NUM_PE-1:0] pe_busy,
  input  logic              noc_idle,
  // context memory and control signal generation
  output logic              ctx_we,
  output logic [ID_W-1:0]   ctx_waddr,
  output ctx_t              ctx_wdata,
  output logic              ctrl_set,
  output logic [CTRL_W-1:0] ctrl_val
);
  typedef enum logic [2:0] {H_IDLE, H_DMRD, H_LOAD, H_RUN, H_STORE} hstate_e;
  hstate_e    st;
  host_cmd_t  c;          // command being executed
  logic [IDX_W:0] i;      // word counter
  logic [1:0] settle;     // cycles before the drain test is trusted

  assign cmd_ready = (st == H_IDLE);
  logic accept;
  assign accept = cmd_valid && cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= H_IDLE;
      c          <= '0;
      i          <= '0;
      settle     <= '0;
      run_cycles <= '0;
    end else begin
      unique case (st)
        H_IDLE: if (accept) begin
          c <= cmd;
          i <= '0;
          unique case (cmd.op)
            CMD_DM_READ: st <= H_DMRD;
            CMD_LOAD:    st <= H_LOAD;
            CMD_STORE:   st <= H_STORE;
            CMD_RUN: begin
              st         <= H_RUN;
              settle     <= 2'd3;
              run_cycles <= '0;
            end
            default:     st <= H_IDLE;
          endcase
        end
        H_DMRD: st <= H_IDLE;
        H_LOAD: begin
          i <= i + 1'b1;
          if (i == (IDX_W+1)'(BLOCK_N)) st <= H_IDLE;
        end
        H_STORE: begin
          i <= i + 1'b1;
          if (i == (IDX_W+1)'(BLOCK_N - 1)) st <= H_IDLE;
        end
        H_RUN: begin
          run_cycles <= run_cycles + 1'b1;
          if (settle != 2'd0) settle <= settle - 1'b1;
          else if (pe_busy == '0 && noc_idle) st <= H_IDLE;
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  // Data memory port
  always_comb begin
    dm_en    = 1'b0;
    dm_we    = 1'b0;
    dm_addr  = c.addr;
    dm_wdata = cmd.data;
    if (accept && (cmd.op == CMD_DM_WRITE || cmd.op == CMD_DM_READ)) begin
      dm_en   = 1'b1;
      dm_we   = (cmd.op == CMD_DM_WRITE);
      dm_addr = cmd.addr;
    end else if (st == H_LOAD && i < (IDX_W+1)'(BLOCK_N)) begin
      dm_en   = 1'b1;
      dm_addr = c.addr + DM_AW'(i);
    end else if (st == H_STORE) begin
      dm_en    = 1'b1;
      dm_we    = 1'b1;
      dm_addr  = c.addr + DM_AW'(i);
      dm_wdata = pe_rx_rdata[c.pe];
    end
  end

  // PE internal memory: the word read in cycle i is written in cycle i + 1.
  always_comb begin
    pe_mem_we    = '0;
    pe_mem_addr  = IDX_W'(i - 1'b1);
    pe_mem_wdata = dm_rdata;
    if (st == H_LOAD && i != '0) pe_mem_we[c.pe] = 1'b1;
  end

  assign pe_rx_raddr = (st == H_STORE) ? i[IDX_W-1:0]
                     : (accept ? cmd.addr[IDX_W-1:0] : '0);

  // Context memory and control signals
  always_comb begin
    ctx_we          = accept && (cmd.op == CMD_CONFIG);
    ctx_waddr       = cmd.pe;
    ctx_wdata.valid = 1'b1;
    ctx_wdata.dest  = cmd.addr[ID_W-1:0];
    ctx_wdata.coef  = cmd.data;
    ctrl_set        = accept && (cmd.op == CMD_RUN);
    ctrl_val        = cmd.data[CTRL_W-1:0];
  end

  // Responses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (st == H_DMRD) begin
        rsp_valid <= 1'b1;
        rsp_data  <= dm_rdata;
      end else if (accept && cmd.op == CMD_PE_READ) begin
        rsp_valid <= 1'b1;
        rsp_data  <= pe_rx_rdata[cmd.pe];
      end
    end
  end
endmodule
