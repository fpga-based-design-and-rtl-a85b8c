# A 4x4 multigrained reconfigurable network on chip for DSP kernels

This design is a 4x4 array of processing elements (PEs). Each PE sits on
the local port of one switch of a mesh network. The PEs are not generic
ALUs. Each column has one fixed DSP function:

| column | switches  | function of its PEs                                  |
|--------|-----------|------------------------------------------------------|
| 1      | SW1-SW4   | 8-point complex FFT                                   |
| 2      | SW5-SW8   | 8-point DCT-II, cosines from an 8-location memory     |
| 3      | SW9-SW12  | 4-tap FIR filter                                      |
| 4      | SW13-SW16 | channel encoder, and decoder at the receiving switch  |

Configuration is coarse-grained, at the level of whole columns. Eight
control signals, two per column, choose which columns run and whether their
arithmetic is on. The host also chooses, for each PE, the switch its
results go to. So one run of the array can chain any mix of kernels across
the network. For example, an FFT block goes from SW1 to SW16, a DCT block
from SW6 to SW11, and a FIR block from SW10 to SW14, all at the same time.

Everything is synthesizable SystemVerilog. The top module is `mrpma_top`.

## Switch numbering

Switches are numbered down each column. SWn is in column `(n-1)/4` and row
`(n-1)%4`, so the 4-bit switch id is `{column[1:0], row[1:0]}` = n-1. The
id is used everywhere: in context words, packet headers and host commands.
SW1 is at the top left and SW16 at the bottom right.

## How a run works

The host talks only to `host_controller`, through a valid/ready command
port (`cmd_valid`, `cmd_ready`, `cmd`) and a response port (`rsp_valid`,
`rsp_data`). `cmd_ready` is high only while the controller is idle, so
each command finishes before the next one is accepted. A command is the
packed struct `host_cmd_t`, which holds `{op, pe, addr, data}`:

| op        | effect                                                                   | busy cycles |
|-----------|---------------------------------------------------------------------------|-------------|
| DM_WRITE  | shared data memory[addr] <= data                                          | 0           |
| DM_READ   | rsp_data <= data memory[addr]                                             | 1           |
| LOAD      | internal memory of PE `pe`, words 0..7 <= data memory[addr .. addr+7]     | 9           |
| CONFIG    | context word of PE `pe`: valid, destination = addr[3:0], FIR coefficients = data | 0    |
| RUN       | control signals <= data[7:0]; the command waits until the run has drained | run length  |
| STORE     | data memory[addr .. addr+7] <= receive memory of PE `pe`                  | 8           |
| PE_READ   | rsp_data <= receive memory of PE `pe`, word addr[2:0]                     | 0           |

A normal sequence has five steps:

1. Write the input blocks into the data memory (DM_WRITE).
2. Copy each block into a PE (LOAD).
3. Give each PE that should run a context word (CONFIG).
4. Issue RUN with the control word.
5. Copy the receive memories back (STORE) and read them out (DM_READ).

**What RUN does.** `ctrl_gen` takes the new control word. One cycle later
it sends a start pulse to every PE whose column is running and whose
context word is valid. Each started PE does three things:

- It runs its unit over its eight words. With arithmetic off, it skips
  this step and forwards the words unchanged.
- It pushes eight single-flit packets into its output FIFO.
- It stays `busy` until that FIFO is empty.

The controller ends RUN once no PE is busy and every switch buffer is
empty. A packet's last hop writes straight into the destination's receive
memory in the same cycle, so at that point every packet has arrived.
`run_cycles` then holds the length of the run.

**The control word.** Bits 1:0 are the FFT column, 3:2 the DCT column,
5:4 the FIR column and 7:6 the channel-encoder column. In each pair:

- The low bit runs the column.
- The high bit turns its arithmetic on.

So `8'hFF` runs everything, `8'h55` runs every column as plain data
movers, and `8'h0C` runs only the DCT column.

**Receive memories.** Each PE has an eight-word receive memory. An arriving
packet is written at the sample index it carries. If two sources send to
the same destination in one run, the later packet for an index overwrites
the earlier one. The host has to pick destinations that do not collide.
The end-to-end testbench uses a permutation.

## Packets and routing

A flit is the packed struct `flit_t`, 44 bits wide:
`{dst[3:0], src[3:0], idx[2:0], enc, payload[31:0]}`. One sample is one
packet of one flit.

The payload is a complex word `{re[15:0], im[15:0]}`, or a 28-bit
codeword when `enc` is set. The DCT, FIR and channel-encoder PEs use only
the real half and send an imaginary half of zero.

**Switches.** Each switch (`noc_router`) has five ports: north, east,
south, west and local.

- **Buffers.** Each input port has a 2-deep FIFO.
- **Routing.** Routing is column first: the flit moves east or west to the
  destination column, then north or south, then out of the local port. On
  a mesh this is always a shortest path.
- **Arbitration.** Each output port has a round-robin arbiter. A flit that
  loses arbitration, or meets a full buffer, waits. That is a stall, and
  the switch reports it on `sw_stall`.

**Flow control and latency.** Flow control is valid/ready on every link.
`ready` depends only on the receiving FIFO's fill level, so chains of
switches have no combinational loop. Without contention, a flit reaches
its destination one cycle per link after entering its first switch. The
`noc_mesh` testbench checks this for SW1->SW16 (6 links), SW6->SW11,
SW10->SW14 and SW12->SW5.

## The column units

All arithmetic is 16-bit signed fixed point.

**FFT (`fft8`).** An 8-point radix-2 decimation-in-time FFT.

- Input: eight complex samples, in bit-reversed order internally.
- Three registered butterfly stages, so the latency is 3 cycles.
- Each stage halves its results, so the output is X(k)/8 and cannot
  overflow.
- Twiddles are Q1.14 (2^14/sqrt(2) = 11585).
- Internal values are 18 bits wide, and the output is saturated to 16 bits.

**DCT (`dct8`).** Computes `X(k) = sum x(n) cos(pi/8 (n+1/2) k)`, with one
multiply-accumulate per cycle. A block takes 64 cycles, and `done` comes
65 cycles after `start`.

The eight stored coefficients are `c[m] = round(2^14 cos(m pi/16))`, for
m = 0..7: 16384, 16069, 15137, 13623, 11585, 9102, 6270 and 3196. Every
cosine the transform needs is one of these up to sign. With
`m = ((2n+1)k) mod 32`, the cosine is:

| m        | cosine      |
|----------|-------------|
| 0 to 7   | +c[m]       |
| 8 or 24  | 0           |
| 9 to 16  | -c[16-m]    |
| 17 to 23 | -c[m-16]    |
| 25 to 31 | +c[32-m]    |

The result is X(k)/8, with the accumulator shifted right by 17 and
saturated.

**FIR (`fir4`).** Computes `y(n) = sum_{i=0..3} b_i x(n-i)`.

- The coefficients are 8-bit signed with 7 fraction bits, and come from
  the PE's context word, with b0 in the low byte.
- The sum is shifted right by 7 and saturated.
- It takes one sample per cycle, with one cycle of latency.
- The delay line is cleared at the start of every run.

**Channel encoder and decoder (`channel_codec`).** Each 16-bit word is
coded as four Hamming(7,4) codewords, one per nibble. Nibble j uses code
bits 7j..7j+6, in the order p1 p2 d1 p4 d2 d3 d4.

A channel-encoder PE sends codewords with `enc` set. A channel-encoder PE
that receives such a packet decodes it, correcting up to one bit error per
nibble, and stores the 16-bit word. It reports the packet on
`pe_rx_decoded`, and any correction on `pe_rx_corrected`.

Other PEs store a codeword they receive without decoding it.

## Timing and throughput

These are measured in the end-to-end testbench at the default sizes:

| run                                 | packets delivered | cycles |
|-------------------------------------|-------------------|--------|
| all 16 PEs, arithmetic on (`8'hFF`) | 128               | 82     |
| pass-through (`8'h55`)              | 128               | 24     |
| DCT column only (`8'h0C`)           | 32                | 82     |

The DCT's 65-cycle run dominates.

`tb_mrpma_routes` runs each of the four transfers alone:

| transfer                | links | cycles |
|-------------------------|-------|--------|
| SW1 -> SW16, FFT        | 6     | 22     |
| SW6 -> SW11, DCT        | 2     | 80     |
| SW10 -> SW14, FIR       | 1     | 22     |
| SW12 -> SW5, FIR        | 4     | 25     |

A common way to rate such an array is throughput = clock frequency x input
bits / cycles. For the full run that is 128 x 32 bits / 82 cycles, about
50 bits per cycle.

## Trust and departures

**Testing.** Every module has a self-checking testbench in `tb/`. Each
compares against models written from the defining formulas: floating-point
DFT and DCT within 4 LSB, the exact integer FIR sum, and a Hamming encoder
built from the parity-coverage rule. Each testbench also has a watchdog.

The end-to-end test `tb_mrpma_top` runs the top with no parameter changes.
It checks all 128 received words after each of the three runs. It also
checks that every mechanism happens at least once: each kind of
arithmetic, channel decoding, pass-through, running a single column, and
switch stalls.

**Choices this design makes.** The underlying description gives the
architecture, the column functions, the four transfers, the 8-location DCT
coefficient memory, the 4 FIR taps and the 8 control signals. It does not
give the following, which this design chooses:

- word width and fixed-point formats;
- block size;
- the FFT structure;
- the choice of Hamming code;
- the packet format;
- FIFO depths;
- the routing rule;
- the host command set;
- the meaning of each control bit.

**Known departures and omissions:**

- Floating point (IEEE 754) is mentioned as an ALU option. Only fixed point
  is built.
- The FIR column is said to compute the "phase" of each switch's signal,
  and the channel encoder "phase and magnitude". How is not described, so
  only the filter and the code are built.
- The "command signal" drawn beside each data route is carried by the
  packet header. There is no separate wire.
- One array drawing labels SW14-SW16 as FFT. This design follows the
  description in which all of column 4 is the channel encoder.
- The implementation targets a Virtex-5 XC5VLX50T. Whether the default
  configuration fits that device after technology mapping has not been
  determined. Coarse synthesis gives about 18,400 flip-flop bits and
  19,900 memory bits.
- The array injects no errors into the network. So in the end-to-end
  test the channel decoder always receives clean codewords. Its
  error correction is exercised by the `channel_codec` and `pe`
  testbenches.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mrpma_pkg.sv tb/tb_ref_pkg.sv tb/tb_mrpma_top.sv --top-module tb_mrpma_top
./obj_dir/Vtb_mrpma_top
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. The same
command runs any other testbench: name `tb/tb_<module>.sv` and set
`--top-module tb_<module>`.

The design's defaults live in `mrpma_pkg` (`MESH_DIM`, `DATA_W`,
`BLOCK_N`, `FIR_TAPS`, `COEF_W`) and in the parameters of `mrpma_top`
(`DM_DEPTH`, `SW_FIFO_DEPTH`, `PE_FIFO_DEPTH`).

## Files

- `rtl/mrpma_pkg.sv`: shared types and constants. This covers the switch
  ids, the flit, context and command structs, and the opcodes.
- `rtl/mrpma_top.sv`: the whole array.
- `rtl/host_controller.sv`, `rtl/ctrl_gen.sv`, `rtl/context_memory.sv`,
  `rtl/data_memory.sv`: control and memories.
- `rtl/pe.sv`: the processing element, with its unit chosen by the `KIND`
  parameter.
- `rtl/fft8.sv`, `rtl/dct8.sv`, `rtl/fir4.sv`, `rtl/channel_codec.sv`: the
  column units.
- `rtl/noc_mesh.sv`, `rtl/noc_router.sv`, `rtl/sync_fifo.sv`: the network.
- `tb/tb_*.sv`: one testbench per module, plus `tb_mrpma_routes`, which
  runs the four single transfers. `tb/tb_ref_pkg.sv` holds the reference
  models.
