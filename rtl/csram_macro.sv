// csram_macro -- Computational SRAM macro: a vector-processing memory that
// executes element-wise multiply-accumulate next to its storage, for a scalar
// CPU that sends instructions instead of moving vectors over its bus.
//
// The macro is a digital wrapper (bus-side instruction register, instruction
// decoder, scheduler, vector buffer, LANES x ELEM_W-bit multipliers and
// adders) in front of a WORDS x WIDTH multi-port memory built from SRAM cuts
// (csram_storage). The configuration is chosen by parameters, as an SRAM
// compiler and an RTL IP would be configured together:
//   NPORTS / DOUBLE_PUMP  memory type: 1RW, 2RW, 2RW from double-pumped
//                         single-port cells, 4RW from double-pumped dual-port
//                         cells
//   PIPELINED             sequential or pipelined instruction execution
//   CUT_WORDS / CUT_BITS  size of one cut, for partitioning the memory
// The defaults are the best configuration of the source evaluation: 4RW from
// double pumping, pipelined, one cut of 128 words of 128 bits, 16 lanes of
// 8 bits, a 32-bit system bus. A MAC then takes 5 cycles from decode to the
// write of its result (decode starts the cycle after the bus transfer) and a
// new one can start every cycle.
//
// Clocks: clk is the macro clock. clk_dp is needed only with DOUBLE_PUMP = 1
// and must run at twice clk with its rising edges on those of clk; it stands
// for the internal second clock a double-pumped SRAM generates itself.
// Tie it to 0 otherwise. rst_n is an asynchronous active-low reset of the
// wrapper; memory contents are not reset.
//
// stall reports why the instruction in the bus-side register waits: bit 0 a
// read-after-write hazard, bit 1 the issue interval, bit 2 a vector-buffer
// conflict, bit 3 a memory port already taken on a cycle the instruction
// needs it.
// CPU interface: see digital_wrapper and csram_pkg for the handshake and the
// instruction format.
module csram_macro
  import csram_pkg::*;
#(
  parameter int unsigned WORDS       = 128,
  parameter int unsigned WIDTH       = 128,
  parameter int unsigned ELEM_W      = 8,
  parameter int unsigned SYS_W       = 32,
  parameter int unsigned NPORTS      = 4,
  parameter bit          DOUBLE_PUMP = 1'b1,
  parameter bit          PIPELINED   = 1'b1,
  parameter int unsigned CUT_WORDS   = 128,
  parameter int unsigned CUT_BITS    = 128
) (
  input  logic               clk,
  input  logic               clk_dp,
  input  logic               rst_n,
  input  logic               instr_valid,
  output logic               instr_ready,
  input  logic [INSTR_W-1:0] instr,
  input  logic [SYS_W-1:0]   wdata,
  output logic [SYS_W-1:0]   rdata,
  output logic               rvalid,
  output logic               done,
  output logic               busy,
  output logic [3:0]         stall
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [NPORTS-1:0]            mem_en, mem_we;
  logic [NPORTS-1:0][AW-1:0]    mem_addr;
  logic [NPORTS-1:0][WIDTH-1:0] mem_wdata, mem_rdata;

  digital_wrapper #(
    .WORDS(WORDS), .WIDTH(WIDTH), .ELEM_W(ELEM_W), .SYS_W(SYS_W),
    .NPORTS(NPORTS), .PIPELINED(PIPELINED)
  ) u_wrap (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr, .wdata, .rdata, .rvalid,
    .done, .busy, .stall, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);

  csram_storage #(
    .NPORTS(NPORTS), .WORDS(WORDS), .WIDTH(WIDTH), .CUT_WORDS(CUT_WORDS),
    .CUT_BITS(CUT_BITS), .DOUBLE_PUMP(DOUBLE_PUMP)
  ) u_mem (
    .clk, .clk_dp, .en(mem_en), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata));

  // a CPU must hold an instruction until it is accepted
  a_instr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    instr_valid && !instr_ready |=> instr_valid && $stable(instr));

endmodule
