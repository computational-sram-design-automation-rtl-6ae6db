// csram_pkg -- types and constants shared by the C-SRAM macro.
//
// The C-SRAM macro receives 64-bit instructions from a scalar CPU and runs
// them next to the memory, so vector data never crosses the system bus.
// Only the vectorized multiply-accumulate Z = A * B + C and the moves between
// the system bus and 128-bit memory words are defined. The opcode values and
// the field layout below are this design's own choice; only the 64-bit
// instruction size and the MAC operation follow the source description.
//
// Instruction layout (64 bits, MSB first):
//   [63:60] opcode
//   [59:56] idx     slice index of the vector buffer (buffer read/write)
//   [55:42] addr_z  destination word address
//   [41:28] addr_a  first source word address
//   [27:14] addr_b  second source word address
//   [13:0]  addr_c  addend word address
// 14-bit address fields cover the largest cut of 16k words; smaller memories
// use the low bits.
package csram_pkg;

  localparam int unsigned INSTR_W = 64;
  localparam int unsigned AFIELD_W = 14;

  typedef enum logic [3:0] {
    OP_NOP = 4'h0,  // no operation
    OP_MAC = 4'h1,  // mem[z] = mem[a] * mem[b] + mem[c], element-wise
    OP_LDV = 4'h2,  // vector buffer = mem[a]
    OP_STV = 4'h3,  // mem[z] = vector buffer
    OP_WRB = 4'h4,  // vector buffer slice idx = system-bus write data
    OP_RDB = 4'h5   // system-bus read data = vector buffer slice idx
  } opcode_e;

  typedef struct packed {
    opcode_e               op;
    logic [3:0]            idx;
    logic [AFIELD_W-1:0]   addr_z;
    logic [AFIELD_W-1:0]   addr_a;
    logic [AFIELD_W-1:0]   addr_b;
    logic [AFIELD_W-1:0]   addr_c;
  } instr_t;

  // Decoded instruction as it travels down the wrapper pipeline.
  typedef struct packed {
    logic                  valid;
    logic                  mac;     // element-wise multiply-accumulate
    logic                  ldv;     // memory word to vector buffer
    logic                  stv;     // vector buffer to memory word
    logic                  wrb;     // bus data to buffer slice
    logic                  rdb;     // buffer slice to bus data
    logic                  illegal; // unknown opcode, executed as NOP
    logic [3:0]            idx;
    logic [AFIELD_W-1:0]   addr_z;
    logic [AFIELD_W-1:0]   addr_a;
    logic [AFIELD_W-1:0]   addr_b;
    logic [AFIELD_W-1:0]   addr_c;
  } dec_t;

  // Build an instruction word (used by testbenches and CPU-side models).
  function automatic logic [INSTR_W-1:0] make_instr(opcode_e op, logic [3:0] idx,
                                                    logic [AFIELD_W-1:0] z,
                                                    logic [AFIELD_W-1:0] a,
                                                    logic [AFIELD_W-1:0] b,
                                                    logic [AFIELD_W-1:0] c);
    instr_t i;
    i.op     = op;
    i.idx    = idx;
    i.addr_z = z;
    i.addr_a = a;
    i.addr_b = b;
    i.addr_c = c;
    return i;
  endfunction

endpackage
