// instr_decoder -- instruction decoder of the C-SRAM digital wrapper.
//
// Turns the 64-bit instruction word sent by the CPU into one-hot operation
// flags and the word addresses trimmed to the memory's address width. It is
// purely combinational; the wrapper registers its output on the cycle the
// instruction is accepted, which is the decode cycle of the MAC chronogram.
// The source description places an instruction decoder in the wrapper and
// limits instructions to 64 bits; the opcode set and field layout (see
// csram_pkg) are this design's own. An unknown opcode sets illegal and does
// nothing else.
module instr_decoder
  import csram_pkg::*;
#(
  parameter int unsigned AW = 7   // address bits used by the memory
) (
  input  logic [INSTR_W-1:0] instr,
  input  logic               valid,
  output dec_t               dec
);

  instr_t i;
  assign i = instr_t'(instr);

  always_comb begin
    dec         = '0;
    dec.valid   = valid;
    dec.idx     = i.idx;
    dec.addr_z  = AFIELD_W'(i.addr_z[AW-1:0]);
    dec.addr_a  = AFIELD_W'(i.addr_a[AW-1:0]);
    dec.addr_b  = AFIELD_W'(i.addr_b[AW-1:0]);
    dec.addr_c  = AFIELD_W'(i.addr_c[AW-1:0]);
    if (valid) begin
      unique case (i.op)
        OP_NOP:  ;
        OP_MAC:  dec.mac = 1'b1;
        OP_LDV:  dec.ldv = 1'b1;
        OP_STV:  dec.stv = 1'b1;
        OP_WRB:  dec.wrb = 1'b1;
        OP_RDB:  dec.rdb = 1'b1;
        default: dec.illegal = 1'b1;
      endcase
    end
  end

endmodule
