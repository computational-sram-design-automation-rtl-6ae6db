// digital_wrapper -- computing part of the C-SRAM macro: decodes the CPU's
// instructions and executes them against the storage part.
//
// Blocks, from the CPU side to the memory side: the bus-side flip-flops
// (instr_reg), the instruction decoder, the scheduler (wrapper_ctrl) that
// places every memory access and operation on its cycle, the vector buffer that converts between SYS_W-bit bus data and
// WIDTH-bit words, and the vector datapath: LANES multipliers and LANES
// adders of ELEM_W bits with their pipeline registers (operand A, product,
// result). This split into decoder, bus-to-word multiplexer and computing
// follows the source description; the registers between the steps follow
// its MAC chronogram.
//
// CPU interface: instr_valid / instr_ready handshake, one instruction per
// accepted cycle; wdata travels with a buffer-write instruction. An accepted
// instruction is decoded on the next cycle (its decode cycle, cycle 0 of the
// schedule in wrapper_ctrl), so a MAC writes its result LAT cycles after the
// bus handed it over (5, or 6 with one port). rdata/rvalid return a buffer
// slice two cycles after a buffer-read instruction is accepted; done pulses
// in the cycle an instruction's result word is written; stall shows which
// interlock holds back the registered instruction.
// Memory interface: an NPORTS-port synchronous SRAM with one cycle of read
// latency (csram_storage).
module digital_wrapper
  import csram_pkg::*;
#(
  parameter int unsigned WORDS     = 128,
  parameter int unsigned WIDTH     = 128,
  parameter int unsigned ELEM_W    = 8,
  parameter int unsigned SYS_W     = 32,
  parameter int unsigned NPORTS    = 4,
  parameter bit          PIPELINED = 1'b1,
  localparam int unsigned AW       = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned NSL      = WIDTH / SYS_W,
  localparam int unsigned IW       = (NSL > 1) ? $clog2(NSL) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CPU side
  input  logic                          instr_valid,
  output logic                          instr_ready,
  input  logic [INSTR_W-1:0]            instr,
  input  logic [SYS_W-1:0]              wdata,
  output logic [SYS_W-1:0]              rdata,
  output logic                          rvalid,
  output logic                          done,
  output logic                          busy,
  output logic [3:0]                    stall,   // {port, buffer, II, hazard} interlocks
  // memory side
  output logic [NPORTS-1:0]             mem_en,
  output logic [NPORTS-1:0]             mem_we,
  output logic [NPORTS-1:0][AW-1:0]     mem_addr,
  output logic [NPORTS-1:0][WIDTH-1:0]  mem_wdata,
  input  logic [NPORTS-1:0][WIDTH-1:0]  mem_rdata
);

  localparam int unsigned PA = 0;
  localparam int unsigned PB = (NPORTS == 1) ? 0 : 1;
  localparam int unsigned PC = (NPORTS >= 4) ? 2 : ((NPORTS == 2) ? 1 : 0);
  // with one port, A is read a cycle before B and must wait in a register
  localparam bit A_REG = (NPORTS == 1);

  // bus-side flip-flops: the instruction is decoded on the cycle after the
  // CPU hands it over
  logic               iq_valid, iq_ready;
  logic [INSTR_W-1:0] iq_instr;
  logic [SYS_W-1:0]   iq_wdata;

  instr_reg #(.W(INSTR_W + SYS_W)) u_ireg (
    .clk, .rst_n, .in_valid(instr_valid), .in_ready(instr_ready), .in_data({instr, wdata}),
    .out_valid(iq_valid), .out_ready(iq_ready), .out_data({iq_instr, iq_wdata}));

  dec_t dec;
  logic ctrl_busy;
  logic cap_a, do_mul, do_add, do_stv, ld_buf, wr_slice, rd_slice;
  logic stall_hazard, stall_ii, stall_buf, stall_port;
  assign stall = {stall_port, stall_buf, stall_ii, stall_hazard};

  // busy while an instruction waits in the bus-side register or is in flight
  assign busy = ctrl_busy | iq_valid;

  instr_decoder #(.AW(AW)) u_dec (
    .instr(iq_instr), .valid(iq_valid), .dec);

  wrapper_ctrl #(.NPORTS(NPORTS), .PIPELINED(PIPELINED), .AW(AW)) u_ctrl (
    .clk, .rst_n, .dec, .ready(iq_ready),
    .mem_en, .mem_we, .mem_addr,
    .cap_a, .do_mul, .do_add, .do_stv, .ld_buf, .wr_slice, .rd_slice,
    .done, .busy(ctrl_busy), .stall_hazard, .stall_ii, .stall_buf, .stall_port);

  logic [WIDTH-1:0] buf_word;

  vec_buffer #(.WIDTH(WIDTH), .SYS_W(SYS_W)) u_buf (
    .clk, .rst_n, .wr_slice, .rd_slice, .idx(IW'(dec.idx)),
    .bus_wdata(iq_wdata), .bus_rdata(rdata), .bus_rvalid(rvalid),
    .ld_word(ld_buf), .word_d(mem_rdata[PA]), .word_q(buf_word));

  // vector datapath
  logic [WIDTH-1:0] a_q, prod_q, z_q, op_a, prod, sum;

  assign op_a = A_REG ? a_q : mem_rdata[PA];

  vec_mul #(.WIDTH(WIDTH), .ELEM_W(ELEM_W)) u_mul (
    .a(op_a), .b(mem_rdata[PB]), .p(prod));

  vec_add #(.WIDTH(WIDTH), .ELEM_W(ELEM_W)) u_add (
    .a(prod_q), .b(mem_rdata[PC]), .s(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      prod_q <= '0;
      z_q    <= '0;
    end else begin
      if (cap_a)  a_q    <= mem_rdata[PA];
      if (do_mul) prod_q <= prod;
      if (do_add) z_q    <= sum;
      else if (do_stv) z_q <= buf_word;
    end
  end

  // every write carries the result register
  always_comb begin
    for (int p = 0; p < NPORTS; p++) mem_wdata[p] = z_q;
  end

endmodule
