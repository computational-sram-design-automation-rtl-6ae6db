// wrapper_ctrl -- instruction scheduler of the C-SRAM digital wrapper.
//
// A MAC instruction Z = A * B + C is broken into four memory accesses
// (read A, read B, read C, write Z), one decode, one multiply and one add,
// and these steps are placed on fixed cycles after the decode cycle
// (stage 0, the cycle the instruction is accepted):
//
//   memory       read A   read B   read C   multiply  add  write Z  latency
//   1 port       1 (p0)   2 (p0)   3 (p0)   3         4    5 (p0)   6
//   2 ports      1 (p0)   1 (p1)   2 (p1)   2         3    4 (p0)   5
//   4 ports      1 (p0)   1 (p1)   2 (p2)   2         3    4 (p3)   5
//
// Stage numbers, latencies and the throughputs below follow the MAC
// chronogram and macro table of the source description, and so do the ports
// of the 1- and 2-port memories (A and Z on the first port, B and C on the
// second); the port of each access on the 4-port memory is this design's
// choice, made so that every port is used once per MAC. Read data arrives one stage after the read, so A and B meet in the
// multiplier on the stage after read B, and the sum is formed on the stage
// after read C and written one stage later.
//
// A new memory instruction may be accepted II cycles after the previous one:
// sequential execution (PIPELINED = 0) gives II = latency - 1, the decode of
// the next instruction overlapping the write of the previous one (5 cycles
// with 1 port, 4 with 2 or 4); pipelined execution gives II = 4 / NPORTS
// (2 cycles with 2 ports, 1 with 4). One port cannot be pipelined further
// than sequential execution and keeps II = 5.
//
// The source runs pipelined code only when successive instructions do not
// depend on each other; this scheduler also holds back (hazard stall) an
// instruction that would read a word before an instruction in flight has
// written it, so dependent code runs correctly, only slower. Once a stall has
// spaced two instructions irregularly, two accesses could fall on the same
// port in the same cycle (2 ports, 3 cycles apart); a port interlock holds
// the new instruction back one more cycle then. Buffer slice reads and writes
// wait until no vector load or store is in flight. These interlocks are this
// design's own.
//
// Interface: dec is the decoded instruction from the bus-side register (dec.valid =
// request); ready accepts it in the same cycle. Port requests are driven
// combinationally from the stage registers, for the memory to sample at the
// next rising edge. The strobes tell the datapath on which cycle to capture A,
// multiply, add or load the vector buffer.
module wrapper_ctrl
  import csram_pkg::*;
#(
  parameter int unsigned NPORTS    = 4,
  parameter bit          PIPELINED = 1'b1,
  parameter int unsigned AW        = 7,
  localparam int unsigned LAT      = (NPORTS == 1) ? 6 : 5,
  localparam int unsigned II       = (!PIPELINED || NPORTS == 1) ? LAT - 1 : 4 / NPORTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  dec_t                     dec,
  output logic                     ready,
  // memory port requests
  output logic [NPORTS-1:0]        mem_en,
  output logic [NPORTS-1:0]        mem_we,
  output logic [NPORTS-1:0][AW-1:0] mem_addr,
  // datapath strobes
  output logic                     cap_a,    // register read data of port PA as operand A
  output logic                     do_mul,   // register A*B (B on port PB)
  output logic                     do_add,   // register product + C (C on port PC)
  output logic                     do_stv,   // register the vector buffer as the result
  output logic                     ld_buf,   // load read data of port PA into the buffer
  output logic                     wr_slice, // bus data to buffer slice
  output logic                     rd_slice, // buffer slice to bus
  output logic                     done,     // result written this cycle
  output logic                     busy,
  // observation of the interlocks
  output logic                     stall_hazard,
  output logic                     stall_ii,
  output logic                     stall_buf,
  output logic                     stall_port
);

  // stages of each step
  localparam int unsigned S_RDA = 1;
  localparam int unsigned S_RDB = (NPORTS == 1) ? 2 : 1;
  localparam int unsigned S_RDC = (NPORTS == 1) ? 3 : 2;
  localparam int unsigned S_MUL = S_RDB + 1;
  localparam int unsigned S_ADD = S_RDC + 1;
  localparam int unsigned S_WR  = S_ADD + 1;
  // ports of each access
  localparam int unsigned PA = 0;
  localparam int unsigned PB = (NPORTS == 1) ? 0 : 1;
  localparam int unsigned PC = (NPORTS >= 4) ? 2 : ((NPORTS == 2) ? 1 : 0);
  localparam int unsigned PW = (NPORTS >= 4) ? 3 : 0;
  localparam int unsigned CW = $clog2(II + 1);

  initial begin
    assert (NPORTS == 1 || NPORTS == 2 || NPORTS == 4)
      else $error("wrapper_ctrl: NPORTS must be 1, 2 or 4");
    assert (S_WR == LAT - 1) else $error("wrapper_ctrl: inconsistent stage table");
  end

  dec_t    slot [1:LAT-1];   // instruction in each stage after decode
  logic [CW-1:0] since;      // cycles since the last memory instruction issued

  logic is_mem, is_buf;
  assign is_mem = dec.mac | dec.ldv | dec.stv;
  assign is_buf = dec.wrb | dec.rdb;

  // read-after-write interlock
  always_comb begin
    stall_hazard = 1'b0;
    for (int s = 1; s < LAT; s++) begin
      if (slot[s].valid && (slot[s].mac || slot[s].stv)) begin
        if ((dec.mac || dec.ldv) && s <= S_WR - S_RDA && slot[s].addr_z == dec.addr_a)
          stall_hazard = 1'b1;
        if (dec.mac && s <= S_WR - S_RDB && slot[s].addr_z == dec.addr_b)
          stall_hazard = 1'b1;
        if (dec.mac && s <= S_WR - S_RDC && slot[s].addr_z == dec.addr_c)
          stall_hazard = 1'b1;
      end
    end
    stall_hazard = stall_hazard && dec.valid && is_mem;
  end

  always_comb begin
    stall_buf = 1'b0;
    for (int s = 1; s < LAT; s++) begin
      if (slot[s].valid && (slot[s].ldv || slot[s].stv)) stall_buf = 1'b1;
    end
    stall_buf = stall_buf && dec.valid && is_buf;
  end

  assign stall_ii = dec.valid && is_mem && (since < CW'(II));

  // port interlock: the new instruction would use a port on the same cycle as
  // an instruction in flight (only possible with 2 ports when a stall has
  // moved two MACs apart by an odd number of cycles)
  localparam int unsigned ACC_STAGE [4] = '{S_RDA, S_RDB, S_RDC, S_WR};
  localparam int unsigned ACC_PORT  [4] = '{PA, PB, PC, PW};

  function automatic logic uses(dec_t d, int k);
    unique case (k)
      0:       return d.mac | d.ldv;
      1, 2:    return d.mac;
      default: return d.mac | d.stv;
    endcase
  endfunction

  always_comb begin
    stall_port = 1'b0;
    for (int k = 0; k < 4; k++) begin
      for (int j = 0; j < 4; j++) begin
        if (ACC_PORT[k] == ACC_PORT[j] && ACC_STAGE[j] > ACC_STAGE[k]) begin
          for (int s = 1; s < LAT; s++) begin
            if (s == int'(ACC_STAGE[j] - ACC_STAGE[k]) && slot[s].valid &&
                uses(slot[s], j) && uses(dec, k))
              stall_port = 1'b1;
          end
        end
      end
    end
    stall_port = stall_port && dec.valid;
  end

  assign ready = !(is_mem && (stall_ii || stall_hazard || stall_port)) && !(is_buf && stall_buf);

  logic issue_mem;
  assign issue_mem = dec.valid && ready && is_mem;
  assign wr_slice  = dec.valid && ready && dec.wrb;
  assign rd_slice  = dec.valid && ready && dec.rdb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s < LAT; s++) slot[s] <= '0;
      since <= CW'(II);
    end else begin
      slot[1] <= issue_mem ? dec : '0;
      for (int s = 2; s < LAT; s++) slot[s] <= slot[s-1];
      if (issue_mem) since <= CW'(1);
      else if (since < CW'(II)) since <= since + CW'(1);
    end
  end

  // memory port requests
  logic conflict;
  always_comb begin
    mem_en   = '0;
    mem_we   = '0;
    mem_addr = '0;
    conflict = 1'b0;
    if (slot[S_RDA].valid && (slot[S_RDA].mac || slot[S_RDA].ldv)) begin
      mem_en[PA]   = 1'b1;
      mem_addr[PA] = AW'(slot[S_RDA].addr_a);
    end
    if (slot[S_RDB].valid && slot[S_RDB].mac) begin
      conflict     = conflict | mem_en[PB];
      mem_en[PB]   = 1'b1;
      mem_addr[PB] = AW'(slot[S_RDB].addr_b);
    end
    if (slot[S_RDC].valid && slot[S_RDC].mac) begin
      conflict     = conflict | mem_en[PC];
      mem_en[PC]   = 1'b1;
      mem_addr[PC] = AW'(slot[S_RDC].addr_c);
    end
    if (slot[S_WR].valid && (slot[S_WR].mac || slot[S_WR].stv)) begin
      conflict     = conflict | mem_en[PW];
      mem_en[PW]   = 1'b1;
      mem_we[PW]   = 1'b1;
      mem_addr[PW] = AW'(slot[S_WR].addr_z);
    end
  end

  assign cap_a  = slot[S_RDA+1].valid && slot[S_RDA+1].mac;
  assign ld_buf = slot[S_RDA+1].valid && slot[S_RDA+1].ldv;
  assign do_mul = slot[S_MUL].valid && slot[S_MUL].mac;
  assign do_add = slot[S_ADD].valid && slot[S_ADD].mac;
  assign do_stv = slot[S_ADD].valid && slot[S_ADD].stv;
  assign done   = slot[S_WR].valid && (slot[S_WR].mac || slot[S_WR].stv);

  always_comb begin
    busy = 1'b0;
    for (int s = 1; s < LAT; s++) busy = busy | slot[s].valid;
  end

  // two steps must never claim the same port in one cycle
  a_no_port_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict);

endmodule
