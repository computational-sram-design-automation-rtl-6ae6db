// sram_cut -- one memory cut as an SRAM compiler would deliver it, with
// NPORTS independent read/write ports (1RW, 2RW, ...).
//
// The real cut is a hard macro from a foundry SRAM compiler built on
// pushed-rule bitcells; this is its synchronous behaviour written as a plain
// array so that it can be simulated and mapped to any memory. Every port can
// read or write one word per clock. A read returns the word on rdata after
// the next rising edge and rdata holds it until the port reads again. A read
// and a write to the same word in the same cycle return the old content; two
// writes to the same word in the same cycle leave the higher-numbered port's
// data. Those collision rules are this design's choice: the source
// description gives the port counts and word sizes of its cuts but not their
// collision behaviour. There is no reset: the contents start undefined, as in
// an SRAM.
//
// Ports (all arrays indexed by port number):
//   en[p]    access on port p this cycle
//   we[p]    1 = write wdata[p] to addr[p], 0 = read addr[p]
//   addr[p]  word address
//   wdata[p] write data
//   rdata[p] read data, valid from the edge after the read
module sram_cut #(
  parameter int unsigned NPORTS = 2,
  parameter int unsigned WORDS  = 128,
  parameter int unsigned WIDTH  = 128,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                         clk,
  input  logic [NPORTS-1:0]            en,
  input  logic [NPORTS-1:0]            we,
  input  logic [NPORTS-1:0][AW-1:0]    addr,
  input  logic [NPORTS-1:0][WIDTH-1:0] wdata,
  output logic [NPORTS-1:0][WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (en[p] && !we[p]) rdata[p] <= mem[addr[p]];
    end
    for (int p = 0; p < NPORTS; p++) begin
      if (en[p] && we[p]) mem[addr[p]] <= wdata[p];
    end
  end

endmodule
