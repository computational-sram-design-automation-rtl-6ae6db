// sram_dpump -- double-pumped SRAM cut: NPORTS external read/write ports
// served by a bitcell array that has only NPORTS/2 ports.
//
// Double pumping starts a second memory access inside one clock cycle with
// an internal clock, so a single-port array behaves as 2RW and a dual-port
// array as 4RW, at the price of a lower maximum clock frequency. Here the
// internal clock is the input clk_dp, which must run at exactly twice clk
// with its rising edges on those of clk. On the clk_dp edge that coincides
// with a rising clk edge the first half of the ports (0 .. NPORTS/2-1) are
// served and the requests of the second half are latched; on the next
// clk_dp edge, in the middle of the clk cycle, the second half
// (NPORTS/2 .. NPORTS-1) is served. Which clk_dp edge is which is found by
// sampling clk on the falling edge of clk_dp, so no reset is needed to align
// the phases.
//
// Seen from clk the cut behaves like an NPORTS-port synchronous SRAM with one
// cycle of read latency: requests are sampled at the rising edge of clk and
// read data is valid before the next one and held until the port reads again.
// Because the two halves are served one after the other, a port of the second
// half reads what a port of the first half wrote in the same cycle; inside
// one half, reads return the old content and the higher port wins a write
// collision. The ordering of the two halves follows the description of
// double pumping; the collision rules are this design's choice.
module sram_dpump #(
  parameter int unsigned NPORTS = 4,
  parameter int unsigned WORDS  = 128,
  parameter int unsigned WIDTH  = 128,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned HALF  = NPORTS / 2
) (
  input  logic                         clk,
  input  logic                         clk_dp,
  input  logic [NPORTS-1:0]            en,
  input  logic [NPORTS-1:0]            we,
  input  logic [NPORTS-1:0][AW-1:0]    addr,
  input  logic [NPORTS-1:0][WIDTH-1:0] wdata,
  output logic [NPORTS-1:0][WIDTH-1:0] rdata
);

  // The array has HALF physical ports.
  logic [WIDTH-1:0] mem [WORDS];

  // clk level seen half a clk_dp period before each clk_dp rising edge:
  // 1 means the coming clk_dp edge is the mid-cycle one.
  logic clk_hi;
  always_ff @(negedge clk_dp) clk_hi <= clk;

  // Second-half requests latched at the start of the clk cycle.
  logic [HALF-1:0]            en2, we2;
  logic [HALF-1:0][AW-1:0]    addr2;
  logic [HALF-1:0][WIDTH-1:0] wdata2;

  always_ff @(posedge clk_dp) begin
    if (!clk_hi) begin
      // first internal access: ports 0 .. HALF-1
      for (int p = 0; p < HALF; p++) begin
        if (en[p] && !we[p]) rdata[p] <= mem[addr[p]];
      end
      for (int p = 0; p < HALF; p++) begin
        if (en[p] && we[p]) mem[addr[p]] <= wdata[p];
      end
      for (int p = 0; p < HALF; p++) begin
        en2[p]    <= en[HALF+p];
        we2[p]    <= we[HALF+p];
        addr2[p]  <= addr[HALF+p];
        wdata2[p] <= wdata[HALF+p];
      end
    end else begin
      // second internal access: ports HALF .. NPORTS-1
      for (int p = 0; p < HALF; p++) begin
        if (en2[p] && !we2[p]) rdata[HALF+p] <= mem[addr2[p]];
      end
      for (int p = 0; p < HALF; p++) begin
        if (en2[p] && we2[p]) mem[addr2[p]] <= wdata2[p];
      end
      en2 <= '0;
    end
  end

endmodule
