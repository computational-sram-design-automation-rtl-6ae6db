// vec_buffer -- data vectorization between the system bus and a memory word
// (the N-to-M multiplexer of the digital wrapper).
//
// The system bus is SYS_W bits wide and a memory word WIDTH bits, so a
// vector crosses the bus in WIDTH/SYS_W slices. This register holds one
// memory word. The CPU side writes slice idx (slice 0 = least significant
// bits) with wr_slice and reads slice idx with rd_slice; the read data is
// registered and appears on bus_rdata with bus_rvalid one cycle later. The
// memory side loads the whole word with ld_word (a memory read) and sees the
// whole word on word_q (a memory write). ld_word wins over wr_slice in the
// same cycle. The source description asks the wrapper to vectorize bus data
// into memory words and back; doing it through a single word buffer is this
// design's choice. Contents reset to zero.
module vec_buffer #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned SYS_W = 32,
  localparam int unsigned NSL  = WIDTH / SYS_W,
  localparam int unsigned IW   = (NSL > 1) ? $clog2(NSL) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_slice,
  input  logic             rd_slice,
  input  logic [IW-1:0]    idx,
  input  logic [SYS_W-1:0] bus_wdata,
  output logic [SYS_W-1:0] bus_rdata,
  output logic             bus_rvalid,
  input  logic             ld_word,
  input  logic [WIDTH-1:0] word_d,
  output logic [WIDTH-1:0] word_q
);

  logic [NSL-1:0][SYS_W-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q      <= '0;
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      if (ld_word) buf_q <= word_d;
      else if (wr_slice) buf_q[idx] <= bus_wdata;
      bus_rvalid <= rd_slice;
      if (rd_slice) bus_rdata <= buf_q[idx];
    end
  end

  assign word_q = buf_q;

endmodule
