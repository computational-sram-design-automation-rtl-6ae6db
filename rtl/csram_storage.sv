// csram_storage -- the storage part of the C-SRAM macro: a WORDS x WIDTH
// memory with NPORTS ports assembled from SRAM cuts.
//
// A memory compiler limits the words and bits of one cut, so the memory is
// partitioned: WIDTH/CUT_BITS cuts side by side give the word length (each
// holds a bit slice: LSBs in slice 0) and WORDS/CUT_WORDS rows of cuts give
// the word count (row r holds addresses r*CUT_WORDS ..). With CUT_WORDS =
// WORDS and CUT_BITS = WIDTH there is a single cut. Every cut is either a
// native multi-port cut (sram_cut) or, with DOUBLE_PUMP = 1, a double-pumped
// cut (sram_dpump) whose array has NPORTS/2 ports. The partitioning schemes
// and the choice of cut type follow the source description; the row-select
// logic is the simplest that does it.
//
// Interface and timing are those of one NPORTS-port synchronous SRAM: each
// port samples en/we/addr/wdata at the rising edge of clk, and read data is
// on rdata one cycle later, held until the port reads again. An access only
// enables the cut row its address selects; read data is taken from the row
// that the port last read, remembered in a register per port.
module csram_storage #(
  parameter int unsigned NPORTS      = 4,
  parameter int unsigned WORDS       = 128,
  parameter int unsigned WIDTH       = 128,
  parameter int unsigned CUT_WORDS   = 128,
  parameter int unsigned CUT_BITS    = 128,
  parameter bit          DOUBLE_PUMP = 1'b1,
  localparam int unsigned AW         = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                         clk,
  input  logic                         clk_dp,
  input  logic [NPORTS-1:0]            en,
  input  logic [NPORTS-1:0]            we,
  input  logic [NPORTS-1:0][AW-1:0]    addr,
  input  logic [NPORTS-1:0][WIDTH-1:0] wdata,
  output logic [NPORTS-1:0][WIDTH-1:0] rdata
);

  localparam int unsigned NROWS = WORDS / CUT_WORDS;
  localparam int unsigned NCOLS = WIDTH / CUT_BITS;
  localparam int unsigned CAW   = (CUT_WORDS > 1) ? $clog2(CUT_WORDS) : 1;
  localparam int unsigned RW    = (NROWS > 1) ? $clog2(NROWS) : 1;

  initial begin
    assert (WORDS % CUT_WORDS == 0 && WIDTH % CUT_BITS == 0)
      else $error("csram_storage: cut size must divide the memory size");
    assert (!DOUBLE_PUMP || NPORTS % 2 == 0)
      else $error("csram_storage: a double-pumped cut needs an even port count");
  end

  // cut row addressed by each port
  logic [NPORTS-1:0][RW-1:0]  row;
  logic [NPORTS-1:0][CAW-1:0] caddr;
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      caddr[p] = CAW'(addr[p] % CUT_WORDS);
      row[p]   = (NROWS > 1) ? RW'(addr[p] / CUT_WORDS) : '0;
    end
  end

  logic [NROWS-1:0][NCOLS-1:0][NPORTS-1:0][CUT_BITS-1:0] cut_rdata;

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    logic [NPORTS-1:0] row_en;
    always_comb begin
      for (int p = 0; p < NPORTS; p++) row_en[p] = en[p] && (row[p] == RW'(r));
    end
    for (genvar c = 0; c < NCOLS; c++) begin : g_col
      logic [NPORTS-1:0][CUT_BITS-1:0] cut_wdata;
      always_comb begin
        for (int p = 0; p < NPORTS; p++) cut_wdata[p] = wdata[p][c*CUT_BITS +: CUT_BITS];
      end
      if (DOUBLE_PUMP) begin : g_dp
        sram_dpump #(.NPORTS(NPORTS), .WORDS(CUT_WORDS), .WIDTH(CUT_BITS)) u_cut (
          .clk, .clk_dp, .en(row_en), .we, .addr(caddr), .wdata(cut_wdata),
          .rdata(cut_rdata[r][c]));
      end else begin : g_native
        sram_cut #(.NPORTS(NPORTS), .WORDS(CUT_WORDS), .WIDTH(CUT_BITS)) u_cut (
          .clk, .en(row_en), .we, .addr(caddr), .wdata(cut_wdata),
          .rdata(cut_rdata[r][c]));
      end
    end
  end

  // row each port read last, selects its read data
  logic [NPORTS-1:0][RW-1:0] row_q;
  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (en[p] && !we[p]) row_q[p] <= row[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      for (int c = 0; c < NCOLS; c++) begin
        rdata[p][c*CUT_BITS +: CUT_BITS] = cut_rdata[row_q[p]][c][p];
      end
    end
  end

endmodule
