// tb_csram_storage -- self-checking test of the partitioned C-SRAM storage.
//
// Two memories of 32 words x 32 bits, each built from 4 rows x 2 columns of
// 8-word x 16-bit cuts (word and bit partitioning at once): one with native
// 2-port cuts, one with double-pumped 4-port cuts. Both get 400 cycles of
// random traffic checked against a reference array; the test also counts
// reads that crossed into a different cut row from the previous read of the
// same port, so the row multiplexer is exercised.
// Addresses change right after each clock edge, so read data must come from
// the row the read addressed, not from the one now on the address lines.
module tb_csram_storage;
  localparam int WORDS = 32, WIDTH = 32, AW = 5;

  logic clk = 1'b0, clk_dp = 1'b0;
  int checks = 0, failures = 0, row_switches = 0;

  always #5 begin
    clk_dp = ~clk_dp;
    if (clk_dp) clk = ~clk;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // native 2-port
  logic [1:0] en2, we2;
  logic [1:0][AW-1:0] addr2;
  logic [1:0][WIDTH-1:0] wd2, rd2;
  csram_storage #(.NPORTS(2), .WORDS(WORDS), .WIDTH(WIDTH), .CUT_WORDS(8),
                  .CUT_BITS(16), .DOUBLE_PUMP(1'b0)) dut2 (
    .clk, .clk_dp, .en(en2), .we(we2), .addr(addr2), .wdata(wd2), .rdata(rd2));

  // double-pumped 4-port
  logic [3:0] en4, we4;
  logic [3:0][AW-1:0] addr4;
  logic [3:0][WIDTH-1:0] wd4, rd4;
  csram_storage #(.NPORTS(4), .WORDS(WORDS), .WIDTH(WIDTH), .CUT_WORDS(8),
                  .CUT_BITS(16), .DOUBLE_PUMP(1'b1)) dut4 (
    .clk, .clk_dp, .en(en4), .we(we4), .addr(addr4), .wdata(wd4), .rdata(rd4));

  logic [WIDTH-1:0] ref2 [WORDS], ref4 [WORDS];
  logic [1:0][WIDTH-1:0] exp2;
  logic [3:0][WIDTH-1:0] exp4;
  logic [1:0] v2;
  logic [3:0] v4;
  int last_row [4];

  task automatic step();
    // native: all reads before all writes
    for (int p = 0; p < 2; p++) begin
      v2[p] = en2[p] && !we2[p];
      if (v2[p]) exp2[p] = ref2[addr2[p]];
    end
    for (int p = 0; p < 2; p++) if (en2[p] && we2[p]) ref2[addr2[p]] = wd2[p];
    // double-pumped: ports 0-1, then ports 2-3
    for (int g = 0; g < 2; g++) begin
      for (int q = 0; q < 2; q++) begin
        int p = 2 * g + q;
        v4[p] = en4[p] && !we4[p];
        if (v4[p]) begin
          exp4[p] = ref4[addr4[p]];
          if (last_row[p] != int'(addr4[p] / 8)) row_switches++;
          last_row[p] = int'(addr4[p] / 8);
        end
      end
      for (int q = 0; q < 2; q++) begin
        int p = 2 * g + q;
        if (en4[p] && we4[p]) ref4[addr4[p]] = wd4[p];
      end
    end
    @(posedge clk);
    #1;
    // the next request may follow at once: read data must not depend on it
    for (int p = 0; p < 2; p++) addr2[p] = AW'($urandom);
    for (int p = 0; p < 4; p++) addr4[p] = AW'($urandom);
    @(negedge clk);
    #1;
    for (int p = 0; p < 2; p++) if (v2[p]) begin
      checks++;
      if (rd2[p] !== exp2[p]) begin
        failures++;
        $display("2-port: port %0d read %h expected %h", p, rd2[p], exp2[p]);
      end
    end
    for (int p = 0; p < 4; p++) if (v4[p]) begin
      checks++;
      if (rd4[p] !== exp4[p]) begin
        failures++;
        $display("4-port: port %0d read %h expected %h", p, rd4[p], exp4[p]);
      end
    end
  endtask

  initial begin
    en2 = '0; we2 = '0; addr2 = '0; wd2 = '0;
    en4 = '0; we4 = '0; addr4 = '0; wd4 = '0;
    for (int p = 0; p < 4; p++) last_row[p] = -1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    #1;
    for (int w = 0; w < WORDS; w++) begin
      en2 = 2'b01; we2 = 2'b01; addr2[0] = AW'(w); wd2[0] = $urandom;
      en4 = 4'b0001; we4 = 4'b0001; addr4[0] = AW'(w); wd4[0] = $urandom;
      step();
    end
    for (int i = 0; i < 400; i++) begin
      for (int p = 0; p < 2; p++) begin
        en2[p] = ($urandom % 4) != 0; we2[p] = $urandom % 2;
        addr2[p] = AW'($urandom); wd2[p] = $urandom;
      end
      for (int p = 0; p < 4; p++) begin
        en4[p] = ($urandom % 4) != 0; we4[p] = $urandom % 2;
        addr4[p] = AW'($urandom); wd4[p] = $urandom;
      end
      step();
    end
    checks++;
    if (row_switches == 0) begin
      failures++;
      $display("reads never changed cut row");
    end
    $display("row switches: %0d", row_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
