// tb_sram_dpump -- self-checking test of the double-pumped SRAM cut.
//
// A 4-port cut (two internal ports, accessed twice per clk cycle) with
// clk_dp at twice clk. After filling the words it runs 400 cycles of random
// accesses on all four ports. The reference applies ports 0-1 first and
// ports 2-3 second within each cycle, so a read on port 2 or 3 sees a write
// from port 0 or 1 in the same cycle; the test counts how often that
// happened and fails if it never did.
module tb_sram_dpump;
  localparam int NP = 4, HALF = 2, WORDS = 16, WIDTH = 16, AW = 4;

  logic clk = 1'b0, clk_dp = 1'b0;
  logic [NP-1:0] en, we;
  logic [NP-1:0][AW-1:0] addr;
  logic [NP-1:0][WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [WORDS];
  logic [NP-1:0][WIDTH-1:0] exp_rd;
  logic [NP-1:0] exp_v;
  int checks = 0, failures = 0, forwarded = 0;

  sram_dpump #(.NPORTS(NP), .WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  // clk rises on every other rising edge of clk_dp
  always #5 begin
    clk_dp = ~clk_dp;
    if (clk_dp) clk = ~clk;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    logic [WORDS-1:0] written;
    written = '0;
    for (int g = 0; g < 2; g++) begin
      for (int q = 0; q < HALF; q++) begin
        int p = g * HALF + q;
        exp_v[p] = en[p] && !we[p];
        if (exp_v[p]) begin
          exp_rd[p] = ref_mem[addr[p]];
          if (g == 1 && written[addr[p]]) forwarded++;
        end
      end
      for (int q = 0; q < HALF; q++) begin
        int p = g * HALF + q;
        if (en[p] && we[p]) begin
          ref_mem[addr[p]] = wdata[p];
          written[addr[p]] = 1'b1;
        end
      end
    end
    @(posedge clk);
    @(negedge clk);
    #1;
    for (int p = 0; p < NP; p++) begin
      if (exp_v[p]) begin
        checks++;
        if (rdata[p] !== exp_rd[p]) begin
          failures++;
          $display("port %0d read %h expected %h", p, rdata[p], exp_rd[p]);
        end
      end
    end
  endtask

  initial begin
    en = '0; we = '0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    #1;
    for (int w = 0; w < WORDS; w += 2) begin
      en = 4'b0101; we = 4'b0101;
      addr[0] = AW'(w); addr[2] = AW'(w + 1);
      wdata[0] = WIDTH'($urandom); wdata[2] = WIDTH'($urandom);
      step();
    end
    for (int i = 0; i < 400; i++) begin
      for (int p = 0; p < NP; p++) begin
        en[p]    = ($urandom % 4) != 0;
        we[p]    = $urandom % 2;
        addr[p]  = AW'($urandom % ((i % 2 == 0) ? 2 : WORDS));
        wdata[p] = WIDTH'($urandom);
      end
      step();
    end
    checks++;
    if (forwarded == 0) begin
      failures++;
      $display("no same-cycle write-then-read through the two halves");
    end
    $display("second-half reads of first-half writes: %0d", forwarded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
