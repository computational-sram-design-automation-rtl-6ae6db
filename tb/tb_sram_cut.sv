// tb_sram_cut -- self-checking test of the native multi-port SRAM cut.
//
// A 2-port, 16 x 16-bit cut is filled through port 0, then driven for 400
// cycles with random reads and writes on both ports, including same-address
// collisions. A reference array applied in the documented order (reads see
// the old word, the higher port wins a double write) predicts every read.
module tb_sram_cut;
  localparam int NP = 2, WORDS = 16, WIDTH = 16, AW = 4;

  logic clk = 1'b0;
  logic [NP-1:0] en, we;
  logic [NP-1:0][AW-1:0] addr;
  logic [NP-1:0][WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [WORDS];
  logic [NP-1:0][WIDTH-1:0] exp_rd;
  logic [NP-1:0] exp_v;
  int checks = 0, failures = 0;

  sram_cut #(.NPORTS(NP), .WORDS(WORDS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    // reference: reads before writes, writes in port order
    for (int p = 0; p < NP; p++) begin
      exp_v[p] = en[p] && !we[p];
      if (exp_v[p]) exp_rd[p] = ref_mem[addr[p]];
    end
    for (int p = 0; p < NP; p++) if (en[p] && we[p]) ref_mem[addr[p]] = wdata[p];
    @(posedge clk);
    @(negedge clk);
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
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      en = 2'b01; we = 2'b01; addr[0] = AW'(w); wdata[0] = WIDTH'($urandom);
      step();
    end
    for (int i = 0; i < 400; i++) begin
      for (int p = 0; p < NP; p++) begin
        en[p]    = ($urandom % 4) != 0;
        we[p]    = $urandom % 2;
        addr[p]  = AW'($urandom % ((i % 3 == 0) ? 2 : WORDS));
        wdata[p] = WIDTH'($urandom);
      end
      step();
    end
    // read port holds its data while idle
    en = 2'b01; we = 2'b00; addr[0] = 3;
    step();
    en = '0;
    step();
    checks++;
    if (rdata[0] !== ref_mem[3]) begin
      failures++;
      $display("read data not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
