// tb_csram_full -- the C-SRAM macro with every parameter at its default
// (128 words x 128 bits, double-pumped 4RW, pipelined, 16 x 8-bit lanes,
// 32-bit bus) running one complete vector job: fill all 128 words over the
// bus, run 48 independent MACs back to back (one issued per cycle), then
// 16 MACs that each accumulate into the previous result, and read back every
// result word. Checks the data, the one-cycle issue interval and the 5-cycle
// latency.
module tb_csram_full;
  import csram_pkg::*;
  localparam int WORDS = 128, WIDTH = 128, ELEM_W = 8, SYS_W = 32;

  logic clk = 1'b0, clk_dp = 1'b0, rst_n = 1'b0;
  logic instr_valid, instr_ready, rvalid, done, busy;
  logic [63:0] instr;
  logic [SYS_W-1:0] wdata, rdata;
  logic [3:0] stall;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int cyc = 0;
  int checks = 0, failures = 0;

  csram_macro dut (.*);

  always #5 begin
    clk_dp = ~clk_dp;
    if (clk_dp) clk = ~clk;
  end
  always @(posedge clk) cyc <= cyc + 1;

  `include "csram_cpu.svh"

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, tp, t_first;
    logic [WIDTH-1:0] v;
    instr_valid = 0; instr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) write_vec(a, rand_vec());
    while (busy) @(negedge clk);
    done_q.delete();
    for (int i = 0; i < 48; i++) begin
      mac(64 + i, i, 63 - i, (i * 5) % 64, t);
      if (i == 0) t_first = t;
      else chk(t - tp == 1, $sformatf("issue interval %0d", t - tp));
      tp = t;
    end
    while (done_q.size() == 0) @(negedge clk);
    chk(done_q[0] - t_first == 5, $sformatf("latency %0d", done_q[0] - t_first));
    for (int i = 0; i < 16; i++) mac(112 + i, i, i + 1, (i == 0) ? 111 : 111 + i, t);
    while (busy) @(negedge clk);
    for (int a = 64; a < WORDS; a++) begin
      read_vec(a, v);
      chk(v == ref_mem[a], $sformatf("result %0d: %h expected %h", a, v, ref_mem[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
