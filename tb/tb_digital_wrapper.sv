// tb_digital_wrapper -- self-checking test of the digital wrapper alone.
//
// The wrapper is configured for a single-port memory, sequential execution,
// so operand A has to wait in its register while B is read. The memory is an
// ideal 1-port synchronous RAM written here. The test writes 16 random
// vectors over the 32-bit bus, runs 16 MACs with random operands and then
// reads every word back and compares it with the reference. It also checks
// that the wrapper never drives a write and a read on its one port at once
// and that every MAC writes 6 cycles after its bus transfer (decode follows
// the transfer, so this is the 6 cycles from decode through write).
module tb_digital_wrapper;
  import csram_pkg::*;
  localparam int WORDS = 128, WIDTH = 128, ELEM_W = 8, SYS_W = 32, AW = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid, instr_ready, rvalid, done, busy;
  logic [63:0] instr;
  logic [SYS_W-1:0] wdata, rdata;
  logic [3:0] stall;
  logic [0:0] mem_en, mem_we;
  logic [0:0][AW-1:0] mem_addr;
  logic [0:0][WIDTH-1:0] mem_wdata, mem_rdata;
  logic [WIDTH-1:0] ref_mem [WORDS];
  logic [WIDTH-1:0] ram [WORDS];
  int cyc = 0;
  int checks = 0, failures = 0;

  digital_wrapper #(.WORDS(WORDS), .WIDTH(WIDTH), .ELEM_W(8), .SYS_W(SYS_W),
                    .NPORTS(1), .PIPELINED(1'b0)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (mem_en[0]) begin
      if (mem_we[0]) ram[mem_addr[0]] <= mem_wdata[0];
      else mem_rdata[0] <= ram[mem_addr[0]];
    end
  end

  `include "csram_cpu.svh"

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    logic [WIDTH-1:0] v;
    instr_valid = 0; instr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int a = 0; a < 16; a++) write_vec(a, rand_vec());
    for (int i = 0; i < 16; i++) begin
      while (busy) @(negedge clk);
      done_q.delete();
      mac(32 + i, $urandom % 16, $urandom % 16, $urandom % 16, t);
      while (done_q.size() == 0) @(negedge clk);
      chk(done_q[0] - t == 6, $sformatf("latency %0d", done_q[0] - t));
    end
    while (busy) @(negedge clk);
    for (int a = 0; a < 16; a++) begin
      read_vec(a, v);
      chk(v == ref_mem[a], $sformatf("word %0d", a));
    end
    for (int a = 32; a < 48; a++) begin
      read_vec(a, v);
      chk(v == ref_mem[a], $sformatf("result %0d: %h expected %h", a, v, ref_mem[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
