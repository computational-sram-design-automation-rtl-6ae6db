// macro_runner -- runs one configuration of csram_macro through a complete
// program and checks it; used by tb_csram_macro, one instance per memory
// type.
//
// Program: write 12 random vectors over the system bus (buffer writes and
// vector stores), then:
//   - run one MAC alone and measure its latency (cycles from the bus
//     transfer to the write, which equals decode through write since decode
//     follows the transfer: expected 6 with one port and 5 otherwise);
//   - run 8 independent MACs back to back and measure the issue interval
//     (expected 5 / 4 for sequential 1RW / 2RW, 2 for pipelined 2RW, 1 for
//     pipelined 4RW);
//   - run a chain of 4 MACs each accumulating into the previous result;
//   - send 8 MACs at exactly that issue interval, as a CPU whose instruction
//     period matches the memory type would, and check none is held back;
//   - read every word back over the bus and compare it with the reference.
// It also counts how often the hazard, interval, buffer and port interlocks
// fired, how many accesses the double-pumped memory served in the second
// half-cycle and how often a read changed cut row.
module macro_runner
  import csram_pkg::*;
#(
  parameter int unsigned WORDS       = 128,
  parameter int unsigned NPORTS      = 1,
  parameter bit          DOUBLE_PUMP = 1'b0,
  parameter bit          PIPELINED   = 1'b0,
  parameter int unsigned CUT_WORDS   = 128,
  parameter int unsigned CUT_BITS    = 128,
  parameter int unsigned WIDTH       = 128,
  parameter int unsigned ELEM_W      = 8,
  parameter int unsigned SYS_W       = 32
) (
  input  logic clk,
  input  logic clk_dp,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_hazard,
  output int   n_ii,
  output int   n_buf,
  output int   n_port,
  output int   n_second_half,
  output int   n_row_switch,
  output logic finished
);
  localparam int R = WORDS - 28;  // first result word
  localparam int EXP_LAT = (NPORTS == 1) ? 6 : 5;
  localparam int EXP_II  = !PIPELINED ? EXP_LAT - 1 : ((NPORTS == 4) ? 1 : 2);

  logic instr_valid, instr_ready, rvalid, done, busy;
  logic [63:0] instr;
  logic [SYS_W-1:0] wdata, rdata;
  logic [3:0] stall;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  csram_macro #(.WORDS(WORDS), .WIDTH(WIDTH), .ELEM_W(ELEM_W), .SYS_W(SYS_W),
                .NPORTS(NPORTS), .DOUBLE_PUMP(DOUBLE_PUMP), .PIPELINED(PIPELINED),
                .CUT_WORDS(CUT_WORDS), .CUT_BITS(CUT_BITS)) dut (.*);

  `include "csram_cpu.svh"

  always @(negedge clk) begin
    if (stall[0]) n_hazard++;
    if (stall[1]) n_ii++;
    if (stall[2]) n_buf++;
    if (stall[3]) n_port++;
  end
  if (DOUBLE_PUMP) begin : g_dp_count
    always @(negedge clk) n_second_half += $countones(dut.mem_en[NPORTS-1:NPORTS/2]);
  end
  logic [NPORTS-1:0][13:0] last_addr;
  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (dut.mem_en[p] && !dut.mem_we[p]) begin
        if (int'(dut.mem_addr[p]) / CUT_WORDS != int'(last_addr[p]) / CUT_WORDS) n_row_switch++;
        last_addr[p] <= 14'(dut.mem_addr[p]);
      end
    end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("[%0dRW dp=%0d pip=%0d %0d-bit word, %0d-bit lanes, %0d-bit bus] FAIL %s",
               NPORTS, DOUBLE_PUMP, PIPELINED, WIDTH, ELEM_W, SYS_W, what);
    end
  endtask

  initial begin
    int t, tp, tn;
    int src [12];
    logic [WIDTH-1:0] v;
    checks = 0; failures = 0; n_hazard = 0; n_ii = 0; n_buf = 0; n_port = 0;
    n_second_half = 0; n_row_switch = 0; finished = 0;
    last_addr = '0;
    instr_valid = 0; instr = '0; wdata = '0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);

    for (int i = 0; i < 12; i++) begin
      src[i] = (i * (WORDS / 4 + 5) + 5) % R;
      write_vec(src[i], rand_vec());
    end
    while (busy) @(negedge clk);

    // latency of a lone MAC
    done_q.delete();
    mac(R, src[0], src[1], src[2], t);
    while (done_q.size() == 0) @(negedge clk);
    chk(done_q[0] - t == EXP_LAT, $sformatf("MAC latency %0d, expected %0d", done_q[0] - t, EXP_LAT));

    // throughput of independent MACs (the second one is taken into the
    // bus-side register at once while the first decodes, so the steady
    // interval is measured from the third on)
    for (int i = 0; i < 8; i++) begin
      mac(R + 1 + i, src[i % 12], src[(i + 3) % 12], src[(i + 7) % 12], t);
      if (i > 1) chk(t - tp == EXP_II, $sformatf("issue interval %0d, expected %0d", t - tp, EXP_II));
      tp = t;
    end

    // dependent chain: acc = acc * b + c ... each reads the previous result
    mac(R + 10, src[4], src[5], src[6], t);
    for (int i = 0; i < 4; i++) mac(R + 11 + i, src[i], src[i + 1], R + 10 + i, t);
    while (busy) @(negedge clk);

    // a CPU that sends one MAC per instruction period (EXP_II cycles) must
    // never be held back
    tn = cyc;
    for (int i = 0; i < 8; i++) begin
      while (cyc < tn) @(negedge clk);
      mac(R + 15 + i, src[(i + 2) % 12], src[(i + 5) % 12], src[(i + 9) % 12], t);
      chk(t == tn, $sformatf("MAC offered at the instruction period waited %0d cycles", t - tn));
      tn = t + EXP_II;
    end
    while (busy) @(negedge clk);

    // read everything back
    for (int i = 0; i < 12; i++) begin
      read_vec(src[i], v);
      chk(v == ref_mem[src[i]], $sformatf("source word %0d", src[i]));
    end
    for (int a = R; a < R + 23; a++) begin
      if (a == R + 9) continue;  // never written
      read_vec(a, v);
      chk(v == ref_mem[a], $sformatf("result word %0d: %h expected %h", a, v, ref_mem[a]));
    end
    finished = 1;
  end
endmodule
