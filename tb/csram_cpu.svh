// csram_cpu.svh -- CPU-side helpers for testbenches of the C-SRAM macro.
//
// Included inside a testbench module that declares: clk, cyc (cycle count,
// incremented on every rising clk edge), instr_valid, instr, wdata,
// instr_ready, rdata, rvalid, done, the parameters WORDS, WIDTH, ELEM_W,
// SYS_W, and the reference memory ref_mem[WORDS]. The reference follows
// program order: each instruction sees the results of all earlier ones. MAC
// lanes are ELEM_W bits wide and wrap modulo 2^ELEM_W.

localparam int NSL = WIDTH / SYS_W;

logic [SYS_W-1:0] rd_q [$];
int done_q [$];
always @(negedge clk) if (rvalid) rd_q.push_back(rdata);
always @(negedge clk) if (done) done_q.push_back(cyc);

// offer one instruction at a falling edge until accepted; t = cycle the bus hands it over
task automatic issue(logic [63:0] w, logic [SYS_W-1:0] d, output int t);
  instr = w;
  wdata = d;
  instr_valid = 1'b1;
  #1;
  while (!instr_ready) begin
    @(negedge clk);
    #1;
  end
  t = cyc;
  @(negedge clk);
  instr_valid = 1'b0;
endtask

function automatic logic [WIDTH-1:0] ref_mac(logic [WIDTH-1:0] a, logic [WIDTH-1:0] b,
                                             logic [WIDTH-1:0] c);
  logic [WIDTH-1:0] z;
  for (int l = 0; l < WIDTH / ELEM_W; l++) begin
    longint unsigned x, y, s;
    x = 64'(a[l*ELEM_W +: ELEM_W]);
    y = 64'(b[l*ELEM_W +: ELEM_W]);
    s = 64'(c[l*ELEM_W +: ELEM_W]);
    z[l*ELEM_W +: ELEM_W] = ELEM_W'((x * y + s) % (64'd1 << ELEM_W));
  end
  return z;
endfunction

task automatic write_vec(int addr, logic [WIDTH-1:0] v);
  int t;
  for (int i = 0; i < NSL; i++) issue(make_instr(OP_WRB, 4'(i), 0, 0, 0, 0), v[i*SYS_W +: SYS_W], t);
  issue(make_instr(OP_STV, 0, 14'(addr), 0, 0, 0), '0, t);
  ref_mem[addr] = v;
endtask

task automatic read_vec(int addr, output logic [WIDTH-1:0] v);
  int t;
  rd_q.delete();
  issue(make_instr(OP_LDV, 0, 0, 14'(addr), 0, 0), '0, t);
  for (int i = 0; i < NSL; i++) issue(make_instr(OP_RDB, 4'(i), 0, 0, 0, 0), '0, t);
  while (rd_q.size() < NSL) @(negedge clk);
  for (int i = 0; i < NSL; i++) v[i*SYS_W +: SYS_W] = rd_q[i];
endtask

task automatic mac(int z, int a, int b, int c, output int t);
  issue(make_instr(OP_MAC, 0, 14'(z), 14'(a), 14'(b), 14'(c)), '0, t);
  ref_mem[z] = ref_mac(ref_mem[a], ref_mem[b], ref_mem[c]);
endtask

function automatic logic [WIDTH-1:0] rand_vec();
  logic [WIDTH-1:0] v;
  for (int i = 0; i < WIDTH / 32; i++) v[i*32 +: 32] = $urandom;
  return v;
endfunction
