// ctrl_checker -- drives one wrapper_ctrl configuration and checks its
// schedule; used by tb_wrapper_ctrl, which instantiates one per memory type.
//
// Expected schedule, written out independently of the scheduler: the cycle
// (after the decode cycle 0) of each memory access and the port that carries
// it, the MAC latency (6 cycles with one port, 5 otherwise) and the issue
// interval (sequential: latency - 1; pipelined: 4 / ports). Tests:
//   1. one MAC alone: every port request on its cycle, done on the last one;
//   2. eight independent MACs offered back to back: accepted II cycles apart;
//   3. a MAC reading the previous MAC's result: its read comes after the
//      write; when pipelining would have overlapped them the hazard stall
//      must have fired;
//   4. a buffer-slice write behind a vector load waits for the load.
module ctrl_checker
  import csram_pkg::*;
#(
  parameter int unsigned NPORTS    = 1,
  parameter bit          PIPELINED = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   hazards,
  output logic finished
);
  localparam int AW  = 7;
  localparam int LAT = (NPORTS == 1) ? 6 : 5;
  localparam int II  = (!PIPELINED || NPORTS == 1) ? LAT - 1 : 4 / NPORTS;
  // expected accesses: {cycle, port, write, which address 0=a 1=b 2=c 3=z}
  localparam int EXP [4][4] = (NPORTS == 1) ? '{'{1,0,0,0}, '{2,0,0,1}, '{3,0,0,2}, '{5,0,1,3}} :
                              (NPORTS == 2) ? '{'{1,0,0,0}, '{1,1,0,1}, '{2,1,0,2}, '{4,0,1,3}} :
                                              '{'{1,0,0,0}, '{1,1,0,1}, '{2,2,0,2}, '{4,3,1,3}};

  dec_t dec;
  logic ready, cap_a, do_mul, do_add, do_stv, ld_buf, wr_slice, rd_slice, done, busy;
  logic stall_hazard, stall_ii, stall_buf, stall_port;
  logic [NPORTS-1:0] mem_en, mem_we;
  logic [NPORTS-1:0][AW-1:0] mem_addr;

  wrapper_ctrl #(.NPORTS(NPORTS), .PIPELINED(PIPELINED), .AW(AW)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int bufstalls = 0;
  always @(negedge clk) if (stall_hazard) hazards++;
  always @(negedge clk) if (stall_buf) bufstalls++;

  function automatic dec_t mk(logic mac, logic ldv, logic wrb, int z, int a, int b, int c);
    dec_t d = '0;
    d.valid = 1'b1; d.mac = mac; d.ldv = ldv; d.wrb = wrb;
    d.addr_z = 14'(z); d.addr_a = 14'(a); d.addr_b = 14'(b); d.addr_c = 14'(c);
    return d;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("[%0d ports, pip %0d] FAIL %s at cycle %0d", NPORTS, PIPELINED, what, cyc);
    end
  endtask

  // offer d until accepted; returns the decode cycle
  task automatic offer(dec_t d, output int t);
    dec = d;
    #1;
    while (!ready) begin
      @(negedge clk);
      #1;
    end
    t = cyc;
    @(negedge clk);
    dec = '0;
  endtask

  initial begin
    int t0, t1, tw, tr;
    int acc [8];
    int addrs [4];
    checks = 0; failures = 0; hazards = 0; finished = 0;
    dec = '0;
    @(posedge rst_n);
    repeat (3) @(negedge clk);

    // 1. lone MAC: z=10 a=11 b=12 c=13
    addrs = '{11, 12, 13, 10};
    offer(mk(1, 0, 0, 10, 11, 12, 13), t0);
    while (cyc < t0 + LAT + 2) begin
      for (int p = 0; p < NPORTS; p++) begin
        logic exp_en, exp_we;
        int exp_a;
        exp_en = 0; exp_we = 0; exp_a = 0;
        for (int k = 0; k < 4; k++) begin
          if (EXP[k][0] == cyc - t0 && EXP[k][1] == p) begin
            exp_en = 1; exp_we = EXP[k][2] != 0; exp_a = addrs[EXP[k][3]];
          end
        end
        chk(mem_en[p] == exp_en, $sformatf("port %0d enable at stage %0d", p, cyc - t0));
        if (exp_en) begin
          chk(mem_we[p] == exp_we, "port direction");
          chk(int'(mem_addr[p]) == exp_a, "port address");
        end
      end
      chk(done == (cyc - t0 == LAT - 1), "done on the write cycle");
      @(negedge clk);
    end

    // 2. back-to-back independent MACs
    for (int i = 0; i < 8; i++) begin
      offer(mk(1, 0, 0, 40 + i, 60 + i, 80 + i, 100 + i), acc[i]);
      if (i > 0) chk(acc[i] - acc[i-1] == II, $sformatf("issue interval %0d, expected %0d", acc[i] - acc[i-1], II));
    end
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);

    // 3. dependent MAC: second reads (as A) the word the first writes
    offer(mk(1, 0, 0, 20, 1, 2, 3), t0);
    offer(mk(1, 0, 0, 21, 20, 5, 6), t1);
    tw = t0 + EXP[3][0];
    tr = t1 + EXP[0][0];
    chk(tr > tw, $sformatf("dependent read at %0d after write at %0d", tr, tw));
    chk(tr == tw + 1 || t1 - t0 == II, "dependent MAC held no longer than needed");
    while (busy) @(negedge clk);

    // 4. buffer write behind a vector load
    offer(mk(0, 1, 0, 0, 7, 0, 0), t0);
    offer(mk(0, 0, 1, 0, 0, 0, 0), t1);
    chk(t1 >= t0 + LAT, "buffer write waits for the load to finish");
    chk(bufstalls > 0, "buffer interlock fired");
    while (busy) @(negedge clk);
    finished = 1;
  end
endmodule
