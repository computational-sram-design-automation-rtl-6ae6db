// tb_csram_maxsize -- the MAC program of macro_runner on the largest macros
// the targeted memory compilers allow: 4096 words for the 2-port and 4-port
// types (2RW sequential, 4RW-DP pipelined) and 16384 words for the 1-port
// type. Checks results, MAC latency and issue interval as at the default
// size; the memories are single cuts of the full size.
module tb_csram_maxsize;
  localparam int N = 3;
  logic clk = 1'b0, clk_dp = 1'b0, rst_n = 1'b0;
  int c [N], f [N], nh [N], ni [N], nb [N], np [N], ns [N], nr [N];
  logic fin [N];

  always #5 begin
    clk_dp = ~clk_dp;
    if (clk_dp) clk = ~clk;
  end

  macro_runner #(.WORDS(16384), .CUT_WORDS(16384), .NPORTS(1), .DOUBLE_PUMP(0), .PIPELINED(0)) r_1rw (
    .clk, .clk_dp, .rst_n, .checks(c[0]), .failures(f[0]), .n_hazard(nh[0]), .n_ii(ni[0]),
    .n_buf(nb[0]), .n_port(np[0]), .n_second_half(ns[0]), .n_row_switch(nr[0]), .finished(fin[0]));
  macro_runner #(.WORDS(4096), .CUT_WORDS(4096), .NPORTS(2), .DOUBLE_PUMP(0), .PIPELINED(0)) r_2rw (
    .clk, .clk_dp, .rst_n, .checks(c[1]), .failures(f[1]), .n_hazard(nh[1]), .n_ii(ni[1]),
    .n_buf(nb[1]), .n_port(np[1]), .n_second_half(ns[1]), .n_row_switch(nr[1]), .finished(fin[1]));
  macro_runner #(.WORDS(4096), .CUT_WORDS(4096), .NPORTS(4), .DOUBLE_PUMP(1), .PIPELINED(1)) r_4rw (
    .clk, .clk_dp, .rst_n, .checks(c[2]), .failures(f[2]), .n_hazard(nh[2]), .n_ii(ni[2]),
    .n_buf(nb[2]), .n_port(np[2]), .n_second_half(ns[2]), .n_row_switch(nr[2]), .finished(fin[2]));

  function automatic int total(int x [N]);
    int s = 0;
    for (int i = 0; i < N; i++) s += x[i];
    return s;
  endfunction

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    logic all_fin;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_fin = 1'b1;
      for (int i = 0; i < N; i++) all_fin &= fin[i];
    end while (!all_fin);
    for (int i = 0; i < N; i++) $display("config %0d: checks %0d failures %0d", i, c[i], f[i]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
