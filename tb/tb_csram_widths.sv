// tb_csram_widths -- the MAC program of macro_runner on macros whose bus,
// vector and element sizes differ from the defaults, all at 128 words:
//   0  4RW-DP pipelined, 128-bit words, 64-bit system bus (2 slices a word)
//   1  4RW-DP pipelined, 512-bit words (64 lanes of 8 bits) assembled from
//      eight 64-bit cut columns and two 64-word cut rows, 64-bit bus
//   2  2RW pipelined, 128-bit words of 16-bit elements (8 lanes), built from
//      32-bit x 32-word cuts (4 x 4 cuts), 32-bit bus
// Checks results, MAC latency and issue interval as at the default sizes,
// and that the partitioned memories change cut row.
module tb_csram_widths;
  localparam int N = 3;
  logic clk = 1'b0, clk_dp = 1'b0, rst_n = 1'b0;
  int c [N], f [N], nh [N], ni [N], nb [N], np [N], ns [N], nr [N];
  logic fin [N];

  always #5 begin
    clk_dp = ~clk_dp;
    if (clk_dp) clk = ~clk;
  end

  macro_runner #(.NPORTS(4), .DOUBLE_PUMP(1), .PIPELINED(1), .SYS_W(64)) r_bus64 (
    .clk, .clk_dp, .rst_n, .checks(c[0]), .failures(f[0]), .n_hazard(nh[0]), .n_ii(ni[0]),
    .n_buf(nb[0]), .n_port(np[0]), .n_second_half(ns[0]), .n_row_switch(nr[0]), .finished(fin[0]));
  macro_runner #(.NPORTS(4), .DOUBLE_PUMP(1), .PIPELINED(1), .WIDTH(512), .SYS_W(64),
                 .CUT_WORDS(64), .CUT_BITS(64)) r_w512 (
    .clk, .clk_dp, .rst_n, .checks(c[1]), .failures(f[1]), .n_hazard(nh[1]), .n_ii(ni[1]),
    .n_buf(nb[1]), .n_port(np[1]), .n_second_half(ns[1]), .n_row_switch(nr[1]), .finished(fin[1]));
  macro_runner #(.NPORTS(2), .DOUBLE_PUMP(0), .PIPELINED(1), .ELEM_W(16),
                 .CUT_WORDS(32), .CUT_BITS(32)) r_e16 (
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
    int failures;
    logic all_fin;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_fin = 1'b1;
      for (int i = 0; i < N; i++) all_fin &= fin[i];
    end while (!all_fin);
    failures = total(f);
    for (int i = 0; i < N; i++)
      $display("config %0d: checks %0d failures %0d, row switches %0d", i, c[i], f[i], nr[i]);
    if (nr[1] == 0 || nr[2] == 0) begin
      failures++;
      $display("a partitioned memory never changed cut row");
    end
    $display("TB_RESULT checks=%0d failures=%0d", total(c) + 1, failures);
    $finish;
  end
endmodule
