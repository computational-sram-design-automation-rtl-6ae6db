// tb_csram_macro -- end-to-end test of the C-SRAM macro.
//
// Runs the same program (see macro_runner) on every memory configuration of
// the macro table: 1RW, 2RW and double-pumped 2RW sequentially, 2RW and
// double-pumped 2RW pipelined, double-pumped 4RW pipelined (the default),
// and double-pumped 4RW built from four 64-word x 64-bit cuts. Each run
// checks the results, the MAC latency and the issue interval. The test also
// requires that each mechanism happened at least once somewhere: the
// read-after-write stall, the issue-interval stall, the buffer interlock,
// the port interlock,
// second-half accesses of a double-pumped memory and reads changing cut row.
module tb_csram_macro;
  localparam int N = 7;
  logic clk = 1'b0, clk_dp = 1'b0, rst_n = 1'b0;
  int c [N], f [N], nh [N], ni [N], nb [N], np [N], ns [N], nr [N];
  logic fin [N];

  always #5 begin
    clk_dp = ~clk_dp;
    if (clk_dp) clk = ~clk;
  end

  macro_runner #(.NPORTS(1), .DOUBLE_PUMP(0), .PIPELINED(0)) r_1rw (
    .clk, .clk_dp, .rst_n, .checks(c[0]), .failures(f[0]), .n_hazard(nh[0]), .n_ii(ni[0]),
    .n_buf(nb[0]), .n_port(np[0]), .n_second_half(ns[0]), .n_row_switch(nr[0]), .finished(fin[0]));
  macro_runner #(.NPORTS(2), .DOUBLE_PUMP(0), .PIPELINED(0)) r_2rw (
    .clk, .clk_dp, .rst_n, .checks(c[1]), .failures(f[1]), .n_hazard(nh[1]), .n_ii(ni[1]),
    .n_buf(nb[1]), .n_port(np[1]), .n_second_half(ns[1]), .n_row_switch(nr[1]), .finished(fin[1]));
  macro_runner #(.NPORTS(2), .DOUBLE_PUMP(0), .PIPELINED(1)) r_2rw_pip (
    .clk, .clk_dp, .rst_n, .checks(c[2]), .failures(f[2]), .n_hazard(nh[2]), .n_ii(ni[2]),
    .n_buf(nb[2]), .n_port(np[2]), .n_second_half(ns[2]), .n_row_switch(nr[2]), .finished(fin[2]));
  macro_runner #(.NPORTS(2), .DOUBLE_PUMP(1), .PIPELINED(0)) r_2rw_dp (
    .clk, .clk_dp, .rst_n, .checks(c[3]), .failures(f[3]), .n_hazard(nh[3]), .n_ii(ni[3]),
    .n_buf(nb[3]), .n_port(np[3]), .n_second_half(ns[3]), .n_row_switch(nr[3]), .finished(fin[3]));
  macro_runner #(.NPORTS(2), .DOUBLE_PUMP(1), .PIPELINED(1)) r_2rw_dp_pip (
    .clk, .clk_dp, .rst_n, .checks(c[4]), .failures(f[4]), .n_hazard(nh[4]), .n_ii(ni[4]),
    .n_buf(nb[4]), .n_port(np[4]), .n_second_half(ns[4]), .n_row_switch(nr[4]), .finished(fin[4]));
  macro_runner #(.NPORTS(4), .DOUBLE_PUMP(1), .PIPELINED(1)) r_4rw_dp_pip (
    .clk, .clk_dp, .rst_n, .checks(c[5]), .failures(f[5]), .n_hazard(nh[5]), .n_ii(ni[5]),
    .n_buf(nb[5]), .n_port(np[5]), .n_second_half(ns[5]), .n_row_switch(nr[5]), .finished(fin[5]));
  macro_runner #(.NPORTS(4), .DOUBLE_PUMP(1), .PIPELINED(1), .CUT_WORDS(64), .CUT_BITS(64)) r_4rw_split (
    .clk, .clk_dp, .rst_n, .checks(c[6]), .failures(f[6]), .n_hazard(nh[6]), .n_ii(ni[6]),
    .n_buf(nb[6]), .n_port(np[6]), .n_second_half(ns[6]), .n_row_switch(nr[6]), .finished(fin[6]));

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
    int checks, failures;
    logic all_fin;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_fin = 1'b1;
      for (int i = 0; i < N; i++) all_fin &= fin[i];
    end while (!all_fin);
    checks = total(c) + 6;
    failures = total(f);
    for (int i = 0; i < N; i++)
      $display("config %0d: checks %0d failures %0d, stalls hazard %0d interval %0d buffer %0d port %0d, second-half accesses %0d, row switches %0d",
               i, c[i], f[i], nh[i], ni[i], nb[i], np[i], ns[i], nr[i]);
    if (total(nh) == 0) begin failures++; $display("hazard stall never happened"); end
    if (total(ni) == 0) begin failures++; $display("interval stall never happened"); end
    if (total(nb) == 0) begin failures++; $display("buffer interlock never happened"); end
    if (total(np) == 0) begin failures++; $display("port interlock never happened"); end
    if (total(ns) == 0) begin failures++; $display("no second-half access"); end
    if (nr[6] == 0) begin failures++; $display("partitioned memory never changed cut row"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
