// tb_wrapper_ctrl -- self-checking test of the wrapper scheduler in the four
// evaluated configurations: 1RW sequential, 2RW sequential, 2RW pipelined
// and 4RW pipelined (see ctrl_checker for the individual checks). The
// pipelined configurations must also have hit the read-after-write stall.
module tb_wrapper_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  int c [4], f [4], h [4];
  logic fin [4];
  int checks, failures;

  always #5 clk = ~clk;

  ctrl_checker #(.NPORTS(1), .PIPELINED(1'b0)) u_1rw     (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .hazards(h[0]), .finished(fin[0]));
  ctrl_checker #(.NPORTS(2), .PIPELINED(1'b0)) u_2rw     (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .hazards(h[1]), .finished(fin[1]));
  ctrl_checker #(.NPORTS(2), .PIPELINED(1'b1)) u_2rw_pip (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .hazards(h[2]), .finished(fin[2]));
  ctrl_checker #(.NPORTS(4), .PIPELINED(1'b1)) u_4rw_pip (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .hazards(h[3]), .finished(fin[3]));

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = c[0] + c[1] + c[2] + c[3] + 2;
    failures = f[0] + f[1] + f[2] + f[3];
    if (h[2] == 0) begin failures++; $display("2RW pipelined: no hazard stall"); end
    if (h[3] == 0) begin failures++; $display("4RW pipelined: no hazard stall"); end
    $display("hazard stall cycles: 1RW %0d, 2RW %0d, 2RW pip %0d, 4RW pip %0d", h[0], h[1], h[2], h[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
