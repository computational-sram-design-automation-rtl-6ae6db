// tb_vec_buffer -- self-checking test of the bus-to-word vector buffer.
//
// 128-bit word, 32-bit bus (4 slices). Random slice writes, slice reads,
// whole-word loads and loads colliding with slice writes are checked against
// a reference word; slice reads must answer exactly one cycle later.
module tb_vec_buffer;
  localparam int WIDTH = 128, SYS_W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_slice, rd_slice, ld_word, bus_rvalid;
  logic [1:0] idx;
  logic [SYS_W-1:0] bus_wdata, bus_rdata;
  logic [WIDTH-1:0] word_d, word_q, ref_w;
  int checks = 0, failures = 0;

  vec_buffer #(.WIDTH(WIDTH), .SYS_W(SYS_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_rv;
    logic [SYS_W-1:0] exp_rd;
    wr_slice = 0; rd_slice = 0; ld_word = 0; idx = 0; bus_wdata = 0; word_d = 0;
    ref_w = '0;
    exp_rv = 0; exp_rd = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      wr_slice = ($urandom % 2) == 0;
      rd_slice = ($urandom % 2) == 0;
      ld_word  = ($urandom % 5) == 0;
      idx      = 2'($urandom);
      bus_wdata = $urandom;
      word_d   = {$urandom, $urandom, $urandom, $urandom};
      exp_rv = rd_slice;
      if (rd_slice) exp_rd = ref_w[idx*SYS_W +: SYS_W];
      if (ld_word) ref_w = word_d;
      else if (wr_slice) ref_w[idx*SYS_W +: SYS_W] = bus_wdata;
      @(negedge clk);
      checks++;
      if (bus_rvalid !== exp_rv || (exp_rv && bus_rdata !== exp_rd)) begin
        failures++;
        $display("read slice: got %b %h expected %b %h", bus_rvalid, bus_rdata, exp_rv, exp_rd);
      end
      checks++;
      if (word_q !== ref_w) begin
        failures++;
        $display("word %h expected %h", word_q, ref_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
