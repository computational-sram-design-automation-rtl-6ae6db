// tb_instr_reg -- self-checking test of the bus-side instruction register.
//
// A random source offers numbered words and a random sink takes them. Every
// word must arrive once, in order, one cycle after it was accepted at the
// earliest; the register must take a new word whenever it is empty or its
// word leaves in the same cycle, and must hold its word while the sink waits.
module tb_instr_reg;
  localparam int W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  instr_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int sent = 0, got = 0, full = 0, back_to_back = 0;
    logic [W-1:0] held = '0;
    logic was_stalled = 0;
    in_valid = 0; out_ready = 0; in_data = '0;
    @(negedge clk);
    chk(!out_valid, "empty after reset");
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      in_valid  = ($urandom % 4) != 0;
      out_ready = ($urandom % 3) != 0;
      in_data   = W'(sent);
      #1;
      chk(in_ready == (!out_valid || out_ready), "ready rule");
      if (out_valid) begin
        chk(out_data == W'(got), $sformatf("word %0d expected %0d", out_data, got));
        if (was_stalled) chk(out_data == held, "word held while the sink waits");
      end
      was_stalled = out_valid && !out_ready;
      held = out_data;
      if (out_valid && out_ready) got++;
      if (out_valid && out_ready && in_valid) back_to_back++;
      if (in_valid && in_ready) sent++;
      @(posedge clk);
      #1;
      if (out_valid) full++;
      @(negedge clk);
    end
    chk(got > 300 && got <= sent && sent - got <= 1, $sformatf("sent %0d received %0d", sent, got));
    chk(back_to_back > 50, "a word leaves and a new one enters in the same cycle");
    rst_n = 1'b0;
    #1;
    chk(!out_valid, "reset empties the register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
