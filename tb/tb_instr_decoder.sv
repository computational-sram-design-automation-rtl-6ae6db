// tb_instr_decoder -- self-checking test of the instruction decoder.
//
// Builds instruction words bit by bit from the documented layout (opcode in
// bits 63:60, idx 59:56, then four 14-bit addresses z, a, b, c) and checks
// the one-hot operation flags and the addresses trimmed to 7 bits, for every
// opcode value including unused ones and with valid low.
module tb_instr_decoder;
  import csram_pkg::*;
  localparam int AW = 7;

  logic [63:0] instr;
  logic valid;
  dec_t dec;
  int checks = 0, failures = 0;

  instr_decoder #(.AW(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (instr %h)", what, instr);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [3:0] op, idx;
      logic [13:0] z, a, b, c;
      op = 4'(i % 16); idx = 4'($urandom);
      z = 14'($urandom); a = 14'($urandom); b = 14'($urandom); c = 14'($urandom);
      instr = {op, idx, z, a, b, c};
      valid = (i % 17) != 16;
      #1;
      chk(dec.valid == valid, "valid");
      chk(dec.mac == (valid && op == 4'h1), "mac flag");
      chk(dec.ldv == (valid && op == 4'h2), "ldv flag");
      chk(dec.stv == (valid && op == 4'h3), "stv flag");
      chk(dec.wrb == (valid && op == 4'h4), "wrb flag");
      chk(dec.rdb == (valid && op == 4'h5), "rdb flag");
      chk(dec.illegal == (valid && op > 4'h5), "illegal flag");
      chk(dec.idx == idx, "idx");
      chk(dec.addr_z == 14'(z[6:0]), "addr_z");
      chk(dec.addr_a == 14'(a[6:0]), "addr_a");
      chk(dec.addr_b == 14'(b[6:0]), "addr_b");
      chk(dec.addr_c == 14'(c[6:0]), "addr_c");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
