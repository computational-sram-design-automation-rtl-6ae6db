// tb_vec_add -- self-checking test of the 16 x 8-bit lane adders.
//
// Random operands and all-ones operands: every lane must equal the integer
// sum modulo 256, with no carry leaking into the next lane.
module tb_vec_add;
  logic [127:0] a, b, s;
  int checks = 0, failures = 0;

  vec_add #(.WIDTH(128), .ELEM_W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = (i % 5 == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int l = 0; l < 16; l++) begin
        int unsigned x, y;
        x = a[l*8 +: 8];
        y = b[l*8 +: 8];
        checks++;
        if (s[l*8 +: 8] != 8'((x + y) % 256)) begin
          failures++;
          $display("lane %0d: %0d + %0d gave %0d", l, x, y, s[l*8 +: 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
