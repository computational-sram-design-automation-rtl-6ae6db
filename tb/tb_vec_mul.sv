// tb_vec_mul -- self-checking test of the 16 x 8-bit lane multipliers.
//
// Random and corner operands (0, 1, 255); every lane's result is compared
// with the low 8 bits of the integer product of that lane's operands.
module tb_vec_mul;
  logic [127:0] a, b, p;
  int checks = 0, failures = 0;

  vec_mul #(.WIDTH(128), .ELEM_W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      for (int l = 0; l < 16; l++) begin
        case (i % 4)
          0: begin a[l*8 +: 8] = 8'd255; b[l*8 +: 8] = 8'($urandom); end
          1: begin a[l*8 +: 8] = 8'(l); b[l*8 +: 8] = 8'd1; end
          default: begin a[l*8 +: 8] = 8'($urandom); b[l*8 +: 8] = 8'($urandom); end
        endcase
      end
      #1;
      for (int l = 0; l < 16; l++) begin
        int unsigned x, y;
        x = a[l*8 +: 8];
        y = b[l*8 +: 8];
        checks++;
        if (p[l*8 +: 8] != 8'((x * y) % 256)) begin
          failures++;
          $display("lane %0d: %0d * %0d gave %0d", l, x, y, p[l*8 +: 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
