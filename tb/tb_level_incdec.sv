// tb_level_incdec: exhaustive test of the 4-bit level incrementer/decrementer
// against level+1 and level-1 modulo 16.
module tb_level_incdec;
  logic       e;
  logic [3:0] level, next;
  int checks = 0, failures = 0;

  level_incdec dut (.e(e), .level(level), .next(next));

  initial begin
    for (int d = 0; d < 2; d++)
      for (int l = 0; l < 16; l++) begin
        e = d[0]; level = 4'(l);
        #1;
        checks++;
        if (next !== (d == 0 ? 4'(l + 1) : 4'(l - 1))) begin
          failures++;
          $display("FAIL e=%0d level=%0d next=%0d", d, l, next);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
