// tb_cbns_adder: self-checking test of the complex binary adder. Random and
// directed operand pairs of 24 digits in a 34-digit adder; every sum is
// compared with the Gaussian-integer reference (cbns_ref_pkg). Checks the
// digit rule 1+1 = 1100, the zero rule 11 + 111 = 0 (sum 0 with a carry out
// of the 24-digit word) and that a sum needing more than 24 digits always
// reports a carry out.
module tb_cbns_adder;
  import cbns_ref_pkg::*;
  localparam int W = 34, N = 24;
  logic [W-1:0] a, b, s;
  logic         c;
  int checks = 0, failures = 0;

  cbns_adder #(.W(W), .CARRY_POS(N)) dut (.a(a), .b(b), .sum(s), .carry_out(c));

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [127:0] exp;
    a = x; b = y;
    #1;
    exp = from_gauss(gadd(to_gauss({94'd0, x}, W), to_gauss({94'd0, y}, W)));
    checks++;
    if (s !== exp[W-1:0]) begin
      failures++;
      $display("FAIL %h + %h: got %h exp %h", x, y, s, exp[W-1:0]);
    end
    if (|exp[127:N] && !c) begin
      failures++;
      $display("FAIL %h + %h: long sum without carry", x, y);
    end
  endtask

  initial begin
    check(1, 1);
    checks++; if (s !== 34'b1100 || c) begin failures++; $display("FAIL 1+1"); end
    check(34'b11, 34'b111);
    checks++; if (s !== '0 || !c) begin failures++; $display("FAIL zero rule s=%h c=%b", s, c); end
    check(0, 0);
    check(34'hff_ffff, 34'hff_ffff);
    for (int i = 0; i < 3000; i++)
      check(W'({$urandom} & 32'hff_ffff), W'({$urandom} & 32'hff_ffff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
