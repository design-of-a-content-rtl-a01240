// tb_level_register: reset value, load and hold of the 4-bit level register.
module tb_level_register;
  logic clk = 0, rst_n = 0, load = 0;
  logic [3:0] d = 0, q;
  logic [3:0] exp_q = 0;
  int checks = 0, failures = 0;

  level_register dut (.clk, .rst_n, .load, .d, .q);
  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    checks++; if (q !== 0) failures++;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      load = $urandom % 2;
      d = 4'($urandom);
      @(posedge clk); #1;
      if (load) exp_q = d;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL q=%0d exp=%0d", q, exp_q); end
    end
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
