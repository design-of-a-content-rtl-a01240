// tb_counter_value_register: load, hold, valid bit and invalidate of the
// 6-bit counter-value register.
module tb_counter_value_register;
  logic clk = 0, rst_n = 0, load = 0, invalidate = 0;
  logic [5:0] d = 0, q;
  logic valid;
  logic [5:0] exp_q = 0;
  logic exp_v = 0;
  int checks = 0, failures = 0;

  counter_value_register dut (.clk, .rst_n, .load, .invalidate, .d, .q, .valid);
  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    checks++; if (q !== 0 || valid !== 0) failures++;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = ($urandom % 3) == 0;
      invalidate = ($urandom % 4) == 0;
      d = 6'($urandom);
      @(posedge clk); #1;
      if (load) begin exp_q = d; exp_v = 1; end
      else if (invalidate) exp_v = 0;
      checks++;
      if (q !== exp_q || valid !== exp_v) begin
        failures++; $display("FAIL q=%0d v=%b exp %0d %b", q, valid, exp_q, exp_v);
      end
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
