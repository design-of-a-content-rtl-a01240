// tb_flags_registers: per-ALU loading, clear and the read port of the four
// flag registers FR0..FR3.
module tb_flags_registers;
  import cbadp_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [NUM_ALU-1:0] load = '0;
  flags_t [NUM_ALU-1:0] d = '0, q, exp_q = '0;
  logic [1:0] rd_sel = 0;
  flags_t rd_data;
  int checks = 0, failures = 0;

  flags_registers dut (.clk, .rst_n, .clear, .load, .d, .q, .rd_sel, .rd_data);
  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = 4'($urandom);
      clear = ($urandom % 10) == 0;
      d = 16'($urandom);
      rd_sel = 2'($urandom);
      @(posedge clk); #1;
      if (clear) exp_q = '0;
      else for (int k = 0; k < NUM_ALU; k++) if (load[k]) exp_q[k] = d[k];
      checks++;
      if (q !== exp_q || rd_data !== exp_q[rd_sel]) begin
        failures++; $display("FAIL q=%h exp=%h", q, exp_q);
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
