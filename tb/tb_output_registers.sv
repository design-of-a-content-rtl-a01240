// tb_output_registers: per-ALU loading, hold and the read port of the four
// output registers ZR0..ZR3.
module tb_output_registers;
  import cbadp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NUM_ALU-1:0] load = '0;
  logic [NUM_ALU-1:0][DATA_W-1:0] d = '0, q, exp_q = '0;
  logic [1:0] rd_sel = 0;
  logic [DATA_W-1:0] rd_data;
  int checks = 0, failures = 0;

  output_registers dut (.clk, .rst_n, .load, .d, .q, .rd_sel, .rd_data);
  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    checks++; if (q !== '0) failures++;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = 4'($urandom);
      for (int k = 0; k < NUM_ALU; k++) d[k] = DATA_W'($urandom);
      rd_sel = 2'($urandom);
      @(posedge clk); #1;
      for (int k = 0; k < NUM_ALU; k++) if (load[k]) exp_q[k] = d[k];
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
