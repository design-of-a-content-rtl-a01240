// tb_updown_counter: the 6-bit node counter is stepped up through a full wrap,
// down through a full wrap and in random directions with random enables; q is
// compared every cycle with a modulo-64 reference count. Clear and reset are
// checked too.
module tb_updown_counter;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, down = 0;
  logic [5:0] q;
  int ref_q = 0;
  int checks = 0, failures = 0;

  updown_counter dut (.clk, .rst_n, .clear, .en, .down, .q);
  always #5 clk = ~clk;

  task automatic step(input logic c, input logic e, input logic d);
    clear = c; en = e; down = d;
    @(posedge clk); #1;
    if (c) ref_q = 0;
    else if (e) ref_q = d ? (ref_q + 63) % 64 : (ref_q + 1) % 64;
    checks++;
    if (q !== 6'(ref_q)) begin
      failures++;
      $display("FAIL q=%0d exp=%0d", q, ref_q);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    checks++; if (q !== 0) failures++;
    for (int i = 0; i < 70; i++) step(0, 1, 0);
    for (int i = 0; i < 70; i++) step(0, 1, 1);
    for (int i = 0; i < 400; i++) step(($urandom % 40) == 0, ($urandom % 4) != 0, $urandom % 2);
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
