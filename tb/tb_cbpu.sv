// tb_cbpu: the four ALUs of the processing unit are started together with
// different opcodes and operands (including a multiplication next to
// single-cycle operations); each ALU's result and flags are compared with the
// Gaussian-integer reference, and the done pulses must come after 1 cycle
// (and DATA_W+2 for multiplication) per ALU, independently of the others.
module tb_cbpu;
  import cbadp_pkg::*;
  import cbns_ref_pkg::*;
  localparam int N = DATA_W;
  logic clk = 0, rst_n = 0;
  logic [NUM_ALU-1:0] start = '0, busy, done;
  opcode_e [NUM_ALU-1:0] op;
  logic [NUM_ALU-1:0][N-1:0] a, b, result;
  flags_t [NUM_ALU-1:0] flags;
  int checks = 0, failures = 0;

  cbpu dut (.clk, .rst_n, .start, .opcode(op), .a, .b, .busy, .done, .result, .flags);
  always #5 clk = ~clk;

  task automatic group(input logic [NUM_ALU-1:0] en);
    int lat [NUM_ALU];
    logic [NUM_ALU-1:0] seen;
    logic [63:0] er;
    logic eo, eng;
    int cyc;
    for (int k = 0; k < NUM_ALU; k++) begin
      op[k] = opcode_e'($urandom % 13);
      a[k]  = N'($urandom % 4096);
      b[k]  = N'($urandom % 4096);
      lat[k] = 0;
    end
    if (en[0]) op[0] = OP_MUL;
    @(negedge clk);
    start = en;
    @(negedge clk);
    start = '0;
    seen = '0;
    cyc = 1;
    while (seen != en && cyc < 100) begin
      for (int k = 0; k < NUM_ALU; k++)
        if (done[k] && !seen[k]) begin seen[k] = 1'b1; lat[k] = cyc; end
      if (seen != en) begin @(negedge clk); cyc++; end
    end
    for (int k = 0; k < NUM_ALU; k++) if (en[k]) begin
      expect_op(int'(op[k]), 64'(a[k]), 64'(b[k]), N, er, eo, eng);
      checks++;
      if (result[k] !== N'(er) || flags[k].overflow !== eo || flags[k].negative !== eng) begin
        failures++;
        $display("FAIL alu%0d %s got %h exp %h", k, op[k].name(), result[k], N'(er));
      end
      checks++;
      if (lat[k] != ((op[k] == OP_MUL) ? N + 2 : 1)) begin
        failures++;
        $display("FAIL alu%0d latency %0d", k, lat[k]);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; op = '0;
    #22 rst_n = 1;
    for (int i = 0; i < 60; i++) group(i < 20 ? 4'hf : 4'($urandom % 15 + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
