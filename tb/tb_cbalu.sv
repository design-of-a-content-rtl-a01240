// tb_cbalu: self-checking test of one complex binary ALU at its default width
// (24 digits). Every opcode is run with random operands (full-width and small
// ones, so both exact and overflowing results occur) and with directed cases,
// among them the conversions of 2, -1 and -j (opcode CONV);
// result, zero, negative and overflow are compared with the Gaussian-integer
// reference, carry is checked against the zero rule (11 + 111) and must be
// set whenever an addition overflows. The cycle count from start to done is
// checked: 1 for every opcode but MUL, DATA_W+2 for MUL.
module tb_cbalu;
  import cbadp_pkg::*;
  import cbns_ref_pkg::*;
  localparam int N = DATA_W;
  logic clk = 0, rst_n = 0, start = 0;
  opcode_e op;
  logic [N-1:0] a, b, result;
  logic busy, done;
  flags_t flags;
  int checks = 0, failures = 0;
  int ovf_seen = 0, neg_seen = 0, zero_seen = 0;

  cbalu dut (.clk, .rst_n, .start, .opcode(op), .a, .b, .busy, .done, .result, .flags);
  always #5 clk = ~clk;

  task automatic run(input opcode_e o, input logic [N-1:0] x, input logic [N-1:0] y);
    logic [63:0] er;
    logic eo, en;
    int cyc;
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    expect_op(int'(o), 64'(x), 64'(y), N, er, eo, en);
    checks++;
    if (result !== N'(er) || flags.overflow !== eo || flags.negative !== en ||
        flags.zero !== (er == 0)) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h ovf%b neg%b z%b exp %h ovf%b neg%b", o.name(), x, y,
               result, flags.overflow, flags.negative, flags.zero, N'(er), eo, en);
    end
    checks++;
    if (cyc != ((o == OP_MUL) ? N + 2 : 1)) begin
      failures++;
      $display("FAIL %s latency %0d", o.name(), cyc);
    end
    checks++;
    if ((o == OP_ADD || o == OP_SUB) ? (eo && !flags.carry) : flags.carry) begin
      failures++;
      $display("FAIL %s carry flag", o.name());
    end
    ovf_seen  += eo;
    neg_seen  += en;
    zero_seen += (er == 0);
  endtask

  function automatic logic [N-1:0] rnd(input int sm);
    return sm ? N'($urandom % 256) : N'($urandom);
  endfunction

  initial begin
    a = 0; b = 0; op = OP_PASSA;
    #22 rst_n = 1;
    run(OP_ADD, 1, 1);                          // 1 + 1 = 1100
    checks++; if (result !== 24'b1100) failures++;
    run(OP_ADD, 24'b11, 24'b111);               // zero rule
    checks++; if (result !== 0 || !flags.carry || flags.overflow || !flags.zero) failures++;
    run(OP_NEG, 1, 0);                          // -1 = 11101
    checks++; if (result !== 24'b11101) failures++;
    run(OP_MULJ, 1, 0);                         // j = 11
    checks++; if (result !== 24'b11) failures++;
    run(OP_MULNJ, 1, 0);                        // -j = 111
    checks++; if (result !== 24'b111) failures++;
    run(OP_SUB, 24'h5a5, 24'h5a5);
    run(OP_CONV, 24'd2, 24'd0);                 // 2 = 1100
    checks++; if (result !== 24'b1100) failures++;
    run(OP_CONV, 24'hfff, 24'd0);               // -1 = 11101
    checks++; if (result !== 24'b11101) failures++;
    run(OP_CONV, 24'd0, 24'hfff);               // -j = 111
    checks++; if (result !== 24'b111) failures++;
    for (int i = 0; i < 200; i++) run(OP_CONV, rnd(0), rnd(0));
    for (int i = 0; i < 400; i++) begin
      int s;
      s = $urandom % 2;
      run(opcode_e'($urandom % 13), rnd(s), rnd(s));
    end
    for (int i = 0; i < 30; i++) run(OP_MUL, rnd(0), rnd(0));
    checks++;
    if (ovf_seen == 0 || neg_seen == 0 || zero_seen == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d neg=%0d zero=%0d", ovf_seen, neg_seen, zero_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
