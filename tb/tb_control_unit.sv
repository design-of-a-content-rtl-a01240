// tb_control_unit: the two phase sequencers (CU_SP, CU_EP) driving a real
// associative memory, processing unit, level incrementer/decrementer and node
// counter. Graph: X = a+b+c+d (N3 = N1 + N2, N1 = a + b, N2 = c + d) with N2
// disabled and a control node C at level 1 that enables N2. Checked: the exact
// event sequence of both phases (nodes found level by level in address order,
// children linked to N3, C firing before the level's action nodes execute,
// N1 and N2 started in the same cycle on ALU0 and ALU1, N3 last), the
// direction given to the level unit and the counter in each phase, the final
// counter values, the result written into N3's operand fields and the root
// result, and that a start of the other phase is ignored while a phase runs.
module tb_control_unit;
  import cbadp_pkg::*;
  import cbns_ref_pkg::*;

  logic clk = 0, rst_n = 0, sp_start = 0, ep_start = 0;
  logic [LEVEL_W-1:0] max_level = 4'd1;
  logic sp_busy, sp_done, sp_error, ep_busy, ep_done;
  cam_cmd_t cmd;
  logic [DEPTH-1:0] responders;
  logic any_match;
  logic [ADDR_W-1:0] first_addr;
  logic [WORD_W-1:0] rd_data, io_rd_data;
  logic lid_e;
  logic [LEVEL_W-1:0] lid_level, lid_next;
  logic cnt_clear, cnt_en, cnt_down, cvr_load, cvr_invalidate, fr_clear;
  logic [NUM_ALU-1:0] alu_start, alu_done, alu_busy;
  opcode_e [NUM_ALU-1:0] alu_op;
  logic [NUM_ALU-1:0][DATA_W-1:0] alu_a, alu_b, alu_result;
  flags_t [NUM_ALU-1:0] alu_flags;
  event_t ev;
  logic [5:0] count;
  logic tb_wr = 0;
  logic [ADDR_W-1:0] tb_addr = '0, io_rd_addr = '0;
  logic [WORD_W-1:0] tb_data = '0;

  control_unit dut (
    .clk, .rst_n, .sp_start, .ep_start, .max_level,
    .sp_busy, .sp_done, .sp_error, .ep_busy, .ep_done,
    .cmd, .responders, .any_match, .first_addr, .rd_word(node_word_t'(rd_data)),
    .lid_e, .lid_level, .lid_next, .cnt_clear, .cnt_en, .cnt_down,
    .cvr_load, .cvr_invalidate,
    .alu_start, .alu_op, .alu_a, .alu_b, .alu_done, .alu_result, .fr_clear, .ev);

  assoc_memory am (
    .clk, .rst_n, .clear_all(1'b0),
    .cmp_load(cmd.cmp_load), .cmp_in(cmd.cmp), .mask_load(cmd.mask_load), .mask_in(cmd.mask),
    .comparand(), .mask(), .search(cmd.search), .resp_clear(cmd.resp_clear),
    .responders, .any_match, .first_addr,
    .wr_en(tb_wr | cmd.wr_en), .wr_addr(tb_wr ? tb_addr : cmd.wr_addr),
    .wr_data(tb_wr ? tb_data : cmd.wr_data), .wr_bits(tb_wr ? '1 : cmd.wr_bits),
    .rd_addr(cmd.rd_addr), .rd_data, .io_rd_addr, .io_rd_data);

  cbpu pu (.clk, .rst_n, .start(alu_start), .opcode(alu_op), .a(alu_a), .b(alu_b),
           .busy(alu_busy), .done(alu_done), .result(alu_result), .flags(alu_flags));
  level_incdec lid (.e(lid_e), .level(lid_level), .next(lid_next));
  updown_counter cnt (.clk, .rst_n, .clear(cnt_clear), .en(cnt_en), .down(cnt_down), .q(count));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // expected event stream
  typedef struct { event_e code; int node; } exp_ev_t;
  exp_ev_t exp_q [$];
  int ev_idx = 0;
  int par_start = 0;
  int cvr_loads = 0;

  always @(posedge clk) if (rst_n) begin
    if (ev.valid) begin
      checks++;
      if (ev_idx >= exp_q.size() || ev.code != exp_q[ev_idx].code || int'(ev.node) != exp_q[ev_idx].node) begin
        failures++;
        $display("FAIL event %0d: %s node %0d", ev_idx, ev.code.name(), ev.node);
      end
      ev_idx++;
    end
    if (cnt_en) begin
      checks++;
      if (cnt_down !== ep_busy || lid_e !== ep_busy) begin failures++; $display("FAIL direction"); end
    end
    if (alu_start == 4'b0011) par_start++;
    if (cvr_load) begin
      cvr_loads++;
      checks++;
      if (count !== 6'd4) begin failures++; $display("FAIL count at end of search %0d", count); end
    end
  end

  task automatic put(input int addr, input node_word_t w);
    @(negedge clk); tb_wr = 1; tb_addr = ADDR_W'(addr); tb_data = w;
    @(negedge clk); tb_wr = 0;
  endtask

  initial begin
    node_word_t n3, n1, n2, c;
    logic [DATA_W-1:0] a, b, cc, d;
    logic [127:0] s1, s2, x;
    int cyc;
    a = 24'h1234; b = 24'h0f0f; cc = 24'h00ab; d = 24'h3c3c;
    #22 rst_n = 1;
    n3 = '0; n3.is_action = 1; n3.enable = 1; n3.level = 0; n3.node_id = 10; n3.opcode = OP_ADD;
    n1 = '0; n1.is_action = 1; n1.enable = 1; n1.level = 1; n1.node_id = 11; n1.parent_id = 10;
    n1.slot = 0; n1.opcode = OP_ADD; n1.a_rdy = 1; n1.b_rdy = 1; n1.opa = a; n1.opb = b;
    n2 = n1; n2.node_id = 12; n2.slot = 1; n2.opa = cc; n2.opb = d; n2.enable = 0;
    c = '0; c.is_action = 0; c.enable = 1; c.level = 1; c.node_id = 13; c.parent_id = 12;
    put(40, n2); put(7, n3); put(20, n1); put(33, c);

    exp_q.push_back('{EV_NODE_FOUND, 10});
    exp_q.push_back('{EV_CHILD_LINK, 11});
    exp_q.push_back('{EV_CHILD_LINK, 12});
    exp_q.push_back('{EV_NODE_FOUND, 11});
    exp_q.push_back('{EV_NODE_FOUND, 13});
    exp_q.push_back('{EV_NODE_FOUND, 12});
    exp_q.push_back('{EV_CTRL_FIRED, 13});
    exp_q.push_back('{EV_NODE_EXEC, 11});
    exp_q.push_back('{EV_NODE_EXEC, 12});
    exp_q.push_back('{EV_NODE_EXEC, 10});

    @(negedge clk); sp_start = 1; @(negedge clk); sp_start = 0;
    ep_start = 1; @(negedge clk); ep_start = 0;          // must be ignored
    cyc = 0;
    while (!sp_done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks++;
    if (ep_busy || sp_error || cvr_loads != 1) begin failures++; $display("FAIL search phase"); end
    @(negedge clk); ep_start = 1; @(negedge clk); ep_start = 0;
    sp_start = 1; @(negedge clk); sp_start = 0;          // must be ignored
    cyc = 0;
    while (!ep_done && cyc < 1000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    s1 = from_gauss(gadd(to_gauss(128'(a), DATA_W), to_gauss(128'(b), DATA_W)));
    s2 = from_gauss(gadd(to_gauss(128'(cc), DATA_W), to_gauss(128'(d), DATA_W)));
    x  = from_gauss(gadd(to_gauss(128'(s1[DATA_W-1:0]), DATA_W), to_gauss(128'(s2[DATA_W-1:0]), DATA_W)));
    io_rd_addr = 7; #1;
    n3 = node_word_t'(io_rd_data);
    checks++;
    if (n3.opa !== s1[DATA_W-1:0] || n3.opb !== s2[DATA_W-1:0] || !n3.a_rdy || !n3.b_rdy) begin
      failures++; $display("FAIL N3 operands");
    end
    checks++;
    if (alu_result[0] !== x[DATA_W-1:0]) begin failures++; $display("FAIL X %h", alu_result[0]); end
    checks++;
    if (count !== 6'd0 || sp_busy || ev_idx != exp_q.size() || par_start != 1) begin
      failures++; $display("FAIL end count %0d events %0d par %0d", count, ev_idx, par_start);
    end
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
