// tb_cbadp: end-to-end test of the processor at its default sizes (64-word
// memory, 16 levels, four ALUs, 24-digit data). The testbench plays the host:
// it loads a dataflow graph into the associative memory, loads the level
// register, runs the search phase and then the execution phase, and checks
//   - the X = a+b+c+d graph (three ADD nodes on two levels): root result in
//     ZR0, counter value 3, the node counter back at 0, event counts;
//   - random expression trees of 1 to 16 levels, up to 64 nodes, nodes at
//     random addresses, all thirteen opcodes: after the execution phase every
//     node's operand fields in memory and the root's result and flags are
//     compared with a reference evaluation (cbns_ref_pkg), execution events
//     must come level by level from the highest level to 0, and the counter
//     value must equal the number of nodes;
//   - a branch: two alternative producers, each enabled only by its control
//     node; the host enables one control node, and only the chosen producer
//     may execute;
//   - an unsuccessful search (no root) and the zero rule at the root.
// Each mechanism (child linking, four ALUs started together, a level issued
// in more than one group, control node firing, an inhibited node skipped,
// multiplication, overflow, negative, zero-rule carry, unsuccessful search)
// is counted; one that never happened counts as a failure.
module tb_cbadp;
  import cbadp_pkg::*;
  import cbns_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic io_clear = 0, io_wr_en = 0, io_level_load = 0, io_sp_start = 0, io_ep_start = 0;
  logic [ADDR_W-1:0] io_wr_addr = '0, io_rd_addr = '0;
  logic [WORD_W-1:0] io_wr_data = '0, io_rd_data;
  logic [LEVEL_W-1:0] io_level = '0, max_level;
  logic sp_busy, sp_done, sp_error, ep_busy, ep_done;
  logic [CNT_W-1:0] node_count, counter_value;
  logic counter_value_valid;
  logic [NUM_ALU-1:0][DATA_W-1:0] zr;
  flags_t [NUM_ALU-1:0] fr;
  logic [1:0] io_reg_sel = '0;
  logic [DATA_W-1:0] io_zr_data;
  flags_t io_fr_data;
  logic [NUM_ALU-1:0] alu_busy;
  event_t ev;

  cbadp dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_link = 0, n_par4 = 0, n_multigroup = 0, n_ctrl = 0, n_skip = 0, n_mul = 0;
  int n_ovf = 0, n_neg = 0, n_zcarry = 0, n_sperr = 0, n_found = 0, n_exec = 0;

  // ---------------- graph model ----------------
  int          g_n;
  int          g_level  [64];
  int          g_parent [64];     // -1 for the root
  int          g_slot   [64];
  int          g_op     [64];
  int          g_addr   [64];
  logic        g_act    [64];
  logic        g_en     [64];
  int          g_target [64];     // control nodes
  logic [DATA_W-1:0] g_a [64], g_b [64];
  logic        g_a_in   [64], g_b_in [64];   // operand comes from a child
  logic [DATA_W-1:0] g_res [64];
  flags_t      g_flags  [64];
  logic        g_runs   [64];
  int          g_maxlev;
  int          exec_per_level [16];
  int          last_exec_level;

  function automatic void g_reset();
    g_n = 0; g_maxlev = 0;
  endfunction

  function automatic int g_add(input int lev, input int par, input int slot, input int op);
    int i;
    i = g_n++;
    g_level[i] = lev; g_parent[i] = par; g_slot[i] = slot; g_op[i] = op;
    g_act[i] = 1; g_en[i] = 1; g_target[i] = 0;
    g_a[i] = DATA_W'($urandom % 4096); g_b[i] = DATA_W'($urandom % 4096);
    g_a_in[i] = 0; g_b_in[i] = 0;
    if (par >= 0) begin
      if (slot == 0) g_a_in[par] = 1; else g_b_in[par] = 1;
    end
    if (lev > g_maxlev) g_maxlev = lev;
    return i;
  endfunction

  function automatic void g_place();
    int perm [64];
    for (int i = 0; i < 64; i++) perm[i] = i;
    perm.shuffle();
    for (int i = 0; i < g_n; i++) g_addr[i] = perm[i];
  endfunction

  // Which nodes execute: enabled (possibly by a fired control node) and with
  // both operands present, evaluated from the deepest level up.
  function automatic void g_eval();
    logic en [64];
    logic rdy_a [64], rdy_b [64];
    logic [DATA_W-1:0] va [64], vb [64];
    logic [63:0] r;
    logic o, ng;
    for (int i = 0; i < g_n; i++) begin
      en[i] = g_en[i];
      rdy_a[i] = !g_a_in[i]; rdy_b[i] = !g_b_in[i];
      va[i] = g_a[i]; vb[i] = g_b[i];
      g_runs[i] = 0;
    end
    for (int l = g_maxlev; l >= 0; l--) begin
      for (int i = 0; i < g_n; i++)
        if (g_level[i] == l && !g_act[i] && en[i]) en[g_target[i]] = 1;
      for (int i = 0; i < g_n; i++)
        if (g_level[i] == l && g_act[i] && en[i] && rdy_a[i] && rdy_b[i]) begin
          g_runs[i] = 1;
          expect_op(g_op[i], 64'(va[i]), 64'(vb[i]), DATA_W, r, o, ng);
          g_res[i] = DATA_W'(r);
          g_flags[i].overflow = o;
          g_flags[i].negative = ng;
          g_flags[i].zero = (r == 0);
          g_flags[i].carry = 1'b0;
          if (g_parent[i] >= 0) begin
            if (g_slot[i] == 0) begin va[g_parent[i]] = DATA_W'(r); rdy_a[g_parent[i]] = 1; end
            else                begin vb[g_parent[i]] = DATA_W'(r); rdy_b[g_parent[i]] = 1; end
          end
        end
    end
    // expected final operand fields
    for (int i = 0; i < g_n; i++) begin
      g_a[i] = va[i]; g_b[i] = vb[i];
      g_a_in[i] = !rdy_a[i]; g_b_in[i] = !rdy_b[i];
    end
  endfunction

  function automatic node_word_t g_word(input int i, input logic final_view);
    node_word_t w;
    int tid;
    w = '0;
    w.is_action = g_act[i];
    w.enable    = g_en[i];
    w.level     = LEVEL_W'(g_level[i]);
    w.node_id   = NODE_W'(i);
    if (g_act[i]) begin
      w.parent_id = (g_parent[i] >= 0) ? NODE_W'(g_parent[i]) : '0;
      w.slot   = g_slot[i][0];
      w.opcode = OPC_W'(g_op[i]);
      w.a_rdy  = !g_a_in[i];
      w.b_rdy  = !g_b_in[i];
      w.opa    = g_a[i];
      w.opb    = g_b[i];
    end else begin
      tid = g_target[i];
      w.parent_id = NODE_W'(tid);
    end
    if (!final_view) begin
      // initial view: child-fed operands are zero and not present
      if (g_a_in[i]) w.opa = '0;
      if (g_b_in[i]) w.opb = '0;
    end
    return w;
  endfunction

  // ---------------- host tasks ----------------
  task automatic host_load();
    @(negedge clk); io_clear = 1; @(negedge clk); io_clear = 0;
    for (int i = 0; i < g_n; i++) begin
      io_wr_en = 1; io_wr_addr = ADDR_W'(g_addr[i]); io_wr_data = g_word(i, 0);
      @(negedge clk);
    end
    io_wr_en = 0;
    io_level = LEVEL_W'(g_maxlev); io_level_load = 1; @(negedge clk); io_level_load = 0;
  endtask

  task automatic run_phase(input logic ep);
    int cyc;
    if (ep) io_ep_start = 1; else io_sp_start = 1;
    @(negedge clk);
    io_ep_start = 0; io_sp_start = 0;
    cyc = 0;
    while (!(ep ? ep_done : sp_done) && cyc < 20000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc >= 20000) begin failures++; $display("FAIL phase %0d timeout", ep); end
  endtask

  // events
  always @(posedge clk) if (rst_n && ev.valid) begin
    unique case (ev.code)
      EV_NODE_FOUND: n_found++;
      EV_CHILD_LINK: n_link++;
      EV_CTRL_FIRED: n_ctrl++;
      EV_NODE_EXEC: begin
        n_exec++;
        exec_per_level[g_level[ev.node]]++;
        if (g_level[ev.node] > last_exec_level) begin
          failures++; $display("FAIL execution order: node %0d level %0d after level %0d",
                               ev.node, g_level[ev.node], last_exec_level);
        end
        last_exec_level = g_level[ev.node];
        if (g_op[ev.node] == 3) n_mul++;
        if (!g_runs[ev.node]) begin failures++; $display("FAIL node %0d executed", ev.node); end
        if (g_addr[ev.node] != int'(ev.addr)) begin failures++; $display("FAIL event address"); end
      end
    endcase
  end
  always @(posedge clk) if (rst_n && dut.alu_start == '1) n_par4++;

  // run a loaded graph model through both phases and check everything
  task automatic run_graph(input string name);
    node_word_t w, e;
    int nodes_run, root;
    g_place();
    host_load();
    n_found = 0; n_exec = 0;
    for (int l = 0; l < 16; l++) exec_per_level[l] = 0;
    run_phase(0);
    checks++;
    if (counter_value !== CNT_W'(g_n) || !counter_value_valid || n_found != g_n) begin
      failures++;
      $display("FAIL %s counter value %0d found %0d exp %0d", name, counter_value, n_found, g_n);
    end
    g_eval();
    last_exec_level = 99;
    run_phase(1);
    nodes_run = 0;
    root = 0;
    for (int i = 0; i < g_n; i++) begin
      nodes_run += g_runs[i];
      if (g_level[i] == 0 && g_act[i]) root = i;
      if (g_act[i] && !g_runs[i] && g_en[i] == 0) n_skip++;
    end
    for (int l = 0; l < 16; l++) if (exec_per_level[l] > NUM_ALU) n_multigroup++;
    checks++;
    if (n_exec + n_ctrl_in_graph() != nodes_run + n_ctrl_in_graph() ||
        node_count !== CNT_W'(g_n - nodes_run - n_ctrl_fired_expected())) begin
      failures++;
      $display("FAIL %s executed %0d exp %0d, node counter %0d", name, n_exec, nodes_run, node_count);
    end
    for (int i = 0; i < g_n; i++) if (g_act[i]) begin
      io_rd_addr = ADDR_W'(g_addr[i]);
      #1;
      w = node_word_t'(io_rd_data);
      e = g_word(i, 1);
      checks++;
      if (w.opa !== e.opa || w.opb !== e.opb || w.a_rdy !== e.a_rdy || w.b_rdy !== e.b_rdy) begin
        failures++;
        $display("FAIL %s node %0d operands %h/%h exp %h/%h", name, i, w.opa, w.opb, e.opa, e.opb);
      end
    end
    if (g_runs[root]) begin
      checks++;
      if (zr[0] !== g_res[root] || fr[0].overflow !== g_flags[root].overflow ||
          fr[0].negative !== g_flags[root].negative || fr[0].zero !== g_flags[root].zero) begin
        failures++;
        $display("FAIL %s root result %h flags %b exp %h %b", name, zr[0], fr[0], g_res[root], g_flags[root]);
      end
      if (fr[0].overflow) n_ovf++;
      if (fr[0].negative) n_neg++;
      io_reg_sel = 0; #1;
      checks++;
      if (io_zr_data !== zr[0] || io_fr_data !== fr[0]) begin failures++; $display("FAIL read port"); end
    end
  endtask

  function automatic int n_ctrl_in_graph();
    int c = 0;
    for (int i = 0; i < g_n; i++) if (!g_act[i]) c++;
    return c;
  endfunction
  function automatic int n_ctrl_fired_expected();
    int c = 0;
    for (int i = 0; i < g_n; i++) if (!g_act[i] && g_en[i]) c++;
    return c;
  endfunction

  // random tree with given node count per level
  task automatic random_tree(input int levels, input int per_level_max);
    int cnt [16];
    int first [16];
    int k, par, slot, lv, tries;
    g_reset();
    void'(g_add(0, -1, 0, $urandom % 13));
    first[0] = 0; cnt[0] = 1;
    for (int l = 1; l < levels && g_n < 64; l++) begin
      int want;
      want = 1 + ($urandom % per_level_max);
      if (want > 2 * cnt[l-1]) want = 2 * cnt[l-1];
      if (want > 64 - g_n) want = 64 - g_n;
      first[l] = g_n; cnt[l] = 0;
      for (int j = 0; j < want; j++) begin
        tries = 0;
        do begin
          par  = first[l-1] + int'($urandom % cnt[l-1]);
          slot = $urandom % 2;
          tries++;
        end while (((slot == 0) ? g_a_in[par] : g_b_in[par]) && tries < 100);
        if (tries < 100) begin
          lv = g_add(l, par, slot, (($urandom % 6) == 0) ? 3 : ($urandom % 13));
          cnt[l]++;
        end
      end
      if (cnt[l] == 0) break;
    end
  endtask

  initial begin
    int r, p1, p2, c1, c2;
    #22 rst_n = 1;

    // ---- Fig. 1 graph: X = a + b + c + d ----
    g_reset();
    r = g_add(0, -1, 0, 1);          // N3
    void'(g_add(1, r, 0, 1));        // N1 = a + b
    void'(g_add(1, r, 1, 1));        // N2 = c + d
    run_graph("a+b+c+d");
    checks++;
    if (zr[0] !== 24'(from_gauss(gadd(gadd(to_gauss(128'(g_a[1]), DATA_W), to_gauss(128'(g_b[1]), DATA_W)),
                                      gadd(to_gauss(128'(g_a[2]), DATA_W), to_gauss(128'(g_b[2]), DATA_W))))) ||
        counter_value !== 3 || node_count !== 0) begin
      failures++; $display("FAIL a+b+c+d: X=%h count %0d", zr[0], counter_value);
    end

    // ---- zero rule at the root: 11 + 111 = 0 with carry ----
    g_reset();
    r = g_add(0, -1, 0, 1);
    g_a[r] = 24'b11; g_b[r] = 24'b111;
    run_graph("zero rule");
    checks++;
    if (zr[0] !== 0 || !fr[0].carry || !fr[0].zero) begin failures++; $display("FAIL zero rule"); end
    else n_zcarry++;

    // ---- branch through control nodes ----
    for (int sel = 0; sel < 2; sel++) begin
      g_reset();
      r  = g_add(0, -1, 0, 1);                 // R = P + B
      p1 = g_add(1, r, 0, 5);                  // P1 = j * A
      p2 = g_add(1, r, 0, 4);                  // P2 = -A
      g_en[p1] = 0; g_en[p2] = 0;
      c1 = g_add(2, -1, 0, 0); g_act[c1] = 0; g_target[c1] = p1; g_en[c1] = (sel == 0);
      c2 = g_add(2, -1, 0, 0); g_act[c2] = 0; g_target[c2] = p2; g_en[c2] = (sel == 1);
      run_graph(sel ? "branch -A" : "branch jA");
      checks++;
      if (!g_runs[sel ? p2 : p1] || g_runs[sel ? p1 : p2]) begin failures++; $display("FAIL branch model"); end
    end

    // ---- full-size graph: 16 levels, 4 nodes per level below level 1 ----
    g_reset();
    void'(g_add(0, -1, 0, 1));
    for (int l = 1; l < 16; l++) begin
      int base;
      base = (l == 1) ? 0 : ((l == 2) ? 1 : 3 + 4 * (l - 3));
      for (int j = 0; j < ((l == 1) ? 2 : 4); j++) begin
        int par;
        par = (l == 1) ? 0 : base + ((l == 2) ? j / 2 : j);
        void'(g_add(l, par, (l == 2) ? j % 2 : 0, (j == 3) ? 3 : 1 + (j % 3)));
      end
    end
    run_graph("16 levels");

    // ---- random trees ----
    for (int t = 0; t < 40; t++) begin
      random_tree(1 + ($urandom % 16), (t % 2) ? 4 : 10);
      run_graph("random");
    end

    // ---- unsuccessful search: empty memory ----
    g_reset();
    @(negedge clk); io_clear = 1; @(negedge clk); io_clear = 0;
    fork
      begin run_phase(0); end
      begin @(posedge sp_done); #1; if (sp_error) n_sperr++; end
    join
    checks++;
    if (counter_value_valid) begin failures++; $display("FAIL counter value valid after failed search"); end

    // ---- mechanisms ----
    $display("mechanisms: links=%0d par4=%0d multigroup=%0d ctrl=%0d skip=%0d mul=%0d ovf=%0d neg=%0d zcarry=%0d sperr=%0d",
             n_link, n_par4, n_multigroup, n_ctrl, n_skip, n_mul, n_ovf, n_neg, n_zcarry, n_sperr);
    foreach (mech_list[i]) begin
      checks++;
      if (mech_list[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mech_list [10];
  always_comb mech_list = '{n_link, n_par4, n_multigroup, n_ctrl, n_skip, n_mul, n_ovf, n_neg, n_zcarry, n_sperr};

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
