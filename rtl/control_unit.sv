// control_unit: the processor's control unit, made of two independent
// hardwired sequencers, CU_SP for the search phase and CU_EP for the
// execution phase, as the specification prescribes. Only one phase runs at a
// time: sp_start is ignored while the execution phase runs and ep_start while
// the search phase runs (and either while its own phase runs). The running
// sequencer drives the associative memory, the level incrementer/decrementer
// (e = 0 in the search phase, 1 in the execution phase) and the node counter
// (up in the search phase, down in the execution phase).
//
// The unit also keeps the result of the search phase: for every memory
// address, whether a parent was found for the node stored there and the
// parent's address (link table, DEPTH entries of ADDR_W+1 bits). The execution
// phase uses it to deliver each result to its parent. Where the original
// design keeps this information is not published; a table in the control
// unit is this design's choice.
//
// Timing: see cu_sp and cu_ep. The link table is written on the rising edge
// and read combinationally.
module control_unit
  import cbadp_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            sp_start,
  input  logic                            ep_start,
  input  logic [LEVEL_W-1:0]              max_level,
  output logic                            sp_busy,
  output logic                            sp_done,
  output logic                            sp_error,
  output logic                            ep_busy,
  output logic                            ep_done,
  // associative memory
  output cam_cmd_t                        cmd,
  input  logic [DEPTH-1:0]                responders,
  input  logic                            any_match,
  input  logic [ADDR_W-1:0]               first_addr,
  input  node_word_t                      rd_word,
  // level incrementer/decrementer
  output logic                            lid_e,
  output logic [LEVEL_W-1:0]              lid_level,
  input  logic [LEVEL_W-1:0]              lid_next,
  // node counter
  output logic                            cnt_clear,
  output logic                            cnt_en,
  output logic                            cnt_down,
  // counter-value register
  output logic                            cvr_load,
  output logic                            cvr_invalidate,
  // processing unit
  output logic [NUM_ALU-1:0]              alu_start,
  output opcode_e [NUM_ALU-1:0]           alu_op,
  output logic [NUM_ALU-1:0][DATA_W-1:0]  alu_a,
  output logic [NUM_ALU-1:0][DATA_W-1:0]  alu_b,
  input  logic [NUM_ALU-1:0]              alu_done,
  input  logic [NUM_ALU-1:0][DATA_W-1:0]  alu_result,
  output logic                            fr_clear,
  // host events (interrupts of both phases)
  output event_t                          ev
);

  cam_cmd_t           sp_cmd, ep_cmd;
  event_t             sp_ev, ep_ev;
  logic [LEVEL_W-1:0] sp_level, ep_level;
  logic               sp_cnt_en, ep_cnt_en;
  logic               link_clear, link_wr;
  logic [ADDR_W-1:0]  link_child, link_parent_w, link_addr;
  logic [DEPTH-1:0]   link_valid;
  logic [ADDR_W-1:0]  link_parent [DEPTH];

  cu_sp u_sp (
    .clk, .rst_n,
    .start          (sp_start && !ep_busy),
    .max_level,
    .busy           (sp_busy),
    .done           (sp_done),
    .error          (sp_error),
    .cur_level      (sp_level),
    .next_level     (lid_next),
    .cmd            (sp_cmd),
    .responders, .any_match, .first_addr, .rd_word,
    .cnt_clear,
    .cnt_en         (sp_cnt_en),
    .cvr_load, .cvr_invalidate,
    .link_clear, .link_wr, .link_child,
    .link_parent    (link_parent_w),
    .ev             (sp_ev)
  );

  cu_ep u_ep (
    .clk, .rst_n,
    .start          (ep_start && !sp_busy),
    .max_level,
    .busy           (ep_busy),
    .done           (ep_done),
    .cur_level      (ep_level),
    .next_level     (lid_next),
    .cmd            (ep_cmd),
    .responders, .any_match, .first_addr, .rd_word,
    .link_addr,
    .link_valid     (link_valid[link_addr]),
    .link_parent    (link_parent[link_addr]),
    .alu_start, .alu_op, .alu_a, .alu_b, .alu_done, .alu_result,
    .cnt_en         (ep_cnt_en),
    .fr_clear,
    .ev             (ep_ev)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) link_valid <= '0;
    else if (link_clear) link_valid <= '0;
    else if (link_wr) link_valid[link_child] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (link_wr) link_parent[link_child] <= link_parent_w;
  end

  assign cmd       = ep_busy ? ep_cmd : sp_cmd;
  assign ev        = ep_busy ? ep_ev : sp_ev;
  assign lid_e     = ep_busy;
  assign lid_level = ep_busy ? ep_level : sp_level;
  assign cnt_en    = sp_cnt_en | ep_cnt_en;
  assign cnt_down  = ep_busy;

endmodule
