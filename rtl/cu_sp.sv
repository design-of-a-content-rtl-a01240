// cu_sp: hardwired control unit of the search phase.
//
// In the search phase the dataflow graph is looked at upside down: the root
// is at level 0 and every parent searches the associative memory for its
// children. This sequencer walks the levels from 0 up to the highest level
// (level register), the level number being advanced by the level
// incrementer. At each level it
//   1. searches for all nodes of that level (comparand: level, mask: level
//      field) and keeps the responders as the level's parents,
//   2. visits the parents one by one (lowest address first): the node counter
//      counts up and a NODE_FOUND event tells the host the node number and
//      address,
//   3. for an action-node parent below the highest level, searches in one
//      parallel step for the action nodes whose parent field names it and
//      whose level is one more (the incrementer's output goes into the
//      comparand's level field); each responder is linked to the parent
//      (link_wr: child address -> parent address) and reported with a
//      CHILD_LINK event.
// After the highest level the node count is loaded into the counter-value
// register (cvr_load) and done pulses. A search that finds no node at level 0
// is unsuccessful: done and error pulse together and the counter-value
// register keeps no value.
//
// The walk above is this design's reading of the search phase; the sequence
// of control steps of the original unit is not published. Each comparand/mask
// load takes one cycle, each search one, each visited node and each linked
// child one.
module cu_sp
  import cbadp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [LEVEL_W-1:0] max_level,
  output logic               busy,
  output logic               done,
  output logic               error,
  // level incrementer
  output logic [LEVEL_W-1:0] cur_level,
  input  logic [LEVEL_W-1:0] next_level,
  // associative memory
  output cam_cmd_t           cmd,
  input  logic [DEPTH-1:0]   responders,
  input  logic               any_match,
  input  logic [ADDR_W-1:0]  first_addr,
  input  node_word_t         rd_word,
  // node counter and counter-value register
  output logic               cnt_clear,
  output logic               cnt_en,
  output logic               cvr_load,
  output logic               cvr_invalidate,
  // child -> parent links
  output logic               link_clear,
  output logic               link_wr,
  output logic [ADDR_W-1:0]  link_child,
  output logic [ADDR_W-1:0]  link_parent,
  // host events
  output event_t             ev
);

  typedef enum logic [3:0] {
    S_IDLE, S_LVL_CMP, S_LVL_SRCH, S_LVL_SAVE, S_PICK,
    S_CH_CMP, S_CH_SRCH, S_CH_PICK, S_FIN
  } state_e;

  state_e            state;
  logic [DEPTH-1:0]  pending;
  logic [ADDR_W-1:0] par_addr;
  logic [NODE_W-1:0] par_node;
  logic              found_root;
  logic [ADDR_W-1:0] p;
  node_word_t        cw, mw;

  assign p    = lowest(pending);
  assign busy = (state != S_IDLE);

  // comparand and mask for the two kinds of search
  always_comb begin
    cw = '0;
    mw = '0;
    if (state == S_CH_CMP) begin
      cw.is_action = 1'b1;      mw.is_action = 1'b1;
      cw.parent_id = par_node;  mw.parent_id = '1;
      cw.level     = next_level; mw.level    = '1;
    end else begin
      cw.level = cur_level;     mw.level = '1;
    end
  end

  always_comb begin
    cmd            = '0;
    cmd.cmp        = cw;
    cmd.mask       = mw;
    cmd.rd_addr    = (state == S_CH_PICK) ? first_addr : p;
    cmd.cmp_load   = (state == S_LVL_CMP) || (state == S_CH_CMP);
    cmd.mask_load  = cmd.cmp_load;
    cmd.search     = (state == S_LVL_SRCH) || (state == S_CH_SRCH);
    cmd.resp_clear = (state == S_CH_PICK) && any_match;
    cnt_clear      = (state == S_IDLE) && start;
    cvr_invalidate = cnt_clear;
    link_clear     = cnt_clear;
    cnt_en         = (state == S_PICK) && (pending != '0);
    cvr_load       = (state == S_FIN) && found_root;
    link_wr        = (state == S_CH_PICK) && any_match;
    link_child     = first_addr;
    link_parent    = par_addr;
    ev             = '0;
    if (cnt_en) begin
      ev.valid = 1'b1; ev.code = EV_NODE_FOUND; ev.node = rd_word.node_id; ev.addr = p;
    end else if (link_wr) begin
      ev.valid = 1'b1; ev.code = EV_CHILD_LINK; ev.node = rd_word.node_id; ev.addr = first_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur_level  <= '0;
      pending    <= '0;
      par_addr   <= '0;
      par_node   <= '0;
      found_root <= 1'b0;
      done       <= 1'b0;
      error      <= 1'b0;
    end else begin
      done  <= 1'b0;
      error <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur_level  <= '0;
          found_root <= 1'b0;
          state      <= S_LVL_CMP;
        end
        S_LVL_CMP:  state <= S_LVL_SRCH;
        S_LVL_SRCH: state <= S_LVL_SAVE;
        S_LVL_SAVE: begin
          pending <= responders;
          if (cur_level == '0) found_root <= any_match;
          if (cur_level == '0 && !any_match) state <= S_FIN;
          else                               state <= S_PICK;
        end
        S_PICK: begin
          if (pending == '0) begin
            if (cur_level == max_level) state <= S_FIN;
            else begin
              cur_level <= next_level;
              state     <= S_LVL_CMP;
            end
          end else begin
            pending[p] <= 1'b0;
            par_addr   <= p;
            par_node   <= rd_word.node_id;
            if (rd_word.is_action && cur_level != max_level) state <= S_CH_CMP;
          end
        end
        S_CH_CMP:  state <= S_CH_SRCH;
        S_CH_SRCH: state <= S_CH_PICK;
        S_CH_PICK: if (!any_match) state <= S_PICK;
        S_FIN: begin
          done  <= 1'b1;
          error <= !found_root;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
