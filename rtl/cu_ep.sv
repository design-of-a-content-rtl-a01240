// cu_ep: hardwired control unit of the execution phase.
//
// Data now flows from the deepest level of the inverted graph back to the
// root, so this sequencer starts at the highest level (level register) and
// steps down, one level at a time, with the level decrementer. At each level
//   1. control nodes: one parallel search finds the enabled control nodes of
//      the level. Each of them fires in turn: a second search finds the node
//      named in its target field and sets that node's enable bit, so the task
//      of executing passes to that node (a branch the host has selected by
//      enabling or inhibiting the control node). CTRL_FIRED event.
//   2. action nodes: one parallel search finds the enabled action nodes of the
//      level whose two operands are present (dataflow firing rule). Up to four
//      of them are read and issued together, one to each ALU, which start in
//      the same cycle. When every issued ALU has signalled done, each result
//      is written into the operand field (A or B, by the node's slot bit) of
//      the parent found in the search phase, with the operand's present bit,
//      and a NODE_EXEC event is raised. A level with more than four ready
//      nodes is issued in groups of four.
// Every fired control node and executed action node counts the node counter
// down. After level 0 done pulses. The results also land in the output and
// flags registers of the ALUs that produced them (wired outside this unit).
//
// The order of steps is this design's reading of the execution phase; the
// control steps of the original unit are not published. Cycle cost per level:
// 3 cycles per search, 1 per fired control node plus 3 for its target search,
// and per group of ALUs: 1 per issued node, 1 to start, the ALU latency, 1 per
// write-back.
module cu_ep
  import cbadp_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic [LEVEL_W-1:0]              max_level,
  output logic                            busy,
  output logic                            done,
  // level decrementer
  output logic [LEVEL_W-1:0]              cur_level,
  input  logic [LEVEL_W-1:0]              next_level,
  // associative memory
  output cam_cmd_t                        cmd,
  input  logic [DEPTH-1:0]                responders,
  input  logic                            any_match,
  input  logic [ADDR_W-1:0]               first_addr,
  input  node_word_t                      rd_word,
  // child -> parent links from the search phase
  output logic [ADDR_W-1:0]               link_addr,
  input  logic                            link_valid,
  input  logic [ADDR_W-1:0]               link_parent,
  // processing unit
  output logic [NUM_ALU-1:0]              alu_start,
  output opcode_e [NUM_ALU-1:0]           alu_op,
  output logic [NUM_ALU-1:0][DATA_W-1:0]  alu_a,
  output logic [NUM_ALU-1:0][DATA_W-1:0]  alu_b,
  input  logic [NUM_ALU-1:0]              alu_done,
  input  logic [NUM_ALU-1:0][DATA_W-1:0]  alu_result,
  // node counter, flags registers
  output logic                            cnt_en,
  output logic                            fr_clear,
  // host events
  output event_t                          ev
);

  localparam int KW = $clog2(NUM_ALU + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_CT_CMP, S_CT_SRCH, S_CT_SAVE, S_CT_PICK,
    S_TG_CMP, S_TG_SRCH, S_TG_PICK,
    S_AC_CMP, S_AC_SRCH, S_AC_SAVE, S_ISSUE, S_START, S_WAIT, S_WB, S_LVL_END
  } state_e;

  state_e                          state;
  logic [DEPTH-1:0]                pending;
  logic [ADDR_W-1:0]               p;
  logic [NODE_W-1:0]               tgt_node;
  logic [NODE_W-1:0]               ctl_node;
  logic [KW-1:0]                   n_iss;
  logic [KW-1:0]                   wb_idx;
  logic [NUM_ALU-1:0][ADDR_W-1:0]  iss_addr;
  logic [NUM_ALU-1:0][NODE_W-1:0]  iss_node;
  logic [NUM_ALU-1:0]              iss_slot;
  logic [NUM_ALU-1:0]              issued, done_seen;
  node_word_t                      cw, mw, wd, wb;
  logic [$clog2(NUM_ALU)-1:0]      wsel, isel;

  assign p    = lowest(pending);
  assign busy = (state != S_IDLE);
  assign wsel = wb_idx[$clog2(NUM_ALU)-1:0];
  assign isel = n_iss[$clog2(NUM_ALU)-1:0];

  // comparand and mask of the three searches
  always_comb begin
    cw = '0;
    mw = '0;
    unique case (state)
      S_TG_CMP: begin
        cw.node_id = tgt_node; mw.node_id = '1;
      end
      S_AC_CMP: begin
        cw.is_action = 1'b1; mw.is_action = 1'b1;
        cw.enable    = 1'b1; mw.enable    = 1'b1;
        cw.level     = cur_level; mw.level = '1;
        cw.a_rdy     = 1'b1; mw.a_rdy     = 1'b1;
        cw.b_rdy     = 1'b1; mw.b_rdy     = 1'b1;
      end
      default: begin  // control nodes of the level
        cw.is_action = 1'b0; mw.is_action = 1'b1;
        cw.enable    = 1'b1; mw.enable    = 1'b1;
        cw.level     = cur_level; mw.level = '1;
      end
    endcase
  end

  // write-back data: enable bit of a target, or an operand of a parent
  always_comb begin
    wd = '0;
    wb = '0;
    if (state == S_TG_PICK) begin
      wd.enable = 1'b1; wb.enable = 1'b1;
    end else if (iss_slot[wsel]) begin
      wd.opb = alu_result[wsel]; wb.opb = '1;
      wd.b_rdy = 1'b1;           wb.b_rdy = 1'b1;
    end else begin
      wd.opa = alu_result[wsel]; wb.opa = '1;
      wd.a_rdy = 1'b1;           wb.a_rdy = 1'b1;
    end
  end

  assign link_addr = iss_addr[wsel];

  always_comb begin
    cmd            = '0;
    cmd.cmp        = cw;
    cmd.mask       = mw;
    cmd.cmp_load   = (state == S_CT_CMP) || (state == S_TG_CMP) || (state == S_AC_CMP);
    cmd.mask_load  = cmd.cmp_load;
    cmd.search     = (state == S_CT_SRCH) || (state == S_TG_SRCH) || (state == S_AC_SRCH);
    cmd.resp_clear = 1'b0;
    cmd.rd_addr    = p;
    cmd.wr_data    = wd;
    cmd.wr_bits    = wb;
    cmd.wr_en      = ((state == S_TG_PICK) && any_match) || ((state == S_WB) && link_valid);
    cmd.wr_addr    = (state == S_TG_PICK) ? first_addr : link_parent;
    alu_start      = (state == S_START) ? issued : '0;
    fr_clear       = (state == S_IDLE) && start;
    cnt_en         = ((state == S_CT_PICK) && (pending != '0)) || (state == S_WB);
    ev             = '0;
    if (state == S_TG_PICK && any_match) begin
      ev.valid = 1'b1; ev.code = EV_CTRL_FIRED; ev.node = ctl_node; ev.addr = first_addr;
    end else if (state == S_WB) begin
      ev.valid = 1'b1; ev.code = EV_NODE_EXEC; ev.node = iss_node[wsel]; ev.addr = iss_addr[wsel];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_level <= '0;
      pending   <= '0;
      tgt_node  <= '0;
      ctl_node  <= '0;
      n_iss     <= '0;
      wb_idx    <= '0;
      iss_addr  <= '0;
      iss_node  <= '0;
      iss_slot  <= '0;
      issued    <= '0;
      done_seen <= '0;
      alu_op    <= {NUM_ALU{OP_PASSA}};
      alu_a     <= '0;
      alu_b     <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur_level <= max_level;
          state     <= S_CT_CMP;
        end
        // ---- control nodes ----
        S_CT_CMP:  state <= S_CT_SRCH;
        S_CT_SRCH: state <= S_CT_SAVE;
        S_CT_SAVE: begin
          pending <= responders;
          state   <= S_CT_PICK;
        end
        S_CT_PICK: begin
          if (pending == '0) state <= S_AC_CMP;
          else begin
            pending[p] <= 1'b0;
            tgt_node   <= rd_word.parent_id;
            ctl_node   <= rd_word.node_id;
            state      <= S_TG_CMP;
          end
        end
        S_TG_CMP:  state <= S_TG_SRCH;
        S_TG_SRCH: state <= S_TG_PICK;
        S_TG_PICK: state <= S_CT_PICK;
        // ---- action nodes ----
        S_AC_CMP:  state <= S_AC_SRCH;
        S_AC_SRCH: state <= S_AC_SAVE;
        S_AC_SAVE: begin
          pending <= responders;
          n_iss   <= '0;
          issued  <= '0;
          state   <= S_ISSUE;
        end
        S_ISSUE: begin
          if (pending != '0 && n_iss < KW'(NUM_ALU)) begin
            pending[p]        <= 1'b0;
            alu_op[isel]   <= opcode_e'(rd_word.opcode);
            alu_a[isel]    <= rd_word.opa;
            alu_b[isel]    <= rd_word.opb;
            iss_addr[isel] <= p;
            iss_node[isel] <= rd_word.node_id;
            iss_slot[isel] <= rd_word.slot;
            issued[isel]   <= 1'b1;
            n_iss             <= n_iss + 1'b1;
          end else if (n_iss == '0) state <= S_LVL_END;
          else begin
            done_seen <= '0;
            state     <= S_START;
          end
        end
        S_START: state <= S_WAIT;
        S_WAIT: begin
          done_seen <= done_seen | alu_done;
          if (((done_seen | alu_done) & issued) == issued) begin
            wb_idx <= '0;
            state  <= S_WB;
          end
        end
        S_WB: begin
          if (wb_idx == n_iss - 1'b1) begin
            n_iss  <= '0;
            issued <= '0;
            state  <= (pending != '0) ? S_ISSUE : S_LVL_END;
          end
          wb_idx <= wb_idx + 1'b1;
        end
        S_LVL_END: begin
          if (cur_level == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cur_level <= next_level;
            state     <= S_CT_CMP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
