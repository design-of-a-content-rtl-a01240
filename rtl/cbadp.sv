// cbadp: Complex Binary Associative Dataflow Processor.
//
// A dataflow graph is held in a 64-word associative memory, one word per node
// (80-bit action nodes carrying opcode and operands, 18-bit control nodes).
// It runs in two phases, each started by the host:
//   search phase     the graph is seen upside down (root at level 0); level by
//                    level every parent finds its children with one parallel
//                    search of the associative memory, the node counter counts
//                    the nodes, and the count ends in the counter-value
//                    register;
//   execution phase  from the highest level (level register) down to the root,
//                    the enabled control nodes of a level enable their targets
//                    and up to four ready action nodes of the level execute
//                    side by side in the four complex binary ALUs; each result
//                    is written into its parent's operand field, and into the
//                    ALU's output (ZR) and flags (FR) registers.
// All data are complex binary numbers, base (-1+j), 24 digits.
//
// Blocks and connections follow the processor's block diagram: level register
// -> control unit; control unit (CU_SP, CU_EP) -> associative memory,
// processing unit, level incrementer/decrementer and counter; counter ->
// counter-value register; processing unit -> flags and output registers. The
// input/output system of the diagram lies outside this module: its side is
// the host port below (memory load and read-back, level register load, phase
// start/done, register reads and the event stream that reports the nodes each
// phase visits).
//
// Host port timing: io_wr_en writes memory word io_wr_addr (all 80 bits) on
// the rising edge and is ignored while a phase runs; io_clear empties the
// memory. io_sp_start / io_ep_start are one-cycle requests; the matching
// *_done output pulses for one cycle at the end of the phase. Events are valid
// for the one cycle ev.valid is high. Asynchronous active-low reset.
module cbadp
  import cbadp_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  // memory load / read-back
  input  logic                            io_clear,
  input  logic                            io_wr_en,
  input  logic [ADDR_W-1:0]               io_wr_addr,
  input  logic [WORD_W-1:0]               io_wr_data,
  input  logic [ADDR_W-1:0]               io_rd_addr,
  output logic [WORD_W-1:0]               io_rd_data,
  // level register
  input  logic                            io_level_load,
  input  logic [LEVEL_W-1:0]              io_level,
  output logic [LEVEL_W-1:0]              max_level,
  // phase control
  input  logic                            io_sp_start,
  input  logic                            io_ep_start,
  output logic                            sp_busy,
  output logic                            sp_done,
  output logic                            sp_error,
  output logic                            ep_busy,
  output logic                            ep_done,
  // counter and counter-value register
  output logic [CNT_W-1:0]                node_count,
  output logic [CNT_W-1:0]                counter_value,
  output logic                            counter_value_valid,
  // output and flags registers
  output logic [NUM_ALU-1:0][DATA_W-1:0]  zr,
  output flags_t [NUM_ALU-1:0]            fr,
  input  logic [$clog2(NUM_ALU)-1:0]      io_reg_sel,
  output logic [DATA_W-1:0]               io_zr_data,
  output flags_t                          io_fr_data,
  output logic [NUM_ALU-1:0]              alu_busy,
  // events to the host
  output event_t                          ev
);

  cam_cmd_t                        cmd;
  logic [DEPTH-1:0]                responders;
  logic                            any_match;
  logic [ADDR_W-1:0]               first_addr;
  logic [WORD_W-1:0]               rd_data;
  logic                            lid_e;
  logic [LEVEL_W-1:0]              lid_level, lid_next;
  logic                            cnt_clear, cnt_en, cnt_down;
  logic                            cvr_load, cvr_invalidate;
  logic [NUM_ALU-1:0]              alu_start, alu_done;
  opcode_e [NUM_ALU-1:0]           alu_op;
  logic [NUM_ALU-1:0][DATA_W-1:0]  alu_a, alu_b, alu_result;
  flags_t [NUM_ALU-1:0]            alu_flags;
  logic                            fr_clear;
  logic                            phase_busy;
  logic                            wr_en;
  logic [ADDR_W-1:0]               wr_addr;
  logic [WORD_W-1:0]               wr_data, wr_bits;

  assign phase_busy = sp_busy | ep_busy;
  assign wr_en   = phase_busy ? cmd.wr_en   : io_wr_en;
  assign wr_addr = phase_busy ? cmd.wr_addr : io_wr_addr;
  assign wr_data = phase_busy ? cmd.wr_data : io_wr_data;
  assign wr_bits = phase_busy ? cmd.wr_bits : '1;

  level_register u_level_reg (
    .clk, .rst_n, .load(io_level_load && !phase_busy), .d(io_level), .q(max_level));

  control_unit u_cu (
    .clk, .rst_n,
    .sp_start(io_sp_start), .ep_start(io_ep_start), .max_level,
    .sp_busy, .sp_done, .sp_error, .ep_busy, .ep_done,
    .cmd, .responders, .any_match, .first_addr, .rd_word(node_word_t'(rd_data)),
    .lid_e, .lid_level, .lid_next,
    .cnt_clear, .cnt_en, .cnt_down,
    .cvr_load, .cvr_invalidate,
    .alu_start, .alu_op, .alu_a, .alu_b, .alu_done, .alu_result,
    .fr_clear, .ev
  );

  assoc_memory u_am (
    .clk, .rst_n,
    .clear_all (io_clear && !phase_busy),
    .cmp_load  (cmd.cmp_load),  .cmp_in (cmd.cmp),
    .mask_load (cmd.mask_load), .mask_in(cmd.mask),
    .comparand (), .mask(),
    .search    (cmd.search), .resp_clear(cmd.resp_clear),
    .responders, .any_match, .first_addr,
    .wr_en, .wr_addr, .wr_data, .wr_bits,
    .rd_addr   (cmd.rd_addr), .rd_data,
    .io_rd_addr, .io_rd_data
  );

  level_incdec u_lid (.e(lid_e), .level(lid_level), .next(lid_next));

  updown_counter u_cnt (
    .clk, .rst_n, .clear(cnt_clear), .en(cnt_en), .down(cnt_down), .q(node_count));

  counter_value_register u_cvr (
    .clk, .rst_n, .load(cvr_load), .invalidate(cvr_invalidate),
    .d(node_count), .q(counter_value), .valid(counter_value_valid));

  cbpu u_pu (
    .clk, .rst_n,
    .start(alu_start), .opcode(alu_op), .a(alu_a), .b(alu_b),
    .busy(alu_busy), .done(alu_done), .result(alu_result), .flags(alu_flags));

  flags_registers u_fr (
    .clk, .rst_n, .clear(fr_clear), .load(alu_done), .d(alu_flags), .q(fr),
    .rd_sel(io_reg_sel), .rd_data(io_fr_data));

  output_registers u_zr (
    .clk, .rst_n, .load(alu_done), .d(alu_result), .q(zr),
    .rd_sel(io_reg_sel), .rd_data(io_zr_data));

endmodule
