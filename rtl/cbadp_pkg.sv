// cbadp_pkg: types and constants shared by the Complex Binary Associative
// Dataflow Processor (CBADP).
//
// Numbers are complex binary numbers: digit k of a word weighs (-1+j)^k, so a
// single bit string carries both the real and the imaginary part. Sizes taken
// from the processor's specification: 80-bit action-node words, 18-bit
// control-node words, a 64-word associative memory (16 levels of at most four
// nodes), four ALUs, a 4-bit level number, a 6-bit node counter and a 6-bit
// opcode space (up to 64 instructions). The field layout of the memory words,
// the 24-digit operand width and the opcode assignments are this design's own
// choices.
//
// Memory word layout (bit 79 first). A control node uses only the first 18
// bits, which have the same layout as the first 18 bits of an action node:
//   [79]    is_action   1 = action node, 0 = control node
//   [78]    enable      node may fire (control nodes: set by the host, action
//                       nodes: set by the host or by a firing control node)
//   [77:74] level       level in the inverted graph, 0 = root
//   [73:68] node_id     node number
//   [67:62] parent_id   action: node that consumes the result
//                       control: node enabled when this control node fires
//   --- action nodes only ---
//   [61]    slot        0: result goes to the parent's operand A, 1: to B
//   [60:55] opcode      see opcode_e
//   [54]    a_rdy       operand A present
//   [53]    b_rdy       operand B present
//   [52:48] reserved
//   [47:24] opa         operand A, 24 complex binary digits
//   [23:0]  opb         operand B
package cbadp_pkg;

  localparam int WORD_W  = 80;
  localparam int CTRL_W  = 18;
  localparam int DEPTH   = 64;
  localparam int ADDR_W  = 6;
  localparam int LEVEL_W = 4;
  localparam int NODE_W  = 6;
  localparam int OPC_W   = 6;
  localparam int DATA_W  = 24;
  localparam int NUM_ALU = 4;
  localparam int CNT_W   = 6;

  // Extra digits above the operand width that an exact sum, difference or
  // product of two DATA_W-digit numbers can need (sum and difference: at most
  // 8, product: at most 5 above 2*DATA_W); 10 leaves margin.
  localparam int GUARD = 10;

  typedef enum logic [OPC_W-1:0] {
    OP_PASSA = 6'd0,   // Z = A
    OP_ADD   = 6'd1,   // Z = A + B
    OP_SUB   = 6'd2,   // Z = A - B
    OP_MUL   = 6'd3,   // Z = A * B
    OP_NEG   = 6'd4,   // Z = -A      (A * 11101)
    OP_MULJ  = 6'd5,   // Z = j * A   (A * 11)
    OP_MULNJ = 6'd6,   // Z = -j * A  (A * 111)
    OP_AND   = 6'd7,
    OP_OR    = 6'd8,
    OP_XOR   = 6'd9,
    OP_NOT   = 6'd10,  // Z = ~A
    OP_PASSB = 6'd11,  // Z = B
    OP_CONV  = 6'd12   // Z = complex binary form of re + j*im, re and im the
                       //     low DATA_W/2 bits of A and B (two's complement)
  } opcode_e;

  typedef struct packed {
    logic carry;
    logic zero;
    logic negative;
    logic overflow;
  } flags_t;

  typedef struct packed {
    logic                is_action;
    logic                enable;
    logic [LEVEL_W-1:0]  level;
    logic [NODE_W-1:0]   node_id;
    logic [NODE_W-1:0]   parent_id;
    logic                slot;
    logic [OPC_W-1:0]    opcode;
    logic                a_rdy;
    logic                b_rdy;
    logic [4:0]          rsvd;
    logic [DATA_W-1:0]   opa;
    logic [DATA_W-1:0]   opb;
  } node_word_t;

  // Event codes reported to the host (the "interrupts" of the two phases).
  typedef enum logic [1:0] {
    EV_NODE_FOUND  = 2'd0,  // search phase: node visited as a parent
    EV_CHILD_LINK  = 2'd1,  // search phase: child found for a parent
    EV_NODE_EXEC   = 2'd2,  // execution phase: action node executed
    EV_CTRL_FIRED  = 2'd3   // execution phase: control node enabled its target
  } event_e;


  // One cycle's worth of commands from a control unit to the associative
  // memory (see assoc_memory for their meaning).
  typedef struct packed {
    logic              cmp_load;
    logic [WORD_W-1:0] cmp;
    logic              mask_load;
    logic [WORD_W-1:0] mask;
    logic              search;
    logic              resp_clear;
    logic              wr_en;
    logic [ADDR_W-1:0] wr_addr;
    logic [WORD_W-1:0] wr_data;
    logic [WORD_W-1:0] wr_bits;
    logic [ADDR_W-1:0] rd_addr;
  } cam_cmd_t;

  typedef struct packed {
    logic              valid;
    event_e            code;
    logic [NODE_W-1:0] node;   // node number concerned
    logic [ADDR_W-1:0] addr;   // its address in the associative memory
  } event_t;

  // Lowest set bit of a DEPTH-wide vector (0 when none is set).
  function automatic logic [ADDR_W-1:0] lowest(input logic [DEPTH-1:0] v);
    logic [ADDR_W-1:0] r;
    r = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (v[i]) r = ADDR_W'(i);
    return r;
  endfunction

endpackage
