// cbpu: complex binary processing unit, four CBALUs side by side so that up
// to four action nodes of one graph level execute at the same time. Each ALU
// has its own start, opcode, operands, result, flags, busy and done; the
// control unit starts the ALUs of one issue group in the same cycle and waits
// for all their done pulses. Timing per ALU as in cbalu (one cycle, multiply
// DATA_W+2 cycles).
module cbpu
  import cbadp_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NUM_ALU-1:0]              start,
  input  opcode_e [NUM_ALU-1:0]           opcode,
  input  logic [NUM_ALU-1:0][DATA_W-1:0]  a,
  input  logic [NUM_ALU-1:0][DATA_W-1:0]  b,
  output logic [NUM_ALU-1:0]              busy,
  output logic [NUM_ALU-1:0]              done,
  output logic [NUM_ALU-1:0][DATA_W-1:0]  result,
  output flags_t [NUM_ALU-1:0]            flags
);
  for (genvar k = 0; k < NUM_ALU; k++) begin : g_alu
    cbalu u_alu (
      .clk, .rst_n,
      .start (start[k]),
      .opcode(opcode[k]),
      .a     (a[k]),
      .b     (b[k]),
      .busy  (busy[k]),
      .done  (done[k]),
      .result(result[k]),
      .flags (flags[k])
    );
  end
endmodule
