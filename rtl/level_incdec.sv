// level_incdec: 4-bit level incrementer/decrementer.
//
// The search phase walks the inverted dataflow graph from the root (level 0)
// downwards and so increments the level number; the execution phase walks back
// and decrements it. With the level written X0 X1 X2 X3 (X0 the most
// significant bit), e = 0 increments and e = 1 decrements, modulo 16. The
// gates are the sum-of-products equations given for this unit in the
// processor's specification, written out term by term:
//   L0 = E.[X0'.X1'.X2'.X3' + X0.X2] + E'.[X0'.X1.X2.X3 + X0.X1']
//        + X0.[X1.X2' + X1'.X3 + X2.X3']
//   L1 = E.[X1.X2 + X1'.X2'.X3'] + E'.[X1.X2' + X1'.X2.X3] + X1.(X2 xor X3)
//   L2 = E xor X2 xor X3
//   L3 = X3'
// Purely combinational.
module level_incdec (
  input  logic       e,        // 0: increment, 1: decrement
  input  logic [3:0] level,    // level[3] = X0 ... level[0] = X3
  output logic [3:0] next      // next[3] = L0 ... next[0] = L3
);

  logic x0, x1, x2, x3, en;
  assign x0 = level[3];
  assign x1 = level[2];
  assign x2 = level[1];
  assign x3 = level[0];
  assign en = ~e;

  assign next[3] = (e  & ((~x0 & ~x1 & ~x2 & ~x3) | (x0 & x2)))
                 | (en & ((~x0 & x1 & x2 & x3) | (x0 & ~x1)))
                 | (x0 & ((x1 & ~x2) | (~x1 & x3) | (x2 & ~x3)));
  assign next[2] = (e  & ((x1 & x2) | (~x1 & ~x2 & ~x3)))
                 | (en & ((x1 & ~x2) | (~x1 & x2 & x3)))
                 | (x1 & (x2 ^ x3));
  assign next[1] = e ^ x2 ^ x3;
  assign next[0] = ~x3;

endmodule
