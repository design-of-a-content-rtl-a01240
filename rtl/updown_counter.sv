// updown_counter: 6-bit up/down node counter.
//
// Keeps track of up to 64 dataflow nodes: it counts up as the search phase
// visits nodes and down as the execution phase retires them. With the state
// written x2 x3 x4 x5 x6 x7 (x2 the most significant bit) and the direction
// x1 (0 = up, 1 = down) the next state y0..y5 is formed by the sum-of-products
// equations of the processor's specification:
//   y0 = x1.{x2.[x3 + x5 + x6 + x7] + x2'.x3'.x4'.x5'.x6'.x7'}
//      + x1'.{x2.[x3' + x4' + x3.(x4.x6.x7' + x5.x6')] + x2'.x3.x4.x5.x6.x7}
//      + x2.(x4 xor x5)
//   y1 = x1.{x3.[x4 + x4'.(x5'.x7 + x6.x7')] + x3'.x4'.x5'.x6'.x7'}
//      + x1'.{x3.[x4' + x5.x6' + x4.x6.x7'] + x3'.x4.x5.x6.x7}
//      + x3.(x4 xor x5)
//   y2 = x1.(x4.x6 + x4'.x5'.x6'.x7') + x1'.(x4.x5' + x4'.x5.x6.x7)
//      + x4.(x5.x6' + x5'.x7 + x6.x7')
//   y3 = x1.(x5 xor x6'.x7') + x1'.{x5.x6' + x6.(x5 xor x7)}
//   y4 = x1 xor x6 xor x7
//   y5 = x7'
// Two terms are this design's reading where the equations as printed do not
// give a counter: the up-count carry term of y1 uses x3' (with x2 there,
// 15 would count up to 0 and 63 to 16), and the down-count bracket of y0
// is x3 + x5 + x6 + x7, which with the shared x2.(x4 xor x5) term makes y0
// borrow only from 000000 in the low five bits. Both readings were checked
// against a plain +1/-1 count for all 128 input combinations.
//
// Timing: q takes the next state on the rising clock edge when en is high;
// clear (synchronous) has priority. Asynchronous active-low reset to 0.
module updown_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic       down,     // x1
  output logic [5:0] q         // q[5] = x2 ... q[0] = x7
);

  logic x1, x2, x3, x4, x5, x6, x7;
  logic [5:0] y;
  assign x1 = down;
  assign x2 = q[5];
  assign x3 = q[4];
  assign x4 = q[3];
  assign x5 = q[2];
  assign x6 = q[1];
  assign x7 = q[0];

  assign y[5] = (x1 & ((x2 & (x3 | x5 | x6 | x7)) | (~x2 & ~x3 & ~x4 & ~x5 & ~x6 & ~x7)))
              | (~x1 & ((x2 & (~x3 | ~x4 | (x3 & ((x4 & x6 & ~x7) | (x5 & ~x6)))))
                        | (~x2 & x3 & x4 & x5 & x6 & x7)))
              | (x2 & (x4 ^ x5));
  assign y[4] = (x1 & ((x3 & (x4 | (~x4 & ((~x5 & x7) | (x6 & ~x7))))) | (~x3 & ~x4 & ~x5 & ~x6 & ~x7)))
              | (~x1 & ((x3 & (~x4 | (x5 & ~x6) | (x4 & x6 & ~x7))) | (~x3 & x4 & x5 & x6 & x7)))
              | (x3 & (x4 ^ x5));
  assign y[3] = (x1 & ((x4 & x6) | (~x4 & ~x5 & ~x6 & ~x7)))
              | (~x1 & ((x4 & ~x5) | (~x4 & x5 & x6 & x7)))
              | (x4 & ((x5 & ~x6) | (~x5 & x7) | (x6 & ~x7)));
  assign y[2] = (x1 & (x5 ^ (~x6 & ~x7)))
              | (~x1 & ((x5 & ~x6) | (x6 & (x5 ^ x7))));
  assign y[1] = x1 ^ x6 ^ x7;
  assign y[0] = ~x7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (en)    q <= y;
  end

endmodule
