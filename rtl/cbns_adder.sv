// cbns_adder: combinational adder for complex binary numbers (base -1+j).
//
// Digit rules: 0+0=0, 0+1=1+0=1 and 1+1=1100, i.e. two ones in position n
// give a zero in position n and carries into positions n+2 and n+3. The adder
// applies this rule to whole words at once: the sum digits are the XOR of the
// operands, the "1+1" positions are the AND, shifted up by 2 and by 3. Three
// words (sum, carry<<2, carry<<3) are then reduced the same way, digit by
// digit: their XOR is the new sum and the positions holding two or more ones
// create the next carries. Every pass moves the lowest carry up by at least two
// positions, so after W/2+1 passes no carry is left inside the word; the
// result is exact modulo (-1+j)^W. This array structure is this design's own;
// the digit rules are those of complex binary arithmetic.
//
// carry_out is set when any carry lands on position CARRY_POS or above
// (position W and above included). With CARRY_POS equal to the operand width
// this reports a carry out of the operand's top digit even where the carries
// cancel (the zero rule 11 + 111 = 0), which the exact result alone cannot show.
//
// Purely combinational, no clock.
module cbns_adder #(
  parameter int W         = 34,
  parameter int CARRY_POS = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         carry_out
);

  localparam int PASSES = W / 2 + 2;
  localparam int XW     = W + 3;   // room for carries shifted past the top

  function automatic logic [XW-1:0] hi_mask();
    logic [XW-1:0] m;
    for (int i = 0; i < XW; i++) m[i] = (i >= CARRY_POS);
    return m;
  endfunction

  localparam logic [XW-1:0] HI = hi_mask();

  always_comb begin
    logic [W-1:0]  s, u, v, m;
    logic [XW-1:0] u_x, v_x;
    logic          c;
    s = a ^ b;
    m = a & b;
    c = 1'b0;
    u = '0;
    v = '0;
    for (int p = 0; p < PASSES; p++) begin
      u_x = {1'b0, m, 2'b00};
      v_x = {m, 3'b000};
      c   = c | (|(u_x & HI)) | (|(v_x & HI));
      u   = u_x[W-1:0];
      v   = v_x[W-1:0];
      m   = (s & u) | (s & v) | (u & v);
      s   = s ^ u ^ v;
    end
    sum       = s;
    carry_out = c;
  end

endmodule
