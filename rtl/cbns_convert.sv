// cbns_convert: converts a complex number re + j*im into a complex binary
// number of W digits. re and im are two's complement fixed-point numbers with
// IN_W integer bits (sign included) and FRAC_W fraction bits; the output has
// 2*FRAC_W digits after the radix point, i.e. z[2*FRAC_W] is the units digit.
//
// It follows the published conversion procedure:
//   integer part N >= 0:
//   1. N is written in base 4, i.e. its bits are taken in pairs q0, q1, q2 and
//      so on;
//   2. the digits in odd positions are negated, giving a base -4 number
//      (q0, -q1, q2, -q3 and so on);
//   3. the digits are normalized to 0..3 from the lowest one upwards: a
//      negative digit gets 4 added and 1 added to the digit on its left, a
//      digit of 4 becomes 0 and 1 is subtracted from the digit on its left;
//   4. every base -4 digit becomes four complex binary digits
//      (0 -> 0000, 1 -> 0001, 2 -> 1100, 3 -> 1101), since (-1+j)^4 = -4.
//   fraction F = f1/2 + f2/4 + f3/8 + ... (the fraction bits, f1 the top one):
//   each 2^-i with fi = 1 is replaced by its complex binary string and the
//   strings are added: 2^-1 = 1.11, 2^-2 = 1.1101, 2^-3 = 0.000011,
//   2^-4 = 0.00000001. Beyond i = 4 the same four strings repeat 8 places
//   further right each time, because 2^-4 = (-1+j)^-8 (in general 2^-i is
//   (-j)^i moved 2i places right, as 2 = j*(-1+j)^2).
//   A number with both parts is the sum of the two conversions.
// A negative real part is the conversion of |re| multiplied by 11101 (-1); the
// imaginary part is the conversion of |im| multiplied by 11 (+j) or 111 (-j);
// the two parts are then added. The multiplications by these short constants
// are sums of shifted copies formed with cbns_adder; the strings of the set
// fraction bits are summed with the same carry rule (add_fn), and that sum is
// added to the integer string.
//
// W must hold the exact result (for IN_W = 12, at most 36 digits above the
// radix point); the result is exact modulo (-1+j)^W. Because W holds every
// exact value, the adders' carry outputs carry no information and are left
// unused. Purely combinational. The fraction width default, 4 bits, is the
// length of the published 2^-i table; IN_W and W are this design's choice.
module cbns_convert #(
  parameter int IN_W   = 12,
  parameter int FRAC_W = 4,
  parameter int W      = 48
) (
  input  logic signed [IN_W+FRAC_W-1:0] re,
  input  logic signed [IN_W+FRAC_W-1:0] im,
  output logic        [W-1:0]           z
);

  localparam int TW = IN_W + FRAC_W;  // input width
  localparam int FD = 2 * FRAC_W;     // output digits after the radix point

  localparam int ND = IN_W / 2 + 3;  // base -4 digits incl. room for carries

  // steps 1 to 4 for a non-negative magnitude
  function automatic logic [W-1:0] pos_to_cbns(input logic [IN_W-1:0] n);
    logic [W-1:0]       r;
    logic [2*ND-1:0]    nx;
    int                 d, carry, q;
    r = '0;
    nx = (2*ND)'(n);
    carry = 0;
    for (int i = 0; i < ND; i++) begin
      q = int'(nx[2*i +: 2]);
      d = ((i % 2) == 1) ? -q : q;
      d = d + carry;
      if (d < 0) begin
        d = d + 4; carry = 1;
      end else if (d == 4) begin
        d = 0; carry = -1;
      end else begin
        carry = 0;
      end
      if (4*i + 3 < W) begin
        unique case (d)
          1:       r[4*i +: 4] = 4'b0001;
          2:       r[4*i +: 4] = 4'b1100;
          3:       r[4*i +: 4] = 4'b1101;
          default: r[4*i +: 4] = 4'b0000;
        endcase
      end
    end
    return r;
  endfunction

  // complex binary string of 2^-i, placed so that digit FD is the units digit
  function automatic logic [W-1:0] frac_digit(input int i);
    logic [W-1:0] p;
    unique case (i % 4)
      1:       p = W'(5'b00111);   // -j
      2:       p = W'(5'b11101);   // -1
      3:       p = W'(5'b00011);   // +j
      default: p = W'(5'b00001);   // +1
    endcase
    return p << (FD - 2 * i);
  endfunction

  logic [TW-1:0] re_mag, im_mag;
  assign re_mag = re[TW-1] ? TW'(-re) : TW'(re);
  assign im_mag = im[TW-1] ? TW'(-im) : TW'(im);

  // base (-1+j) sum of two strings: the XOR/majority carry passes of
  // cbns_adder (1 + 1 = 1100), written as a function for the fraction sum
  function automatic logic [W-1:0] add_fn(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] sm, u, v, m;
    sm = x ^ y;
    m  = x & y;
    for (int p = 0; p < W / 2 + 2; p++) begin
      u  = m << 2;
      v  = m << 3;
      m  = (sm & u) | (sm & v) | (u & v);
      sm = sm ^ u ^ v;
    end
    return sm;
  endfunction

  // fraction bits f1 (top) .. fFRAC_W of a magnitude -> sum of their strings
  function automatic logic [W-1:0] frac_to_cbns(input logic [TW-1:0] mag);
    logic [W-1:0] fs;
    fs = '0;
    for (int i = 1; i <= FRAC_W; i++)
      if (mag[FRAC_W-i]) fs = add_fn(fs, frac_digit(i));
    return fs;
  endfunction

  // magnitudes: integer string + fraction string
  logic [W-1:0] pr, pi;
  logic         c_pr, c_pi;
  cbns_adder #(.W(W), .CARRY_POS(W)) u_pr (
    .a(pos_to_cbns(re_mag[TW-1:FRAC_W]) << FD), .b(frac_to_cbns(re_mag)),
    .sum(pr), .carry_out(c_pr));
  cbns_adder #(.W(W), .CARRY_POS(W)) u_pi (
    .a(pos_to_cbns(im_mag[TW-1:FRAC_W]) << FD), .b(frac_to_cbns(im_mag)),
    .sum(pi), .carry_out(c_pi));

  // real part: pr, or pr * 11101 when re < 0
  logic [W-1:0] r1, r2, r3, re_z;
  logic         c_r1, c_r2, c_r3;
  cbns_adder #(.W(W), .CARRY_POS(W)) u_r1 (.a(pr), .b(pr << 2), .sum(r1), .carry_out(c_r1));
  cbns_adder #(.W(W), .CARRY_POS(W)) u_r2 (.a(r1), .b(pr << 3), .sum(r2), .carry_out(c_r2));
  cbns_adder #(.W(W), .CARRY_POS(W)) u_r3 (.a(r2), .b(pr << 4), .sum(r3), .carry_out(c_r3));
  assign re_z = re[TW-1] ? r3 : pr;

  // imaginary part: pi * 11 (+j) or pi * 111 (-j)
  logic [W-1:0] i1, i2, im_z;
  logic         c_i1, c_i2;
  cbns_adder #(.W(W), .CARRY_POS(W)) u_i1 (.a(pi), .b(pi << 1), .sum(i1), .carry_out(c_i1));
  cbns_adder #(.W(W), .CARRY_POS(W)) u_i2 (.a(i1), .b(pi << 2), .sum(i2), .carry_out(c_i2));
  assign im_z = im[TW-1] ? i2 : i1;

  logic c_sum;
  cbns_adder #(.W(W), .CARRY_POS(W)) u_sum (.a(re_z), .b(im_z), .sum(z), .carry_out(c_sum));

endmodule
