// cbns_ref_pkg: reference arithmetic for the testbenches, independent of the
// RTL. A complex binary number (digit k weighs (-1+j)^k) is converted to a
// Gaussian integer re + j*im by summing the powers of (-1+j); a Gaussian
// integer is converted back by repeated division by (-1+j): the lowest digit
// is the parity of re + im, and (x + jy)/(-1+j) = ((y - x) - j(x + y))/2.
// Expected ALU results are formed with ordinary integer arithmetic on the
// Gaussian integers and converted back.
package cbns_ref_pkg;

  typedef struct {
    longint re;
    longint im;
  } gauss_t;

  function automatic gauss_t to_gauss(input logic [127:0] z, input int n);
    gauss_t g;
    longint pr, pi, t;
    g.re = 0; g.im = 0; pr = 1; pi = 0;
    for (int k = 0; k < n; k++) begin
      if (z[k]) begin g.re += pr; g.im += pi; end
      t  = -pr - pi;
      pi = pr - pi;
      pr = t;
    end
    return g;
  endfunction

  // Digits of a Gaussian integer, lowest first; all 128 returned.
  function automatic logic [127:0] from_gauss(input gauss_t g);
    logic [127:0] r;
    longint x, y, nx;
    logic b;
    r = '0; x = g.re; y = g.im;
    for (int k = 0; k < 128; k++) begin
      b    = logic'((x + y) & 1);
      r[k] = b;
      if (b) x = x - 1;
      nx = (y - x) / 2;
      y  = -(x + y) / 2;
      x  = nx;
    end
    return r;
  endfunction

  function automatic gauss_t gadd(input gauss_t a, input gauss_t b);
    gauss_t r; r.re = a.re + b.re; r.im = a.im + b.im; return r;
  endfunction
  function automatic gauss_t gsub(input gauss_t a, input gauss_t b);
    gauss_t r; r.re = a.re - b.re; r.im = a.im - b.im; return r;
  endfunction
  function automatic gauss_t gmul(input gauss_t a, input gauss_t b);
    gauss_t r;
    r.re = a.re * b.re - a.im * b.im;
    r.im = a.re * b.im + a.im * b.re;
    return r;
  endfunction
  function automatic gauss_t gc(input longint re, input longint im);
    gauss_t r; r.re = re; r.im = im; return r;
  endfunction

  // Two's complement value of the low w bits of x.
  function automatic longint sx(input logic [63:0] x, input int w);
    longint v;
    v = longint'(x & ((64'd1 << w) - 1));
    if (x[w-1]) v = v - (longint'(1) << w);
    return v;
  endfunction

  // Expected ALU outcome for opcode op on n-digit operands: result digits,
  // overflow (exact result longer than n digits) and the real-part sign.
  // Opcode numbers: 0 PASSA 1 ADD 2 SUB 3 MUL 4 NEG 5 MULJ 6 MULNJ 7 AND
  // 8 OR 9 XOR 10 NOT 11 PASSB 12 CONV (low n/2 bits of A and B as re, im).
  function automatic void expect_op(input int op, input logic [63:0] a, input logic [63:0] b,
                                     input int n, output logic [63:0] res, output logic ovf,
                                     output logic neg);
    gauss_t ga, gb, gr;
    logic [127:0] full, m;
    logic arith;
    m = (128'd1 << n) - 1;
    ga = to_gauss({64'd0, a}, n);
    gb = to_gauss({64'd0, b}, n);
    arith = 1'b1;
    full = '0;
    case (op)
      1: gr = gadd(ga, gb);
      2: gr = gsub(ga, gb);
      3: gr = gmul(ga, gb);
      4: gr = gsub(gc(0, 0), ga);
      5: gr = gmul(ga, gc(0, 1));
      6: gr = gmul(ga, gc(0, -1));
      12: gr = gc(sx(a, n / 2), sx(b, n / 2));
      default: begin
        arith = 1'b0;
        gr = gc(0, 0);
      end
    endcase
    if (arith) full = from_gauss(gr);
    else case (op)
      7:  full = {64'd0, a & b};
      8:  full = {64'd0, a | b};
      9:  full = {64'd0, a ^ b};
      10: full = {64'd0, ~a} & m;
      11: full = {64'd0, b};
      default: full = {64'd0, a};
    endcase
    res = 64'(full & m);
    ovf = |(full & ~m);
    neg = to_gauss({64'd0, res}, n).re < 0;
  endfunction

endpackage
