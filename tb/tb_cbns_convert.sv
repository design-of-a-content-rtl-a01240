// tb_cbns_convert: checks the converter at its default sizes (12 integer
// bits, 4 fraction bits, 48 output digits). Every real part from -2048 to
// 2047.9375 in steps of 1/16 (imaginary part 0), every imaginary part likewise,
// and random complex pairs are converted. A value R/16 + j*I/16 has, scaled by
// (-1+j)^8 = 16, the exact complex binary digits of the Gaussian integer
// (R + j*I) * (-j)^4 = R + j*I, since (-1+j)^2 = -2j; the reference digits are
// obtained by repeated division by (-1+j) and must never need more than the 48
// digits of the converter. The four published fraction strings (1/2 = 1.11,
// 1/4 = 1.1101, 1/8 = 0.000011, 1/16 = 0.00000001) and small integers are
// checked directly.
module tb_cbns_convert;
  import cbns_ref_pkg::*;
  localparam int IN_W = 12, FRAC_W = 4, W = 48;
  localparam int TW = IN_W + FRAC_W, FD = 2 * FRAC_W;
  logic signed [TW-1:0] re, im;
  logic [W-1:0] z;
  int checks = 0, failures = 0;

  cbns_convert dut (.re(re), .im(im), .z(z));

  task automatic check(input int r, input int i);
    logic [127:0] exp;
    gauss_t g;
    re = TW'(r); im = TW'(i);
    #1;
    g = gc(longint'(r), longint'(i));
    for (int k = 0; k < FRAC_W; k++) g = gmul(g, gc(0, -1));
    exp = from_gauss(g);
    checks++;
    if (z !== exp[W-1:0] || |exp[127:W]) begin
      failures++;
      $display("FAIL %0d + j%0d: got %h exp %h", r, i, z, exp[W-1:0]);
    end
  endtask

  initial begin
    check(16, 0);                               // 1
    checks++; if (z !== W'(1) << FD) failures++;
    check(32, 0);                               // 2 = 1100
    checks++; if (z !== W'(4'b1100) << FD) failures++;
    check(-16, 0);                              // -1 = 11101
    checks++; if (z !== W'(5'b11101) << FD) failures++;
    check(0, 16);                               // j = 11
    checks++; if (z !== W'(2'b11) << FD) failures++;
    check(0, -16);                              // -j = 111
    checks++; if (z !== W'(3'b111) << FD) failures++;
    check(8, 0);                                // 1/2 = 1.11
    checks++; if (z !== W'(3'b111) << (FD - 2)) failures++;
    check(4, 0);                                // 1/4 = 1.1101
    checks++; if (z !== W'(5'b11101) << (FD - 4)) failures++;
    check(2, 0);                                // 1/8 = 0.000011
    checks++; if (z !== W'(2'b11) << (FD - 6)) failures++;
    check(1, 0);                                // 1/16 = 0.00000001
    checks++; if (z !== W'(1)) failures++;
    for (int r = -32768; r < 32768; r++) check(r, 0);
    for (int r = -32768; r < 32768; r++) check(0, r);
    for (int k = 0; k < 20000; k++)
      check(int'($urandom % 65536) - 32768, int'($urandom % 65536) - 32768);
    check(-32768, -32768);
    check(32767, 32767);
    check(-32768, 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
