// cbalu: complex binary arithmetic and logic unit (one CBALU of the
// processing unit).
//
// Operands and result are DATA_W-digit complex binary numbers (digit k weighs
// (-1+j)^k). Arithmetic follows complex binary rules:
//   ADD    A + B with the digit rule 1+1 = 1100 (cbns_adder)
//   NEG    -A = A * 11101, i.e. A + A<<2 + A<<3 + A<<4
//   SUB    A + (-B)
//   MULJ   j*A = A * 11 = A + A<<1;   MULNJ  -j*A = A * 111 = A + A<<1 + A<<2
//   MUL    shift-and-add: for each digit of B that is 1, A shifted by the
//          digit's position is added with the complex binary adder, one digit
//          of B per clock
//   CONV   converts an ordinary complex integer into complex binary form:
//          the low DATA_W/2 bits of A (real part) and of B (imaginary part),
//          two's complement, through the published base 4 -> base -4 ->
//          4-digit-group procedure (cbns_convert)
//   AND, OR, XOR, NOT, PASSA, PASSB work bit by bit.
// Internally sums are formed GUARD digits wider (products 2*DATA_W+GUARD),
// wide enough to hold the exact result, so the flags are exact:
//   overflow  the exact result needs more than DATA_W digits
//   carry     ADD/SUB: a carry left the top digit of the word during the
//             addition (also set by the zero rule 11 + 111 = 0 at the word's
//             top, where the result is still exact); 0 for the other opcodes
//   zero      result is 0
//   negative  real part of the result is below 0
// The meaning chosen for carry and negative on complex numbers, the opcode set
// and the multiplier structure are this design's own; the specification gives
// the four flag names and the arithmetic rules only. Division (reciprocal by
// Newton-Raphson) is left out.
//
// Timing: start is taken when busy is low. All opcodes but MUL deliver result
// and flags with a one-cycle done pulse in the next cycle; MUL takes DATA_W+2
// cycles from start to done. busy is high while a multiplication runs.
module cbalu
  import cbadp_pkg::*;
#(
  parameter int DATA_W_P = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  opcode_e             opcode,
  input  logic [DATA_W_P-1:0] a,
  input  logic [DATA_W_P-1:0] b,
  output logic                busy,
  output logic                done,
  output logic [DATA_W_P-1:0] result,
  output flags_t              flags
);

  localparam int N  = DATA_W_P;
  localparam int WA = N + GUARD;        // add/sub width
  localparam int WM = 2 * N + GUARD;    // multiply width

  function automatic int re_of(input logic [N-1:0] z);
    int re, pr, pi, t;
    re = 0; pr = 1; pi = 0;
    for (int k = 0; k < N; k++) begin
      if (z[k]) re += pr;
      t  = -pr - pi;
      pi = pr - pi;
      pr = t;
    end
    return re;
  endfunction

  // ---------------- single-cycle datapath ----------------
  logic [WA-1:0] ax, bx, neg_src;
  assign ax = WA'(a);
  assign bx = WA'(b);
  assign neg_src = (opcode == OP_NEG) ? ax : bx;

  // negation chain: x*11101 = x + x<<2 + x<<3 + x<<4
  logic [WA-1:0] n1, n2, n3;
  logic          n1_c, n2_c, n3_c;
  cbns_adder #(.W(WA), .CARRY_POS(N)) u_neg1 (.a(neg_src), .b(neg_src << 2), .sum(n1), .carry_out(n1_c));
  cbns_adder #(.W(WA), .CARRY_POS(N)) u_neg2 (.a(n1), .b(neg_src << 3), .sum(n2), .carry_out(n2_c));
  cbns_adder #(.W(WA), .CARRY_POS(N)) u_neg3 (.a(n2), .b(neg_src << 4), .sum(n3), .carry_out(n3_c));

  // j multiple: A*11
  logic [WA-1:0] aj;
  logic          aj_c;
  cbns_adder #(.W(WA), .CARRY_POS(N)) u_j (.a(ax), .b(ax << 1), .sum(aj), .carry_out(aj_c));

  // integer -> complex binary conversion
  localparam int HW = N / 2;
  localparam int WC = N + 16;
  logic [WC-1:0] conv_z;
  cbns_convert #(.IN_W(HW), .FRAC_W(0), .W(WC)) u_conv (
    .re(signed'(a[HW-1:0])), .im(signed'(b[HW-1:0])), .z(conv_z));

  // final adder
  logic [WA-1:0] fx, fy, fsum;
  logic          f_c;
  always_comb begin
    unique case (opcode)
      OP_SUB:   begin fx = ax; fy = n3;       end
      OP_MULNJ: begin fx = aj; fy = ax << 2;  end
      default:  begin fx = ax; fy = bx;       end
    endcase
  end
  cbns_adder #(.W(WA), .CARRY_POS(N)) u_fin (.a(fx), .b(fy), .sum(fsum), .carry_out(f_c));

  logic [N-1:0] c_res;
  logic         c_carry, c_ovf;
  always_comb begin
    c_carry = 1'b0;
    c_ovf   = 1'b0;
    unique case (opcode)
      OP_ADD, OP_SUB: begin
        c_res = fsum[N-1:0]; c_carry = f_c; c_ovf = |fsum[WA-1:N];
      end
      OP_MULNJ: begin c_res = fsum[N-1:0]; c_ovf = |fsum[WA-1:N]; end
      OP_NEG:   begin c_res = n3[N-1:0];   c_ovf = |n3[WA-1:N];   end
      OP_MULJ:  begin c_res = aj[N-1:0];   c_ovf = |aj[WA-1:N];   end
      OP_CONV:  begin c_res = conv_z[N-1:0]; c_ovf = |conv_z[WC-1:N]; end
      OP_AND:   c_res = a & b;
      OP_OR:    c_res = a | b;
      OP_XOR:   c_res = a ^ b;
      OP_NOT:   c_res = ~a;
      OP_PASSB: c_res = b;
      default:  c_res = a;
    endcase
  end

  // ---------------- multiplier ----------------
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_FIN} state_e;
  state_e        state;
  logic [WM-1:0] acc, mcand, acc_next;
  logic [N-1:0]  mplier;
  logic [$clog2(N+1)-1:0] cnt;
  logic          m_c_unused;

  cbns_adder #(.W(WM), .CARRY_POS(WM)) u_mul (
    .a(acc), .b(mplier[0] ? mcand : '0), .sum(acc_next), .carry_out(m_c_unused));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      result <= '0;
      flags  <= '0;
      acc    <= '0;
      mcand  <= '0;
      mplier <= '0;
      cnt    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (opcode == OP_MUL) begin
            acc    <= '0;
            mcand  <= WM'(a);
            mplier <= b;
            cnt    <= '0;
            state  <= S_MUL;
          end else begin
            result         <= c_res;
            flags.carry    <= c_carry;
            flags.overflow <= c_ovf;
            flags.zero     <= (c_res == '0);
            flags.negative <= (re_of(c_res) < 0);
            done           <= 1'b1;
          end
        end
        S_MUL: begin
          acc    <= acc_next;
          mcand  <= mcand << 1;
          mplier <= mplier >> 1;
          cnt    <= cnt + 1'b1;
          if (cnt == ($clog2(N+1))'(N - 1)) state <= S_FIN;
        end
        S_FIN: begin
          result         <= acc[N-1:0];
          flags.carry    <= 1'b0;
          flags.overflow <= |acc[WM-1:N];
          flags.zero     <= (acc[N-1:0] == '0);
          flags.negative <= (re_of(acc[N-1:0]) < 0);
          done           <= 1'b1;
          state          <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
