// vr_slice: the basic recurrence block of the variable-radix divider, one per
// quotient component (one for real division, two cross-coupled for complex).
//
// It holds this component's partial remainder w in carry-save form (w_sum,
// w_carry), this component's scaled divisor z (conventional), the round-and-
// recode digit selection (rr_unit), the divisor multiple generators, two
// left-to-right scalers (one for w, one for z) and the on-the-fly converter of
// its quotient digits.  Each clock edge does what the control word says:
//   OP_LOAD : w <- K*n/4, z <- K*d            (prescaling, K from the table)
//   OP_SCALE: w <- M*w,   z <- M*z            (M = 2 - z)
//   OP_RECUR: t = r*w - q*z_re + SIGN_Q*q'*z_im, where q is this slice's digit,
//             q' the other slice's digit (complex only);
//             w <- t, or w <- M*t and z <- M*z on the last iteration of a radix
//   OP_FINAL: quotient <- Q, or Q - 1 ulp when the remainder is negative;
//             quotient_rnd <- that value rounded to two fewer fraction bits
//             (half-way cases up), taken from Q or Q + 4 without adder
// For the real part of a complex division SIGN_Q = +1 and the scaling uses
// Re(M*t) = Mr*t_re - Mi*t_im; for the imaginary part SIGN_Q = -1 and
// Im(M*t) = Mr*t_im + Mi*t_re (the paper's complex recurrence).  The other
// slice's pre-scaling value t and z source are exchanged through ports.
// The digit multiples q*z are formed from the five radix-4 digits of q (0, +-z,
// +-2z, shifted) and summed with r*w in a carry-save tree, so the iteration has
// no carry-propagate adder; z is assimilated only when it is rescaled, and w
// only at the end for the sign correction.
// Quotient: QL = L + 2 bits with L - 2 fraction bits, L = 2*N4 + 4*N16 + 8*N256;
// rounded quotient: QL - 2 bits with L - 4 fraction bits (52 at the defaults).
module vr_slice
  import vrdiv_pkg::*;
#(
  parameter int N    = 53,
  parameter bit CPLX = 1'b1,
  parameter bit IMAG = 1'b0,   // this slice computes the imaginary component
  parameter int QL   = 58,
  parameter int F    = N - 1 + KF + SHIFT,
  parameter int W    = F + IBITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  dp_ctrl_t             ctrl,
  input  logic [N-1:0]         n_in,        // this component of the dividend
  input  logic [N-1:0]         d_in,        // this component of the divisor
  input  r4dig_t               m_re_dig [MDIG],
  input  r4dig_t               m_im_dig [MDIG],
  input  logic [W-1:0]         z_re,        // scaled divisor, real part
  input  logic [W-1:0]         z_im,        // scaled divisor, imaginary part
  input  r4dig_t               q_oth_dig [QDIG],
  input  logic [W-1:0]         t_oth_sum,
  input  logic [W-1:0]         t_oth_carry,
  input  logic [W-1:0]         zsrc_oth,
  output logic [W-1:0]         z_own,
  output logic [W-1:0]         zsrc,
  output logic [W-1:0]         t_sum,
  output logic [W-1:0]         t_carry,
  output r4dig_t               q_dig [QDIG],
  output logic signed [QW-1:0] q,
  output logic [QL-1:0]        quotient,
  output logic [QL-3:0]        quotient_rnd
);

  localparam int NF = N - 1;
  localparam int SIGN_M = IMAG ? 1 : -1;   // sign of the M_im cross product
  localparam int NREC = CPLX ? 2 + 2*QDIG : 2 + QDIG;

  logic [W-1:0] w_sum, w_carry;
  logic [W-1:0] n_al, d_al;

  assign n_al = W'($signed(n_in)) << (F - NF - SHIFT);
  assign d_al = W'($signed(d_in)) << (F - NF);

  // ---- digit selection -----------------------------------------------------------
  rr_unit #(.F(F), .W(W)) u_rr (
    .w_sum(w_sum), .w_carry(w_carry), .radix(ctrl.radix), .q(q), .q_dig(q_dig)
  );

  // ---- recurrence: r*w - q*z_re +- q'*z_im in carry-save ---------------------------
  function automatic logic [W-1:0] mult(logic [W-1:0] v, r4dig_t d, int k, bit neg);
    logic [W-1:0] y;
    case (d)
      3'sd1:   y = v;
      3'sd2:   y = v << 1;
      -3'sd1:  y = -v;
      -3'sd2:  y = -(v << 1);
      default: y = '0;
    endcase
    y = y << (2*k);
    return neg ? -y : y;
  endfunction

  logic [W-1:0] rec_ops [NREC];
  logic [W-1:0] rec_s, rec_c;

  always_comb begin
    unique case (ctrl.radix)
      RADIX4:  begin rec_ops[0] = w_sum << 2; rec_ops[1] = w_carry << 2; end
      RADIX16: begin rec_ops[0] = w_sum << 4; rec_ops[1] = w_carry << 4; end
      default: begin rec_ops[0] = w_sum << 8; rec_ops[1] = w_carry << 8; end
    endcase
    for (int k = 0; k < QDIG; k++) rec_ops[2 + k] = mult(z_re, q_dig[k], k, 1'b1);
    if (CPLX)
      for (int k = 0; k < QDIG; k++) rec_ops[2 + QDIG + k] = mult(z_im, q_oth_dig[k], k, IMAG);
  end

  csa_tree #(.NIN(NREC), .W(W)) u_rec_tree (.in(rec_ops), .sum(rec_s), .carry(rec_c));

  // value that is stored or scaled this cycle
  always_comb begin
    unique case (ctrl.op)
      OP_LOAD:  begin t_sum = n_al;  t_carry = '0;      end
      OP_RECUR: begin t_sum = rec_s; t_carry = rec_c;   end
      default:  begin t_sum = w_sum; t_carry = w_carry; end
    endcase
  end

  assign zsrc = (ctrl.op == OP_LOAD) ? d_al : z_own;

  // ---- scaling of w and z by M -------------------------------------------------------
  logic [W-1:0] ws_sum, ws_carry, zs_sum, zs_carry;

  lr_scaler #(.F(F), .W(W), .CPLX(CPLX), .SIGN(SIGN_M)) u_wscale (
    .own_sum(t_sum), .own_carry(t_carry), .oth_sum(t_oth_sum), .oth_carry(t_oth_carry),
    .m_re(m_re_dig), .m_im(m_im_dig), .out_sum(ws_sum), .out_carry(ws_carry)
  );

  lr_scaler #(.F(F), .W(W), .CPLX(CPLX), .SIGN(SIGN_M)) u_zscale (
    .own_sum(zsrc), .own_carry('0), .oth_sum(zsrc_oth), .oth_carry('0),
    .m_re(m_re_dig), .m_im(m_im_dig), .out_sum(zs_sum), .out_carry(zs_carry)
  );

  logic do_scale;
  assign do_scale = (ctrl.op == OP_LOAD) || (ctrl.op == OP_SCALE) ||
                    (ctrl.op == OP_RECUR && ctrl.rescale);

  // ---- on-the-fly conversion --------------------------------------------------------
  logic [QL-1:0] q_reg, qm_reg, qp4_reg;

  otfc #(.QL(QL)) u_otfc (
    .clk(clk), .rst_n(rst_n), .init(ctrl.op == OP_LOAD), .en(ctrl.op == OP_RECUR),
    .radix(ctrl.radix), .q(q), .q_reg(q_reg), .qm_reg(qm_reg),
    .qp4_reg(qp4_reg)
  );

  logic [W-1:0] w_full;
  assign w_full = w_sum + w_carry;

  // rounding: with T = Q - neg the truncated quotient, round(T/4) = (T + 2) >> 2,
  // which is (Q + 4) >> 2 when the two low bits of Q are 3, or 2 with a
  // non-negative remainder, and Q >> 2 otherwise
  logic round_up;
  assign round_up = (q_reg[1:0] == 2'd3) || (q_reg[1:0] == 2'd2 && !w_full[W-1]);

  logic unused_qp4;
  assign unused_qp4 = ^qp4_reg[1:0];   // the rounded result drops the two low bits

  // ---- registers -----------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_sum    <= '0;
      w_carry  <= '0;
      z_own    <= '0;
      quotient     <= '0;
      quotient_rnd <= '0;
    end else begin
      if (ctrl.op == OP_LOAD || ctrl.op == OP_SCALE || ctrl.op == OP_RECUR) begin
        w_sum   <= do_scale ? ws_sum   : t_sum;
        w_carry <= do_scale ? ws_carry : t_carry;
      end
      if (do_scale) z_own <= zs_sum + zs_carry;
      if (ctrl.op == OP_FINAL) begin
        quotient     <= w_full[W-1] ? qm_reg : q_reg;
        quotient_rnd <= round_up ? qp4_reg[QL-1:2] : q_reg[QL-1:2];
      end
    end
  end

  // maximally redundant digit set: |q| <= r - 1 in every iteration
  logic signed [QW-1:0] rmax;
  always_comb begin
    unique case (ctrl.radix)
      RADIX4:  rmax = QW'(3);
      RADIX16: rmax = QW'(15);
      default: rmax = QW'(255);
    endcase
  end

  a_digit_range: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.op == OP_RECUR) |-> (q <= rmax && q >= -rmax))
    else $error("quotient digit %0d outside the digit set", q);

endmodule
