// vr_complex_div: variable-radix complex divider, q = n / d with n, d complex.
//
// Two vr_slice recurrence blocks, one for the real and one for the imaginary
// component, exchange their quotient digits, scaled divisors and pre-scaling
// remainders every cycle and implement
//   wR[j+1] = r*wR[j] - qR*zR + qI*zI
//   wI[j+1] = r*wI[j] - qI*zR - qR*zI
// with z = K*d, w[0] = K*n/4.  The prescaling factor K = K1 + i*K2 comes from a
// 256-entry table addressed by four bits of each divisor component; a first
// rescaling step by M = 2 - z and further ones before each radix change keep z
// close enough to 1 that each quotient digit is the rounded remainder.  The radix
// runs 4 -> 16 -> 256 (N4/N16/N256 iterations), one vr_ctrl sequences it.
//
// Interface: operands are N-bit two's complement fractions (N-1 fraction bits).
// The divisor must be normalised: at least one component >= 1/2 or < -1/2 in
// value.  Raise `start` for one cycle while `ready` with the operands valid; the
// quotient components (QL bits, L - 2 fraction bits, L = 2*N4+4*N16+8*N256) are
// valid from the cycle `done` is high until the next `done`.  Latency: `done`
// rises 3 + N4 + N16 + N256 cycles (15 by default) after the start edge.
// Each component of q_re/q_im is the exact quotient component truncated towards
// minus infinity (to within a small part of one unit in the last place);
// qr_re/qr_im (QL - 2 bits, L - 4 fraction bits) are the same rounded to
// nearest, half-way cases up, by on-the-fly rounding.
module vr_complex_div
  import vrdiv_pkg::*;
#(
  parameter int N    = 53,
  parameter int N4   = 4,
  parameter int N16  = 4,
  parameter int N256 = 4,
  parameter int L    = 2*N4 + 4*N16 + 8*N256,
  parameter int QL   = L + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  n_re,
  input  logic [N-1:0]  n_im,
  input  logic [N-1:0]  d_re,
  input  logic [N-1:0]  d_im,
  output logic          ready,
  output logic          done,
  output logic [QL-1:0] q_re,
  output logic [QL-1:0] q_im,
  output logic [QL-3:0] qr_re,
  output logic [QL-3:0] qr_im
);

  // datapath fraction bits: the exact prescaled operand, and at least six guard
  // bits below the last quotient bit
  localparam int F = (N - 1 + KF + SHIFT > L + 6) ? N - 1 + KF + SHIFT : L + 6;
  localparam int W = F + IBITS;

  dp_ctrl_t ctrl;

  vr_ctrl #(.N4(N4), .N16(N16), .N256(N256)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready), .done(done), .ctrl(ctrl)
  );

  logic signed [KW-1:0] k1, k2;

  prescale_table #(.N(N), .CPLX(1'b1)) u_table (.d_re(d_re), .d_im(d_im), .k1(k1), .k2(k2));

  logic [W-1:0] z_re, z_im, zsrc_re, zsrc_im;
  logic [W-1:0] t_re_s, t_re_c, t_im_s, t_im_c;
  r4dig_t       m_re_dig [MDIG];
  r4dig_t       m_im_dig [MDIG];
  r4dig_t       qd_re [QDIG];
  r4dig_t       qd_im [QDIG];
  logic signed [MW-1:0] m_re, m_im;
  logic signed [QW-1:0] qdig_re, qdig_im;

  scale_factor #(.F(F), .W(W)) u_sf (
    .load(ctrl.op == OP_LOAD), .k1(k1), .k2(k2), .z_re(z_re), .z_im(z_im),
    .m_re(m_re), .m_im(m_im), .m_re_dig(m_re_dig), .m_im_dig(m_im_dig)
  );

  vr_slice #(.N(N), .CPLX(1'b1), .IMAG(1'b0), .QL(QL), .F(F), .W(W)) u_re (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .n_in(n_re), .d_in(d_re),
    .m_re_dig(m_re_dig), .m_im_dig(m_im_dig), .z_re(z_re), .z_im(z_im),
    .q_oth_dig(qd_im), .t_oth_sum(t_im_s), .t_oth_carry(t_im_c), .zsrc_oth(zsrc_im),
    .z_own(z_re), .zsrc(zsrc_re), .t_sum(t_re_s), .t_carry(t_re_c),
    .q_dig(qd_re), .q(qdig_re), .quotient(q_re),
    .quotient_rnd(qr_re)
  );

  vr_slice #(.N(N), .CPLX(1'b1), .IMAG(1'b1), .QL(QL), .F(F), .W(W)) u_im (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .n_in(n_im), .d_in(d_im),
    .m_re_dig(m_re_dig), .m_im_dig(m_im_dig), .z_re(z_re), .z_im(z_im),
    .q_oth_dig(qd_re), .t_oth_sum(t_re_s), .t_oth_carry(t_re_c), .zsrc_oth(zsrc_re),
    .z_own(z_im), .zsrc(zsrc_im), .t_sum(t_im_s), .t_carry(t_im_c),
    .q_dig(qd_im), .q(qdig_im), .quotient(q_im),
    .quotient_rnd(qr_im)
  );

  logic unused;
  assign unused = ^{m_re, m_im, qdig_re, qdig_im};

endmodule
