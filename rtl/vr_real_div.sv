// vr_real_div: variable-radix real divider, q = x / d.
//
// One vr_slice recurrence block with the cross terms removed:
//   w[j+1] = r*w[j] - q[j+1]*z,   z = K*d,   w[0] = K*x/4
// The prescaling factor K comes from an 8-entry table addressed by the three
// divisor bits after its leading one; a first rescaling step by M = 2 - z and
// further ones before each radix change keep z close enough to 1 that each
// quotient digit is the remainder rounded to an integer (round and recode).
// The radix runs 4 -> 16 -> 256 (N4/N16/N256 iterations) under vr_ctrl, and the
// digits are converted on the fly.
//
// Interface: x is an N-bit two's complement fraction in [-1, 1); d is positive
// and normalised, d in [1/2, 1).  Raise `start` for one cycle while `ready`; the
// quotient (QL bits, L - 2 fraction bits, L = 2*N4+4*N16+8*N256) is valid from
// the cycle `done` is high until the next `done`.  Latency: `done` rises
// 3 + N4 + N16 + N256 cycles (15 by default) after the start edge.  The quotient
// q is x/d truncated towards minus infinity; qr (QL - 2 bits, L - 4 fraction
// bits) is x/d rounded to nearest, half-way cases up.
module vr_real_div
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
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  d,
  output logic          ready,
  output logic          done,
  output logic [QL-1:0] q,
  output logic [QL-3:0] qr
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

  prescale_table #(.N(N), .CPLX(1'b0)) u_table (.d_re(d), .d_im('0), .k1(k1), .k2(k2));

  logic [W-1:0] z, zsrc, t_s, t_c;
  r4dig_t       m_re_dig [MDIG];
  r4dig_t       m_im_dig [MDIG];
  r4dig_t       qd [QDIG];
  r4dig_t       qd_none [QDIG];
  logic signed [MW-1:0] m_re, m_im;
  logic signed [QW-1:0] qdig;

  scale_factor #(.F(F), .W(W)) u_sf (
    .load(ctrl.op == OP_LOAD), .k1(k1), .k2(k2), .z_re(z), .z_im('0),
    .m_re(m_re), .m_im(m_im), .m_re_dig(m_re_dig), .m_im_dig(m_im_dig)
  );

  for (genvar k = 0; k < QDIG; k++) begin : g_none
    assign qd_none[k] = '0;
  end

  vr_slice #(.N(N), .CPLX(1'b0), .IMAG(1'b0), .QL(QL), .F(F), .W(W)) u_slice (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .n_in(x), .d_in(d),
    .m_re_dig(m_re_dig), .m_im_dig(m_im_dig), .z_re(z), .z_im('0),
    .q_oth_dig(qd_none), .t_oth_sum('0), .t_oth_carry('0), .zsrc_oth('0),
    .z_own(z), .zsrc(zsrc), .t_sum(t_s), .t_carry(t_c),
    .q_dig(qd), .q(qdig), .quotient(q), .quotient_rnd(qr)
  );

  logic unused;
  assign unused = ^{m_re, m_im, qdig, zsrc, t_s, t_c, k2, qd[0]};

endmodule
