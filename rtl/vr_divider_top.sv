// vr_divider_top: the variable-radix division unit, a complex divider and a real
// divider side by side.
//
// Both use the same recurrence block (vr_slice), digit selection by rounding
// (rr_unit), left-to-right carry-save scalers (lr_scaler), factor generation
// (scale_factor), prescaling tables (prescale_table), on-the-fly conversion (otfc)
// and controller (vr_ctrl); the complex divider has two cross-coupled slices and
// a two-dimensional table, the real divider one slice and a one-dimensional
// table.  They run independently, each with its own start/ready/done handshake;
// merging them into one shared unit is not done here.
// Latency of each: `done` 15 cycles after the start edge with the default radix
// schedule (4 x radix 4, 4 x radix 16, 4 x radix 256 = 56 quotient bits).
// Operands: N = 53-bit two's complement fractions; quotients: 58 bits with 54
// fraction bits, truncated (c_q_*, r_q), and 56 bits with 52 fraction bits,
// rounded to nearest (c_qr_*, r_qr).  See vr_complex_div and vr_real_div for
// the operand ranges.
module vr_divider_top
  import vrdiv_pkg::*;
#(
  parameter int N    = 53,
  parameter int N4   = 4,
  parameter int N16  = 4,
  parameter int N256 = 4,
  parameter int QL   = 2*N4 + 4*N16 + 8*N256 + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // complex division
  input  logic          c_start,
  input  logic [N-1:0]  c_n_re,
  input  logic [N-1:0]  c_n_im,
  input  logic [N-1:0]  c_d_re,
  input  logic [N-1:0]  c_d_im,
  output logic          c_ready,
  output logic          c_done,
  output logic [QL-1:0] c_q_re,
  output logic [QL-1:0] c_q_im,
  output logic [QL-3:0] c_qr_re,
  output logic [QL-3:0] c_qr_im,
  // real division
  input  logic          r_start,
  input  logic [N-1:0]  r_x,
  input  logic [N-1:0]  r_d,
  output logic          r_ready,
  output logic          r_done,
  output logic [QL-1:0] r_q,
  output logic [QL-3:0] r_qr
);

  vr_complex_div #(.N(N), .N4(N4), .N16(N16), .N256(N256), .QL(QL)) u_cdiv (
    .clk(clk), .rst_n(rst_n), .start(c_start),
    .n_re(c_n_re), .n_im(c_n_im), .d_re(c_d_re), .d_im(c_d_im),
    .ready(c_ready), .done(c_done), .q_re(c_q_re), .q_im(c_q_im),
    .qr_re(c_qr_re), .qr_im(c_qr_im)
  );

  vr_real_div #(.N(N), .N4(N4), .N16(N16), .N256(N256), .QL(QL)) u_rdiv (
    .clk(clk), .rst_n(rst_n), .start(r_start), .x(r_x), .d(r_d),
    .ready(r_ready), .done(r_done), .q(r_q), .qr(r_qr)
  );

endmodule
