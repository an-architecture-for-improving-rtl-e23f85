// rr_unit: round-and-recode quotient-digit selection.
//
// Because the divisor has been prescaled to z ~ 1, the quotient digit is simply
// the shifted partial remainder r*w rounded to an integer.  The remainder is in
// carry-save form; an estimate of r*w with TBITS fraction bits is formed by adding
// the top EW bits of the sum and carry words at the position chosen by the radix
// (a 3-way multiplexer: radix 4, 16 or 256).  Both words are truncated, so the
// estimate is up to two units low; adding 2^-TBITS centres that error before
// rounding:  q = floor(est + 1/2 + 2^-TBITS).
// The digit (|q| <= 255) is then recoded into QDIG = 5 radix-4 Booth digits
// {-2..2}, which drive the divisor multiple generators.  For radix 4 and 16 the
// upper recoded digits are zero.  Purely combinational.
module rr_unit
  import vrdiv_pkg::*;
#(
  parameter int F = 62,           // fraction bits of the remainder words
  parameter int W = F + IBITS
) (
  input  logic [W-1:0]        w_sum,
  input  logic [W-1:0]        w_carry,
  input  radix_e              radix,
  output logic signed [QW-1:0] q,
  output r4dig_t              q_dig [QDIG]
);

  logic [EW-1:0] es, ec, est;

  always_comb begin
    case (radix)
      RADIX4:  begin es = w_sum[F-TBITS-2 +: EW]; ec = w_carry[F-TBITS-2 +: EW]; end
      RADIX16: begin es = w_sum[F-TBITS-4 +: EW]; ec = w_carry[F-TBITS-4 +: EW]; end
      default: begin es = w_sum[F-TBITS-8 +: EW]; ec = w_carry[F-TBITS-8 +: EW]; end
    endcase
    est = es + ec + EW'((1 << (TBITS-1)) + 1);
    q   = QW'($signed(est) >>> TBITS);
  end

  for (genvar k = 0; k < QDIG; k++) begin : g_rec
    assign q_dig[k] = booth_digit(32'(q), QW, k);
  end

  logic unused;
  assign unused = ^{w_sum[W-1:F-TBITS-8+EW], w_carry[W-1:F-TBITS-8+EW],
                    w_sum[F-TBITS-3:0], w_carry[F-TBITS-3:0]};

endmodule
