// lr_scaler: carry-save scaling of a (complex) carry-save value by a short factor.
//
// Computes   out = M_re * t_own + SIGN * M_im * t_oth
// where t_own and t_oth are carry-save pairs (the component handled by this
// slice and the other component), and M_re, M_im arrive as radix-4 Booth digits
// (MDIG digits, MF fraction bits).  Each digit selects 0, +-x or +-2x of a
// shifted operand word; all partial products are reduced by one csa_tree and the
// result is again a carry-save pair, so no carry-propagate adder is used.  This is
// the left-to-right multiple generator of the paper used for prescaling
// (M = K from the table) and for the rescaling between radices (M = 2 - z).
// SIGN is -1 for the real slice (Re(M*t) = Mr*tr - Mi*ti) and +1 for the
// imaginary slice (Im(M*t) = Mr*ti + Mi*tr); CPLX = 0 drops the second product.
//
// A carry-save pair is only defined modulo 2^W, which a fractional factor would
// not preserve.  The value scaled here is known to be below 1 in magnitude, so
// the top three bits of both words tell whether their plain two's complement sum
// overflowed; the carry word is corrected by that multiple of 2^W (a change of
// its top bits only) before scaling.  Each output word is truncated to F
// fraction bits (error below 2 units in the last place).  Combinational.
module lr_scaler
  import vrdiv_pkg::*;
#(
  parameter int F    = 62,
  parameter int W    = F + IBITS,
  parameter bit CPLX = 1'b1,
  parameter int SIGN = -1
) (
  input  logic [W-1:0] own_sum,
  input  logic [W-1:0] own_carry,
  input  logic [W-1:0] oth_sum,
  input  logic [W-1:0] oth_carry,
  input  r4dig_t       m_re [MDIG],
  input  r4dig_t       m_im [MDIG],
  output logic [W-1:0] out_sum,
  output logic [W-1:0] out_carry
);

  localparam int WX  = W + MF + 4;
  localparam int NOP = CPLX ? 4 * MDIG : 2 * MDIG;

  typedef logic [WX-1:0] wx_t;

  // sign-extend a carry-save pair and undo a wrap of its sum
  function automatic void canon(input logic [W-1:0] s, input logic [W-1:0] c,
                                output wx_t se, output wx_t ce);
    logic signed [3:0] u;
    u  = 4'($signed(s[W-1 -: 3])) + 4'($signed(c[W-1 -: 3]));
    se = wx_t'($signed(s));
    ce = wx_t'($signed(c));
    if (u == -4'sd8)     ce = ce + (wx_t'(1) << W);
    else if (u == 4'sd6) ce = ce - (wx_t'(1) << W);
  endfunction

  function automatic wx_t mul_dig(wx_t x, r4dig_t d, int k);
    wx_t y;
    case (d)
      3'sd1:   y = x;
      3'sd2:   y = x << 1;
      -3'sd1:  y = -x;
      -3'sd2:  y = -(x << 1);
      default: y = '0;
    endcase
    return y << (2*k);
  endfunction

  wx_t ops [NOP];
  wx_t red_s, red_c;

  always_comb begin
    wx_t se, ce, ose, oce;
    canon(own_sum, own_carry, se, ce);
    canon(oth_sum, oth_carry, ose, oce);
    for (int k = 0; k < MDIG; k++) begin
      ops[2*k]   = mul_dig(se, m_re[k], k);
      ops[2*k+1] = mul_dig(ce, m_re[k], k);
    end
    if (CPLX) begin
      for (int k = 0; k < MDIG; k++) begin
        ops[2*MDIG + 2*k]   = mul_dig(ose, (SIGN < 0) ? r4dig_t'(-m_im[k]) : m_im[k], k);
        ops[2*MDIG + 2*k+1] = mul_dig(oce, (SIGN < 0) ? r4dig_t'(-m_im[k]) : m_im[k], k);
      end
    end
  end

  csa_tree #(.NIN(NOP), .W(WX)) u_tree (.in(ops), .sum(red_s), .carry(red_c));

  assign out_sum   = red_s[MF +: W];
  assign out_carry = red_c[MF +: W];

  logic unused;
  assign unused = ^{red_s[WX-1:MF+W], red_c[WX-1:MF+W], red_s[MF-1:0], red_c[MF-1:0]};

endmodule
