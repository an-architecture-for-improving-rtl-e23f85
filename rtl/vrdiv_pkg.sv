// vrdiv_pkg: types, constants and helper functions shared by the variable-radix
// real and complex dividers.
//
// Number formats (all two's complement):
//   operands   N bits, N-1 fraction bits, value in [-1, 1)
//   datapath   W = F + IBITS bits, F fraction bits; partial remainder w is kept in
//              carry-save form (sum, carry), scaled divisor z is conventional
//   factors    prescaling/rescaling factor M has MF fraction bits, MW bits in all
//   quotient   QL = L + 2 bits, L - 2 fraction bits (L = number of quotient bits
//              produced by the radix schedule)
// The radix schedule is radix 4 -> radix 16 -> radix 256, following the paper;
// the number of iterations spent in each radix (4/4/4, 56 quotient bits in 12
// iterations) is this design's choice, fitted to the paper's "12 iterations,
// about 56 bits".
package vrdiv_pkg;

  // ---- fixed design constants -------------------------------------------------
  localparam int KF    = 8;   // fraction bits of table prescaling factors (0x82 = 130/256)
  localparam int KW    = 11;  // width of a table factor (range [-4, 4))
  localparam int PB    = 3;   // fraction bits of each divisor component used as table index
  localparam int SHIFT = 2;   // dividend pre-shift (w[0] = K*n/4) so that |w[0]| < 3/4
  localparam int IBITS = 10;  // integer bits of the datapath (|r*w| < 256 for r = 256)
  localparam int TBITS = 6;   // fraction bits of the remainder estimate used for rounding
  localparam int EW    = IBITS + TBITS;  // width of the remainder estimate
  localparam int MF    = 14;  // fraction bits of a rescaling factor M = 2 - z
  localparam int MW    = MF + 3;         // width of M (|M| < 4)
  localparam int MDIG  = (MW + 1) / 2;   // radix-4 (Booth) digits of M
  localparam int QW    = 10;  // width of one quotient digit (|q| <= 255 for r = 256)
  localparam int QDIG  = QW / 2;         // radix-4 digits of a quotient digit: five

  // ---- control ----------------------------------------------------------------
  typedef enum logic [2:0] {
    OP_IDLE  = 3'd0,   // hold
    OP_LOAD  = 3'd1,   // prescale operands by the table factor K
    OP_SCALE = 3'd2,   // refine: rescale w and z by M = 2 - z (no digit)
    OP_RECUR = 3'd3,   // one recurrence iteration (optionally followed by a rescale)
    OP_FINAL = 3'd4    // on-the-fly conversion result correction, result register load
  } op_e;

  typedef enum logic [1:0] {
    RADIX4   = 2'd0,
    RADIX16  = 2'd1,
    RADIX256 = 2'd2
  } radix_e;

  typedef struct packed {
    op_e    op;
    radix_e radix;
    logic   rescale;  // OP_RECUR only: multiply the new remainder and z by M
  } dp_ctrl_t;

  typedef logic signed [2:0] r4dig_t;   // radix-4 digit in {-2..2}

  // Booth (radix-4) digit k of a two's complement word x of width n:
  //   d_k = -2*x[2k+1] + x[2k] + x[2k-1]   (x[-1] = 0, x[i >= n] = sign)
  function automatic r4dig_t booth_digit(input logic [31:0] x, input int n, input int k);
    logic [2:0] trip;   // {x[2k+1], x[2k], x[2k-1]}
    for (int i = 0; i < 3; i++) begin
      int j;
      j = 2*k - 1 + i;
      if (j < 0)       trip[i] = 1'b0;
      else if (j >= n) trip[i] = x[n-1];
      else             trip[i] = x[j[4:0]];
    end
    case (trip)
      3'b001, 3'b010: return 3'sd1;
      3'b011:         return 3'sd2;
      3'b100:         return -3'sd2;
      3'b101, 3'b110: return -3'sd1;
      default:        return 3'sd0;
    endcase
  endfunction

  // rounded integer division for the table contents: round(num / den), den > 0
  function automatic int div_round(int num, int den);
    if (num >= 0) return (2*num + den) / (2*den);
    else          return -((-2*num + den) / (2*den));
  endfunction

  // Complex prescaling factor K = 1/d for the table cell of divisor (iR, iI), where
  // iR and iI are the divisor components truncated to PB fraction bits (signed).
  // The cell midpoint is ((2iR+1) + i(2iI+1)) / 2^(PB+1), so
  //   K1 =  2^KF * 2^(PB+1) * (2iR+1) / ((2iR+1)^2 + (2iI+1)^2)
  //   K2 = -2^KF * 2^(PB+1) * (2iI+1) / ((2iR+1)^2 + (2iI+1)^2)
  // Cells with both components below 1/2 in magnitude hold divisors outside the
  // supported (normalised) range and store zero.
  function automatic logic [2*KW-1:0] cplx_k(int iR, int iI);
    int a, b, m, k1, k2;
    a = 2*iR + 1;
    b = 2*iI + 1;
    m = a*a + b*b;
    if ((iR < (1 << (PB-1)) && iR >= -(1 << (PB-1))) && (iI < (1 << (PB-1)) && iI >= -(1 << (PB-1))))
      return '0;
    k1 = div_round( (1 << (KF+PB+1)) * a, m);
    k2 = div_round(-(1 << (KF+PB+1)) * b, m);
    return {KW'(k1), KW'(k2)};
  endfunction

  // Real prescaling factor for a divisor d in [1/2, 1) whose first PB bits after
  // the leading one are j: K = round(2^KF / dmid), dmid = (2^(PB+1) + 2j + 1) / 2^(PB+2)
  function automatic logic [KW-1:0] real_k(int j);
    return KW'(div_round(1 << (KF+PB+2), (1 << (PB+1)) + 2*j + 1));
  endfunction

endpackage
