// prescale_table: low-precision reciprocal table giving the prescaling factor
// K = K1 + i*K2 ~ 1/d for the radix-4 start of the variable-radix recurrence.
//
// Complex (CPLX = 1): addressed by the sign and the first PB = 3 fraction bits of
// each divisor component (2^8 = 256 entries); each entry holds K1 and K2 with
// KF = 8 fraction bits (the paper's example factors 0x82 and 0x80 read as
// 130/256 and -128/256).  Real (CPLX = 0): the divisor is in [1/2, 1) and the
// three bits after its leading one select one of 8 entries; K2 is zero.
// Entries are the rounded reciprocal of the cell midpoint (formulas in vrdiv_pkg).
// The table leaves |1 - K*d| up to about 0.13; one rescaling step by 2 - K*d at
// the start of the operation brings it under the radix-4 bound.  The contents are
// computed at elaboration time.  Combinational read.
// Divisors outside the supported range (both components in [-1/2, 1/2)) read
// zero factors.
module prescale_table
  import vrdiv_pkg::*;
#(
  parameter int N    = 53,  // operand width
  parameter bit CPLX = 1'b1
) (
  input  logic [N-1:0]         d_re,  // divisor, real part (N-1 fraction bits)
  input  logic [N-1:0]         d_im,  // divisor, imaginary part (ignored if CPLX = 0)
  output logic signed [KW-1:0] k1,
  output logic signed [KW-1:0] k2
);

  localparam int IW     = PB + 1;           // index bits per component
  localparam int DEPTH  = CPLX ? (1 << (2*IW)) : (1 << PB);

  typedef logic [2*KW-1:0] entry_t;

  function automatic entry_t rom_word(int a);
    int iR, iI;
    if (CPLX) begin
      iR = a >> IW;
      iI = a & ((1 << IW) - 1);
      if (iR >= (1 << PB)) iR -= (1 << IW);
      if (iI >= (1 << PB)) iI -= (1 << IW);
      return cplx_k(iR, iI);
    end else begin
      return {real_k(a), KW'(0)};
    end
  endfunction

  function automatic entry_t [DEPTH-1:0] rom_init();
    entry_t [DEPTH-1:0] r;
    for (int a = 0; a < DEPTH; a++) r[a] = rom_word(a);
    return r;
  endfunction

  localparam entry_t [DEPTH-1:0] ROM = rom_init();

  logic [$clog2(DEPTH)-1:0] addr;

  if (CPLX) begin : g_cplx
    assign addr = {d_re[N-1 -: IW], d_im[N-1 -: IW]};
    logic unused;
    assign unused = ^{d_re[N-1-IW:0], d_im[N-1-IW:0]};
  end else begin : g_real
    // d = 0.1 j2 j1 j0 ...: skip the sign and the leading one
    assign addr = d_re[N-3 -: PB];
    logic unused;
    assign unused = ^{d_re[N-1:N-2], d_re[N-3-PB:0], d_im};
  end

  assign k1 = ROM[addr][2*KW-1:KW];
  assign k2 = ROM[addr][KW-1:0];

endmodule
