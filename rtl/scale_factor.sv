// scale_factor: forms the prescaling / rescaling factor M = M_re + i*M_im and
// recodes it into radix-4 Booth digits for the lr_scaler multiple generators.
//
//   OP_LOAD : M = K from the prescaling table (KF fraction bits, shifted to MF)
//   otherwise: M = 2 - z truncated to MF = 14 fraction bits, i.e.
//              M_re = 2 - z_re,  M_im = -z_im
// With z = 1 + e, M*z = 1 - e^2 (plus the truncation), so every rescaling step
// squares the distance of the scaled divisor from 1.  This is how the design
// reaches the accuracy each higher radix needs (about 2^-5 for radix 4, 2^-7 for
// radix 16, 2^-11 for radix 256) without larger tables: the paper's
// variable-radix idea, where a factor approximating 1/d is applied again before
// each radix change; forming it as 2 - z is this design's choice.
// Combinational.
module scale_factor
  import vrdiv_pkg::*;
#(
  parameter int F = 62,
  parameter int W = F + IBITS
) (
  input  logic                 load,   // use the table factor
  input  logic signed [KW-1:0] k1,
  input  logic signed [KW-1:0] k2,
  input  logic [W-1:0]         z_re,
  input  logic [W-1:0]         z_im,
  output logic signed [MW-1:0] m_re,
  output logic signed [MW-1:0] m_im,
  output r4dig_t               m_re_dig [MDIG],
  output r4dig_t               m_im_dig [MDIG]
);

  logic [W-1:0] two_minus_z, minus_z;

  always_comb begin
    two_minus_z = (W'(2) << F) - z_re;
    minus_z     = -z_im;
    if (load) begin
      m_re = MW'(k1) <<< (MF - KF);
      m_im = MW'(k2) <<< (MF - KF);
    end else begin
      m_re = MW'($signed(two_minus_z) >>> (F - MF));
      m_im = MW'($signed(minus_z) >>> (F - MF));
    end
  end

  for (genvar k = 0; k < MDIG; k++) begin : g_rec
    assign m_re_dig[k] = booth_digit(32'(m_re), MW, k);
    assign m_im_dig[k] = booth_digit(32'(m_im), MW, k);
  end

endmodule
