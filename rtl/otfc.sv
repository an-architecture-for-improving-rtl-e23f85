// otfc: variable-radix on-the-fly conversion of signed quotient digits.
//
// Keeps Q (the quotient so far) and QM = Q - 1, QP = Q + 1 and QP4 = Q + 4 (in
// units of the last digit).  For each new digit q of radix r = 2^b every register
// becomes Q*r + q + c for its constant c (-1, 0, 1 or 4): with v = q + c,
//   v <  0:       from QM, low bits v + r
//   0 <= v < r:   from Q,  low bits v
//   v >= r:       from QP, low bits v - r
// (v >= r happens only for QP and QP4, since |q| <= r - 1).
// Every update is a shift by b and a concatenation of b bits taken from one of
// the registers, so no carry-propagate adder is needed; b changes with the radix
// schedule (2, 4, 8).  On init Q = 0, QM = -1, QP = 1, QP4 = 4.
// The final selection (QM when the last remainder is negative, giving a quotient
// truncated towards minus infinity; Q or QP4 without their two low bits for the
// rounded quotient) is done by the user of this block.  QP and QP4 implement the
// on-the-fly rounding the paper names; the register set and the round position
// (two bits below the last quotient bit) are this design's choices.
// Timing: one digit per enabled clock edge.
module otfc
  import vrdiv_pkg::*;
#(
  parameter int QL = 58  // register width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,   // clear to Q = 0, QM = -1
  input  logic                 en,     // append digit q
  input  radix_e               radix,
  input  logic signed [QW-1:0] q,
  output logic [QL-1:0]        q_reg,
  output logic [QL-1:0]        qm_reg,
  output logic [QL-1:0]        qp4_reg
);

  logic [QL-1:0] qp_reg;
  logic [7:0]    lo_q, lo_qm, lo_qp, lo_qp4;   // the b new low bits (low b used)
  logic          from_qm_q, from_qm_qm, from_q_qp, from_qp_qp, from_qp_qp4,
                 from_qm_qp4;
  logic signed [QW-1:0] rv;                    // the radix r

  always_comb begin
    unique case (radix)
      RADIX4:  rv = QW'(4);
      RADIX16: rv = QW'(16);
      default: rv = QW'(256);
    endcase
    // low bits are (q + c) mod r; taking 8 bits and masking by the shift below
    // is the same for every radix
    lo_q        = 8'(q);
    lo_qm       = 8'(q - 1);
    lo_qp       = 8'(q + 1);
    lo_qp4      = 8'(q + 4);
    from_qm_q   = q[QW-1];                 // q < 0
    from_qm_qm  = q[QW-1] || (q == '0);    // q <= 0
    from_q_qp   = (q >= -1) && (q + 1 < rv);
    from_qp_qp  = (q + 1 == rv);           // otherwise q < -1: from QM
    from_qp_qp4 = (q + 4 >= rv);
    from_qm_qp4 = (q < -4);
  end

  function automatic logic [QL-1:0] append(logic [QL-1:0] base, logic [7:0] lo, radix_e r);
    case (r)
      RADIX4:  return {base[QL-3:0], lo[1:0]};
      RADIX16: return {base[QL-5:0], lo[3:0]};
      default: return {base[QL-9:0], lo[7:0]};
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_reg   <= '0;
      qm_reg  <= '1;
      qp_reg  <= QL'(1);
      qp4_reg <= QL'(4);
    end else if (init) begin
      q_reg   <= '0;
      qm_reg  <= '1;
      qp_reg  <= QL'(1);
      qp4_reg <= QL'(4);
    end else if (en) begin
      q_reg   <= append(from_qm_q  ? qm_reg : q_reg, lo_q,  radix);
      qm_reg  <= append(from_qm_qm ? qm_reg : q_reg, lo_qm, radix);
      qp_reg  <= append(from_qp_qp ? qp_reg : from_q_qp ? q_reg : qm_reg, lo_qp, radix);
      qp4_reg <= append(from_qp_qp4 ? qp_reg : from_qm_qp4 ? qm_reg : q_reg,
                        lo_qp4, radix);
    end
  end

endmodule
