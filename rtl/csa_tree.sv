// csa_tree: carry-save reduction of NIN operands of W bits to a sum/carry pair.
//
// Levels of 3:2 counters (full adders working bit-parallel) are stacked like a
// Wallace tree: on each level every complete group of three operands becomes a
// sum and a shifted carry, left-over operands pass down unchanged, until two
// remain.  No carry propagates anywhere, so the delay grows with the number of
// levels only (about log1.5(NIN)).  Arithmetic is modulo 2^W: sum + carry equals
// the sum of the inputs modulo 2^W.  Purely combinational.
// This is the partial-product reduction the paper places inside its
// left-to-right multiple generators; the tree shape is this design's choice.
module csa_tree #(
  parameter int NIN = 3,
  parameter int W   = 8
) (
  input  logic [W-1:0] in  [NIN],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // number of operands left after level l
  function automatic int count_at(int l);
    int n;
    n = NIN;
    for (int i = 0; i < l; i++) n = n - n / 3;
    return n;
  endfunction

  function automatic int n_levels();
    int n, l;
    n = NIN;
    l = 0;
    while (n > 2) begin
      n = n - n / 3;
      l++;
    end
    return l;
  endfunction

  localparam int LEV = n_levels();

  // each level keeps its operands in its own generate scope (no array shared
  // between levels, so simulators see no false combinational loop)
  for (genvar l = 0; l < LEV; l++) begin : g_lev
    localparam int NC = count_at(l);
    localparam int G  = NC / 3;
    logic [W-1:0] cur [NIN];
    logic [W-1:0] nxt [NIN];
    if (l == 0) begin : g_first
      assign cur = in;
    end else begin : g_next
      assign cur = g_lev[l-1].nxt;
    end
    for (genvar g = 0; g < G; g++) begin : g_fa
      logic [W-1:0] a, b, c;
      assign a = cur[3*g];
      assign b = cur[3*g+1];
      assign c = cur[3*g+2];
      assign nxt[2*g]   = a ^ b ^ c;
      assign nxt[2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
    end
    for (genvar i = 3*G; i < NC; i++) begin : g_pass
      assign nxt[2*G + i - 3*G] = cur[i];
    end
    for (genvar i = NC - G; i < NIN; i++) begin : g_unused
      assign nxt[i] = '0;
    end
  end

  if (LEV == 0) begin : g_none
    assign sum   = in[0];
    assign carry = (NIN >= 2) ? in[NIN-1] : '0;
  end else begin : g_out
    assign sum   = g_lev[LEV-1].nxt[0];
    assign carry = g_lev[LEV-1].nxt[1];
  end

endmodule
