// tb_vr_divider_top: end-to-end test of the complex and real dividers at their
// default sizes (53-bit operands, radix 4 -> 16 -> 256, 58-bit quotients).
//
// Runs NOPS complex and NOPS real divisions at the same time: the worked example
// n = 0.359308 - 0.922485i, d = 0.996379 + 0.986769i, corner divisors at the
// edges of the prescaling-table cells and of the normalised range, and random
// operands.  Each quotient is checked with exact integer arithmetic, not with a
// model of the divider:
//   real:    -d/8 <= x*2^54 - Q*d < 9d/8, i.e. Q is floor(x/d) to within 1/8 unit in
//            the last place
//   complex: E = n*2^54 - Q*d, P = E*conj(d); for each component
//            -|d|^2/8 <= P < 9/8*|d|^2, i.e. Q is the truncated quotient to within
//            1/8 unit in the last place
//   rounded outputs (52 fraction bits): the same with 4R in place of Q and the
//            bounds |8*e| <= 17*d, |8*P| <= 17*|d|^2 (rounded to nearest to within
//            1/32 unit in the last place)
// It also checks the latency (done 15 cycles after the start edge) and counts how
// often each mechanism occurred: radix-4/16/256 iterations, refinement and
// rescaling steps, negative quotient digits (the QM path of the on-the-fly
// converter), the negative-remainder correction and rounding up; one that never happened is
// a failure.
module tb_vr_divider_top;
  import vrdiv_pkg::*;

  localparam int N    = 53;
  localparam int QL   = 58;
  localparam int NOPS = 300;
  localparam int LAT  = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          c_start = 1'b0, r_start = 1'b0;
  logic [N-1:0]  c_n_re, c_n_im, c_d_re, c_d_im, r_x, r_d;
  logic          c_ready, c_done, r_ready, r_done;
  logic [QL-1:0] c_q_re, c_q_im, r_q;
  logic [QL-3:0] c_qr_re, c_qr_im, r_qr;

  vr_divider_top dut (.*);

  int checks = 0, failures = 0;
  int n_r4 = 0, n_r16 = 0, n_r256 = 0, n_refine = 0, n_rescale = 0, n_negdig = 0, n_corr = 0,
      n_rup = 0;

  // ---- mechanism counters (observe the complex divider's control word) ----------
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cdiv.ctrl.op == OP_SCALE) n_refine++;
    if (dut.u_cdiv.ctrl.op == OP_RECUR) begin
      case (dut.u_cdiv.ctrl.radix)
        RADIX4:  n_r4++;
        RADIX16: n_r16++;
        default: n_r256++;
      endcase
      if (dut.u_cdiv.ctrl.rescale) n_rescale++;
      if (dut.u_cdiv.u_re.q < 0 || dut.u_cdiv.u_im.q < 0) n_negdig++;
    end
    if (dut.u_cdiv.ctrl.op == OP_FINAL &&
        (dut.u_cdiv.u_re.w_full[dut.u_cdiv.W-1] || dut.u_rdiv.u_slice.w_full[dut.u_rdiv.W-1]))
      n_corr++;
    if (dut.u_cdiv.ctrl.op == OP_FINAL &&
        (dut.u_cdiv.u_re.round_up || dut.u_rdiv.u_slice.round_up))
      n_rup++;
  end

  // ---- operand generation ---------------------------------------------------------
  function automatic logic [N-1:0] rnd();
    return N'({$urandom, $urandom});
  endfunction

  function automatic logic [N-1:0] fx(real v);   // real -> N-bit fraction
    return N'(longint'(v * (2.0 ** (N-1))));
  endfunction

  function automatic bit normal(logic [N-1:0] v);
    return v[N-1] ^ v[N-2];
  endfunction

  // ---- exact checks ---------------------------------------------------------------
  typedef logic signed [255:0] big_t;

  function automatic big_t sx(logic [N-1:0] v);  return big_t'($signed(v)); endfunction
  function automatic big_t sq(logic [QL-1:0] v); return big_t'($signed(v)); endfunction

  task automatic check_real(logic [N-1:0] x, logic [N-1:0] d, logic [QL-1:0] q);
    big_t e;
    e = (sx(x) <<< 54) - sq(q) * sx(d);
    checks++;
    if (8 * e < -sx(d) || 8 * e >= 9 * sx(d)) begin
      failures++;
      $display("FAIL real x=%h d=%h q=%h", x, d, q);
    end
  endtask

  function automatic big_t sr(logic [QL-3:0] v); return big_t'($signed(v)) <<< 2; endfunction

  task automatic check_real_rnd(logic [N-1:0] x, logic [N-1:0] d, logic [QL-3:0] q);
    big_t e;
    e = (sx(x) <<< 54) - sr(q) * sx(d);
    checks++;
    if (8 * e < -17 * sx(d) || 8 * e > 17 * sx(d)) begin
      failures++;
      $display("FAIL rounded real x=%h d=%h q=%h", x, d, q);
    end
  endtask

  task automatic check_cplx_rnd(logic [N-1:0] nr, logic [N-1:0] ni, logic [N-1:0] dr,
                                logic [N-1:0] di, logic [QL-3:0] qr, logic [QL-3:0] qi);
    big_t er, ei, pr, pi, m;
    er = (sx(nr) <<< 54) - (sr(qr) * sx(dr) - sr(qi) * sx(di));
    ei = (sx(ni) <<< 54) - (sr(qr) * sx(di) + sr(qi) * sx(dr));
    pr = er * sx(dr) + ei * sx(di);
    pi = ei * sx(dr) - er * sx(di);
    m  = sx(dr) * sx(dr) + sx(di) * sx(di);
    checks++;
    if (8 * pr < -17 * m || 8 * pr > 17 * m || 8 * pi < -17 * m || 8 * pi > 17 * m) begin
      failures++;
      $display("FAIL rounded complex n=(%h,%h) d=(%h,%h) q=(%h,%h)", nr, ni, dr, di, qr, qi);
    end
  endtask

  task automatic check_cplx(logic [N-1:0] nr, logic [N-1:0] ni, logic [N-1:0] dr,
                            logic [N-1:0] di, logic [QL-1:0] qr, logic [QL-1:0] qi);
    big_t er, ei, pr, pi, m;
    er = (sx(nr) <<< 54) - (sq(qr) * sx(dr) - sq(qi) * sx(di));
    ei = (sx(ni) <<< 54) - (sq(qr) * sx(di) + sq(qi) * sx(dr));
    pr = er * sx(dr) + ei * sx(di);
    pi = ei * sx(dr) - er * sx(di);
    m  = sx(dr) * sx(dr) + sx(di) * sx(di);
    checks += 2;
    if (8 * pr < -m || 8 * pr >= 9 * m) begin
      failures++;
      $display("FAIL complex re n=(%h,%h) d=(%h,%h) q=(%h,%h)", nr, ni, dr, di, qr, qi);
    end
    if (8 * pi < -m || 8 * pi >= 9 * m) begin
      failures++;
      $display("FAIL complex im n=(%h,%h) d=(%h,%h) q=(%h,%h)", nr, ni, dr, di, qr, qi);
    end
  endtask

  // ---- stimulus -------------------------------------------------------------------
  logic [N-1:0] nr, ni, dr, di, x, d;
  int cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < NOPS; i++) begin
      // complex operands
      case (i)
        0: begin nr = fx(0.359308); ni = fx(-0.922485); dr = fx(0.996379); di = fx(0.986769); end
        1: begin nr = fx(0.999999); ni = fx(0.999999);  dr = fx(0.5);      di = '0;             end
        2: begin nr = {1'b1, {(N-1){1'b0}}}; ni = {1'b1, {(N-1){1'b0}}};
                 dr = {2'b01, {(N-2){1'b0}}}; di = {2'b01, {(N-2){1'b0}}} - 1'b1; end
        3: begin nr = fx(-0.999999); ni = fx(0.7); dr = fx(-0.500001); di = fx(0.499999); end
        4: begin nr = fx(0.999999); ni = fx(-0.999999); dr = fx(0.999999); di = fx(-0.999999); end
        5: begin nr = '0; ni = '0; dr = fx(0.75); di = fx(-0.3); end
        default: begin
          nr = rnd(); ni = rnd();
          do begin dr = rnd(); di = rnd(); end while (!(normal(dr) || normal(di)));
        end
      endcase
      // real operands
      case (i)
        0: begin x = fx(0.999999);  d = {2'b01, {(N-2){1'b0}}}; end
        1: begin x = {1'b1, {(N-1){1'b0}}}; d = {2'b01, {(N-2){1'b0}}}; end
        2: begin x = fx(0.5); d = {2'b01, {(N-2){1'b1}}}; end
        3: begin x = '0; d = fx(0.7); end
        default: begin x = rnd(); d = rnd(); d[N-1:N-2] = 2'b01; end
      endcase
      c_n_re = nr; c_n_im = ni; c_d_re = dr; c_d_im = di; r_x = x; r_d = d;
      wait (c_ready && r_ready);
      @(negedge clk);
      c_start = 1'b1; r_start = 1'b1;
      @(posedge clk);
      cyc = 0;
      @(negedge clk);
      c_start = 1'b0; r_start = 1'b0;
      c_n_re = rnd(); c_d_re = rnd(); r_x = rnd(); r_d = rnd();   // operands need not be held
      while (!c_done) begin
        @(posedge clk);
        cyc++;
      end
      checks++;
      if (cyc != LAT || !r_done) begin
        failures++;
        $display("FAIL latency %0d (expected %0d), real done %0b", cyc, LAT, r_done);
      end
      if (i == 0)
        $display("example: q = %f + %f i", real'($signed(c_q_re)) / 2.0**54,
                 real'($signed(c_q_im)) / 2.0**54);
      check_cplx(nr, ni, dr, di, c_q_re, c_q_im);
      check_real(x, d, r_q);
      check_cplx_rnd(nr, ni, dr, di, c_qr_re, c_qr_im);
      check_real_rnd(x, d, r_qr);
      @(negedge clk);
    end
    // every mechanism must have occurred
    checks += 8;
    if (n_r4 == 0)      begin failures++; $display("FAIL no radix-4 iteration");   end
    if (n_r16 == 0)     begin failures++; $display("FAIL no radix-16 iteration");  end
    if (n_r256 == 0)    begin failures++; $display("FAIL no radix-256 iteration"); end
    if (n_refine == 0)  begin failures++; $display("FAIL no refinement step");     end
    if (n_rescale == 0) begin failures++; $display("FAIL no rescaling step");      end
    if (n_negdig == 0)  begin failures++; $display("FAIL no negative digit");      end
    if (n_corr == 0)    begin failures++; $display("FAIL no remainder correction"); end
    if (n_rup == 0)     begin failures++; $display("FAIL no rounding up");         end
    $display("mechanisms: r4=%0d r16=%0d r256=%0d refine=%0d rescale=%0d negdigit=%0d correction=%0d roundup=%0d",
             n_r4, n_r16, n_r256, n_refine, n_rescale, n_negdig, n_corr, n_rup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS * (LAT + 6) + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
