// tb_lr_scaler: carry-save complex scaling test.  Random values |t| < 1 for the
// own and the other component are split into random carry-save pairs (whose
// plain sums may wrap modulo 2^W); random factors M_re, M_im of MW bits are
// recoded into Booth digits by the testbench's own recoder.  The assimilated
// output must equal floor((M_re*t_own + SIGN*M_im*t_oth) / 2^MF) within
// 2 units (one per truncated output word).  Both slice signs are tested.
// Combinational.
module tb_lr_scaler;
  import vrdiv_pkg::*;
  localparam int F = 62;
  localparam int W = F + IBITS;
  int checks = 0, failures = 0;

  logic [W-1:0] os, oc, ts, tc;
  r4dig_t mr [MDIG];
  r4dig_t mi [MDIG];
  logic [W-1:0] out_s_re, out_c_re, out_s_im, out_c_im;

  lr_scaler #(.F(F), .W(W), .CPLX(1'b1), .SIGN(-1)) dut_re (
    .own_sum(os), .own_carry(oc), .oth_sum(ts), .oth_carry(tc),
    .m_re(mr), .m_im(mi), .out_sum(out_s_re), .out_carry(out_c_re));
  lr_scaler #(.F(F), .W(W), .CPLX(1'b1), .SIGN(1)) dut_im (
    .own_sum(os), .own_carry(oc), .oth_sum(ts), .oth_carry(tc),
    .m_re(mr), .m_im(mi), .out_sum(out_s_im), .out_carry(out_c_im));

  typedef logic signed [159:0] big_t;

  function automatic logic [W-1:0] rndw();
    return W'({$urandom, $urandom, $urandom});
  endfunction

  // independent radix-4 recoding: greedy digits of a signed integer
  function automatic void recode(input longint v, output r4dig_t d [MDIG]);
    longint x;
    x = v;
    for (int k = 0; k < MDIG; k++) begin
      longint m;
      m = x % 4;
      if (m < 0) m += 4;          // 0..3
      if (m == 3) m = -1;
      else if (m == 2 && ((x / 4) % 2 != 0)) m = -2;
      d[k] = r4dig_t'(m);
      x = (x - m) / 4;
    end
  endfunction

  logic signed [W-1:0] a, b;
  longint mre, mim;
  big_t expr, expi, gotr, goti, dr, di;

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = W'($signed(rndw()) >>> (W - F - 1));     // |a| < 1
      b = W'($signed(rndw()) >>> (W - F - 1));
      if (i % 4 == 0) b = b >>> 12;
      oc = rndw(); os = a - oc;
      tc = rndw(); ts = b - tc;
      // carry words near -2^(W-1): the plain sum of the pair then often wraps
      if (i % 3 == 1) begin
        oc = (W'(1) << (W-1)) + W'(rndw() >> (W - F - 1)) - (W'(1) << F);
        os = a - oc;
      end
      if (i % 3 == 2) begin
        tc = (W'(1) << (W-1)) + W'(rndw() >> (W - F - 1)) - (W'(1) << F);
        ts = b - tc;
      end
      if (i == 0) begin oc = '0; os = a; tc = '0; ts = b; end
      mre = longint'($urandom_range(0, 65535)) - 32768;   // |M| < 2
      mim = longint'($urandom_range(0, 4095)) - 2048;
      recode(mre, mr);
      recode(mim, mi);
      #1;
      expr = ((big_t'(mre) * big_t'(a)) - (big_t'(mim) * big_t'(b))) >>> MF;
      expi = ((big_t'(mre) * big_t'(a)) + (big_t'(mim) * big_t'(b))) >>> MF;
      gotr = big_t'($signed(W'(out_s_re + out_c_re)));
      goti = big_t'($signed(W'(out_s_im + out_c_im)));
      dr = expr - gotr;
      di = expi - goti;
      checks += 2;
      if (dr < 0 || dr > 2) begin failures++; $display("FAIL re %0d: diff %0d", i, dr); end
      if (di < 0 || di > 2) begin failures++; $display("FAIL im %0d: diff %0d", i, di); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
