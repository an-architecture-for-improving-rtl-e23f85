// tb_vr_slice: recurrence-block test with the testbench as controller.
//
// One slice (real configuration, no cross terms) is driven directly: the
// testbench issues the control words (LOAD, SCALE, 4+4+4 RECUR with rescaling at
// the radix changes, FINAL), computes the scale factors itself (K = round(256/d)
// on load, M = floor((2 - z) * 2^14) from the slice's z output otherwise) and
// recodes them into radix-4 digits with its own recoder.  After every rescaling
// the slice's z must be within the bound the next radix needs (|1 - z| < 2^-5
// after the first step, < 2^-10 before radix 256), and the final quotient is
// checked exactly against x/d: -d/8 <= x*2^54 - Q*d < 9d/8.
module tb_vr_slice;
  import vrdiv_pkg::*;
  localparam int N  = 53;
  localparam int QL = 58;
  localparam int F  = N - 1 + KF + SHIFT;
  localparam int W  = F + IBITS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dp_ctrl_t ctrl;
  logic [N-1:0] n_in, d_in;
  r4dig_t m_re_dig [MDIG];
  r4dig_t m_im_dig [MDIG];
  r4dig_t q_oth_dig [QDIG];
  r4dig_t q_dig [QDIG];
  logic [W-1:0] z_own, zsrc, t_sum, t_carry;
  logic signed [QW-1:0] q;
  logic [QL-1:0] quotient;
  logic [QL-3:0] quotient_rnd;

  vr_slice #(.N(N), .CPLX(1'b0), .IMAG(1'b0), .QL(QL), .F(F), .W(W)) dut (
    .clk, .rst_n, .ctrl, .n_in, .d_in, .m_re_dig, .m_im_dig, .z_re(z_own), .z_im('0),
    .q_oth_dig, .t_oth_sum('0), .t_oth_carry('0), .zsrc_oth('0),
    .z_own, .zsrc, .t_sum, .t_carry, .q_dig, .q, .quotient, .quotient_rnd);

  int checks = 0, failures = 0;
  typedef logic signed [255:0] big_t;

  function automatic void recode(input longint v, output r4dig_t d [MDIG]);
    longint x;
    x = v;
    for (int k = 0; k < MDIG; k++) begin
      longint m;
      m = x % 4;
      if (m < 0) m += 4;
      if (m == 3) m = -1;
      else if (m == 2 && ((x / 4) % 2 != 0)) m = -2;
      d[k] = r4dig_t'(m);
      x = (x - m) / 4;
    end
  endfunction

  task automatic set_m_from_z();
    longint m;
    m = longint'($signed((W'(2) << F) - z_own) >>> (F - MF));
    recode(m, m_re_dig);
  endtask

  task automatic check_z(real bound, string what);
    real e;
    e = real'($signed(z_own - (W'(1) << F))) / (2.0 ** F);
    if (e < 0.0) e = -e;
    checks++;
    if (e >= bound) begin failures++; $display("FAIL z after %s: |1-z| = %g", what, e); end
  endtask

  logic [N-1:0] xv, dv;
  big_t e;
  real dreal;

  initial begin
    for (int k = 0; k < QDIG; k++) q_oth_dig[k] = '0;
    for (int k = 0; k < MDIG; k++) m_im_dig[k] = '0;
    ctrl = '{op: OP_IDLE, radix: RADIX4, rescale: 1'b0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      xv = N'({$urandom, $urandom});
      dv = N'({$urandom, $urandom}); dv[N-1:N-2] = 2'b01;
      n_in = xv; d_in = dv;
      dreal = real'($signed(dv)) / (2.0 ** (N-1));
      @(negedge clk);
      ctrl = '{op: OP_LOAD, radix: RADIX4, rescale: 1'b0};
      recode(longint'($rtoi(256.0 / dreal + 0.5)) <<< (MF - KF), m_re_dig);
      @(negedge clk);
      n_in = '0; d_in = '0;
      ctrl = '{op: OP_SCALE, radix: RADIX4, rescale: 1'b0};
      set_m_from_z();
      @(negedge clk);
      check_z(1.0 / 32, "refinement");
      for (int j = 0; j < 12; j++) begin
        ctrl = '{op: OP_RECUR, radix: (j < 4) ? RADIX4 : (j < 8) ? RADIX16 : RADIX256,
                 rescale: (j == 3 || j == 7)};
        set_m_from_z();
        @(negedge clk);
        if (j == 7) check_z(1.0 / 1024, "radix-16 phase");
      end
      ctrl = '{op: OP_FINAL, radix: RADIX4, rescale: 1'b0};
      @(negedge clk);
      ctrl = '{op: OP_IDLE, radix: RADIX4, rescale: 1'b0};
      e = (big_t'($signed(xv)) <<< 54) - big_t'($signed(quotient)) * big_t'($signed(dv));
      checks++;
      if (8 * e < -big_t'($signed(dv)) || 8 * e >= 9 * big_t'($signed(dv))) begin
        failures++; $display("FAIL x=%h d=%h q=%h", xv, dv, quotient);
      end
      e = (big_t'($signed(xv)) <<< 54) - (big_t'($signed(quotient_rnd)) <<< 2) * big_t'($signed(dv));
      checks++;
      if (8 * e < -17 * big_t'($signed(dv)) || 8 * e > 17 * big_t'($signed(dv))) begin
        failures++; $display("FAIL rounded x=%h d=%h r=%h", xv, dv, quotient_rnd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500 * 20 + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
