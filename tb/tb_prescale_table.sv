// tb_prescale_table: prescaling table test.  For random normalised divisors the
// factor read from the table must bring the scaled divisor close to 1:
//   complex: |1 - K*d| <= 0.165   (cell half-width sqrt(2)/16 over a cell midpoint
//                                   of magnitude >= 9/16,
//                                   plus the 2^-9 rounding of K)
//   real:    |1 - K*d| <= 0.066   (d in [1/2, 1), cell half-width 1/32 over d >= 1/2)
// K*d is computed here in floating point from the integer factors.  Both table
// variants are instantiated.  Combinational.
module tb_prescale_table;
  import vrdiv_pkg::*;
  localparam int N = 53;
  logic [N-1:0] d_re, d_im;
  logic signed [KW-1:0] k1, k2, rk1, rk2;
  int checks = 0, failures = 0;

  prescale_table #(.N(N), .CPLX(1'b1)) dut_c (.d_re(d_re), .d_im(d_im), .k1(k1), .k2(k2));
  prescale_table #(.N(N), .CPLX(1'b0)) dut_r (.d_re(d_re), .d_im(d_im), .k1(rk1), .k2(rk2));

  function automatic real fr(logic [N-1:0] v);
    return real'($signed(v)) / (2.0 ** (N-1));
  endfunction

  real dr, di, kr, ki, zr, zi, e;

  initial begin
    for (int i = 0; i < 5000; i++) begin
      do begin
        d_re = N'({$urandom, $urandom});
        d_im = N'({$urandom, $urandom});
      end while (!((d_re[N-1] ^ d_re[N-2]) || (d_im[N-1] ^ d_im[N-2])));
      #1;
      dr = fr(d_re); di = fr(d_im);
      kr = real'(k1) / 256.0; ki = real'(k2) / 256.0;
      zr = dr * kr - di * ki;
      zi = di * kr + dr * ki;
      e = ((1.0 - zr) * (1.0 - zr) + zi * zi) ** 0.5;
      checks++;
      if (e > 0.165) begin failures++; $display("FAIL complex d=(%f,%f) K=(%0d,%0d) err=%f", dr, di, k1, k2, e); end
      // real divisor: force into [1/2, 1)
      d_re[N-1:N-2] = 2'b01;
      #1;
      e = 1.0 - fr(d_re) * real'(rk1) / 256.0;
      if (e < 0.0) e = -e;
      checks += 2;
      if (e > 0.066) begin failures++; $display("FAIL real d=%f K=%0d err=%f", fr(d_re), rk1, e); end
      if (rk2 != '0) begin failures++; $display("FAIL real K2 not zero"); end
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
