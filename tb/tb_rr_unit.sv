// tb_rr_unit: round-and-recode test.  Random partial remainders |w| < 0.56 are
// split into random carry-save pairs (sum + carry = w modulo 2^W, so the words
// themselves may wrap).  For each radix the digit must satisfy the rounding
// property |r*w - q| <= 1/2 + 2^-5 (estimate truncation included), and the five
// radix-4 digits must each be in {-2..2} and add up to q (sum d_k 4^k = q).
// Combinational: one check set per input.
module tb_rr_unit;
  import vrdiv_pkg::*;
  localparam int F = 62;
  localparam int W = F + IBITS;
  logic [W-1:0] w_sum, w_carry;
  radix_e radix;
  logic signed [QW-1:0] q;
  r4dig_t q_dig [QDIG];
  int checks = 0, failures = 0;

  rr_unit #(.F(F), .W(W)) dut (.*);

  function automatic logic [W-1:0] rndw();
    return W'({$urandom, $urandom, $urandom});
  endfunction

  logic signed [W-1:0] w;
  logic signed [W+9:0] err;   // r*w - q, F fraction bits
  int b, s;

  initial begin
    for (int i = 0; i < 3000; i++) begin
      // |w| < 0.56: random fraction bits scaled down
      w = W'($signed(rndw()) >>> (W - F - 1));          // |w| < 1
      w = (w >>> 1) + (w >>> 4);                           // |w| < 0.5625
      w_carry = rndw();
      w_sum = w - w_carry;
      radix = (i % 3 == 0) ? RADIX4 : (i % 3 == 1) ? RADIX16 : RADIX256;
      b = (i % 3 == 0) ? 2 : (i % 3 == 1) ? 4 : 8;
      #1;
      err = ((W+10)'(w) <<< b) - ((W+10)'(q) <<< F);
      checks++;
      if (err > ((W+10)'(1) <<< (F-1)) + ((W+10)'(1) <<< (F-5)) ||
          err < -(((W+10)'(1) <<< (F-1)) + ((W+10)'(1) <<< (F-5)))) begin
        failures++;
        $display("FAIL rounding: radix 2^%0d w=%h q=%0d", b, w, q);
      end
      s = 0;
      for (int k = 0; k < QDIG; k++) begin
        s += int'(q_dig[k]) * (1 << (2*k));
        checks++;
        if (q_dig[k] > 2 || q_dig[k] < -2) begin failures++; $display("FAIL digit range"); end
      end
      checks++;
      if (s != int'(q)) begin failures++; $display("FAIL recoding q=%0d sum=%0d", q, s); end
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
