// tb_scale_factor: factor generation test.  On load, M must equal the table factor
// K shifted to MF = 14 fraction bits; otherwise M_re = floor((2 - z_re) * 2^14) and
// M_im = floor(-z_im * 2^14) for random z near 1 + 0i.  In both cases the Booth
// digits must lie in {-2..2} and add up to M (sum d_k 4^k).  Combinational.
module tb_scale_factor;
  import vrdiv_pkg::*;
  localparam int F = 62;
  localparam int W = F + IBITS;
  logic load;
  logic signed [KW-1:0] k1, k2;
  logic [W-1:0] z_re, z_im;
  logic signed [MW-1:0] m_re, m_im;
  r4dig_t m_re_dig [MDIG];
  r4dig_t m_im_dig [MDIG];
  int checks = 0, failures = 0;

  scale_factor #(.F(F), .W(W)) dut (.*);

  longint er, ei, sr, si;
  logic signed [W-1:0] dz;

  initial begin
    for (int i = 0; i < 4000; i++) begin
      load = (i % 2 == 0);
      k1 = KW'($urandom_range(0, 1200)) - KW'(600);
      k2 = KW'($urandom_range(0, 1200)) - KW'(600);
      dz = W'($signed(W'({$urandom, $urandom, $urandom})) >>> (W - F + 2));  // |dz| < 1/4
      z_re = (W'(1) << F) + dz;
      z_im = W'($signed(W'({$urandom, $urandom, $urandom})) >>> (W - F + 3));
      #1;
      if (load) begin
        er = longint'(k1) * 64;
        ei = longint'(k2) * 64;
      end else begin
        er = longint'($signed((W'(2) << F) - z_re) >>> (F - MF));
        ei = longint'($signed(-z_im) >>> (F - MF));
      end
      sr = 0; si = 0;
      for (int k = 0; k < MDIG; k++) begin
        sr += longint'(m_re_dig[k]) << (2*k);
        si += longint'(m_im_dig[k]) << (2*k);
        checks++;
        if (m_re_dig[k] > 2 || m_re_dig[k] < -2 || m_im_dig[k] > 2 || m_im_dig[k] < -2) begin
          failures++; $display("FAIL digit range");
        end
      end
      checks += 4;
      if (longint'(m_re) != er) begin failures++; $display("FAIL m_re %0d vs %0d (load %0b)", m_re, er, load); end
      if (longint'(m_im) != ei) begin failures++; $display("FAIL m_im %0d vs %0d (load %0b)", m_im, ei, load); end
      if (sr != er) begin failures++; $display("FAIL re digits %0d vs %0d", sr, er); end
      if (si != ei) begin failures++; $display("FAIL im digits %0d vs %0d", si, ei); end
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
