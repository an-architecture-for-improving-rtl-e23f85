// tb_vr_real_div: real divider test at the default size (53-bit operands, 58-bit
// quotient with 54 fraction bits).  Dividends are signed fractions, divisors are
// in [1/2, 1): edge cases (largest and smallest dividend and divisor, zero,
// divisors on table-cell edges) and NOPS random pairs.  The check is exact
// integer arithmetic: -d/8 <= x*2^54 - Q*d < 9d/8, i.e. Q is floor(x/d) to within
// 1/8 unit in the last place.  The rounded quotient R (52 fraction bits) must
// satisfy |8*(x*2^54 - 4R*d)| <= 17d: rounded to nearest to within 1/32 unit in
// its last place.  Latency: done 15 cycles after the start edge.
module tb_vr_real_div;
  localparam int N    = 53;
  localparam int QL   = 58;
  localparam int NOPS = 2000;
  localparam int LAT  = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0;
  logic [N-1:0]  x, d;
  logic          ready, done;
  logic [QL-1:0] q;
  logic [QL-3:0] qr;

  vr_real_div dut (.*);

  int checks = 0, failures = 0;
  typedef logic signed [255:0] big_t;

  function automatic logic [N-1:0] rnd();
    return N'({$urandom, $urandom});
  endfunction

  logic [N-1:0] xv, dv;
  big_t e;
  int cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      xv = rnd();
      dv = rnd(); dv[N-1:N-2] = 2'b01;
      case (i)
        0: begin xv = {1'b0, {(N-1){1'b1}}}; dv = {2'b01, {(N-2){1'b0}}}; end
        1: begin xv = {1'b1, {(N-1){1'b0}}}; dv = {2'b01, {(N-2){1'b0}}}; end
        2: begin xv = {1'b0, {(N-1){1'b1}}}; dv = {2'b01, {(N-2){1'b1}}}; end
        3: begin xv = '0; end
        4: begin xv = {N{1'b1}}; end
        5: begin dv = {2'b01, 3'b011, {(N-5){1'b1}}}; end
        6: begin dv = {2'b01, 3'b100, {(N-5){1'b0}}}; end
        default: ;
      endcase
      x = xv; d = dv;
      wait (ready);
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      cyc = 0;
      @(negedge clk);
      start = 1'b0;
      x = rnd(); d = rnd();
      while (!done) begin
        @(posedge clk);
        cyc++;
      end
      checks += 3;
      if (cyc != LAT) begin failures++; $display("FAIL latency %0d", cyc); end
      e = (big_t'($signed(xv)) <<< 54) - big_t'($signed(q)) * big_t'($signed(dv));
      if (8 * e < -big_t'($signed(dv)) || 8 * e >= 9 * big_t'($signed(dv))) begin
        failures++; $display("FAIL x=%h d=%h q=%h", xv, dv, q);
      end
      e = (big_t'($signed(xv)) <<< 54) - (big_t'($signed(qr)) <<< 2) * big_t'($signed(dv));
      if (8 * e < -17 * big_t'($signed(dv)) || 8 * e > 17 * big_t'($signed(dv))) begin
        failures++; $display("FAIL rounded x=%h d=%h r=%h", xv, dv, qr);
      end
      @(negedge clk);
    end
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
