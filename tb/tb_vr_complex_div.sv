// tb_vr_complex_div: complex divider test at the default 53-bit size and at the
// 32-bit size of the proof-of-concept implementation, run side by side.  The
// 32-bit instance runs 4 radix-4, 4 radix-16 and 2 radix-256 iterations (40
// quotient bits, 38 fraction bits, done 13 cycles after start).
//
// Operands: the worked example n = 0.359308 - 0.922485i, d = 0.996379 + 0.986769i
// (exact quotient -0.280843 - 0.647703i), divisors on the edges of the normalised
// range and of the prescaling-table cells, zero and extreme dividends, and NOPS
// random operand pairs.  Each result is checked exactly with integer arithmetic:
// with E = n*2^f - Q*d (f = 54 fraction bits at 53 bits, 38 at 32 bits) and
// P = E*conj(d), each component of P must lie in
// [-|d|^2/8, 9/8*|d|^2), i.e. each quotient component is the exact one truncated
// to f fraction bits, to within 1/8 unit in the last place.  The latency
// (done 15 cycles after the start edge) is checked for every operation.
module tb_vr_complex_div;
  localparam int N    = 53;
  localparam int NS   = 32;
  localparam int QL   = 58;
  localparam int QLS  = 42;   // 32-bit instance: 10 iterations, 40 quotient bits
  localparam int NOPS = 2000;
  localparam int LAT  = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0;
  logic [N-1:0]  n_re, n_im, d_re, d_im;
  logic          ready, done, ready_s, done_s;
  logic [QL-1:0] q_re, q_im;
  logic [QLS-1:0] qs_re, qs_im;
  logic [QL-3:0] qr_re, qr_im;
  logic [QLS-3:0] qrs_re, qrs_im;

  vr_complex_div dut (.clk, .rst_n, .start, .n_re, .n_im, .d_re, .d_im,
                      .ready, .done, .q_re, .q_im, .qr_re, .qr_im);

  // 32-bit operands: the upper bits of the same values
  vr_complex_div #(.N(NS), .N256(2)) dut32 (.clk, .rst_n, .start,
    .n_re(n_re[N-1 -: NS]), .n_im(n_im[N-1 -: NS]), .d_re(d_re[N-1 -: NS]), .d_im(d_im[N-1 -: NS]),
    .ready(ready_s), .done(done_s), .q_re(qs_re), .q_im(qs_im),
    .qr_re(qrs_re), .qr_im(qrs_im));

  int checks = 0, failures = 0;

  typedef logic signed [255:0] big_t;

  function automatic logic [N-1:0] rnd();
    return N'({$urandom, $urandom});
  endfunction

  function automatic logic [N-1:0] fx(real v);
    return N'(longint'(v * (2.0 ** (N-1))));
  endfunction

  function automatic bit normal(logic [N-1:0] v);
    return v[N-1] ^ v[N-2];
  endfunction

  // operands as signed integers scaled by the same power of two: the check does not
  // depend on the operand width
  task automatic check(string tag, big_t nr, big_t ni, big_t dr, big_t di,
                       big_t sqr, big_t sqi, int fb);
    big_t er, ei, pr, pi, m;
    er = (nr <<< fb) - (sqr * dr - sqi * di);
    ei = (ni <<< fb) - (sqr * di + sqi * dr);
    pr = er * dr + ei * di;
    pi = ei * dr - er * di;
    m  = dr * dr + di * di;
    checks += 2;
    if (8 * pr < -m || 8 * pr >= 9 * m) begin
      failures++; $display("FAIL %s re: n=(%0d,%0d) d=(%0d,%0d) q=(%0d,%0d)", tag, nr, ni, dr, di, sqr, sqi);
    end
    if (8 * pi < -m || 8 * pi >= 9 * m) begin
      failures++; $display("FAIL %s im: n=(%0d,%0d) d=(%0d,%0d) q=(%0d,%0d)", tag, nr, ni, dr, di, sqr, sqi);
    end
  endtask

  // rounded quotient R (two fewer fraction bits): with 4R in place of Q each
  // component must lie within 17/8 units of the exact one (rounded to nearest
  // to within 1/32 unit of its own last place)
  task automatic check_rnd(string tag, big_t nr, big_t ni, big_t dr, big_t di,
                           big_t rr, big_t ri, int fb);
    big_t er, ei, pr, pi, m;
    er = (nr <<< fb) - ((rr <<< 2) * dr - (ri <<< 2) * di);
    ei = (ni <<< fb) - ((rr <<< 2) * di + (ri <<< 2) * dr);
    pr = er * dr + ei * di;
    pi = ei * dr - er * di;
    m  = dr * dr + di * di;
    checks++;
    if (8 * pr < -17 * m || 8 * pr > 17 * m || 8 * pi < -17 * m || 8 * pi > 17 * m) begin
      failures++; $display("FAIL %s rounded: n=(%0d,%0d) d=(%0d,%0d) q=(%0d,%0d)", tag, nr, ni, dr, di, rr, ri);
    end
  endtask

  function automatic big_t s53(logic [N-1:0] v);  return big_t'($signed(v)); endfunction
  function automatic big_t s32(logic [NS-1:0] v); return big_t'($signed(v)); endfunction

  logic [N-1:0] nr, ni, dr, di;
  int cyc;
  bit seen_s;
  always @(posedge clk) begin
    if (start)  seen_s <= 1'b0;
    if (done_s) seen_s <= 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      case (i)
        0: begin nr = fx(0.359308); ni = fx(-0.922485); dr = fx(0.996379); di = fx(0.986769); end
        1: begin nr = fx(0.999999); ni = fx(0.999999);  dr = fx(0.5);      di = '0;           end
        2: begin nr = {1'b1, {(N-1){1'b0}}}; ni = {1'b1, {(N-1){1'b0}}};
                 dr = {2'b01, {(N-2){1'b0}}}; di = {2'b01, {(N-2){1'b0}}} - 1'b1; end
        3: begin nr = fx(-0.999999); ni = fx(0.7); dr = fx(-0.500001); di = fx(0.499999); end
        4: begin nr = fx(0.999999); ni = fx(-0.999999); dr = fx(0.999999); di = fx(-0.999999); end
        5: begin nr = '0; ni = '0; dr = fx(0.75); di = fx(-0.3); end
        6: begin nr = fx(0.999999); ni = fx(-0.999999); dr = '0; di = fx(-0.500001); end
        7: begin nr = fx(-0.6); ni = fx(0.999999); dr = fx(0.499999); di = fx(0.624999); end
        8: begin nr = fx(0.3); ni = fx(0.3); dr = fx(-1.0); di = fx(-1.0); end
        default: begin
          nr = rnd(); ni = rnd();
          do begin dr = rnd(); di = rnd(); end while (!(normal(dr) || normal(di)));
        end
      endcase
      n_re = nr; n_im = ni; d_re = dr; d_im = di;
      wait (ready && ready_s);
      if (i > 0) begin
        checks++;
        if (!seen_s) begin failures++; $display("FAIL 32-bit divider: no done"); end
      end
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      cyc = 0;
      @(negedge clk);
      start = 1'b0;
      n_re = rnd(); d_im = rnd();
      while (!done) begin
        @(posedge clk);
        cyc++;
      end
      checks++;
      if (cyc != LAT) begin
        failures++; $display("FAIL latency %0d", cyc);
      end
      if (i == 0)
        $display("worked example: q = %f, %f", real'($signed(q_re)) / 2.0**54,
                 real'($signed(q_im)) / 2.0**54);
      check("53-bit", s53(nr), s53(ni), s53(dr), s53(di),
            big_t'($signed(q_re)), big_t'($signed(q_im)), QL - 4);
      check("32-bit", s32(nr[N-1 -: NS]), s32(ni[N-1 -: NS]), s32(dr[N-1 -: NS]), s32(di[N-1 -: NS]),
            big_t'($signed(qs_re)), big_t'($signed(qs_im)), QLS - 4);
      check_rnd("53-bit", s53(nr), s53(ni), s53(dr), s53(di),
                big_t'($signed(qr_re)), big_t'($signed(qr_im)), QL - 4);
      check_rnd("32-bit", s32(nr[N-1 -: NS]), s32(ni[N-1 -: NS]), s32(dr[N-1 -: NS]), s32(di[N-1 -: NS]),
                big_t'($signed(qrs_re)), big_t'($signed(qrs_im)), QLS - 4);
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
