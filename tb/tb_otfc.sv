// tb_otfc: on-the-fly converter test.  Feeds random signed digit sequences with the
// radix schedule 4,4,4,4,16,16,16,16,256,256,256,256 (digits in [-(r-1), r-1]) and
// compares Q and QM after every digit with the value sum(q_j * r_j ...) built by
// ordinary integer arithmetic (Q = Q*r + q, QM = Q - 1, QP4 = Q + 4).  One digit per cycle.
module tb_otfc;
  import vrdiv_pkg::*;
  localparam int QL = 58;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic init = 1'b0, en = 1'b0;
  radix_e radix = RADIX4;
  logic signed [QW-1:0] q = '0;
  logic [QL-1:0] q_reg, qm_reg, qp4_reg;
  int checks = 0, failures = 0;

  otfc #(.QL(QL)) dut (.*);

  logic signed [QL-1:0] ref_q;
  int b, rr;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 200; op++) begin
      @(negedge clk); init = 1'b1;
      @(negedge clk); init = 1'b0;
      ref_q = '0;
      checks++;
      if (q_reg != '0 || qm_reg != '1 || qp4_reg != QL'(4)) begin failures++; $display("FAIL init"); end
      for (int j = 0; j < 12; j++) begin
        radix = (j < 4) ? RADIX4 : (j < 8) ? RADIX16 : RADIX256;
        b  = (j < 4) ? 2 : (j < 8) ? 4 : 8;
        rr = 1 << b;
        q  = QW'(int'($urandom_range(0, 2*rr - 2)) - (rr - 1));
        if (op == 1) q = QW'(-(rr - 1));
        if (op == 2) q = QW'(rr - 1);
        if (op == 3) q = '0;
        if (op == 4) q = QW'(rr - 4);
        if (op == 5) q = (rr == 4) ? QW'(-3 + (j % 2)) : QW'(-4 - (j % 2));
        if (op == 6) q = QW'(rr - 2 + (j % 2));
        if (op == 7) q = QW'(-1 - (j % 2));
        en = 1'b1;
        ref_q = ref_q * rr + q;
        @(negedge clk);
        en = 1'b0;
        checks += 3;
        if ($signed(qp4_reg) != ref_q + 4) begin
          failures++; $display("FAIL QP4 op %0d digit %0d", op, j);
        end
        if ($signed(q_reg) != ref_q) begin
          failures++; $display("FAIL Q op %0d digit %0d: %h vs %h", op, j, q_reg, ref_q);
        end
        if ($signed(qm_reg) != ref_q - 1) begin
          failures++; $display("FAIL QM op %0d digit %0d", op, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * 20 + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
