// tb_vr_ctrl: controller test.  For each of several operations (back to back and
// with idle gaps) checks the control word cycle by cycle against the expected
// schedule: LOAD on the start edge, one SCALE, 4 radix-4, 4 radix-16 and 4
// radix-256 RECUR steps with the rescale flag on the 4th and 8th, FINAL, then
// `done` for one cycle together with `ready` (15 cycles after the start edge).
module tb_vr_ctrl;
  import vrdiv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, ready, done;
  dp_ctrl_t ctrl;
  int checks = 0, failures = 0;

  vr_ctrl #(.N4(4), .N16(4), .N256(4)) dut (.*);

  task automatic expect_ctrl(op_e op, radix_e rx, logic rs, string what);
    checks++;
    if (ctrl.op != op || (op == OP_RECUR && (ctrl.radix != rx || ctrl.rescale != rs))) begin
      failures++;
      $display("FAIL %s: op %0d radix %0d rescale %0b", what, ctrl.op, ctrl.radix, ctrl.rescale);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 20; op++) begin
      @(negedge clk);
      checks += 2;
      if (!ready) begin failures++; $display("FAIL not ready"); end
      if (ctrl.op != OP_IDLE) begin failures++; $display("FAIL not idle"); end
      start = 1'b1;
      #1 expect_ctrl(OP_LOAD, RADIX4, 1'b0, "load");
      @(negedge clk); start = 1'b0;
      expect_ctrl(OP_SCALE, RADIX4, 1'b0, "refine");
      checks++;
      if (ready) begin failures++; $display("FAIL ready while busy"); end
      for (int j = 0; j < 12; j++) begin
        @(negedge clk);
        expect_ctrl(OP_RECUR, (j < 4) ? RADIX4 : (j < 8) ? RADIX16 : RADIX256,
                    (j == 3 || j == 7), "iteration");
      end
      @(negedge clk);
      expect_ctrl(OP_FINAL, RADIX4, 1'b0, "final");
      checks++;
      if (done) begin failures++; $display("FAIL early done"); end
      @(negedge clk);
      checks += 2;
      if (!done || !ready) begin failures++; $display("FAIL done/ready missing"); end
      if (op % 2 == 1) begin
        @(negedge clk);
        checks++;
        if (done) begin failures++; $display("FAIL done longer than one cycle"); end
        repeat (op) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
