// vr_ctrl: finite-state machine sequencing one variable-radix division.
//
// Sequence of clock edges after `start` is seen in IDLE (ready = 1):
//   edge 0        OP_LOAD   prescale dividend and divisor by the table factor K
//   edge 1        OP_SCALE  one refinement step: rescale by M = 2 - z
//   edges 2..     OP_RECUR  N4 radix-4, N16 radix-16 and N256 radix-256
//                           iterations; the last iteration of the radix-4 and of
//                           the radix-16 phase also rescales by M = 2 - z
//   next edge     OP_FINAL  result correction and result register load
// `done` is high for one cycle after OP_FINAL, 3 + N4 + N16 + N256 edges after
// the start edge (15 with the default 4/4/4 schedule); `ready` returns with it.
// `start` must only be raised while `ready` (checked by an assertion).
// The paper fixes the radix order 4 -> 16 -> 256, one preparatory step and
// twelve iterations; the split of the twelve iterations, the separate load and
// final cycles and the handshake are this design's choices.  The control word drives every slice of the datapath.
module vr_ctrl
  import vrdiv_pkg::*;
#(
  parameter int N4   = 4,
  parameter int N16  = 4,
  parameter int N256 = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     ready,
  output logic     done,
  output dp_ctrl_t ctrl
);

  localparam int NIT = N4 + N16 + N256;

  typedef enum logic [1:0] {S_IDLE, S_REFINE, S_ITER, S_FINAL} state_e;

  state_e                   state;
  logic [$clog2(NIT+1)-1:0] cnt;

  always_comb begin
    ctrl.op      = OP_IDLE;
    ctrl.radix   = RADIX4;
    ctrl.rescale = 1'b0;
    unique case (state)
      S_IDLE:   ctrl.op = start ? OP_LOAD : OP_IDLE;
      S_REFINE: ctrl.op = OP_SCALE;
      S_ITER: begin
        ctrl.op = OP_RECUR;
        if (int'(cnt) < N4)            ctrl.radix = RADIX4;
        else if (int'(cnt) < N4 + N16) ctrl.radix = RADIX16;
        else                           ctrl.radix = RADIX256;
        ctrl.rescale = (N4 > 0 && int'(cnt) == N4 - 1 && N16 + N256 > 0) ||
                       (N16 > 0 && int'(cnt) == N4 + N16 - 1 && N256 > 0);
      end
      S_FINAL:  ctrl.op = OP_FINAL;
      default:  ctrl.op = OP_IDLE;
    endcase
  end

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= (state == S_FINAL);
      unique case (state)
        S_IDLE:   if (start) state <= S_REFINE;
        S_REFINE: begin
          state <= S_ITER;
          cnt   <= '0;
        end
        S_ITER: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == NIT - 1) state <= S_FINAL;
        end
        S_FINAL:  state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // one operation at a time: a start pulse must not arrive mid-operation
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ready)
    else $error("start asserted while the divider is busy");

endmodule
