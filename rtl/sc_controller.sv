// sc_controller: control FSM of the self-checking AR filter.
//
// It walks through a checking cycle of CHECK_ITERS nominal iterations of
// K_N = 8 control steps each. Iterations 0 and 1 use rows 1..8 and 9..16 of
// the shared schedule (scsc_pkg::schedule_row), which interleave the nominal
// operations of both iterations with the checking operations of the input
// set of iteration 0 and end with the two output checks; any further
// iterations (CHECK_ITERS > 2, a longer checking period) run the nominal
// operations only. The input set of iteration 0 is the checked one: when it
// is accepted, chk_load copies it into the checking registers as well.
//
// Interface: a new input set is accepted when in_valid && in_ready. in_ready
// is high while idle and in the last step of every iteration, so an
// uninterrupted stream starts an iteration every 8 cycles. If no input set is
// offered at the end of an iteration the FSM waits (cw_valid low, nothing is
// written) and continues with the following row when one arrives; the
// checking operations wait with it. out_valid pulses the cycle after the last
// step of an iteration, when its two outputs sit in the nominal registers;
// out_checked marks the iteration whose outputs will be checked.
//
// The step table and the two-iteration checking period follow the published
// AR filter example; the handshake, the wait state, reset values and the
// extension to longer periods are this design's own.
module sc_controller
  import scsc_pkg::*;
#(
  parameter int unsigned CHECK_ITERS = 2   // nominal iterations per checking cycle, >= 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       x_load,
  output logic       chk_load,
  output ctrl_word_t cw,
  output logic       cw_valid,
  output logic [4:0] step,        // row of the schedule now executed, 1..16
  output logic       out_valid,
  output logic       out_checked
);
  localparam int unsigned IW = (CHECK_ITERS > 2) ? $clog2(CHECK_ITERS) : 1;

  logic          active;
  logic [2:0]    phase;      // step within the iteration, 0..7
  logic [IW-1:0] iter;       // iteration within the checking cycle
  logic [IW-1:0] iter_next;
  logic          accept;
  logic          last_step;

  initial assert (CHECK_ITERS >= 2) else $error("CHECK_ITERS must be at least 2");

  always_comb begin
    last_step = (phase == 3'(K_N - 1));
    in_ready  = !active || last_step;
    accept    = in_valid && in_ready;
    x_load    = accept;
    iter_next = (32'(iter) == CHECK_ITERS - 1) ? '0 : iter + 1'b1;
    // iteration that starts with this accept
    chk_load  = accept && (active ? (iter_next == '0) : (iter == '0));
    step      = (iter == '0) ? 5'(phase) + 5'd1
              : (32'(iter) == 1) ? 5'(phase) + 5'd9
              : 5'(phase) + 5'd1;
    cw        = schedule_row(32'(step), 32'(iter) >= 2);
    cw_valid  = active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      phase       <= '0;
      iter        <= '0;
      out_valid   <= 1'b0;
      out_checked <= 1'b0;
    end else begin
      out_valid   <= active && last_step;
      out_checked <= active && last_step && (iter == '0);
      if (active) begin
        if (last_step) begin
          phase  <= '0;
          iter   <= iter_next;
          active <= accept;
        end else begin
          phase  <= phase + 1'b1;
        end
      end else if (accept) begin
        active <= 1'b1;
      end
    end
  end

  // The allocation rule of the method: a checking operation never runs on
  // the unit that performs the same operation in the nominal data path.
  always_comb begin
    if (rst_n && active)
      for (int unsigned f = 0; f < NUM_FU; f++)
        if (cw.fu[f].en && cw.fu[f].chk)
          assert (nominal_fu(cw.fu[f].op) != f)
            else $error("checking op %0d on its nominal unit %0d", cw.fu[f].op, f);
  end
endmodule
