// tb_sc_controller: self-checking test of the control FSM.
//
// Holds its own copy of the 16-step table of the self-checking AR filter
// (units m1..m4, a1..a3; a negative number is a checking operation, 0 an idle
// unit) and of the check column, and compares every issued control word with
// it while input sets arrive with random gaps. Checks: the handshake (in_ready
// only when idle or in the last step of an iteration), the checked-copy load
// on every second accepted set, out_valid/out_checked one cycle after the
// last step of an iteration, no control word while waiting, and the rate of
// one iteration per 8 cycles for a stream without gaps. Also checks the
// allocation rule: no checking operation on its nominal unit.
module tb_sc_controller;
  import scsc_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, x_load, chk_load, cw_valid, out_valid, out_checked;
  ctrl_word_t cw;
  logic [4:0] step;
  int checks = 0, failures = 0;
  int waits = 0;

  int tab [16][7] = '{
    '{  1,   2,   3,   4,   0,   0,   0},
    '{ 15,  16,  17,  18,   5,   6,   0},
    '{ -2,  -1,  -4,  -3,   7,   8,   0},
    '{  9,  10,  11,  12,  23,  24,  -5},
    '{-16, -15, -18, -17,  13,  14,  -6},
    '{ 19,  20,  21,  22,  -8,  -7, -23},
    '{-10,  -9, -12, -11,  25,  26, -24},
    '{  0,   0,   0,   0,  27,  28, -13},
    '{  1,   2,   3,   4,   0,   0, -14},
    '{ 15,  16,  17,  18,   5,   6,   0},
    '{-20, -19, -22, -21,   7,   8,   0},
    '{  9,  10,  11,  12,  23,  24, -25},
    '{  0,   0,   0,   0,  13,  14, -26},
    '{ 19,  20,  21,  22,   0, -27, -28},
    '{  0,   0,   0,   0,  25,  26,   0},
    '{  0,   0,   0,   0,  27,  28,   0}
  };
  int chk_col [16] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,27,28};
  int nom_unit [29] = '{-1, 0,1,2,3, 4,5,4,5, 0,1,2,3, 4,5, 0,1,2,3, 0,1,2,3, 4,5,4,5,4,5};

  sc_controller dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  // Expected state, tracked from the handshake
  bit m_active = 0;
  int m_row = 0;        // 0..15, row executed when active
  int m_accepts = 0;
  bit exp_out_valid = 0, exp_out_checked = 0;
  int first_row1 = -1, tenth_row1 = -1, row1_count = 0, cycle = 0;

  always @(posedge clk) if (rst_n) begin
    bit ready_exp;
    cycle++;
    ready_exp = !m_active || (m_row % 8 == 7);
    chk(in_ready == ready_exp, "in_ready");
    chk(cw_valid == m_active, "cw_valid");
    chk(out_valid == exp_out_valid, "out_valid");
    chk(out_checked == exp_out_checked, "out_checked");
    if (m_active) begin
      chk(step == 5'(m_row + 1), $sformatf("step %0d exp %0d", step, m_row + 1));
      for (int f = 0; f < 7; f++) begin
        int e;
        e = tab[m_row][f];
        if (e == 0) chk(!cw.fu[f].en, $sformatf("row %0d unit %0d idle", m_row + 1, f));
        else begin
          chk(cw.fu[f].en && cw.fu[f].chk == (e < 0) && int'(cw.fu[f].op) == (e < 0 ? -e : e),
              $sformatf("row %0d unit %0d op %0d", m_row + 1, f, e));
          if (e < 0) chk(nom_unit[-e] != f, "checking op on its nominal unit");
        end
      end
      chk((chk_col[m_row] == 0 && cw.chk == CHK_NONE) ||
          (chk_col[m_row] == 27 && cw.chk == CHK_OUT27) ||
          (chk_col[m_row] == 28 && cw.chk == CHK_OUT28), "check column");
      chk(cw.save_out == (m_row == 8), "save_out");
      if (m_row == 0) begin
        row1_count++;
        if (row1_count == 1) first_row1 = cycle;
        if (row1_count == 6) tenth_row1 = cycle;
      end
    end else waits++;
    chk(x_load == (in_valid && ready_exp), "x_load");
    chk(chk_load == (in_valid && ready_exp && ((m_active ? (m_row + 1) % 16 : m_row) == 0)), "chk_load");
    exp_out_valid   = m_active && (m_row % 8 == 7);
    exp_out_checked = m_active && m_row == 7;
    // next state
    if (m_active) begin
      if (m_row % 8 == 7) begin
        m_active = in_valid;
        m_row = (m_row + 1) % 16;
      end else m_row++;
    end else if (in_valid) m_active = 1;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    // gap-free stream of 12 input sets: 8 cycles per iteration
    @(negedge clk) in_valid = 1;
    repeat (12 * 8 - 1) @(negedge clk);
    chk(tenth_row1 - first_row1 == 5 * 16, $sformatf("rate: %0d cycles for 5 cycles of 16 steps", tenth_row1 - first_row1));
    // random gaps
    repeat (1500) @(negedge clk) in_valid = ($urandom % 3) == 0;
    in_valid = 0;
    repeat (20) @(negedge clk);
    chk(waits > 100, "controller waited for input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
