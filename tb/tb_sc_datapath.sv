// tb_sc_datapath: self-checking test of the shared data path.
//
// Plays the 16-step schedule into the data path as the controller would,
// with a new random input set every 8 steps and the checked copy loaded on
// every second one, and compares both outputs of every iteration with the
// reference model. Fault-free, every check must pass (code word from the
// checker). Then a fault is forced into one unit at a time (m2: result + 1;
// a3, which only the checking computation uses: bit 0 stuck at 1): each
// must be detected by the next check, and with the a3 fault the nominal
// outputs must stay correct. Last, a register of the checking set is forced
// to a constant: the registers are not shared, so the nominal outputs stay
// correct and the check flags the difference.
module tb_sc_datapath;
  import scsc_pkg::*;
  import ar_ref_pkg::*;
  localparam int unsigned WIDTH = 16;

  logic clk = 0, rst_n = 0;
  ctrl_word_t cw;
  logic cw_valid = 0, x_load = 0, chk_load = 0;
  logic [WIDTH-1:0] x_in [NUM_X];
  logic [WIDTH-1:0] coef [NUM_C];
  logic [WIDTH-1:0] y27, y28;
  logic chk_valid, chk_err;
  logic [1:0] chk_pair;
  int checks = 0, failures = 0;
  int n_checks_ok = 0, n_checks_err = 0;

  sc_datapath dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  u64_t ex [8], ec [16];
  u64_t r27, r28;

  // Runs one checking cycle (two iterations); expects detection if exp_err
  task automatic run_cycle(input bit exp_err, input bit nominal_ok);
    int errs;
    errs = 0;
    for (int it = 0; it < 2; it++) begin
      for (int i = 0; i < 8; i++) begin x_in[i] = WIDTH'($urandom); ex[i] = u64_t'(x_in[i]); end
      x_load = 1; chk_load = (it == 0); cw_valid = 0; cw = '0;
      @(negedge clk);
      x_load = 0; chk_load = 0;
      ar_ref(WIDTH, ex, ec, r27, r28);
      for (int s = 1; s <= 8; s++) begin
        cw = schedule_row(it * 8 + s, 1'b0); cw_valid = 1;
        @(negedge clk);
        if (chk_valid) begin
          if (chk_err) errs++;
          chk(chk_pair[0] != chk_pair[1] || chk_err, "chk_err follows chk_pair");
          if (chk_err) n_checks_err++; else n_checks_ok++;
        end
      end
      cw_valid = 0;
      if (nominal_ok) begin
        chk(u64_t'(y27) == r27, $sformatf("y27 %h exp %h", y27, r27));
        chk(u64_t'(y28) == r28, $sformatf("y28 %h exp %h", y28, r28));
      end
    end
    if (exp_err) chk(errs > 0, "fault not detected");
    else chk(errs == 0, "false alarm");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw = '0;
    for (int i = 0; i < 16; i++) begin coef[i] = WIDTH'($urandom); ec[i] = u64_t'(coef[i]); end
    for (int i = 0; i < 8; i++) x_in[i] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    repeat (20) run_cycle(1'b0, 1'b1);
    // check steps themselves: count
    chk(n_checks_ok == 40, $sformatf("%0d passing checks, expected 40", n_checks_ok));
    // multiplier m2 adds one to every product
    force dut.u_m2.y = dut.u_m2.a * dut.u_m2.b + 16'd1;
    repeat (5) run_cycle(1'b1, 1'b0);
    release dut.u_m2.y;
    repeat (2) run_cycle(1'b0, 1'b1);
    // adder a3 with bit 0 stuck at 1: nominal results unaffected
    force dut.u_a3.y = (dut.u_a3.a + dut.u_a3.b) | 16'd1;
    repeat (5) run_cycle(1'b1, 1'b1);
    release dut.u_a3.y;
    repeat (2) run_cycle(1'b0, 1'b1);
    // register of the checking set stuck: only the checking result is wrong
    force dut.u_chk_regs.v_q[13] = 16'h5a5a;
    repeat (3) run_cycle(1'b1, 1'b1);
    release dut.u_chk_regs.v_q[13];
    chk(n_checks_err > 0, "error detected at least once");
    $display("checks passed %0d, failed (detections) %0d", n_checks_ok, n_checks_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
