// tb_ar_filter_scsc: end-to-end test of the self-checking AR filter at its
// default parameters.
//
// Feeds random input sets, first as a gap-free stream and then with random
// gaps, and compares every pair of outputs with the reference model through
// a scoreboard. It follows which sets are checked (every CHECK_ITERS-th
// accepted set, the first one included) and expects, for every checked set,
// two check results that pass while no fault is present. In the gap-free
// phase it checks the rate (one set per 8 cycles), the output latency
// (outputs 9 cycles after the accepting cycle) and the check latency (the
// two check results 16 and 17 cycles after the checked set was accepted,
// i.e. after checking steps 15 and 16). Then faults are forced into a
// multiplier (m1, result + 1) and into the adder used only for checking
// (a3, bit 0 stuck at 1): the next check must flag chk_err and set the
// sticky error output. Mechanisms counted, each must occur: wait for input,
// checked set, passing check of output 27 and of output 28, detected error,
// sticky error flag.
module tb_ar_filter_scsc;
  import scsc_pkg::*;
  import ar_ref_pkg::*;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned CI    = 2;     // checking period of the default top

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, out_valid, out_checked, chk_valid, chk_err, error;
  logic [WIDTH-1:0] x_in [NUM_X];
  logic [WIDTH-1:0] coef [NUM_C];
  logic [WIDTH-1:0] y27, y28;
  logic [1:0] chk_pair;
  logic [4:0] ctrl_step;

  ar_filter_scsc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  u64_t ec [16];
  u64_t q27 [$], q28 [$];
  bit   qchk [$];
  int   qcyc [$];
  int   cycle = 0, accepts = 0, outs = 0;
  int   last_accept = -1, last_chk_accept = -1, last_out = -1;
  int   n_wait = 0, n_checked = 0, n_pass27 = 0, n_pass28 = 0, n_detect = 0;
  int   chk_in_pair = 0, chk_base = 0;
  bit   gapfree = 0, expect_fault = 0, gap_seen = 0;
  int   gapfree_lat_ok = 0;

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (chk_valid) begin
      chk_in_pair++;
      if (chk_in_pair == 1) chk_base = last_chk_accept;
      if (gapfree) chk(cycle - chk_base == 15 + chk_in_pair, $sformatf("check latency %0d", cycle - chk_base));
      if (!expect_fault) begin
        chk(!chk_err && chk_pair[0] != chk_pair[1], "false alarm");
        if (chk_in_pair == 1) n_pass27++; else n_pass28++;
      end
      if (chk_err) n_detect++;
      if (chk_in_pair == 2) chk_in_pair = 0;
    end
    if (in_valid && in_ready) begin
      u64_t ex [8], r27, r28;
      for (int i = 0; i < 8; i++) ex[i] = u64_t'(x_in[i]);
      ar_ref(WIDTH, ex, ec, r27, r28);
      q27.push_back(r27); q28.push_back(r28);
      qchk.push_back(accepts % CI == 0);
      qcyc.push_back(cycle);
      if (accepts % CI == 0) last_chk_accept = cycle;
      if (gapfree && last_accept >= 0) chk(cycle - last_accept == 8, "rate: 8 cycles per input set");
      last_accept = cycle;
      accepts++;
    end
    if (in_ready && !in_valid) n_wait++;   // the schedule pauses for input
    if (out_valid) begin
      chk(q27.size() > 0, "output without input");
      if (q27.size() > 0) begin
        u64_t e27, e28; bit ec_; int acyc;
        e27 = q27.pop_front(); e28 = q28.pop_front(); ec_ = qchk.pop_front();
        acyc = qcyc.pop_front();
        if (gapfree && cycle - acyc == 9) gapfree_lat_ok++;
        if (!expect_fault) begin
          chk(u64_t'(y27) == e27, $sformatf("y27 %h exp %h", y27, e27));
          chk(u64_t'(y28) == e28, $sformatf("y28 %h exp %h", y28, e28));
        end
        chk(out_checked == ec_, "out_checked");
        if (ec_) n_checked++;
      end
      outs++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int n, input bit gaps);
    int sent;
    sent = 0;
    while (sent < n) begin
      @(negedge clk);
      in_valid = gaps ? (($urandom % 3) != 0) : 1'b1;
      for (int i = 0; i < 8; i++) x_in[i] = WIDTH'($urandom);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin coef[i] = WIDTH'($urandom); ec[i] = u64_t'(coef[i]); end
    for (int i = 0; i < 8; i++) x_in[i] = '0;
    #12 rst_n = 1;
    gapfree = 1;
    drive(20, 0);
    repeat (40) @(negedge clk);
    gapfree = 0;
    drive(60, 1);
    repeat (40) @(negedge clk);
    chk(outs == accepts, "every input set produced outputs");
    chk(!error, "no error flag without a fault");
    chk(gapfree_lat_ok >= 19, $sformatf("output latency, %0d ok", gapfree_lat_ok));
    // fault in multiplier m1
    expect_fault = 1;
    force dut.u_dp.u_m1.y = dut.u_dp.u_m1.a * dut.u_dp.u_m1.b + 16'd1;
    drive(4, 0);
    repeat (40) @(negedge clk);
    release dut.u_dp.u_m1.y;
    chk(error, "m1 fault sets the error flag");
    chk(n_detect > 0, "m1 fault detected");
    // reset, then a fault in a3
    rst_n = 0; #12 rst_n = 1;
    q27.delete(); q28.delete(); qchk.delete(); qcyc.delete(); accepts = 0; chk_in_pair = 0;
    chk(!error, "reset clears the error flag");
    begin
      int n_det0;
      n_det0 = n_detect;
      force dut.u_dp.u_a3.y = (dut.u_dp.u_a3.a + dut.u_dp.u_a3.b) | 16'd1;
      drive(4, 1);
      repeat (40) @(negedge clk);
      release dut.u_dp.u_a3.y;
      chk(n_detect > n_det0, "a3 fault detected");
      chk(error, "a3 fault sets the error flag");
    end
    $display("mechanisms: waits=%0d checked_sets=%0d pass27=%0d pass28=%0d detections=%0d",
             n_wait, n_checked, n_pass27, n_pass28, n_detect);
    chk(n_wait > 0, "wait for input happened");
    chk(n_checked > 0, "checked set happened");
    chk(n_pass27 > 0, "check of output 27 happened");
    chk(n_pass28 > 0, "check of output 28 happened");
    chk(n_detect > 0, "error detection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
