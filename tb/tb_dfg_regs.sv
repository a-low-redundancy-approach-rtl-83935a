// tb_dfg_regs: self-checking test of one DFG register set.
// Loads input sets, writes random operation registers through random write
// ports (no two ports on one register in a cycle, as the schedule
// guarantees) and compares every register with a model array after every
// clock. Also checks that a cleared enable or operation 0 writes nothing and
// that reset clears the set.
module tb_dfg_regs;
  import scsc_pkg::*;
  localparam int unsigned WIDTH = 16;

  logic clk = 0, rst_n = 0, x_load = 0;
  logic [WIDTH-1:0] x_in [NUM_X];
  logic [NUM_FU-1:0] wr_en = '0;
  op_id_t wr_op [NUM_FU];
  logic [WIDTH-1:0] wr_data [NUM_FU];
  logic [WIDTH-1:0] x_q [NUM_X];
  logic [WIDTH-1:0] v_q [NUM_OPS+1];

  logic [WIDTH-1:0] mx [NUM_X];
  logic [WIDTH-1:0] mv [NUM_OPS+1];
  int checks = 0, failures = 0;

  dfg_regs dut (.*);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int i = 0; i < int'(NUM_X); i++) begin
      checks++;
      if (x_q[i] !== mx[i]) begin failures++; $display("FAIL %s x[%0d]=%h exp %h", what, i, x_q[i], mx[i]); end
    end
    for (int k = 1; k <= int'(NUM_OPS); k++) begin
      checks++;
      if (v_q[k] !== mv[k]) begin failures++; $display("FAIL %s v[%0d]=%h exp %h", what, k, v_q[k], mv[k]); end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(NUM_X); i++) begin x_in[i] = '0; mx[i] = '0; end
    for (int k = 0; k <= int'(NUM_OPS); k++) mv[k] = '0;
    for (int p = 0; p < int'(NUM_FU); p++) begin wr_op[p] = '0; wr_data[p] = '0; end
    #12 rst_n = 1;
    @(negedge clk);
    compare("after reset");
    repeat (300) begin
      bit used [NUM_OPS+1];
      foreach (used[k]) used[k] = 0;
      x_load = ($urandom % 4) == 0;
      for (int i = 0; i < int'(NUM_X); i++) x_in[i] = WIDTH'($urandom);
      for (int p = 0; p < int'(NUM_FU); p++) begin
        int unsigned op;
        op = $urandom % (NUM_OPS + 1);
        wr_op[p]   = op_id_t'(op);
        wr_data[p] = WIDTH'($urandom);
        wr_en[p]   = ($urandom % 3) != 0 && !used[op];
        if (wr_en[p] && op != 0) used[op] = 1;
      end
      @(posedge clk);
      if (x_load) for (int i = 0; i < int'(NUM_X); i++) mx[i] = x_in[i];
      for (int p = 0; p < int'(NUM_FU); p++)
        if (wr_en[p] && wr_op[p] != 0) mv[wr_op[p]] = wr_data[p];
      @(negedge clk);
      compare("write");
    end
    wr_en = '0; x_load = 0;
    rst_n = 0;
    #1;
    for (int i = 0; i < int'(NUM_X); i++) mx[i] = '0;
    for (int k = 0; k <= int'(NUM_OPS); k++) mv[k] = '0;
    compare("reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
