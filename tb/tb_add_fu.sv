// tb_add_fu: self-checking test of the adder functional unit.
// Applies corner operands and random operands and compares the sum with
// a 64-bit sum reduced modulo 2**WIDTH.
module tb_add_fu;
  localparam int unsigned WIDTH = 16;
  logic [WIDTH-1:0] a, b, y;
  int checks = 0, failures = 0;

  add_fu dut (.a, .b, .y);

  task automatic apply(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb);
    longint unsigned expv;
    a = ta; b = tb;
    #1;
    expv = (longint'(ta) + longint'(tb)) % (64'd1 << WIDTH);
    checks++;
    if (longint'(y) != expv) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, expected %0d", ta, tb, y, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0); apply(1, 16'hffff); apply(16'hffff, 16'hffff); apply(16'h8000, 2);
    apply(3, 5); apply(16'h0100, 16'h0100);
    repeat (2000) apply(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
