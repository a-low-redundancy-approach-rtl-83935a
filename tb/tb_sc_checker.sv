// tb_sc_checker: self-checking test of the two-rail equality checker.
// Equal words must give a two-rail code word (01 or 10); words differing in
// one bit (every position), in several bits or at random must give a
// non-code word (00 or 11).
module tb_sc_checker;
  localparam int unsigned WIDTH = 16;
  logic [WIDTH-1:0] a, b;
  logic [1:0] z;
  int checks = 0, failures = 0;

  sc_checker dut (.a, .b, .z);

  task automatic apply(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb);
    logic expect_code;
    a = ta; b = tb;
    #1;
    expect_code = (ta == tb);
    checks++;
    if ((z[0] != z[1]) != expect_code) begin
      failures++;
      $display("FAIL a=%h b=%h z=%b", ta, tb, z);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] r;
    apply('0, '0); apply('1, '1);
    for (int i = 0; i < int'(WIDTH); i++) begin
      r = WIDTH'($urandom);
      apply(r, r);
      apply(r, r ^ (WIDTH'(1) << i));
      apply('0, WIDTH'(1) << i);
    end
    repeat (1000) begin
      r = WIDTH'($urandom);
      apply(r, r);
      apply(r, WIDTH'($urandom));
      apply(r, r ^ WIDTH'(3 << ($urandom % (WIDTH - 1))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
