// tb_csa: self-checking test of one 3:2 carry-save adder row.
//
// Drives a 16-bit row with random words and with all-zero/all-one corners and
// checks that s + 2*cy equals a + b + c computed in 18 bits, and that every
// bit of s and cy matches the full-adder truth table.
module tb_csa;

  int checks = 0;
  int failures = 0;

  logic [15:0] a, b, c, s, cy;

  csa #(.W(16)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, tb, tc);
    logic [17:0] total;
    a = ta; b = tb; c = tc;
    #1;
    total = 18'(a) + 18'(b) + 18'(c);
    check(18'(s) + (18'(cy) << 1) == total, $sformatf("sum %h %h %h", a, b, c));
    for (int i = 0; i < 16; i++) begin
      int n = int'(a[i]) + int'(b[i]) + int'(c[i]);
      check(s[i] == n[0] && cy[i] == n[1], $sformatf("bit %0d", i));
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '1);
    apply(16'hAAAA, 16'h5555, 16'h0F0F);
    for (int n = 0; n < 5000; n++) apply(16'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
