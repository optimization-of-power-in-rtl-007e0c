// tb_fam_top: end-to-end self-checking test of the fused add-multiply operator.
//
// Two operators run side by side: the default 8-bit one (even width) and a
// 7-bit one (odd width). For a set of multiplicands X (zero, +-1, extremes,
// the values of the reference waveforms and random ones) every pair (A, B) is
// applied, and z is compared with X * (A + B) computed by the testbench: exact
// when A + B fits in 8 bits, low 8 bits otherwise; the 7-bit operator must
// always be exact. The four operand sets of the reference waveforms are
// checked first, with the digit selects where the waveform prints them.
//
// The test counts how often each mechanism of the operator is exercised and
// fails if one never is: every MB digit value -2..+2, a negative partial
// product (non-zero correction term), a sum outside the 8-bit range, an odd
// width sum outside the 7-bit range, and a carry out of the final adder.
module tb_fam_top;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8, x8;
  logic [15:0] z8;
  logic        co8;
  logic [6:0]  a7, b7, x7;
  logic [15:0] z7;
  logic        co7;

  fam_top dut8 (.a(a8), .b(b8), .x(x8), .z(z8), .cout(co8));
  fam_top #(.N(7)) dut7 (.a(a7), .b(b7), .x(x7), .z(z7), .cout(co7));

  int n_digit [5];     // digit value -2..+2 seen, index d+2
  int n_neg_pp;        // correction term non-zero
  int n_ovf8;          // A + B outside the 8-bit range
  int n_wide7;         // A + B outside the 7-bit range on the odd-width operator
  int n_cout;          // final adder carry out

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_mechanisms();
    for (int j = 0; j < 4; j++) begin
      int d;
      d = dut8.one[j] ? 1 : (dut8.two[j] ? 2 : 0);
      if (dut8.sign[j]) d = -d;
      n_digit[d+2]++;
    end
    if (dut8.ct != '0) n_neg_pp++;
    if (co8) n_cout++;
  endtask

  task automatic apply(input int ia, ib, ix);
    int sa, sb, sx, y, p;
    a8 = 8'(ia); b8 = 8'(ib); x8 = 8'(ix);
    a7 = 7'(ia); b7 = 7'(ib); x7 = 7'(ix);
    #1;
    sa = int'(signed'(a8)); sb = int'(signed'(b8)); sx = int'(signed'(x8));
    y = sa + sb;
    p = sx * y;
    if (y >= -128 && y <= 127) begin
      check(z8 == 16'(p), $sformatf("8-bit x=%0d a=%0d b=%0d z=%0d", sx, sa, sb, signed'(z8)));
    end else begin
      n_ovf8++;
      check(z8[7:0] == 8'(p), $sformatf("8-bit low x=%0d a=%0d b=%0d", sx, sa, sb));
    end
    sa = int'(signed'(a7)); sb = int'(signed'(b7)); sx = int'(signed'(x7));
    y = sa + sb;
    if (y < -64 || y > 63) n_wide7++;
    check(z7 == 16'(sx * y), $sformatf("7-bit x=%0d a=%0d b=%0d z=%0d", sx, sa, sb, signed'(z7)));
    count_mechanisms();
  endtask

  initial begin
    int xs [12];
    xs = '{0, 1, 255, 7, 12, 127, 128, 85, 170, 0, 0, 0};
    for (int i = 9; i < 12; i++) xs[i] = int'($urandom_range(0, 255));

    // Operand sets of the reference waveforms.
    apply(26, 11, 7);  check(z8 == 16'b0000000100000011, "26+11 times 7");
    apply(26, 1, 7);   check(z8 == 16'b0000000010111101, "26+1 times 7");
    apply(5, 11, 12);  check(z8 == 16'b0000000011000000, "5+11 times 12");
    check(dut8.one == 4'b0100 && dut8.two == 4'b0000 && dut8.sign == 4'b0000, "digits 5+11");
    apply(1, 11, 12);  check(z8 == 16'b0000000010010000, "1+11 times 12");
    check(dut8.one == 4'b0110 && dut8.two == 4'b0000 && dut8.sign == 4'b0010, "digits 1+11");
    check(dut8.pp[1] == 16'b1111111111001100 && dut8.pp[2] == 16'b0000000011000000, "pp 1+11 times 12");

    foreach (xs[i])
      for (int ia = 0; ia < 256; ia++)
        for (int ib = 0; ib < 256; ib++)
          apply(ia, ib, xs[i]);

    for (int k = 0; k < 5; k++) check(n_digit[k] > 0, $sformatf("digit %0d never produced", k - 2));
    check(n_neg_pp > 0, "no negative partial product");
    check(n_ovf8 > 0, "no 8-bit sum overflow");
    check(n_wide7 > 0, "no wide odd-width sum");
    check(n_cout > 0, "no final carry out");
    $display("mechanisms: digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d neg_pp:%0d ovf8:%0d wide7:%0d cout:%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4],
             n_neg_pp, n_ovf8, n_wide7, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
