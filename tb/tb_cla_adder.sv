// tb_cla_adder: self-checking test of the carry look-ahead adder.
//
// Checks {cout, sum} against a + b + cin for a 16-bit and an 8-bit adder:
// every 8-bit input pair with both carry-in values, and for 16 bits random
// words plus patterns that push a carry through every group (all-ones plus
// one, alternating propagate/generate runs).
module tb_cla_adder;

  int checks = 0;
  int failures = 0;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;

  cla_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  cla_adder #(.W(8))  dut8  (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

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

  task automatic apply16(input logic [15:0] ta, tb, input logic tc);
    a16 = ta; b16 = tb; ci16 = tc;
    #1;
    check({co16, s16} == 17'(ta) + 17'(tb) + 17'(tc), $sformatf("16-bit %h + %h + %0d", ta, tb, tc));
  endtask

  initial begin
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          a8 = 8'(ia); b8 = 8'(ib); ci8 = 1'(ic);
          #1;
          check({co8, s8} == 9'(ia + ib + ic), $sformatf("8-bit %0d + %0d + %0d", ia, ib, ic));
        end
    apply16(16'hFFFF, 16'h0000, 1'b1);
    apply16(16'hFFFF, 16'h0001, 1'b0);
    apply16(16'hFFFF, 16'hFFFF, 1'b1);
    apply16(16'h0F0F, 16'h00F1, 1'b0);
    apply16(16'h7FFF, 16'h0001, 1'b0);
    for (int i = 0; i < 16; i++) apply16(16'hFFFF >> i, 16'h0001 << 0, 1'b0);
    for (int n = 0; n < 20000; n++) apply16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
