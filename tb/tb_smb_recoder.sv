// tb_smb_recoder: exhaustive self-checking test of the S-MB recoder.
//
// Drives every pair (A, B) into an 8-bit (even width) and a 7-bit (odd width)
// recoder. For each output it checks that every digit is well formed (never
// both one and two, sign only on a non-zero digit) and that the digits, taken
// as sum(d_j * 4^j), equal A + B computed by the testbench. For the 8-bit
// recoder the value is checked exactly when A + B fits in 8 bits and modulo
// 2^8 otherwise; the 7-bit recoder must be exact for every pair. It also
// checks the digit patterns the reference waveforms show for two sums.
module tb_smb_recoder;

  int checks = 0;
  int failures = 0;

  logic [7:0] a8, b8;
  logic [3:0] one8, two8, sign8;
  logic [6:0] a7, b7;
  logic [3:0] one7, two7, sign7;

  smb_recoder #(.N(8)) dut8 (.a(a8), .b(b8), .one(one8), .two(two8), .sign(sign8));
  smb_recoder #(.N(7)) dut7 (.a(a7), .b(b7), .one(one7), .two(two7), .sign(sign7));

  // Value of a digit vector, and a well-formedness flag.
  function automatic int digits_value(input logic [3:0] o, input logic [3:0] t,
                                      input logic [3:0] s, output bit ok);
    int v = 0;
    int w = 1;
    ok = 1;
    for (int j = 0; j < 4; j++) begin
      int d;
      if (o[j] && t[j]) ok = 0;
      if (s[j] && !o[j] && !t[j]) ok = 0;
      d = o[j] ? 1 : (t[j] ? 2 : 0);
      if (s[j]) d = -d;
      v += d * w;
      w *= 4;
    end
    return v;
  endfunction

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

  initial begin
    bit ok;
    int v, ref_sum;
    // Fixed cases: sums 16 (A=5, B=11) and 12 (A=1, B=11).
    a8 = 8'd5; b8 = 8'd11; #1;
    check(one8 == 4'b0100 && two8 == 4'b0000 && sign8 == 4'b0000, "digits of 5+11");
    a8 = 8'd1; b8 = 8'd11; #1;
    check(one8 == 4'b0110 && two8 == 4'b0000 && sign8 == 4'b0010, "digits of 1+11");

    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a8 = 8'(ia); b8 = 8'(ib);
        a7 = 7'(ia); b7 = 7'(ib);
        #1;
        ref_sum = int'(signed'(a8)) + int'(signed'(b8));
        v = digits_value(one8, two8, sign8, ok);
        check(ok, $sformatf("8-bit digit form a=%0d b=%0d", ia, ib));
        if (ref_sum >= -128 && ref_sum <= 127)
          check(v == ref_sum, $sformatf("8-bit value a=%0d b=%0d got %0d", ia, ib, v));
        else
          check(((v - ref_sum) % 256) == 0, $sformatf("8-bit mod a=%0d b=%0d", ia, ib));
        if (ia < 128 && ib < 128) begin
          ref_sum = int'(signed'(a7)) + int'(signed'(b7));
          v = digits_value(one7, two7, sign7, ok);
          check(ok, $sformatf("7-bit digit form a=%0d b=%0d", ia, ib));
          check(v == ref_sum, $sformatf("7-bit value a=%0d b=%0d got %0d", ia, ib, v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
