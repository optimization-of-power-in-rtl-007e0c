// tb_pp_gen: self-checking test of the partial-product generator.
//
// For every 8-bit multiplicand X and every combination of four MB digits
// (5^4 = 625 digit vectors) it checks each partial product and the
// correction term against values the testbench computes from the digit
// integers: pp[j] plus the correction bit at 2j must equal d_j * X * 4^j
// modulo 2^16, the correction term may only hold the sign bits at even
// positions, and all words together must add up to X * sum(d_j * 4^j).
// It also checks the one's complement partial product -X*4 for X = 12 that
// the reference waveform shows.
module tb_pp_gen;

  int checks = 0;
  int failures = 0;

  logic [7:0]  x;
  logic [3:0]  one, two, sign;
  logic [15:0] pp [4];
  logic [15:0] ct;

  pp_gen #(.N(8)) dut (.x(x), .one(one), .two(two), .sign(sign), .pp(pp), .ct(ct));

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
    int d [4];
    int dsum, tot, expct;
    // Digit -1 in position 1 with X = 12 gives 16'b1111111111001100.
    x = 8'd12; one = 4'b0010; two = 4'b0000; sign = 4'b0010; #1;
    check(pp[1] == 16'b1111111111001100, "pp1 of -1 * 12");
    check(ct == 16'h0004, "ct of -1 in digit 1");

    for (int ix = 0; ix < 256; ix++) begin
      for (int code = 0; code < 625; code++) begin
        int cc;
        cc = code;
        dsum = 0;
        for (int j = 0; j < 4; j++) begin
          d[j] = (cc % 5) - 2;
          cc = cc / 5;
          one[j]  = (d[j] == 1 || d[j] == -1);
          two[j]  = (d[j] == 2 || d[j] == -2);
          sign[j] = (d[j] < 0);
          dsum += d[j] * (4 ** j);
        end
        x = 8'(ix);
        #1;
        expct = 0;
        tot = int'(ct);
        for (int j = 0; j < 4; j++) begin
          int expv;
          expv = d[j] * int'(signed'(x)) * (4 ** j);
          check(16'(pp[j] + (16'(sign[j]) << (2 * j))) == 16'(expv),
                $sformatf("pp%0d x=%0d d=%0d", j, ix, d[j]));
          if (d[j] < 0) expct += 4 ** j;
          tot += int'(pp[j]);
        end
        check(ct == 16'(expct), $sformatf("ct x=%0d code=%0d", ix, code));
        check(16'(tot) == 16'(dsum * int'(signed'(x))), $sformatf("total x=%0d code=%0d", ix, code));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
