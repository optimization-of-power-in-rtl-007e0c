// tb_csa_tree: self-checking test of the carry-save reduction tree.
//
// Runs trees with 5 inputs (the default operator's four partial products
// plus the correction term), 3 inputs and 7 inputs on random and corner-case
// 16-bit words, and checks that s + c equals the sum of all inputs modulo 2^16.
module tb_csa_tree;

  int checks = 0;
  int failures = 0;

  logic [15:0] ops5 [5];
  logic [15:0] ops3 [3];
  logic [15:0] ops7 [7];
  logic [15:0] s5, c5, s3, c3, s7, c7;

  csa_tree #(.W(16), .NOPS(5)) dut5 (.ops(ops5), .s(s5), .c(c5));
  csa_tree #(.W(16), .NOPS(3)) dut3 (.ops(ops3), .s(s3), .c(c3));
  csa_tree #(.W(16), .NOPS(7)) dut7 (.ops(ops7), .s(s7), .c(c7));

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

  initial begin
    logic [15:0] t5, t3, t7;
    for (int n = 0; n < 20000; n++) begin
      t5 = '0; t3 = '0; t7 = '0;
      for (int i = 0; i < 7; i++) begin
        logic [15:0] v;
        case (n)
          0: v = '0;
          1: v = '1;
          2: v = 16'h8000;
          default: v = 16'($urandom);
        endcase
        ops7[i] = v; t7 += v;
        if (i < 5) begin ops5[i] = v; t5 += v; end
        if (i < 3) begin ops3[i] = v; t3 += v; end
      end
      #1;
      check(16'(s5 + c5) == t5, $sformatf("5-input n=%0d", n));
      check(16'(s3 + c3) == t3, $sformatf("3-input n=%0d", n));
      check(16'(s7 + c7) == t7, $sformatf("7-input n=%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
