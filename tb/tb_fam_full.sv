// tb_fam_full: exhaustive test of the operator at its default size.
//
// Applies every one of the 2^24 operand triples (A, B, X) to the default
// 8-bit operator and compares z with X * (A + B): exactly when A + B fits in
// 8 bits, in the low 8 bits otherwise.
module tb_fam_full;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a, b, x;
  logic [15:0] z;
  logic        cout;

  fam_top dut (.a(a), .b(b), .x(x), .z(z), .cout(cout));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y, p;
    for (int ix = 0; ix < 256; ix++)
      for (int ia = 0; ia < 256; ia++)
        for (int ib = 0; ib < 256; ib++) begin
          a = 8'(ia); b = 8'(ib); x = 8'(ix);
          #1;
          y = int'(signed'(a)) + int'(signed'(b));
          p = int'(signed'(x)) * y;
          checks++;
          if (y >= -128 && y <= 127) begin
            if (z != 16'(p)) failures++;
          end else begin
            if (z[7:0] != 8'(p)) failures++;
          end
          if (failures == 1 && z != 16'(p)) $display("FAIL x=%0d a=%0d b=%0d", ix, ia, ib);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
