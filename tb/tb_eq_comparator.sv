// tb_eq_comparator: exhaustive check of the equality comparator at the two
// widths the chip uses, 3 bits (counters against registers, "= 111") and
// 4 bits (INITNUM).
module tb_eq_comparator;
  logic [2:0] a3, b3;
  logic [3:0] a4, b4;
  logic eq3, eq4;
  int checks = 0, failures = 0;

  eq_comparator #(.W(3)) dut3 (.a(a3), .b(b3), .eq(eq3));
  eq_comparator #(.W(4)) dut4 (.a(a4), .b(b4), .eq(eq4));

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j); #1;
        checks++;
        if (eq3 !== (i == j)) begin failures++; $display("FAIL: 3-bit %0d %0d", i, j); end
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (eq4 !== (i == j)) begin failures++; $display("FAIL: 4-bit %0d %0d", i, j); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
