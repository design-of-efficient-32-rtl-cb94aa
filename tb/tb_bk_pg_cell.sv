// tb_bk_pg_cell: exhaustive check of the bitwise propagate/generate cell.
// All four input combinations are applied; p must be 1 exactly when one
// operand bit is 1 and g exactly when both are.
module tb_bk_pg_cell;
  logic a, b, p, g;
  int checks = 0, failures = 0;

  bk_pg_cell dut (.a(a), .b(b), .p(p), .g(g));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if (p !== (int'(a) + int'(b) == 1) || g !== (int'(a) + int'(b) == 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b p=%0b g=%0b", a, b, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
