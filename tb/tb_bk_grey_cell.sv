// tb_bk_grey_cell: exhaustive check of the grey cell. The expected group
// generate is worked out as "a carry leaves the merged span": the upper span
// generates one, or it propagates one that the lower span generated.
module tb_bk_grey_cell;
  logic g_ik, p_ik, g_kj, g_ij;
  int checks = 0, failures = 0;

  bk_grey_cell dut (.g_ik(g_ik), .p_ik(p_ik), .g_kj(g_kj), .g_ij(g_ij));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g;
    for (int v = 0; v < 8; v++) begin
      {g_ik, p_ik, g_kj} = v[2:0];
      #1;
      exp_g = g_ik ? 1'b1 : (p_ik ? g_kj : 1'b0);
      checks++;
      if (g_ij !== exp_g) begin
        failures++;
        $display("FAIL g_ik=%0b p_ik=%0b g_kj=%0b -> %0b", g_ik, p_ik, g_kj, g_ij);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
