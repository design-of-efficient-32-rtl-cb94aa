// tb_bk_black_cell: exhaustive check of the black cell (16 combinations).
// Generate: a carry leaves the merged span; propagate: both spans propagate.
module tb_bk_black_cell;
  logic g_ik, p_ik, g_kj, p_kj, g_ij, p_ij;
  int checks = 0, failures = 0;

  bk_black_cell dut (.g_ik(g_ik), .p_ik(p_ik), .g_kj(g_kj), .p_kj(p_kj),
                     .g_ij(g_ij), .p_ij(p_ij));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      {g_ik, p_ik, g_kj, p_kj} = v[3:0];
      #1;
      exp_g = g_ik ? 1'b1 : (p_ik ? g_kj : 1'b0);
      exp_p = (p_ik && p_kj);
      checks++;
      if (g_ij !== exp_g || p_ij !== exp_p) begin
        failures++;
        $display("FAIL in=%4b -> g=%0b p=%0b", v[3:0], g_ij, p_ij);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
