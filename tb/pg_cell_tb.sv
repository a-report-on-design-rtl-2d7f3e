// pg_cell_tb: exhaustive self-check of the PG cell. For each (A, B) the
// expected propagate and generate come from the truth tables
// P = 1 for 01 and 10, G = 1 for 11; the cell must also give P_BAR = not P.
module pg_cell_tb;
  logic a, b, g_bar, p, p_bar;
  int   checks = 0, failures = 0;
  localparam logic [3:0] P_TRUTH = 4'b0110;  // row index {a, b}
  localparam logic [3:0] G_TRUTH = 4'b1000;

  pg_cell dut (.a(a), .b(b), .g_bar(g_bar), .p(p), .p_bar(p_bar));

  initial begin : watchdog
    #10us;
    failures++;
    $display("pg_cell_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 3;
      if (p !== P_TRUTH[v]) begin failures++; $display("FAIL a=%b b=%b p=%b", a, b, p); end
      if (p_bar !== ~P_TRUTH[v]) begin failures++; $display("FAIL a=%b b=%b p_bar=%b", a, b, p_bar); end
      if (g_bar !== ~G_TRUTH[v]) begin failures++; $display("FAIL a=%b b=%b g_bar=%b", a, b, g_bar); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : pg_cell_tb
