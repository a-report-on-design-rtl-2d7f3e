// nand2_tb: exhaustive self-check of the NAND2 cell against its truth table.
module nand2_tb;
  logic a, b, out;
  int   checks = 0, failures = 0;
  // Truth table, row index {a, b}: only 11 gives 0.
  localparam logic [3:0] TRUTH = 4'b0111;

  nand2 dut (.a(a), .b(b), .out(out));

  initial begin : watchdog
    #10us;
    failures++;
    $display("nand2_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (out !== TRUTH[v]) begin
        failures++;
        $display("FAIL a=%b b=%b out=%b expected %b", a, b, out, TRUTH[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : nand2_tb
