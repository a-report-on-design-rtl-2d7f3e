// xnor2_mirror_tb: exhaustive self-check of the mirror XNOR gate with
// complementary input rails, against the XNOR truth table.
module xnor2_mirror_tb;
  logic a, b, out;
  int   checks = 0, failures = 0;
  // Truth table, row index {a, b}: 1 when the inputs are equal.
  localparam logic [3:0] TRUTH = 4'b1001;

  xnor2_mirror dut (.a(a), .a_bar(~a), .b(b), .b_bar(~b), .out(out));

  initial begin : watchdog
    #10us;
    failures++;
    $display("xnor2_mirror_tb: watchdog expired");
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
endmodule : xnor2_mirror_tb
