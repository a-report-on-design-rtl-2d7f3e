// adder_1bit_tb: exhaustive self-check of one bit slice. Expected values come
// from integer addition: {c_out, sum_out} = a + b + c_in. Also counts the
// three carry modes of the slice (kill, generate, propagate) and requires
// each to occur. Finally repeats the DC test set-up used to measure the
// slice's noise margins, at logic level: A held at 1, C_IN at 0, B swept
// 0 -> 1 -> 0, so the slice propagates and SUM_OUT = not B, C_OUT = B.
module adder_1bit_tb;
  logic a, b, c_in, sum_out, c_out;
  int   checks = 0, failures = 0;
  int   n_kill = 0, n_gen = 0, n_prop = 0;
  int   total;

  adder_1bit dut (.a(a), .b(b), .c_in(c_in), .sum_out(sum_out), .c_out(c_out));

  initial begin : watchdog
    #10us;
    failures++;
    $display("adder_1bit_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c_in} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c_in);
      if (a == b) begin if (a) n_gen++; else n_kill++; end
      else n_prop++;
      checks += 2;
      if (sum_out !== total[0]) begin
        failures++; $display("FAIL a=%b b=%b c_in=%b sum=%b", a, b, c_in, sum_out);
      end
      if (c_out !== total[1]) begin
        failures++; $display("FAIL a=%b b=%b c_in=%b c_out=%b", a, b, c_in, c_out);
      end
    end
    a = 1'b1; c_in = 1'b0;
    for (int k = 0; k < 3; k++) begin
      b = 1'(k % 2 == 1);
      #1;
      checks += 2;
      if (sum_out !== ~b) begin failures++; $display("FAIL sweep b=%b sum=%b", b, sum_out); end
      if (c_out !== b)    begin failures++; $display("FAIL sweep b=%b c_out=%b", b, c_out); end
    end
    checks++;
    if (n_kill == 0 || n_gen == 0 || n_prop == 0) failures++;
    $display("adder_1bit_tb: kill=%0d generate=%0d propagate=%0d", n_kill, n_gen, n_prop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : adder_1bit_tb
