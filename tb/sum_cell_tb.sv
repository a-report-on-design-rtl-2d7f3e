// sum_cell_tb: exhaustive self-check of the SUM cell, S = P xor C_IN, with
// P_BAR driven as the complement of P.
module sum_cell_tb;
  logic p, c_in, sum_out;
  int   checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b0110;  // row index {p, c_in}

  sum_cell dut (.p(p), .p_bar(~p), .c_in(c_in), .sum_out(sum_out));

  initial begin : watchdog
    #10us;
    failures++;
    $display("sum_cell_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {p, c_in} = 2'(v);
      #1;
      checks++;
      if (sum_out !== TRUTH[v]) begin
        failures++;
        $display("FAIL p=%b c_in=%b sum=%b expected %b", p, c_in, sum_out, TRUTH[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : sum_cell_tb
