// c_chain_tb: self-check of one Manchester carry stage over every
// consistent input: C_IN in {0,1} and (P, G) in {kill (0,0), generate (0,1),
// propagate (1,0)}. Expected C_OUT: propagate passes C_IN, otherwise G.
module c_chain_tb;
  logic c_in, p, g, c_out;
  int   checks = 0, failures = 0;
  int   n_kill = 0, n_gen = 0, n_prop = 0;
  logic expected;

  c_chain dut (.c_in(c_in), .g_bar(~g), .p(p), .p_bar(~p), .c_out(c_out));

  initial begin : watchdog
    #10us;
    failures++;
    $display("c_chain_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int mode = 0; mode < 3; mode++) begin
        c_in = 1'(ci);
        case (mode)
          0: begin p = 1'b0; g = 1'b0; expected = 1'b0;    n_kill++; end
          1: begin p = 1'b0; g = 1'b1; expected = 1'b1;    n_gen++;  end
          default: begin p = 1'b1; g = 1'b0; expected = 1'(ci); n_prop++; end
        endcase
        #1;
        checks++;
        if (c_out !== expected) begin
          failures++;
          $display("FAIL c_in=%b p=%b g=%b c_out=%b expected %b", c_in, p, g, c_out, expected);
        end
      end
    end
    checks++;
    if (n_kill == 0 || n_gen == 0 || n_prop == 0) failures++;
    $display("c_chain_tb: kill=%0d generate=%0d propagate=%0d", n_kill, n_gen, n_prop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : c_chain_tb
