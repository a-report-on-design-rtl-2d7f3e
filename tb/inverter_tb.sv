// inverter_tb: exhaustive self-check of the inverter cell (both input
// values), expected value written out by hand.
module inverter_tb;
  logic in, out;
  int   checks = 0, failures = 0;

  inverter dut (.in(in), .out(out));

  initial begin : watchdog
    #10us;
    failures++;
    $display("inverter_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 1'b0; #1;
    checks++; if (out !== 1'b1) begin failures++; $display("FAIL in=0 out=%b", out); end
    in = 1'b1; #1;
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL in=1 out=%b", out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : inverter_tb
