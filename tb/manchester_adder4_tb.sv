// manchester_adder4_tb: end-to-end self-check of the 4-bit Manchester-carry
// adder at its default width.
//
// 1. Exhaustive: every (a, b, c_in), 2**(2*WIDTH+1) vectors. sum and c_out
//    are compared with integer addition, and each internal slice carry
//    (dut.carry) with the carry of the low bits' integer sum.
// 2. Worst case: every bit propagating, in both operand orientations
//    (a = 1111, b = 0000 and a = 0000, b = 1111), with c_in toggled
//    0 -> 1 -> 0 -> 1 so the carry ripples the whole chain in both
//    directions; then sum must be all ~c_in and c_out = c_in.
// Counted mechanisms, each of which must occur: a slice generating, a slice
// killing, a slice propagating, a carry rippling through all slices (rising
// and falling), and the buffered carry out at both values.
module manchester_adder4_tb;
  import manchester_pkg::*;
  localparam int unsigned W = ADDER_WIDTH;

  logic [W-1:0] a, b, sum;
  logic         c_in, c_out;
  int           checks = 0, failures = 0;
  int           n_gen = 0, n_kill = 0, n_prop = 0;
  int           n_ripple_rise = 0, n_ripple_fall = 0;
  int           n_cout0 = 0, n_cout1 = 0;

  manchester_adder4 dut (.a(a), .b(b), .c_in(c_in), .sum(sum), .c_out(c_out));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("manchester_adder4_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the outputs and every internal carry with integer addition.
  task automatic check_vector();
    longint unsigned total, low;
    total = longint'(a) + longint'(b) + longint'(c_in);
    checks += 2;
    if (sum !== W'(total)) begin
      failures++;
      $display("FAIL a=%h b=%h c_in=%b sum=%h expected %h", a, b, c_in, sum, W'(total));
    end
    if (c_out !== total[W]) begin
      failures++;
      $display("FAIL a=%h b=%h c_in=%b c_out=%b expected %b", a, b, c_in, c_out, total[W]);
    end
    for (int i = 1; i <= int'(W); i++) begin
      // Carry into bit i = bit i of the sum of the low i bits plus c_in.
      low = (longint'(a) & ((64'd1 << i) - 1)) + (longint'(b) & ((64'd1 << i) - 1))
          + longint'(c_in);
      checks++;
      if (dut.carry[i] !== low[i]) begin
        failures++;
        $display("FAIL a=%h b=%h c_in=%b carry[%0d]=%b expected %b",
                 a, b, c_in, i, dut.carry[i], low[i]);
      end
    end
    for (int i = 0; i < int'(W); i++) begin
      if (a[i] & b[i])        n_gen++;
      else if (~a[i] & ~b[i]) n_kill++;
      else                    n_prop++;
    end
    if (c_out) n_cout1++; else n_cout0++;
  endtask

  // All bits propagate: toggle c_in and watch the carry cross the chain.
  task automatic worst_case(input logic [W-1:0] wa, input logic [W-1:0] wb);
    logic prev;
    a = wa; b = wb; c_in = 1'b0;
    #1;
    check_vector();
    for (int k = 0; k < 3; k++) begin
      prev = c_in;
      c_in = ~c_in;
      #1;
      check_vector();
      checks += 2;
      if (c_out !== c_in) begin
        failures++; $display("FAIL worst case: c_out=%b after c_in -> %b", c_out, c_in);
      end
      if (sum !== {W{~c_in}}) begin
        failures++; $display("FAIL worst case: sum=%h after c_in -> %b", sum, c_in);
      end
      if (c_out === c_in && sum === {W{~c_in}}) begin
        if (!prev) n_ripple_rise++; else n_ripple_fall++;
      end
    end
  endtask

  initial begin
    for (longint unsigned v = 0; v < (64'd1 << (2 * W + 1)); v++) begin
      {a, b, c_in} = (2 * W + 1)'(v);
      #1;
      check_vector();
    end

    worst_case({W{1'b1}}, {W{1'b0}});
    worst_case({W{1'b0}}, {W{1'b1}});

    $display("manchester_adder4_tb: generate=%0d kill=%0d propagate=%0d",
             n_gen, n_kill, n_prop);
    $display("manchester_adder4_tb: full ripple rise=%0d fall=%0d, c_out 0=%0d 1=%0d",
             n_ripple_rise, n_ripple_fall, n_cout0, n_cout1);
    checks++;
    if (n_gen == 0 || n_kill == 0 || n_prop == 0 || n_ripple_rise == 0 ||
        n_ripple_fall == 0 || n_cout0 == 0 || n_cout1 == 0) begin
      failures++;
      $display("FAIL a counted mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : manchester_adder4_tb
