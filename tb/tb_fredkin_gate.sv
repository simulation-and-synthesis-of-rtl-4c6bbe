// tb_fredkin_gate: exhaustive self-checking test of the Fredkin gate.
//
// For all eight inputs it compares (P, Q, R) with the controlled swap worked
// out here, checks that no output triple repeats (reversible), that the
// number of ones is kept (conservative), and that applying the gate twice
// returns the input (self-inverse). A watchdog ends the run if it hangs.
module tb_fredkin_gate;

  logic a, b, c, p, q, r;
  logic p2, q2, r2;
  int   checks = 0;
  int   failures = 0;
  bit   seen [8];

  fredkin_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eq, er;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      eq = a ? c : b;
      er = a ? b : c;
      checks++;
      if (p !== a || q !== eq || r !== er) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b, expected %b%b%b", a, b, c, p, q, r, a, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
      checks++;
      if ($countones({p, q, r}) != $countones({a, b, c})) begin
        failures++;
        $display("FAIL abc=%b%b%b not conservative", a, b, c);
      end
      checks++;
      if ({p2, q2, r2} !== {a, b, c}) begin
        failures++;
        $display("FAIL abc=%b%b%b not self-inverse", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
