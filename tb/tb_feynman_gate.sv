// tb_feynman_gate: exhaustive self-checking test of the Feynman (CNOT) gate.
//
// Applies all four input pairs, compares (P, Q) with (A, A xor B) worked out
// here, and checks that the four output pairs are all different (the gate is
// reversible). A watchdog ends the run if it hangs.
module tb_feynman_gate;

  logic a, b, p, q;
  int   checks = 0;
  int   failures = 0;
  bit   seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b repeated: not reversible", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    // With B = 0 the gate is a fan-out: both outputs copy A.
    for (int v = 0; v < 2; v++) begin
      a = v[0];
      b = 1'b0;
      #1;
      checks++;
      if (p !== a || q !== a) begin
        failures++;
        $display("FAIL copy mode a=%b -> p=%b q=%b", a, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
