// feynman_gate: 2x2 reversible controlled-NOT (CNOT) gate.
//
// Maps (A, B) to (P, Q) = (A, A xor B). The map is its own inverse, so the
// inputs can always be recovered from the outputs. With B held at 0 the gate
// produces two copies of A; the Design-1 multiplexer uses it that way to give
// a select line a second, fan-out-free copy. Quantum cost 1.
//
// Interface: a, b in; p, q out. Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
