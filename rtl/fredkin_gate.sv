// fredkin_gate: 3x3 conservative reversible gate (controlled swap).
//
// Maps (A, B, C) to (P, Q, R) with P = A, Q = A'B + AC, R = AB + A'C: when
// A = 0 the data lines pass straight, when A = 1 they are swapped. The gate
// is its own inverse and keeps the number of ones on its three lines
// (conservative). Seen as a 2:1 multiplexer, Q = A ? C : B is the selected
// bit, R is the other one (a garbage output when only Q is used) and P
// carries the select on to the next gate. Quantum cost 5.
//
// Interface: a (control), b, c in; p, q, r out. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (a & b) | (~a & c);
  end

endmodule
