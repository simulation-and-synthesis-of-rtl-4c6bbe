// rev_mux4_feynman_fredkin: reversible 4:1 multiplexer from one Feynman gate
// and three Fredkin gates (the multiplexer cell of Design-1).
//
// The Feynman gate takes H0 and the constant input anc (0 in use) and gives
// two copies of H0. Fredkin gate f1, controlled by the first copy, chooses
// between d[0] and d[1]; f2, controlled by the second copy, chooses between
// d[2] and d[3]; f3, controlled by H1, chooses between the two. So with
// anc = 0, y = d[{H1,H0}]. The seven inputs (d, H0, H1, anc) map one-to-one
// onto seven outputs: y, H0 and H1 passed on, and four garbage lines (the
// spare copy of H0 from f2's P output and the three unused R outputs).
// With anc = 1 the block stays reversible but f2 sees ~H0.
//
// The gate mix (1 Feynman, 3 Fredkin), one constant-0 input and four garbage
// outputs per multiplexer follow the source design; the wiring between the
// gates and which H0 copy continues the select chain are this
// implementation's.
//
// Interface: h0_in/h1_in from the previous cell of a chain, h0_out/h1_out to
// the next. Combinational, no clock.
module rev_mux4_feynman_fredkin (
  input  logic       h0_in,
  input  logic       h1_in,
  input  logic       anc,
  input  logic [3:0] d,
  output logic       h0_out,
  output logic       h1_out,
  output logic       y,
  output logic [3:0] garbage
);

  logic h0_a, h0_b; // the two copies of H0 from the Feynman gate
  logic sel01;      // d[0] or d[1]
  logic sel23;      // d[2] or d[3]

  feynman_gate fy (.a(h0_in), .b(anc), .p(h0_a), .q(h0_b));

  fredkin_gate f1 (.a(h0_a),  .b(d[0]),  .c(d[1]),  .p(h0_out),     .q(sel01), .r(garbage[0]));
  fredkin_gate f2 (.a(h0_b),  .b(d[2]),  .c(d[3]),  .p(garbage[3]), .q(sel23), .r(garbage[1]));
  fredkin_gate f3 (.a(h1_in), .b(sel01), .c(sel23), .p(h1_out),     .q(y),     .r(garbage[2]));

endmodule
