// rev_mux4_fredkin: reversible 4:1 multiplexer from three Fredkin gates
// (the multiplexer cell of Design-2, the Fredkin-only shifter).
//
// Gate f1 is controlled by H0 and chooses between d[0] and d[1]; its P output
// carries H0 on to gate f2, which chooses between d[2] and d[3]; gate f3 is
// controlled by H1 and chooses between the two first-level results. So
// y = d[{H1,H0}]. No constant input is needed. The six inputs (d, H0, H1) map
// one-to-one onto the six outputs (y, H0 and H1 passed on, and the three
// unused R outputs as garbage), so the block is reversible.
//
// Three Fredkin gates, no constant inputs and three garbage outputs per
// multiplexer follow the source design; the gate-level wiring, the choice of
// H0 for the first level and the passing-on of H0/H1 to the next multiplexer
// are this implementation's.
//
// Interface: h0_in/h1_in from the previous cell of a chain (or the shifter's
// select), h0_out/h1_out to the next. Combinational, no clock.
module rev_mux4_fredkin (
  input  logic       h0_in,
  input  logic       h1_in,
  input  logic [3:0] d,
  output logic       h0_out,
  output logic       h1_out,
  output logic       y,
  output logic [2:0] garbage
);

  logic h0_mid;   // H0 passed from f1 to f2
  logic sel01;    // d[0] or d[1], chosen by H0
  logic sel23;    // d[2] or d[3], chosen by H0

  fredkin_gate f1 (.a(h0_in),  .b(d[0]),  .c(d[1]),  .p(h0_mid), .q(sel01), .r(garbage[0]));
  fredkin_gate f2 (.a(h0_mid), .b(d[2]),  .c(d[3]),  .p(h0_out), .q(sel23), .r(garbage[1]));
  fredkin_gate f3 (.a(h1_in),  .b(sel01), .c(sel23), .p(h1_out), .q(y),     .r(garbage[2]));

endmodule
