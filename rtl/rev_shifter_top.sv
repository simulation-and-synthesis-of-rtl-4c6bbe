// rev_shifter_top: the two reversible combinational shifters side by side.
//
// Both shifter variants share one input bus: the N-bit word F, the operation
// select {H1,H0} and the two serial inputs. Each brings out its own result
// and its own garbage lines, so the two can be compared bit for bit:
//   Design-1 (rev_shifter_d1): per bit 1 Feynman + 3 Fredkin gates,
//            1 constant input, 4N+2 garbage outputs.
//   Design-2 (rev_shifter_d2): per bit 3 Fredkin gates, no ancilla,
//            3N+2 garbage outputs.
// With equal inputs s_d1 and s_d2 are always equal; only cost differs.
// Placing both in one top is this implementation's choice: the source design
// proposes and compares the two but does not combine them.
//
// Interface: f, h ({H1,H0}: 00 transfer, 01 shift right, 10 shift left,
// 11 zero), ir (enters bit N-1 on shift right), il (enters bit 0 on shift
// left); s_d1/garbage_d1, s_d2/garbage_d2 out. Purely combinational.
module rev_shifter_top #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   f,
  input  logic [1:0]     h,
  input  logic           ir,
  input  logic           il,
  output logic [N-1:0]   s_d1,
  output logic [4*N+1:0] garbage_d1,
  output logic [N-1:0]   s_d2,
  output logic [3*N+1:0] garbage_d2
);

  rev_shifter_d1 #(.N(N)) u_d1 (
    .f(f), .h(h), .ir(ir), .il(il), .s(s_d1), .garbage(garbage_d1)
  );

  rev_shifter_d2 #(.N(N)) u_d2 (
    .f(f), .h(h), .ir(ir), .il(il), .s(s_d2), .garbage(garbage_d2)
  );

endmodule
