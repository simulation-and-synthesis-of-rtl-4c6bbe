// rev_shifter_d1: N-bit combinational shifter built from Feynman and Fredkin
// gates (Design-1).
//
// One reversible 4:1 multiplexer (rev_mux4_feynman_fredkin) per output bit,
// each with one constant-0 input that its Feynman gate uses to copy H0. The
// two-bit select {H1,H0} chooses, for every bit at once:
//   00  S = F                      (transfer)
//   01  S = {ir, F[N-1:1]}          (shift right, towards bit 0)
//   10  S = {F[N-2:0], il}          (shift left, towards bit N-1)
//   11  S = 0                      (no transfer)
// Multiplexer input k is the source for operation k (see shifter_pkg). The
// select lines enter multiplexer 0 and are handed on from each multiplexer to
// the next, so the two that leave the last one are garbage. Garbage outputs
// total 4 per multiplexer plus those 2, 4N+2; constant inputs N; cost
// N Feynman + 3N Fredkin gates.
//
// The function table, the gate mix and counts, the N = 4 default and the
// garbage and constant-input counts follow the source design. The bit order
// (bit 0 = LSB, shift right goes towards it), the serial inputs ir/il, and
// the select chain are this implementation's choices. Data bits F[i] feed up
// to three multiplexers directly. Input 3 of every multiplexer is a tied 0.
//
// Interface: f, h, ir, il in; s, garbage out. garbage = {H1, H0 after the
// last multiplexer, multiplexer N-1's four, ..., multiplexer 0's four}.
// Purely combinational.
module rev_shifter_d1
  import shifter_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   f,
  input  logic [1:0]     h,
  input  logic           ir,
  input  logic           il,
  output logic [N-1:0]   s,
  output logic [4*N+1:0] garbage
);

  logic [N:0] h0_chain, h1_chain;

  assign h0_chain[0] = h[0];
  assign h1_chain[0] = h[1];

  for (genvar i = 0; i < N; i++) begin : mux
    logic [3:0] d;
    always_comb begin
      d[OP_TRANSFER] = f[i];
      d[OP_SHR]      = (i == N - 1) ? ir : f[(i + 1) % N];
      d[OP_SHL]      = (i == 0)     ? il : f[(i + N - 1) % N];
      d[OP_ZERO]     = 1'b0;
    end

    rev_mux4_feynman_fredkin m (
      .h0_in  (h0_chain[i]),
      .h1_in  (h1_chain[i]),
      .anc    (1'b0),
      .d      (d),
      .h0_out (h0_chain[i+1]),
      .h1_out (h1_chain[i+1]),
      .y      (s[i]),
      .garbage(garbage[4*i +: 4])
    );
  end

  assign garbage[4*N]   = h0_chain[N];
  assign garbage[4*N+1] = h1_chain[N];

endmodule
