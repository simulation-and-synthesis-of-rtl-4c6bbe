// tb_rev_mux4_feynman_fredkin: exhaustive self-checking test of the
// Feynman + Fredkin reversible 4:1 multiplexer.
//
// Drives all 128 combinations of (anc, H1, H0, d). With the constant input
// anc = 0 (its use in the shifter) it checks y = d[{H1,H0}] and that H0 and
// H1 are passed on. For every combination it checks that the 7-bit output
// vector never repeats, i.e. the cell is a reversible 7x7 block.
module tb_rev_mux4_feynman_fredkin;

  logic       h0_in, h1_in, anc, h0_out, h1_out, y;
  logic [3:0] d;
  logic [3:0] garbage;
  int         checks = 0;
  int         failures = 0;
  bit         seen [128];

  rev_mux4_feynman_fredkin dut (
    .h0_in(h0_in), .h1_in(h1_in), .anc(anc), .d(d),
    .h0_out(h0_out), .h1_out(h1_out), .y(y), .garbage(garbage)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] outv;
    for (int v = 0; v < 128; v++) begin
      {anc, h1_in, h0_in, d} = 7'(v);
      #1;
      if (!anc) begin
        checks++;
        if (y !== d[{h1_in, h0_in}]) begin
          failures++;
          $display("FAIL h=%b%b d=%b -> y=%b", h1_in, h0_in, d, y);
        end
        checks++;
        if (h0_out !== h0_in || h1_out !== h1_in) begin
          failures++;
          $display("FAIL select not passed on: in %b%b out %b%b", h1_in, h0_in, h1_out, h0_out);
        end
      end
      outv = {h1_out, h0_out, y, garbage};
      checks++;
      if (seen[outv]) begin
        failures++;
        $display("FAIL output vector %b repeated: not reversible", outv);
      end
      seen[outv] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
