// tb_rev_mux4_fredkin: exhaustive self-checking test of the Fredkin-only
// reversible 4:1 multiplexer.
//
// Drives all 64 combinations of (H1, H0, d). Checks y = d[{H1,H0}], that H0
// and H1 come out unchanged for the next cell, and that the 6-bit output
// vector never repeats, i.e. the cell is a reversible 6x6 block.
module tb_rev_mux4_fredkin;

  logic       h0_in, h1_in, h0_out, h1_out, y;
  logic [3:0] d;
  logic [2:0] garbage;
  int         checks = 0;
  int         failures = 0;
  bit         seen [64];

  rev_mux4_fredkin dut (
    .h0_in(h0_in), .h1_in(h1_in), .d(d),
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
    logic [5:0] outv;
    for (int v = 0; v < 64; v++) begin
      {h1_in, h0_in, d} = 6'(v);
      #1;
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
