// tb_rev_shifter_d1: self-checking test of the Feynman + Fredkin (Design-1) reversible shifter at
// three widths, 4 bits (the default), 8 and 16 bits.
//
// Each width has its own instance and its own stimulus process. At 4 bits
// every combination of F, {H1,H0} and the serial inputs is applied; at 8 and
// 16 bits walking-one words and random words are. The expected result is
// worked out here from the function table (00 transfer, 01 shift right
// towards bit 0 with ir entering the top bit, 10 shift left with il entering
// bit 0, 11 zero). Also checked: the garbage bus is 4 bits per bit plus 2
// wide, and its top two bits carry H0 and H1 out of the select chain.
module tb_rev_shifter_d1;
  import shifter_pkg::*;

  int checks = 0;
  int failures = 0;
  bit done [3];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : width
    localparam int unsigned N = 4 << g;
    localparam int unsigned GW = 4 * N + 2;

    logic [N-1:0]    f, s, expected;
    logic [1:0]      h;
    logic            ir, il;
    logic [GW-1:0]   garbage;

    rev_shifter_d1 #(.N(N)) dut (
      .f(f), .h(h), .ir(ir), .il(il), .s(s), .garbage(garbage)
    );

    task automatic apply(input logic [N-1:0] fv, input logic [1:0] hv,
                         input logic irv, input logic ilv);
      f  = fv;
      h  = hv;
      ir = irv;
      il = ilv;
      #1;
      case (shift_op_e'(hv))
        OP_TRANSFER: expected = fv;
        OP_SHR:      expected = {irv, fv[N-1:1]};
        OP_SHL:      expected = {fv[N-2:0], ilv};
        default:     expected = '0;
      endcase
      checks++;
      if (s !== expected) begin
        failures++;
        $display("FAIL N=%0d f=%h h=%b ir=%b il=%b: s=%h expected %h", N, fv, hv, irv, ilv, s, expected);
      end
      checks++;
      if (garbage[GW-1 -: 2] !== hv) begin
        failures++;
        $display("FAIL N=%0d select chain ends with %b, expected %b", N, garbage[GW-1 -: 2], hv);
      end
    endtask

    initial begin
      checks++;
      if ($bits(garbage) != GW) begin
        failures++;
        $display("FAIL N=%0d garbage width %0d", N, $bits(garbage));
      end
      if (N == 4) begin
        for (int v = 0; v < (1 << (N + 4)); v++)
          apply(N'(v), 2'(v >> N), v[N+2], v[N+3]);
      end else begin
        for (int b = 0; b < N; b++)
          for (int op = 0; op < 4; op++)
            apply(N'(1) << b, 2'(op), 1'b0, 1'b0);
        for (int k = 0; k < 400; k++)
          apply(N'({$urandom, $urandom}), 2'($urandom), 1'($urandom), 1'($urandom));
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
