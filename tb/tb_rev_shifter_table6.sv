// tb_rev_shifter_table6: both shifters at the three sizes of the cost table,
// 4, 8 and 16 bits.
//
// For each size the top is instantiated with that width. The garbage-output
// counts are compared with the published figures (Design-1: 18, 34, 66;
// Design-2: 14, 26, 50, i.e. 4n+2 and 3n+2). Each size then gets the four
// operations on walking-one words and on random words, with both serial
// inputs, checked against the function table and against each other.
module tb_rev_shifter_table6;
  import shifter_pkg::*;

  int checks = 0;
  int failures = 0;
  bit done [3];

  localparam int GO_D1 [3] = '{18, 34, 66};
  localparam int GO_D2 [3] = '{14, 26, 50};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : size
    localparam int unsigned N = 4 << g;

    logic [N-1:0]   f, s_d1, s_d2, expected;
    logic [1:0]     h;
    logic           ir, il;
    logic [4*N+1:0] garbage_d1;
    logic [3*N+1:0] garbage_d2;

    rev_shifter_top #(.N(N)) dut (
      .f(f), .h(h), .ir(ir), .il(il),
      .s_d1(s_d1), .garbage_d1(garbage_d1),
      .s_d2(s_d2), .garbage_d2(garbage_d2)
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
      if (s_d1 !== expected || s_d2 !== expected) begin
        failures++;
        $display("FAIL N=%0d f=%h h=%b ir=%b il=%b: s_d1=%h s_d2=%h expected %h",
                 N, fv, hv, irv, ilv, s_d1, s_d2, expected);
      end
      checks++;
      if (garbage_d1[4*N +: 2] !== hv || garbage_d2[3*N +: 2] !== hv) begin
        failures++;
        $display("FAIL N=%0d select chain", N);
      end
    endtask

    initial begin
      checks++;
      if ($bits(garbage_d1) != GO_D1[g] || $bits(garbage_d2) != GO_D2[g]) begin
        failures++;
        $display("FAIL N=%0d garbage outputs %0d/%0d, table gives %0d/%0d",
                 N, $bits(garbage_d1), $bits(garbage_d2), GO_D1[g], GO_D2[g]);
      end
      for (int b = 0; b < N; b++)
        for (int op = 0; op < 4; op++)
          for (int sv = 0; sv < 4; sv++)
            apply(N'(1) << b, 2'(op), sv[0], sv[1]);
      for (int k = 0; k < 500; k++)
        apply(N'({$urandom, $urandom}), 2'($urandom), 1'($urandom), 1'($urandom));
      $display("N=%0d: garbage outputs Design-1 %0d, Design-2 %0d", N, $bits(garbage_d1), $bits(garbage_d2));
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
