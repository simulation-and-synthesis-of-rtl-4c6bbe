// tb_rev_shifter_top: end-to-end test of both reversible shifters at the
// default width, with no parameter overridden.
//
// Applies every combination of the word F, the select {H1,H0} and the two
// serial inputs, which at 4 bits is 256 vectors. For each it checks both
// results against the function table worked out here, checks that the two
// designs agree, and that each select chain hands H0 and H1 out at the top
// of its garbage bus. The garbage lines of every multiplexer are compared
// with the rejected inputs of its three Fredkin gates (and, for Design-1, the
// spare copy of H0). It counts how often each operation ran (transfer,
// shift right, shift left, zero) and how often a serial input reached the
// result, and counts a failure for any of those that never happened.
module tb_rev_shifter_top;
  import shifter_pkg::*;

  localparam int unsigned N = 4;

  logic [N-1:0]   f, s_d1, s_d2, expected;
  logic [1:0]     h;
  logic           ir, il;
  logic [4*N+1:0] garbage_d1;
  logic [3*N+1:0] garbage_d2;

  int checks = 0;
  int failures = 0;
  int op_count [4];
  int ir_entered = 0;
  int il_entered = 0;

  rev_shifter_top dut (
    .f(f), .h(h), .ir(ir), .il(il),
    .s_d1(s_d1), .garbage_d1(garbage_d1),
    .s_d2(s_d2), .garbage_d2(garbage_d2)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: f=%h h=%b ir=%b il=%b s_d1=%h s_d2=%h expected=%h",
               what, f, h, ir, il, s_d1, s_d2, expected);
    end
  endtask

  // Garbage expected from one multiplexer: the R output of each Fredkin gate
  // is the input it did not select.
  function automatic logic [2:0] mux_garbage(input logic [3:0] d, input logic [1:0] hv);
    logic sel01, sel23;
    sel01 = hv[0] ? d[1] : d[0];
    sel23 = hv[0] ? d[3] : d[2];
    return {hv[1] ? sel01 : sel23, hv[0] ? d[2] : d[3], hv[0] ? d[0] : d[1]};
  endfunction

  initial begin
    shift_op_e op;
    logic [3:0] d;
    check($bits(s_d1) == N && $bits(s_d2) == N, "result width");
    check($bits(garbage_d1) == 4 * N + 2, "Design-1 garbage count");
    check($bits(garbage_d2) == 3 * N + 2, "Design-2 garbage count");

    for (int v = 0; v < (1 << (N + 4)); v++) begin
      f  = N'(v);
      h  = 2'(v >> N);
      ir = v[N+2];
      il = v[N+3];
      #1;
      op = shift_op_e'(h);
      case (op)
        OP_TRANSFER: expected = f;
        OP_SHR:      expected = {ir, f[N-1:1]};
        OP_SHL:      expected = {f[N-2:0], il};
        default:     expected = '0;
      endcase
      op_count[op]++;
      if (op == OP_SHR && s_d2[N-1]) ir_entered++;
      if (op == OP_SHL && s_d2[0])   il_entered++;

      check(s_d1 === expected, "Design-1 result");
      check(s_d2 === expected, "Design-2 result");
      check(s_d1 === s_d2, "designs disagree");
      for (int i = 0; i < N; i++) begin
        d[OP_TRANSFER] = f[i];
        d[OP_SHR]      = (i == N - 1) ? ir : f[(i + 1) % N];
        d[OP_SHL]      = (i == 0) ? il : f[(i + N - 1) % N];
        d[OP_ZERO]     = 1'b0;
        check(garbage_d2[3*i +: 3] === mux_garbage(d, h), "Design-2 multiplexer garbage");
        check(garbage_d1[4*i +: 4] === {h[0], mux_garbage(d, h)}, "Design-1 multiplexer garbage");
      end
      check(garbage_d1[4*N +: 2] === h, "Design-1 select chain");
      check(garbage_d2[3*N +: 2] === h, "Design-2 select chain");
    end

    $display("transfer=%0d shift_right=%0d shift_left=%0d zero=%0d ir_entered=%0d il_entered=%0d",
             op_count[OP_TRANSFER], op_count[OP_SHR], op_count[OP_SHL], op_count[OP_ZERO],
             ir_entered, il_entered);
    for (int k = 0; k < 4; k++) check(op_count[k] > 0, "operation never exercised");
    check(ir_entered > 0, "serial input ir never shifted in");
    check(il_entered > 0, "serial input il never shifted in");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
