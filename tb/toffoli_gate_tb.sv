// toffoli_gate_tb: exhaustive self-checking test of the 3x3 Toffoli gate.
//
// Applies all eight input vectors and checks each output against the gate's
// definition (R inverted only when both controls are 1). Also checks the gate
// is reversible: the eight output vectors are all different, and a second
// Toffoli gate applied to the outputs restores the inputs (it is its own
// inverse). A watchdog ends the run with a failure if it hangs.
module toffoli_gate_tb;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  bit seen [8];

  toffoli_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P = A");
      check(q == b, "Q = B");
      check(r == ((a && b) ? !c : c), "R = C inverted when A and B");
      check(!seen[{p, q, r}], "output vector unique");
      seen[{p, q, r}] = 1'b1;
      check({p2, q2, r2} == {a, b, c}, "self-inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
