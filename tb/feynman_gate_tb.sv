// feynman_gate_tb: exhaustive self-checking test of the 2x2 Feynman gate.
//
// Applies all four input vectors, checks P = A and that Q is 1 exactly when
// the inputs differ, that the four outputs are distinct (reversible) and that
// a second Feynman gate on the outputs restores the inputs. A watchdog ends
// the run with a failure if it hangs.
module feynman_gate_tb;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;
  bit seen [4];

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b -> p=%0b q=%0b", what, a, b, p, q);
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
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(p == a, "P = A");
      check(q == (a != b), "Q = A xor B");
      check(!seen[{p, q}], "output vector unique");
      seen[{p, q}] = 1'b1;
      check({p2, q2} == {a, b}, "self-inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
