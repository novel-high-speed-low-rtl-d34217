// peres_gate_tb: exhaustive self-checking test of the 3x3 Peres gate.
//
// Applies all eight input vectors and checks P = A, Q = A xor B and
// R = C inverted when A and B are both 1. With C = 0 it checks that {R, Q} is
// the arithmetic sum A + B (the half-adder use in the multiplier). It checks
// reversibility: all outputs distinct, and the inverse mapping
// A = P, B = Q xor P, C = R xor (A and B) recovers the inputs. A watchdog ends
// the run with a failure if it hangs.
module peres_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
    logic ia, ib, ic;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P = A");
      check(q == (a != b), "Q = A xor B");
      check(r == ((a && b) ? !c : c), "R = C inverted when A and B");
      if (!c) check(2'({r, q}) == 2'(a + b), "half adder with C = 0");
      check(!seen[{p, q, r}], "output vector unique");
      seen[{p, q, r}] = 1'b1;
      ia = p;
      ib = q ^ p;
      ic = r ^ (ia & ib);
      check({ia, ib, ic} == {a, b, c}, "inverse recovers inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
