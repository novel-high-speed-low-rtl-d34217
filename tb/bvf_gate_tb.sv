// bvf_gate_tb: exhaustive self-checking test of the 4x4 BVF double-XOR gate.
//
// Applies all sixteen input vectors and checks P = A, Q = A xor B, R = C and
// S = C xor D, that the sixteen outputs are distinct (reversible) and that a
// second BVF gate on the outputs restores the inputs. A watchdog ends the run
// with a failure if it hangs.
module bvf_gate_tb;
  logic a, b, c, d, p, q, r, s, p2, q2, r2, s2;
  int checks = 0, failures = 0;
  bit seen [16];

  bvf_gate dut  (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
  bvf_gate dut2 (.a(p), .b(q), .c(r), .d(s), .p(p2), .q(q2), .r(r2), .s(s2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b", what, a, b, c, d, p, q, r, s);
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
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check(p == a, "P = A");
      check(q == (a != b), "Q = A xor B");
      check(r == c, "R = C");
      check(s == (c != d), "S = C xor D");
      check(!seen[{p, q, r, s}], "output vector unique");
      seen[{p, q, r, s}] = 1'b1;
      check({p2, q2, r2, s2} == {a, b, c, d}, "self-inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
