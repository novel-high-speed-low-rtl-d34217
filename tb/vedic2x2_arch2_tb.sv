// vedic2x2_arch2_tb: exhaustive self-checking test of the reversible 2x2
// Vedic multiplier, architecture 2 (Toffoli gates and a BVF gate).
//
// Applies all sixteen operand pairs and checks the product against integer
// multiplication, and each garbage output against the signal its gate passes
// through (B0, A0, A1, B1, A1 B0 and the carry C1 = A1 B0 A0 B1). With its
// constant inputs fixed the network must stay one-to-one, so the sixteen
// (product, garbage) vectors are checked to be distinct. The operand pairs
// shown in the published waveforms (0x0, 3x3, 2x3, 2x2, 2x1) are applied
// first. A watchdog ends the run with a failure if it hangs.
module vedic2x2_arch2_tb;
  import rev_mult_pkg::*;

  operand_t a, b;
  product_t vm;
  logic [ARCH2_GARBAGE-1:0] garbage;
  int checks = 0, failures = 0;
  bit seen [1024];
  int carries = 0;

  vedic2x2_arch2 dut (.a(a), .b(b), .vm(vm), .garbage(garbage));

  task automatic apply(input int x, input int y, input bit uniq);
    logic c1;
    a = operand_t'(x);
    b = operand_t'(y);
    #1;
    checks++;
    if (int'(vm) != x * y) begin
      failures++;
      $display("FAIL product: %0d * %0d gave %0d", x, y, vm);
    end
    c1 = a[1] & b[0] & a[0] & b[1];
    if (c1) carries++;
    checks++;
    if (garbage != {c1, a[1] & b[0], b[1], a[1], a[0], b[0]}) begin
      failures++;
      $display("FAIL garbage: %0d * %0d gave %b", x, y, garbage);
    end
    if (uniq) begin
      checks++;
      if (seen[{vm, garbage}]) begin
        failures++;
        $display("FAIL not one-to-one at %0d * %0d", x, y);
      end
      seen[{vm, garbage}] = 1'b1;
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
    // Operand pairs of the published waveforms.
    apply(0, 0, 0); apply(3, 3, 0); apply(2, 3, 0); apply(2, 2, 0); apply(2, 1, 0);
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        apply(x, y, 1);
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL carry C1 never generated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
