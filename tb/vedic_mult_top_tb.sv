// vedic_mult_top_tb: end-to-end test of the three reversible 2x2 Vedic
// multipliers, with the top at its defaults.
//
// Applies the operand pairs of the published waveforms, then every one of the
// sixteen operand pairs, then 200 random pairs, and checks each
// architecture's product against integer multiplication and the three
// products against each other. It counts how often each mechanism of the
// multiplication occurs in each architecture - a carry C1 out of the middle
// (crosswise) column, and a carry into the product MSB VM[3] - and counts a
// failure for a mechanism that never occurred. C1 is observed on the last
// garbage bit, which every architecture drives from its carry net.
// A watchdog ends the run with a failure if it hangs.
module vedic_mult_top_tb;
  import rev_mult_pkg::*;

  operand_t a, b;
  product_t vm_arch1, vm_arch2, vm_arch3;
  logic [ARCH1_GARBAGE-1:0] garbage_arch1;
  logic [ARCH2_GARBAGE-1:0] garbage_arch2;
  logic [ARCH3_GARBAGE-1:0] garbage_arch3;
  int checks = 0, failures = 0;
  int c1_seen [3];
  int msb_seen [3];
  int ops = 0;

  vedic_mult_top dut (.*);

  task automatic fail_if(input bit bad, input string what);
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d vm1=%0d vm2=%0d vm3=%0d", what, a, b,
               vm_arch1, vm_arch2, vm_arch3);
    end
  endtask

  task automatic apply(input int x, input int y);
    a = operand_t'(x);
    b = operand_t'(y);
    #1;
    ops++;
    fail_if(int'(vm_arch1) != x * y, "arch1 product");
    fail_if(int'(vm_arch2) != x * y, "arch2 product");
    fail_if(int'(vm_arch3) != x * y, "arch3 product");
    fail_if(vm_arch1 != vm_arch2 || vm_arch2 != vm_arch3, "architectures disagree");
    // Internal carry of the middle column in each architecture.
    if (garbage_arch1[5]) c1_seen[0]++;
    if (garbage_arch2[5]) c1_seen[1]++;
    if (garbage_arch3[5]) c1_seen[2]++;
    fail_if(garbage_arch1[5] != (x == 3 && y == 3), "arch1 carry C1");
    fail_if(garbage_arch2[5] != (x == 3 && y == 3), "arch2 carry C1");
    fail_if(garbage_arch3[5] != (x == 3 && y == 3), "arch3 carry C1");
    if (vm_arch1[3]) msb_seen[0]++;
    if (vm_arch2[3]) msb_seen[1]++;
    if (vm_arch3[3]) msb_seen[2]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (c1_seen[i]) begin
      c1_seen[i] = 0;
      msb_seen[i] = 0;
    end
    // Published waveform vectors.
    apply(0, 0); apply(3, 3); apply(2, 3); apply(2, 2); apply(2, 1);
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        apply(x, y);
    for (int i = 0; i < 200; i++)
      apply(int'($urandom_range(3)), int'($urandom_range(3)));
    for (int i = 0; i < 3; i++) begin
      $display("arch%0d: carry C1 %0d times, product MSB set %0d times", i + 1,
               c1_seen[i], msb_seen[i]);
      checks++;
      if (c1_seen[i] == 0) begin
        failures++;
        $display("FAIL arch%0d: carry C1 never happened", i + 1);
      end
      checks++;
      if (msb_seen[i] == 0) begin
        failures++;
        $display("FAIL arch%0d: product MSB never set", i + 1);
      end
    end
    $display("%0d multiplications", ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
