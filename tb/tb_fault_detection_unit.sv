// tb_fault_detection_unit: checks the threshold comparisons.
//
// Runs the six documented test cases (two normal, current/temperature/voltage over limit,
// all three over limit), the boundary values of each threshold (equal to it: normal; one
// above: fault), an exhaustive sweep of each input with the others at zero, and random
// triples. Expected values come from a reference written in the testbench.
module tb_fault_detection_unit;
  import daq_pkg::*;

  sample_t    temp, volt, curr;
  logic [2:0] fault_bits;
  logic       fault_flag;
  int         checks = 0, failures = 0;

  fault_detection_unit dut (.temp, .volt, .curr, .fault_bits, .fault_flag);

  task automatic apply(int t, int v, int c, logic exp_flag);
    logic [2:0] exp_bits;
    temp = sample_t'(t); volt = sample_t'(v); curr = sample_t'(c);
    exp_bits = {t > 200, v > 180, c > 150};
    #1;
    checks++;
    if (fault_flag !== exp_flag) begin
      failures++;
      $display("FAIL flag %b expected %b for T=%0d V=%0d C=%0d", fault_flag, exp_flag, t, v, c);
    end
    checks++;
    if (fault_bits !== exp_bits) begin
      failures++;
      $display("FAIL bits %b expected %b for T=%0d V=%0d C=%0d", fault_bits, exp_bits, t, v, c);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Documented test cases TC1..TC6.
    apply(50, 80, 100, 1'b0);
    apply(120, 140, 130, 1'b0);
    apply(51, 102, 153, 1'b1);
    apply(201, 120, 100, 1'b1);
    apply(100, 181, 120, 1'b1);
    apply(220, 190, 170, 1'b1);
    // Boundaries.
    apply(200, 180, 150, 1'b0);
    apply(201, 0, 0, 1'b1);
    apply(0, 181, 0, 1'b1);
    apply(0, 0, 151, 1'b1);
    apply(255, 255, 255, 1'b1);
    // Fault clears when the reading returns to range.
    apply(0, 0, 150, 1'b0);
    for (int i = 0; i < 256; i++) begin
      apply(i, 0, 0, i > 200);
      apply(0, i, 0, i > 180);
      apply(0, 0, i, i > 150);
    end
    for (int i = 0; i < 3000; i++) begin
      int t, v, c;
      t = int'($urandom_range(255)); v = int'($urandom_range(255)); c = int'($urandom_range(255));
      apply(t, v, c, (t > 200) || (v > 180) || (c > 150));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
