// tb_sensor_generator: checks the three virtual sensors against an independent count.
//
// After reset all readings must be 0; n cycles later temperature, voltage and current must
// be n, 2n and 3n modulo 256. The first five cycles are also compared with the printed sample
// values 01/02/03 ... 05/0A/0F. Runs 600 cycles so every counter wraps at least twice, then
// applies a second reset in mid-run and checks the readings restart from zero.
module tb_sensor_generator;
  import daq_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  sample_t temp, volt, curr;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  sensor_generator dut (.clk, .rst, .temp, .volt, .curr);

  task automatic check(string what, sample_t got, sample_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t table_t[5] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05};
  sample_t table_v[5] = '{8'h02, 8'h04, 8'h06, 8'h08, 8'h0A};
  sample_t table_c[5] = '{8'h03, 8'h06, 8'h09, 8'h0C, 8'h0F};

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check("temp after reset", temp, 8'h00);
    check("volt after reset", volt, 8'h00);
    check("curr after reset", curr, 8'h00);
    for (int n = 1; n <= 600; n++) begin
      @(posedge clk);
      #1;
      check("temp", temp, sample_t'(n));
      check("volt", volt, sample_t'(2 * n));
      check("curr", curr, sample_t'(3 * n));
      if (n <= 5) begin
        check("temp table", temp, table_t[n-1]);
        check("volt table", volt, table_v[n-1]);
        check("curr table", curr, table_c[n-1]);
      end
    end
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    check("temp re-reset", temp, 8'h00);
    check("curr re-reset", curr, 8'h00);
    @(posedge clk);
    #1;
    check("temp after re-reset", temp, 8'h01);
    check("volt after re-reset", volt, 8'h02);
    check("curr after re-reset", curr, 8'h03);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
