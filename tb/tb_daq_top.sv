// tb_daq_top: end-to-end test of the acquisition and telemetry system.
//
// The design runs with a 153.6 kHz clock and 9600 baud, so one bit is 16 clock cycles and the
// whole flow is exercised quickly. The testbench keeps its own model of the sensors (after n
// clock cycles out of reset: temperature n, voltage 2n, current 3n, all mod 256) and:
//   - checks fault_flag on every cycle against the three threshold comparisons;
//   - decodes tx with a behavioural UART receiver, groups the bytes into packets and checks
//     that each starts with 0xAA and carries the sample taken at the expected cycle: packet k
//     holds the readings of cycle k*P, P = 4 * (10 * 16 + 2) + 1 cycles per packet;
//   - checks that the line never shows a framing error and that nothing arrives out of order.
// It counts how often each mechanism happened: a fault raised and cleared, cycles in fault
// caused by each sensor alone and by several at once, packets sent, a packet whose
// transmitted readings are in fault, back-to-back packets, and counter wrap-around; one that
// never happened is a failure.
module tb_daq_top;

  localparam int unsigned CLK_HZ = 153_600;
  localparam int unsigned BAUD   = 9600;
  localparam int unsigned CPB    = CLK_HZ / BAUD;
  localparam int unsigned P      = 4 * (10 * CPB + 2) + 1;
  localparam int unsigned NPKT   = 60;

  logic clk = 1'b0;
  logic rst;
  logic tx, fault_flag;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  daq_top #(.CLK_FREQ_HZ(CLK_HZ), .BAUD_RATE(BAUD)) dut (.clk, .rst, .tx, .fault_flag);

  logic       rx_valid, rx_ferr;
  logic [7:0] rx_data;
  int         rx_glitches;
  uart_rx_model #(.CLKS_PER_BIT(CPB)) rx (
    .clk, .rx(tx), .valid(rx_valid), .data(rx_data), .frame_err(rx_ferr), .glitches(rx_glitches)
  );

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Sensor model and fault flag check.
  longint n = 0;             // clock edges since reset was released
  logic   running = 1'b0;
  logic   prev_fault = 1'b0;
  int     fault_rises = 0, fault_clears = 0;
  int     by_temp = 0, by_volt = 0, by_curr = 0, by_several = 0, wraps = 0;

  always @(posedge clk) if (running) n++;

  always @(negedge clk) if (running) begin
    logic [7:0] t, v, c;
    logic       ft, fv, fc, exp_flag;
    t = 8'(n); v = 8'(2 * n); c = 8'(3 * n);
    ft = t > 200; fv = v > 180; fc = c > 150;
    exp_flag = ft | fv | fc;
    check("fault_flag", fault_flag == exp_flag);
    if (exp_flag && !prev_fault) fault_rises++;
    // Cycles in fault, by cause.
    if (ft + fv + fc > 1) by_several++;
    else if (ft) by_temp++;
    else if (fv) by_volt++;
    else if (fc) by_curr++;
    if (!exp_flag && prev_fault) fault_clears++;
    if (n > 0 && t == 8'h00) wraps++;
    prev_fault = exp_flag;
  end

  // Packet decoding.
  logic [7:0] pkt[4];
  int         nbytes = 0, packets = 0, fault_packets = 0;
  longint     last_byte_cycle = -1;
  int         back_to_back = 0;

  always @(posedge clk) if (rx_valid) begin
    check("stop bit", !rx_ferr);
    pkt[nbytes] = rx_data;
    nbytes++;
    if (nbytes == 4) begin
      logic [7:0] et, ev, ec;
      longint     ns;
      nbytes = 0;
      ns = longint'(packets) * P;
      et = 8'(ns); ev = 8'(2 * ns); ec = 8'(3 * ns);
      check("header 0xAA", pkt[0] == 8'hAA);
      check("temperature field", pkt[1] == et);
      check("voltage field", pkt[2] == ev);
      check("current field", pkt[3] == ec);
      if (pkt[1] != et) $display("  packet %0d: got %02h %02h %02h %02h, expected temp %02h",
                                 packets, pkt[0], pkt[1], pkt[2], pkt[3], et);
      if (pkt[1] > 200 || pkt[2] > 180 || pkt[3] > 150) fault_packets++;
      if (last_byte_cycle >= 0 && n - last_byte_cycle <= longint'(P) + 1) back_to_back++;
      last_byte_cycle = n;
      packets++;
    end
  end

  task automatic mechanism(string what, int count);
    $display("mechanism %-28s %0d", what, count);
    check({"mechanism ", what}, count > 0);
  endtask

  initial begin
    repeat ((NPKT + 2) * P + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    check("tx idle in reset", tx == 1'b1);
    check("no fault in reset", fault_flag == 1'b0);
    rst = 1'b0;
    running = 1'b1;
    wait (packets == NPKT);
    repeat (20) @(posedge clk);
    check("no spurious start bits", rx_glitches == 0);
    mechanism("packets received", packets);
    mechanism("back-to-back packets", back_to_back);
    mechanism("packets with fault readings", fault_packets);
    mechanism("fault raised", fault_rises);
    mechanism("fault cleared", fault_clears);
    mechanism("fault by temperature alone", by_temp);
    mechanism("fault by voltage alone", by_volt);
    mechanism("fault by current alone", by_curr);
    mechanism("fault by several sensors", by_several);
    mechanism("sensor wrap-around", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
