// tb_telemetry_frame_sender: checks how a 32-bit packet is split into UART bytes.
//
// The live packet gets a new random value every cycle, as the sensor data does, and a model of
// the packet generator's held copy loads it whenever the sender pulses capture. A transmitter model raises busy the cycle after it accepts a start and holds it for a
// random 3..20 cycles. The testbench records the packet input of every cycle and checks
// that each packet goes out as four bytes, header byte first, all taken from the live packet
// of the cycle in which capture was high, the cycle before the header's start pulse (one
// snapshot, not a mix of cycles); that start never comes while busy; that each following byte starts one cycle
// after busy drops and the next packet's header two cycles after; and that packet_sent
// pulses once per packet, with the fourth byte.
module tb_telemetry_frame_sender;
  import daq_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  telemetry_packet_t live, packet;
  logic              capture, uart_busy, uart_start, packet_sent;
  logic [7:0]        uart_data;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  telemetry_frame_sender dut (
    .clk, .rst, .packet, .uart_busy, .capture, .uart_start, .uart_data, .packet_sent
  );

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Transmitter model.
  int busy_left;
  always_ff @(posedge clk) begin
    if (rst) begin
      uart_busy <= 1'b0;
      busy_left <= 0;
    end else if (uart_busy) begin
      if (busy_left == 1) uart_busy <= 1'b0;
      busy_left <= busy_left - 1;
    end else if (uart_start) begin
      uart_busy <= 1'b1;
      busy_left <= int'($urandom_range(20, 3));
    end
  end

  // Scoreboard, sampled mid-cycle.
  telemetry_packet_t prev_live;
  logic              prev_capture;
  int  byte_no = 0;          // bytes of the current packet already started
  int  idle_cycles = 0;      // cycles since busy was last seen high (or since reset)
  int  packets = 0, sent_pulses = 0;
  logic [31:0] expect_pkt;

  always @(negedge clk) if (!rst) begin
    if (uart_start) begin
      check("start while busy", !uart_busy);
      if (byte_no == 0) begin
        check("capture in the cycle before the header", prev_capture);
        expect_pkt = prev_live;
        if (packets > 0) check("header start two cycles after busy falls", idle_cycles == 2);
      end else begin
        check("byte start one cycle after busy falls", idle_cycles == 1);
      end
      check("byte value", uart_data == expect_pkt[31 - 8*byte_no -: 8]);
      if (byte_no == 0) check("header is 0xAA", uart_data == 8'hAA);
      byte_no++;
      if (byte_no == 4) begin
        byte_no = 0;
        packets++;
      end
    end
    if (packet_sent) begin
      sent_pulses++;
      check("packet_sent matches the fourth byte", sent_pulses == packets);
    end
    if (uart_busy) idle_cycles = 0;
    else idle_cycles++;
    prev_live    = live;
    prev_capture = capture;
  end

  // New live packet every cycle; held copy as in the packet generator.
  always @(posedge clk) begin
    live <= '{header: 8'hAA, temp: 8'($urandom), volt: 8'($urandom), curr: 8'($urandom)};
    if (capture) packet <= live;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    live   = '{header: 8'hAA, temp: 8'h01, volt: 8'h02, curr: 8'h03};
    packet = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (packets == 200);
    repeat (30) @(posedge clk);
    check("packet count consistent", sent_pulses == packets);
    $display("packets sent: %0d", packets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
