// daq_top: FPGA data-acquisition and telemetry system with threshold fault detection.
//
// Data path: sensor_generator produces temperature, voltage and current readings that change
// every clock; telemetry_packet_generator wraps them as {0xAA, temp, volt, curr} and, when
// asked, freezes a copy; telemetry_frame_sender requests that copy and hands its four bytes,
// header first, to uart_tx, which sends each as an 8N1 frame on tx at BAUD_RATE. In parallel,
// fault_detection_unit compares the three fields of the live packet with their thresholds
// (temperature > 200, voltage > 180, current > 150) and drives fault_flag, meant for a status
// LED. The detector reads the fields from the packet, which carries exactly the current
// sensor values, so it reacts in the same cycle as the readings change.
//
// Interface: clk, synchronous active-high rst, tx (idle high), fault_flag. Timing: packets
// follow back to back, one every 4 * (10 * CLKS_PER_BIT + 2) + 1 cycles (416,649 cycles,
// about 4.17 ms, at 100 MHz and 9600 baud); packet k after reset carries the readings of
// cycle k times that period, the first one all zeros. fault_bits, held_valid and
// packet_sent are internal status signals that are not brought out; the lint tool reports
// them as unused. The block structure, packet format, thresholds and baud rate follow the
// specification; the 100 MHz clock, the reset input and the way the packet is split into
// bytes are this design's choices. The specification's block diagram also draws a
// fault-status connection from the detector to the transmitter without saying what it
// carries; the packet format is fixed at 32 bits, so the flag is not sent in the stream and
// leaves the chip only on fault_flag.
module daq_top
  import daq_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 100_000_000,
  parameter int unsigned BAUD_RATE   = 9600
) (
  input  logic clk,
  input  logic rst,
  output logic tx,
  output logic fault_flag
);

  sample_t           temp, volt, curr;
  logic [31:0]       packet;
  telemetry_packet_t packet_fields;
  telemetry_packet_t held_packet;
  logic              held_valid;
  logic              capture;
  logic [2:0]        fault_bits;
  logic              uart_start, uart_busy;
  logic [7:0]        uart_data;
  logic              packet_sent;

  assign packet_fields = packet;

  sensor_generator u_sensor (
    .clk  (clk),
    .rst  (rst),
    .temp (temp),
    .volt (volt),
    .curr (curr)
  );

  telemetry_packet_generator u_packet (
    .clk         (clk),
    .rst         (rst),
    .temp        (temp),
    .volt        (volt),
    .curr        (curr),
    .capture     (capture),
    .packet      (packet),
    .held_packet (held_packet),
    .held_valid  (held_valid)
  );

  fault_detection_unit u_fault (
    .temp       (packet_fields.temp),
    .volt       (packet_fields.volt),
    .curr       (packet_fields.curr),
    .fault_bits (fault_bits),
    .fault_flag (fault_flag)
  );

  telemetry_frame_sender u_sender (
    .clk         (clk),
    .rst         (rst),
    .packet      (held_packet),
    .uart_busy   (uart_busy),
    .capture     (capture),
    .uart_start  (uart_start),
    .uart_data   (uart_data),
    .packet_sent (packet_sent)
  );

  uart_tx #(
    .CLK_FREQ_HZ (CLK_FREQ_HZ),
    .BAUD_RATE   (BAUD_RATE)
  ) u_uart (
    .clk     (clk),
    .rst     (rst),
    .start   (uart_start),
    .data_in (uart_data),
    .tx      (tx),
    .busy    (uart_busy)
  );

endmodule
