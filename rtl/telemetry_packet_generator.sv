// telemetry_packet_generator: forms the 32-bit telemetry packet from the three readings and
// holds a copy of it for transmission.
//
// The packet is the fixed 0xAA sync header followed by temperature, voltage and current:
// packet = {8'hAA, temp, volt, curr}, so readings 01/02/03 give 0xAA010203. The header lets a
// receiver find the start of a packet in the byte stream.
//
// Two views of the packet are produced. `packet` is combinational and follows the readings
// in the same cycle, as the specification's waveform shows the packet changing together with
// the sensor values. `held_packet` is a register that loads the current packet on a clock
// edge where `capture` is high and keeps it otherwise; the serial link, which needs 40 bit
// times per packet while the readings change every cycle, sends this frozen copy so that all
// four bytes belong to the same sample. `held_valid` goes high with the first capture after
// reset. Interface: clk, synchronous active-high rst (clears the held copy), readings in,
// capture in. Header value and field order follow the specification; the held copy and its
// capture handshake are this design's choice.
module telemetry_packet_generator
  import daq_pkg::*;
#(
  parameter sample_t HEADER = SYNC_HEADER
) (
  input  logic              clk,
  input  logic              rst,
  input  sample_t           temp,
  input  sample_t           volt,
  input  sample_t           curr,
  input  logic              capture,
  output logic [31:0]       packet,
  output telemetry_packet_t held_packet,
  output logic              held_valid
);

  telemetry_packet_t live;

  always_comb begin
    live.header = HEADER;
    live.temp   = temp;
    live.volt   = volt;
    live.curr   = curr;
  end

  assign packet = live;

  always_ff @(posedge clk) begin
    if (rst) begin
      held_packet <= '0;
      held_valid  <= 1'b0;
    end else if (capture) begin
      held_packet <= live;
      held_valid  <= 1'b1;
    end
  end

endmodule
