// telemetry_frame_sender: sends each 32-bit telemetry packet as four UART bytes.
//
// The serial transmitter carries one byte per frame, so each packet goes out as four
// consecutive frames: header (0xAA), temperature, voltage, current, most significant byte
// first. The sender asks the packet generator to freeze a copy of the live packet (capture),
// then sends the bytes of that copy; as soon as the last byte has been handed over and the
// transmitter is free again it captures the next one, so packets follow one another back to
// back.
//
// States: LOAD (capture pulse), SEND (uart_start with the current byte while the transmitter
// is not busy), WAIT (until the transmitter's busy drops). Interface: clk, synchronous
// active-high rst, the held packet in, capture out to the packet generator, uart_start /
// uart_data to and uart_busy from the transmitter; packet_sent pulses for one cycle after the
// fourth byte of a packet has been handed over. Timing: capture is high for one cycle; the
// header's start pulse follows in the next cycle, each later byte one cycle after busy falls,
// and the next capture one cycle after busy falls at the end of the fourth byte. Sending the
// packet over the UART follows the specification; the byte order and this handshake are
// this design's choices, as the specification does not say how the 32-bit packet is fitted
// to the 8-bit transmitter.
module telemetry_frame_sender
  import daq_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  telemetry_packet_t packet,
  input  logic              uart_busy,
  output logic              capture,
  output logic              uart_start,
  output logic [7:0]        uart_data,
  output logic              packet_sent
);

  typedef enum logic [1:0] {
    S_LOAD,
    S_SEND,
    S_WAIT
  } state_t;

  localparam int unsigned PW = $bits(telemetry_packet_t);
  localparam int unsigned IW = $clog2(PACKET_BYTES);

  state_t        state;
  logic [IW-1:0] byte_idx;
  logic [PW-1:0] word;

  assign word = packet;

  // Byte 0 is the most significant byte (the header), the last byte the current reading.
  always_comb uart_data = word[PW - 1 - 8*byte_idx -: 8];

  assign capture    = (state == S_LOAD);
  assign uart_start = (state == S_SEND) && !uart_busy;

  wire last_byte = (byte_idx == IW'(PACKET_BYTES - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_LOAD;
      byte_idx    <= '0;
      packet_sent <= 1'b0;
    end else begin
      packet_sent <= 1'b0;
      unique case (state)
        S_LOAD: begin
          byte_idx <= '0;
          state    <= S_SEND;
        end
        S_SEND: begin
          if (uart_start) begin
            state <= S_WAIT;
            if (last_byte) packet_sent <= 1'b1;
          end
        end
        S_WAIT: begin
          if (!uart_busy) begin
            if (last_byte) begin
              state <= S_LOAD;
            end else begin
              byte_idx <= byte_idx + 1'b1;
              state    <= S_SEND;
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // A byte is only offered to an idle transmitter.
  a_start_when_idle: assert property (@(posedge clk) disable iff (rst) uart_start |-> !uart_busy);

endmodule
