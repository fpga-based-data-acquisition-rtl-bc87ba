// daq_pkg: types and constants shared by the data-acquisition and telemetry design.
//
// The telemetry packet is 32 bits: an 8-bit sync header (always 0xAA) followed by one byte
// each for temperature, voltage and current, in that order from the most significant byte
// down. The header value, the field order and widths, and the three fault thresholds
// (200, 180, 150, compared with "greater than") are the values the design specification
// fixes. The packed struct lets the packet be handled either as one 32-bit word or by field.
package daq_pkg;

  typedef logic [7:0] sample_t;

  // One telemetry packet: header in bits [31:24], current in bits [7:0].
  typedef struct packed {
    sample_t header;
    sample_t temp;
    sample_t volt;
    sample_t curr;
  } telemetry_packet_t;

  localparam sample_t SYNC_HEADER = 8'hAA;

  // Default fault thresholds; a reading strictly above its threshold is a fault.
  localparam sample_t TEMP_THRESHOLD = 8'd200;
  localparam sample_t VOLT_THRESHOLD = 8'd180;
  localparam sample_t CURR_THRESHOLD = 8'd150;

  // Number of bytes the 32-bit packet is sent as over the byte-wide serial link.
  localparam int unsigned PACKET_BYTES = $bits(telemetry_packet_t) / 8;

endpackage
