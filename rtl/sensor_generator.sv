// sensor_generator: three virtual 8-bit sensors (temperature, voltage, current) for
// exercising the acquisition chain without external hardware.
//
// Each reading is an 8-bit counter that advances on every rising clock edge: temperature by
// TEMP_STEP, voltage by VOLT_STEP and current by CURR_STEP, wrapping modulo 256. With the
// default steps 1, 2 and 3 and all three cleared by reset, the n-th cycle after reset shows
// temperature n, voltage 2n and current 3n (mod 256), i.e. 01/02/03, 02/04/06, 03/06/09 ...
// which is the sequence the specification's waveforms and packet table print. Because the
// readings wrap, they repeatedly climb through the fault thresholds and fall back below them.
//
// Interface: clk, synchronous active-high rst (clears all three readings to 0), and the three
// registered readings. Latency: readings change one clock after each edge; no handshake.
// The update every clock follows the specification; the step sizes come from its printed
// sample values; the synchronous reset to zero is this design's choice.
module sensor_generator
  import daq_pkg::*;
#(
  parameter sample_t TEMP_STEP = 8'd1,
  parameter sample_t VOLT_STEP = 8'd2,
  parameter sample_t CURR_STEP = 8'd3
) (
  input  logic    clk,
  input  logic    rst,
  output sample_t temp,
  output sample_t volt,
  output sample_t curr
);

  always_ff @(posedge clk) begin
    if (rst) begin
      temp <= '0;
      volt <= '0;
      curr <= '0;
    end else begin
      temp <= temp + TEMP_STEP;
      volt <= volt + VOLT_STEP;
      curr <= curr + CURR_STEP;
    end
  end

endmodule
