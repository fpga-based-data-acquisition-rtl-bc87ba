// uart_rx_model: behavioural model of the monitoring terminal's serial receiver, for
// testbenches only (not synthesised).
//
// Watches rx for a falling edge (start bit), checks the line is still low half a bit later,
// then samples eight data bits (LSB first) and the stop bit at the middle of each bit time,
// CLKS_PER_BIT clock cycles apart. After the stop-bit sample it pulses valid for one cycle
// with the byte on data; frame_err is high with it if the stop bit read as 0. A start bit that
// does not last to its middle is counted in glitches and ignored.
module uart_rx_model #(
  parameter int unsigned CLKS_PER_BIT = 16
) (
  input  logic       clk,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err,
  output int         glitches
);

  initial begin
    valid     = 1'b0;
    data      = '0;
    frame_err = 1'b0;
    glitches  = 0;
    forever begin
      @(posedge clk);
      valid = 1'b0;
      if (rx == 1'b0) begin
        repeat (CLKS_PER_BIT / 2 - 1) @(posedge clk);
        if (rx != 1'b0) begin
          glitches++;
        end else begin
          for (int i = 0; i < 8; i++) begin
            repeat (CLKS_PER_BIT) @(posedge clk);
            data[i] = rx;
          end
          repeat (CLKS_PER_BIT) @(posedge clk);
          frame_err = (rx != 1'b1);
          valid     = 1'b1;
          @(posedge clk);
          valid = 1'b0;
          // Remaining half of the stop bit, so its end is not mistaken for a new start.
          while (rx == 1'b0) @(posedge clk);
        end
      end
    end
  end

endmodule
