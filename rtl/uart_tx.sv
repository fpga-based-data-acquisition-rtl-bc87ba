// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop bit (8N1).
//
// A four-state machine (IDLE, START, DATA, STOP) serialises one byte. In IDLE the line is
// held high and busy is low. A start pulse seen in IDLE captures data_in and moves to START,
// which drives the line low for one bit time; DATA then shifts out the eight data bits, least
// significant bit first; STOP drives the line high for one bit time and returns to IDLE.
// A bit time is CLKS_PER_BIT clock cycles, counted by a down-counter; the default
// 100 MHz / 9600 baud gives 10416 cycles (9600.6 baud, 0.006 % fast).
//
// Interface: clk, synchronous active-high rst, start (sampled only while not busy), data_in,
// registered tx line and busy. Timing: busy rises the cycle after start is accepted and stays
// high for exactly 10 * CLKS_PER_BIT cycles (start bit, 8 data bits, stop bit); the start bit
// begins on the same edge busy rises. A new start may be given in the cycle busy is low again.
// The FSM sequence, the 8N1 framing, the busy behaviour and the 9600 baud rate follow the
// specification; the 100 MHz clock, LSB-first order (the usual UART order) and the reset
// are this design's choices.
module uart_tx #(
  parameter int unsigned CLK_FREQ_HZ  = 100_000_000,
  parameter int unsigned BAUD_RATE    = 9600,
  parameter int unsigned CLKS_PER_BIT = CLK_FREQ_HZ / BAUD_RATE
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data_in,
  output logic       tx,
  output logic       busy
);

  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  typedef enum logic [1:0] {
    S_IDLE,
    S_START,
    S_DATA,
    S_STOP
  } state_t;

  state_t          state;
  logic [CW-1:0]   baud_cnt;   // cycles left in the current bit, minus one
  logic [2:0]      bit_idx;    // data bit being sent
  logic [7:0]      shift;      // captured byte, shifted right as bits go out

  wire bit_end = (baud_cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      baud_cnt <= '0;
      bit_idx  <= '0;
      shift    <= '0;
      tx       <= 1'b1;
      busy     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          tx <= 1'b1;
          if (start) begin
            shift    <= data_in;
            baud_cnt <= CW'(CLKS_PER_BIT - 1);
            tx       <= 1'b0;
            busy     <= 1'b1;
            state    <= S_START;
          end
        end
        S_START: begin
          if (bit_end) begin
            baud_cnt <= CW'(CLKS_PER_BIT - 1);
            bit_idx  <= '0;
            tx       <= shift[0];
            state    <= S_DATA;
          end else begin
            baud_cnt <= baud_cnt - 1'b1;
          end
        end
        S_DATA: begin
          if (bit_end) begin
            baud_cnt <= CW'(CLKS_PER_BIT - 1);
            if (bit_idx == 3'd7) begin
              tx    <= 1'b1;
              state <= S_STOP;
            end else begin
              bit_idx <= bit_idx + 1'b1;
              tx      <= shift[1];
              shift   <= shift >> 1;
            end
          end else begin
            baud_cnt <= baud_cnt - 1'b1;
          end
        end
        S_STOP: begin
          if (bit_end) begin
            busy  <= 1'b0;
            state <= S_IDLE;
          end else begin
            baud_cnt <= baud_cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The line is only ever low while a frame is in flight.
  a_tx_idle_high: assert property (@(posedge clk) disable iff (rst) !busy |-> tx);

endmodule
