// tb_uart_tx: checks the 8N1 serial transmitter bit by bit and cycle by cycle.
//
// A short-bit-time instance (16 cycles per bit) sends the documented test bytes 0x55, 0xA5
// and 0x3C, then 40 random bytes, some back to back. For each byte the testbench builds the
// expected 10-bit frame itself (0, data LSB first, 1) and compares tx and busy on every cycle
// of the frame: busy must be high for exactly 10 bit times and the line must hold each bit for
// exactly one bit time. A start pulse given while busy must be ignored. A behavioural receiver
// decodes the line as a second, independent check. A second instance at the default
// parameters (100 MHz clock, 9600 baud) sends one byte, and its bit time is checked to be
// 10416 cycles.
module tb_uart_tx;

  localparam int unsigned CPB = 16;

  logic       clk = 1'b0;
  logic       rst;
  logic       start;
  logic [7:0] data_in;
  logic       tx, busy;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .start, .data_in, .tx, .busy);

  logic       rx_valid, rx_ferr;
  logic [7:0] rx_data;
  int         rx_glitches;
  uart_rx_model #(.CLKS_PER_BIT(CPB)) rx (
    .clk, .rx(tx), .valid(rx_valid), .data(rx_data), .frame_err(rx_ferr), .glitches(rx_glitches)
  );

  // Full-rate instance.
  logic       f_start, f_tx, f_busy;
  logic [7:0] f_data;
  uart_tx dut_full (.clk, .rst, .start(f_start), .data_in(f_data), .tx(f_tx), .busy(f_busy));

  logic [7:0] rx_queue[$];
  always @(posedge clk) if (rx_valid) begin
    checks++;
    if (rx_ferr) begin
      failures++;
      $display("FAIL receiver saw a framing error");
    end
    rx_queue.push_back(rx_data);
  end

  task automatic expect_eq(string what, logic got, logic exp, int k);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s cycle %0d of frame: got %b expected %b", what, k, got, exp);
    end
  endtask

  // Send one byte and check the whole frame. If poke is set, pulse start again mid-frame with
  // different data; it must have no effect.
  task automatic send_and_check(logic [7:0] b, bit poke);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    expect_eq("busy before start", busy, 1'b0, -1);
    start   <= 1'b1;
    data_in <= b;
    @(posedge clk);
    start   <= 1'b0;
    data_in <= ~b;
    for (int k = 0; k < 10 * CPB; k++) begin
      #1;
      expect_eq("busy", busy, 1'b1, k);
      expect_eq("tx", tx, frame[k / CPB], k);
      if (poke && k == 3 * CPB) start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
    end
    #1;
    expect_eq("busy after frame", busy, 1'b0, 10 * CPB);
    expect_eq("tx idle", tx, 1'b1, 10 * CPB);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] sent[$];

  initial begin
    rst = 1'b1; start = 1'b0; data_in = '0; f_start = 1'b0; f_data = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    expect_eq("tx idle after reset", tx, 1'b1, 0);
    expect_eq("busy after reset", busy, 1'b0, 0);
    repeat (5) @(posedge clk);
    send_and_check(8'h55, 1'b0); sent.push_back(8'h55);
    repeat (7) @(posedge clk);
    send_and_check(8'hA5, 1'b1); sent.push_back(8'hA5);
    repeat (7) @(posedge clk);
    send_and_check(8'h3C, 1'b0); sent.push_back(8'h3C);
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (i % 2 == 0) repeat ($urandom_range(5)) @(posedge clk);
      send_and_check(b, i % 5 == 0);
      sent.push_back(b);
    end
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (rx_queue.size() != sent.size()) begin
      failures++;
      $display("FAIL receiver got %0d bytes, expected %0d", rx_queue.size(), sent.size());
    end else begin
      foreach (sent[i]) begin
        checks++;
        if (rx_queue[i] !== sent[i]) begin
          failures++;
          $display("FAIL receiver byte %0d = %02h expected %02h", i, rx_queue[i], sent[i]);
        end
      end
    end

    // Full-rate bit time: measure the start bit and the first data bit of 0x55 (bit 0 = 1).
    begin
      int t0, t1, t2;
      f_start <= 1'b1; f_data <= 8'h55;
      @(posedge clk);
      f_start <= 1'b0;
      t0 = 0;
      #1;
      while (f_tx == 1'b0) begin @(posedge clk); #1; t0++; end
      t1 = 0;
      while (f_tx == 1'b1) begin @(posedge clk); #1; t1++; end
      checks++;
      if (t0 != 10416 || t1 != 10416) begin
        failures++;
        $display("FAIL full-rate bit times %0d and %0d, expected 10416", t0, t1);
      end
      t2 = 0;
      while (f_busy) begin @(posedge clk); #1; t2++; end
      checks++;
      if (t2 != 8 * 10416) begin
        failures++;
        $display("FAIL full-rate frame remainder %0d, expected %0d", t2, 8 * 10416);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
