// tb_telemetry_packet_generator: checks packet assembly.
//
// Applies the five printed sensor combinations (01/02/03 -> AA010203 ... 05/0A/0F ->
// AA050A0F), every value of each field in turn with the others fixed, and 2000 random
// combinations, and compares the packet with a word built in the testbench from the bytes.
// Then checks the held copy with a clock running: after reset it is zero and not valid; with
// new readings every cycle and capture pulsed at random, it must equal a model register that
// loads the live packet only on capture edges.
module tb_telemetry_packet_generator;
  import daq_pkg::*;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic              capture = 1'b0;
  sample_t           temp, volt, curr;
  logic [31:0]       packet;
  telemetry_packet_t held_packet;
  logic              held_valid;
  int                checks = 0, failures = 0;

  telemetry_packet_generator dut (
    .clk, .rst, .temp, .volt, .curr, .capture, .packet, .held_packet, .held_valid
  );

  task automatic apply(sample_t t, sample_t v, sample_t c, logic [31:0] exp);
    temp = t; volt = v; curr = c;
    #1;
    checks++;
    if (packet !== exp) begin
      failures++;
      $display("FAIL packet %08h expected %08h", packet, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(8'h01, 8'h02, 8'h03, 32'hAA010203);
    apply(8'h02, 8'h04, 8'h06, 32'hAA020406);
    apply(8'h03, 8'h06, 8'h09, 32'hAA030609);
    apply(8'h04, 8'h08, 8'h0C, 32'hAA04080C);
    apply(8'h05, 8'h0A, 8'h0F, 32'hAA050A0F);
    for (int i = 0; i < 256; i++) begin
      apply(sample_t'(i), 8'h00, 8'h00, 32'hAA000000 | (i << 16));
      apply(8'h00, sample_t'(i), 8'h00, 32'hAA000000 | (i << 8));
      apply(8'h00, 8'h00, sample_t'(i), 32'hAA000000 | i);
    end
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] t, v, c;
      t = 8'($urandom); v = 8'($urandom); c = 8'($urandom);
      apply(t, v, c, (32'hAA << 24) + (32'(t) << 16) + (32'(v) << 8) + 32'(c));
    end
    // Held copy.
    begin
      logic [31:0] model;
      int          captures = 0;
      model = '0;
      repeat (2) begin #5 clk = 1'b1; #5 clk = 1'b0; end
      checks++;
      if (held_packet !== 32'h0 || held_valid !== 1'b0) begin
        failures++;
        $display("FAIL held copy after reset %08h valid %b", held_packet, held_valid);
      end
      rst = 1'b0;
      for (int i = 0; i < 3000; i++) begin
        temp = 8'($urandom); volt = 8'($urandom); curr = 8'($urandom);
        capture = ($urandom_range(3) == 0);
        #4;
        if (capture) begin
          model = {8'hAA, temp, volt, curr};
          captures++;
        end
        #1 clk = 1'b1;
        #1;
        checks++;
        if (held_packet !== model || held_valid !== (captures > 0)) begin
          failures++;
          $display("FAIL held copy %08h expected %08h (valid %b)", held_packet, model, held_valid);
        end
        #4 clk = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
