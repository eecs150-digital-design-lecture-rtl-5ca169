// uart_receiver_tb: self-checking test of the UART receiver at 16 clock
// cycles per bit. Drives frames on the serial line (idle high, start bit,
// b0..b7, stop bit) with idle gaps and back-to-back, and checks that each
// good frame yields exactly one valid pulse with the right byte, that a
// frame whose stop bit is low is dropped and that a low glitch shorter than
// half a bit starts nothing.
module uart_receiver_tb;
  localparam int CF = 1_600_000, BR = 100_000, CPB = CF / BR;
  logic       clk = 0, rst, serial_in;
  logic [7:0] data_out;
  logic       data_out_valid;
  int checks = 0, failures = 0;
  int pulses = 0;
  logic [7:0] got [$];

  uart_receiver #(.CLOCK_FREQ(CF), .BAUD_RATE(BR)) dut (
    .clk, .rst, .serial_in, .data_out, .data_out_valid);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst && data_out_valid) begin
    pulses++;
    got.push_back(data_out);
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic drive_frame(logic [7:0] b, logic stop = 1'b1);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      serial_in = f[i];
      repeat (CPB) @(negedge clk);
    end
    serial_in = 1'b1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent [$];
    rst = 1; serial_in = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    drive_frame(8'h4B); sent.push_back(8'h4B);
    repeat (2 * CPB) @(negedge clk);
    for (int k = 0; k < 30; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      drive_frame(b); sent.push_back(b);
      repeat ($urandom_range(2) * CPB) @(negedge clk);
    end
    repeat (2 * CPB) @(negedge clk);
    // framing error: stop bit low, then let the line idle for a full frame
    drive_frame(8'hA5, 1'b0);
    repeat (12 * CPB) @(negedge clk);
    // glitch shorter than half a bit
    serial_in = 0; repeat (CPB / 4) @(negedge clk); serial_in = 1;
    repeat (12 * CPB) @(negedge clk);
    drive_frame(8'h3C); sent.push_back(8'h3C);
    repeat (2 * CPB) @(negedge clk);
    chk(pulses == sent.size(), $sformatf("pulse count %0d exp %0d", pulses, sent.size()));
    foreach (sent[i]) begin
      if (i < got.size()) chk(got[i] == sent[i], $sformatf("byte %0d got %h exp %h", i, got[i], sent[i]));
      else chk(0, "missing byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
