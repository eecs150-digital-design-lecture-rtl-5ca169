// uart_transmitter_tb: self-checking test of the UART transmitter at 16
// clock cycles per bit. Sends ASCII 'K' (0x4B, whose line bits b0..b7 are
// 1 1 0 1 0 0 1 0) and random bytes, samples the line in the middle of
// every bit and checks start bit, data bits LSB first, stop bit, the idle
// level, that ready stays low for exactly one 10-bit frame and that a byte
// offered while busy is not taken.
module uart_transmitter_tb;
  localparam int CF = 1_600_000, BR = 100_000, CPB = CF / BR;
  logic       clk = 0, rst;
  logic [7:0] data_in;
  logic       data_in_valid, data_in_ready, serial_out;
  int checks = 0, failures = 0;

  uart_transmitter #(.CLOCK_FREQ(CF), .BAUD_RATE(BR)) dut (
    .clk, .rst, .data_in, .data_in_valid, .data_in_ready, .serial_out);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_check(logic [7:0] b);
    int busy_cycles;
    logic [9:0] line;
    @(negedge clk);
    chk(data_in_ready, "ready before send");
    data_in = b; data_in_valid = 1;
    @(negedge clk);
    data_in = ~b;                       // change while busy: must be ignored
    busy_cycles = 0;
    for (int bit_i = 0; bit_i < 10; bit_i++) begin
      for (int c = 0; c < CPB; c++) begin
        if (c == CPB / 2) line[bit_i] = serial_out;
        chk(!data_in_ready, "ready low during frame");
        busy_cycles++;
        @(negedge clk);
      end
    end
    data_in_valid = 0;
    chk(data_in_ready, "ready after frame");
    chk(busy_cycles == 10 * CPB, "frame length");
    chk(line == {1'b1, b, 1'b0}, $sformatf("frame bits %b for %h", line, b));
    @(negedge clk);
    chk(serial_out == 1'b1, "idle high");
  endtask

  initial begin
    rst = 1; data_in = 0; data_in_valid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) begin @(negedge clk); chk(serial_out == 1'b1 && data_in_ready, "idle after reset"); end
    send_and_check(8'h4B);
    repeat (20) send_and_check(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
