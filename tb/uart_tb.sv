// uart_tb: self-checking test of the complete UART with its serial output
// looped back to its serial input (16 clock cycles per bit). Random bytes
// offered to the transmitter must come back out of the receiver in order,
// one valid pulse each, and each byte must take one 10-bit frame.
module uart_tb;
  localparam int CF = 1_600_000, BR = 100_000, CPB = CF / BR;
  logic       clk = 0, rst;
  logic [7:0] data_in, data_out;
  logic       data_in_valid, data_in_ready, data_out_valid, line;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int rx_count = 0;
  longint t_accept [$], t_recv [$];
  longint cyc = 0;

  uart #(.CLOCK_FREQ(CF), .BAUD_RATE(BR)) dut (
    .clk, .rst, .data_in, .data_in_valid, .data_in_ready,
    .data_out, .data_out_valid, .serial_in(line), .serial_out(line));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (!rst && data_out_valid) begin
    t_recv.push_back(cyc);
    if (rx_count < sent.size()) chk(data_out == sent[rx_count], $sformatf("loopback byte %0d got %h exp %h", rx_count, data_out, sent[rx_count]));
    else chk(0, "unexpected byte");
    rx_count++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; data_in = 0; data_in_valid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      data_in = 8'($urandom); data_in_valid = 1;
      @(posedge clk);
      while (!data_in_ready) @(posedge clk);
      sent.push_back(data_in);
      t_accept.push_back(cyc);
      @(negedge clk);
      data_in_valid = 0;
    end
    repeat (12 * CPB) @(negedge clk);
    chk(rx_count == 20, $sformatf("received %0d of 20", rx_count));
    // back-to-back frames: consecutive receptions one frame apart
    for (int i = 1; i < t_recv.size(); i++)
      chk(t_recv[i] - t_recv[i-1] == 10 * CPB + 1 || t_recv[i] - t_recv[i-1] == 10 * CPB,
          $sformatf("frame spacing %0d", t_recv[i] - t_recv[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
