// uart_transmitter: parallel-to-serial half of the UART.
//
// Sends one byte per frame in the asynchronous serial format: the line idles
// high, a start bit (low) is followed by data bits b0 (LSB) to b7 and one
// stop bit (high), each bit lasting CLOCK_FREQ/BAUD_RATE clock cycles. A
// byte is accepted with a ready/valid handshake: when `data_in_ready` is high
// and `data_in_valid` is high on a rising edge the byte is taken, ready drops
// and the frame starts on the next cycle; ready returns high after the stop
// bit, so one frame lasts 10 bit times. The frame format is the one the
// serial-line waveform shows; the clock rate, baud rate and handshake are
// this design's choice.
module uart_transmitter #(
  parameter int unsigned CLOCK_FREQ = 50_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,
  output logic       serial_out
);
  localparam int unsigned CLKS_PER_BIT = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    shreg;    // {stop, b7..b0, start}, sent from bit 0
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;
  logic          busy;

  assign data_in_ready = !busy;
  assign serial_out    = busy ? shreg[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      shreg     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
    end else if (!busy) begin
      if (data_in_valid) begin
        busy      <= 1'b1;
        shreg     <= {1'b1, data_in, 1'b0};
        bits_left <= 4'd10;
        clk_cnt   <= '0;
      end
    end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
      clk_cnt   <= '0;
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 4'd1;
      if (bits_left == 4'd1) busy <= 1'b0;
    end else begin
      clk_cnt <= clk_cnt + CW'(1);
    end
  end

  // Handshake: an accepted byte makes the transmitter busy on the next cycle,
  // and the line is high whenever it is idle.
  ap_accept_busy: assert property (@(posedge clk) disable iff (rst)
    data_in_valid && data_in_ready |=> !data_in_ready);
  ap_idle_high: assert property (@(posedge clk) disable iff (rst)
    data_in_ready |-> serial_out);
endmodule
