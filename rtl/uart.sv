// uart: Universal Asynchronous Receiver and Transmitter of the MIPS150
// serial port.
//
// Converts between bytes and the asynchronous serial format with start and
// stop bits: `uart_transmitter` drives `serial_out` from bytes offered with a
// ready/valid handshake, `uart_receiver` turns frames on `serial_in` into
// bytes announced by a one-cycle valid pulse. The two halves share only the
// clock, reset and bit timing (CLOCK_FREQ/BAUD_RATE cycles per bit), so a
// byte can be sent and received at the same time. The serial pins connect
// to the board's RS-232 transceiver; the CPU side connects to the UART-CPU
// adapter.
module uart #(
  parameter int unsigned CLOCK_FREQ = 50_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,
  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       serial_in,
  output logic       serial_out
);
  uart_transmitter #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_tx (
    .clk, .rst, .data_in, .data_in_valid, .data_in_ready, .serial_out);

  uart_receiver #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_rx (
    .clk, .rst, .serial_in, .data_out, .data_out_valid);
endmodule
