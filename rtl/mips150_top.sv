// mips150_top: the MIPS150 system on the FPGA.
//
// The three-stage MIPS processor fetches from its own instruction memory and
// reaches the data memory and the memory-mapped serial line through one
// data request per instruction. Addresses 0xFFFF0000-0xFFFF000F go to the
// UART-CPU adapter (receiver control/data, transmitter control/data), all
// others to the data memory; both answer on the edge that starts the M
// stage. The adapter drives the UART, whose two pins are the ports
// `serial_in` and `serial_out` that connect to the board's RS-232
// transceiver. Memory sizes, clock frequency and baud rate are parameters
// whose defaults are this design's choice (the clock target lies between 50
// and 100 MHz). The instruction memory is loaded by the environment through
// its `mem` array before reset is released.
module mips150_top
  import mips150_pkg::*;
#(
  parameter int unsigned CLOCK_FREQ = 50_000_000,
  parameter int unsigned BAUD_RATE  = 115_200,
  parameter int unsigned IMEM_WORDS = 4096,
  parameter int unsigned DMEM_WORDS = 4096
) (
  input  logic clk,
  input  logic rst,
  input  logic serial_in,
  output logic serial_out
);
  logic [31:0] imem_addr, imem_rdata, dmem_rdata, io_rdata;
  mem_req_t    dreq;
  logic [7:0]  tx_data, rx_data;
  logic        tx_valid, tx_ready, rx_valid;

  mips150_cpu u_cpu (
    .clk, .rst, .imem_addr, .imem_rdata, .dreq, .dmem_rdata, .io_rdata);

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .en(1'b1), .addr(imem_addr), .rdata(imem_rdata));

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .req(dreq), .rdata(dmem_rdata));

  uart_cpu_adapter u_io (
    .clk, .rst, .req(dreq), .rdata(io_rdata),
    .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready);

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_uart (
    .clk, .rst,
    .data_in(tx_data), .data_in_valid(tx_valid), .data_in_ready(tx_ready),
    .data_out(rx_data), .data_out_valid(rx_valid),
    .serial_in, .serial_out);
endmodule
