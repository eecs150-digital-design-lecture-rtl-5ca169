// uart_cpu_adapter: memory-mapped serial-line registers between the MIPS150
// CPU and the UART.
//
// Four 32-bit registers, modelled on a simple terminal/keyboard interface:
//   0xFFFF0000 receiver control    bit 0 Ready: a received character waits
//                                  in the receiver data register
//   0xFFFF0004 receiver data       bits 7:0 last received character, rest 0
//   0xFFFF0008 transmitter control bit 0 Ready: the transmitter can accept a
//                                  new character (0 while still sending)
//   0xFFFF000C transmitter data    storing byte 0 sends it on the serial line
// Bit 1 of the control registers (interrupt enable) is not implemented and
// reads 0, as are all other unused bits. Software polls a control register
// until Ready is 1, then reads or writes the data register.
//
// Timing follows the processor's M-stage rule: the request from the X stage
// is acted on at the rising edge that starts M. A load captures the register
// value in `rdata` on that edge; a load of the receiver data register also
// clears the receiver Ready bit (1 => 0). A store to the transmitter data
// register with byte enable 0 set is handed to the transmitter on that same
// edge (`tx_valid` is combinational from the request), so a control read in
// the next instruction already sees Ready = 0. A store while the transmitter
// is busy is dropped, and a byte arriving before the previous one was read
// overwrites it; both are this design's choices.
module uart_cpu_adapter
  import mips150_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  mem_req_t    req,
  output logic [31:0] rdata,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  input  logic        tx_ready
);
  logic [7:0] rx_byte;
  logic       rx_ready;
  logic       hit;
  logic       rd_rx_data;

  assign hit        = req.addr[31:4] == IO_RX_CTRL[31:4];
  assign rd_rx_data = hit && req.re && req.addr[3:2] == IO_RX_DATA[3:2];
  assign tx_valid   = hit && req.we && req.be[0] && req.addr[3:2] == IO_TX_DATA[3:2];
  assign tx_data    = req.wdata[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_ready <= 1'b0;
      rx_byte  <= '0;
      rdata    <= '0;
    end else begin
      if (rx_valid) begin
        rx_byte  <= rx_data;
        rx_ready <= 1'b1;
      end else if (rd_rx_data) begin
        rx_ready <= 1'b0;
      end
      if (hit && req.re) begin
        unique case (req.addr[3:2])
          IO_RX_CTRL[3:2]: rdata <= {31'd0, rx_ready};
          IO_RX_DATA[3:2]: rdata <= {24'd0, rx_byte};
          IO_TX_CTRL[3:2]: rdata <= {31'd0, tx_ready};
          default:         rdata <= '0;
        endcase
      end
    end
  end

endmodule
