// uart_receiver: serial-to-parallel half of the UART.
//
// The asynchronous line is first passed through two flip-flops to bring it
// into the clock domain. A falling edge while idle starts a frame; the
// receiver waits half a bit time and checks that the line is still low (a
// shorter pulse is ignored as noise), then samples the eight data bits,
// LSB first, and the stop bit, each one bit time (CLOCK_FREQ/BAUD_RATE
// cycles) after the previous sample, so every sample falls in the middle of
// its bit. If the stop bit is high the byte appears on `data_out` with a
// one-cycle `data_out_valid` pulse; a frame with a low stop bit is dropped.
// `data_out` holds its value until the next frame. The frame format follows
// the serial-line waveform; mid-bit sampling, the synchroniser and the
// framing-error rule are this design's choices.
module uart_receiver #(
  parameter int unsigned CLOCK_FREQ = 50_000_000,
  parameter int unsigned BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       serial_in,
  output logic [7:0] data_out,
  output logic       data_out_valid
);
  localparam int unsigned CLKS_PER_BIT = CLOCK_FREQ / BAUD_RATE;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e        state;
  logic [1:0]    sync;
  logic          rx;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync           <= 2'b11;
      state          <= IDLE;
      clk_cnt        <= '0;
      bit_idx        <= '0;
      shreg          <= '0;
      data_out       <= '0;
      data_out_valid <= 1'b0;
    end else begin
      sync           <= {sync[0], serial_in};
      data_out_valid <= 1'b0;
      unique case (state)
        IDLE: begin
          clk_cnt <= '0;
          if (!rx) state <= START;
        end
        START: begin
          if (clk_cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            clk_cnt <= '0;
            bit_idx <= '0;
            state   <= rx ? IDLE : DATA;
          end else clk_cnt <= clk_cnt + CW'(1);
        end
        DATA: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            shreg   <= {rx, shreg[7:1]};
            bit_idx <= bit_idx + 3'd1;
            if (bit_idx == 3'd7) state <= STOP;
          end else clk_cnt <= clk_cnt + CW'(1);
        end
        STOP: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= IDLE;
            if (rx) begin
              data_out       <= shreg;
              data_out_valid <= 1'b1;
            end
          end else clk_cnt <= clk_cnt + CW'(1);
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
