// uart_cpu_adapter_tb: self-checking test of the memory-mapped serial-line
// registers. Acts as the CPU (requests presented before the M-stage edge,
// read data checked after it) and as the UART (received bytes, transmitter
// ready). Checks the receiver Ready bit going 0 => 1 on a received byte and
// 1 => 0 when the data register is read, the data register layout (byte in
// bits 7:0, rest 0), the transmitter Ready bit following the transmitter,
// that a store to the transmitter data register hands byte 0 over on the
// same edge, and that other addresses and byte lanes do nothing.
module uart_cpu_adapter_tb;
  import mips150_pkg::*;
  logic        clk = 0, rst;
  mem_req_t    req;
  logic [31:0] rdata;
  logic [7:0]  rx_data, tx_data;
  logic        rx_valid, tx_valid, tx_ready;
  int checks = 0, failures = 0;

  uart_cpu_adapter dut (.clk, .rst, .req, .rdata, .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.addr = a; req.re = 1; req.be = 4'hF;
    @(posedge clk); #1;
    d = rdata;
    @(negedge clk); req = '0;
  endtask

  task automatic store(logic [31:0] a, logic [31:0] d, logic [3:0] be, output logic handed, output logic [7:0] byte_out);
    @(negedge clk);
    req = '0; req.addr = a; req.we = 1; req.be = be; req.wdata = d;
    #1;
    handed = tx_valid; byte_out = tx_data;
    @(negedge clk); req = '0;
  endtask

  task automatic receive(logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic h;
    logic [7:0] tb_byte;
    rst = 1; req = '0; rx_data = 0; rx_valid = 0; tx_ready = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    load(IO_RX_CTRL, d); chk(d == 32'd0, "rx not ready after reset");
    for (int k = 0; k < 20; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      receive(b);
      load(IO_RX_CTRL, d); chk(d == 32'd1, $sformatf("rx ready set (%h)", d));
      load(IO_RX_CTRL, d); chk(d == 32'd1, "rx ready kept by control read");
      load(IO_RX_DATA, d); chk(d == {24'd0, b}, $sformatf("rx data %h exp %h", d, b));
      load(IO_RX_CTRL, d); chk(d == 32'd0, "rx ready cleared by data read");
    end
    // a second byte before the first is read replaces it
    receive(8'h11); receive(8'h22);
    load(IO_RX_DATA, d); chk(d == 32'h22, "newest byte kept");
    // transmitter side
    tx_ready = 1;
    load(IO_TX_CTRL, d); chk(d == 32'd1, "tx ready");
    tx_ready = 0;
    load(IO_TX_CTRL, d); chk(d == 32'd0, "tx busy");
    tx_ready = 1;
    for (int k = 0; k < 20; k++) begin
      logic [31:0] w;
      w = $urandom;
      store(IO_TX_DATA, w, 4'hF, h, tb_byte);
      chk(h && tb_byte == w[7:0], "sw to tx data hands byte 0");
    end
    store(IO_TX_DATA, 32'h0000_4B00, 4'b0010, h, tb_byte); chk(!h, "store to byte 1 only: no send");
    store(IO_TX_CTRL, 32'h41, 4'hF, h, tb_byte);           chk(!h, "store to tx control: no send");
    store(32'h0000_000C, 32'h41, 4'hF, h, tb_byte);        chk(!h, "store to memory address: no send");
    // a load outside the I/O region must not consume a received byte
    receive(8'h5A);
    load(32'h0000_0004, d);
    load(IO_RX_CTRL, d); chk(d == 32'd1, "memory load leaves rx ready");
    load(IO_RX_DATA, d); chk(d == 32'h5A, "rx data 5A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
