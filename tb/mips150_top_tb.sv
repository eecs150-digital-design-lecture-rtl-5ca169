// mips150_top_tb: end-to-end test of the MIPS150 system at its default
// parameters (50 MHz clock, 115200 baud, so 434 clock cycles per bit).
//
// The instruction memory holds a polling echo program: it waits for the
// receiver Ready bit, reads the character, stores it in a buffer in data
// memory, waits for the transmitter Ready bit and sends the character plus
// one back. The load delay slot after the data read copies the register's
// previous (old) value to a second buffer, so the architected load delay
// slot is visible in memory. The testbench plays the terminal: it sends
// characters on `serial_in` and decodes `serial_out`, checking start and
// stop bits and the bit period. It checks every echoed character, both
// buffers, and counts the mechanisms the design has: forwarded operands,
// taken branches (each with its delay slot), load-delay-slot reads, receiver
// polls that found no character, transmitter polls that found it busy, and
// receiver Ready cleared by a data read. Each must happen at least once.
module mips150_top_tb;
  import mips150_pkg::*;

  localparam int CPB   = 50_000_000 / 115_200;
  localparam int NBYTE = 8;

  logic clk = 0, rst, serial_in, serial_out;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_taken = 0, n_load_slot = 0, n_rx_empty = 0, n_tx_busy = 0, n_rx_clear = 0;
  logic [7:0] sent [$], echoed [$];

  mips150_top dut (.clk, .rst, .serial_in, .serial_out);

  always #10 clk = ~clk;   // 50 MHz

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------- program
  localparam logic [4:0] T0 = 5'd8, T1 = 5'd9, V0 = 5'd2, A0 = 5'd4, BUF = 5'd10, OLD = 5'd12;
  function automatic void load_program();
    logic [31:0] p [$];
    p.push_back(enc_i(OP_LUI,   T0, 5'd0, 16'hFFFF));        // 0  $t0 = 0xFFFF0000
    p.push_back(enc_i(OP_ADDIU, BUF, 5'd0, 16'h0100));       // 1  buffer pointer
    p.push_back(enc_i(OP_ADDIU, V0, 5'd0, 16'd0));           // 2  $v0 = 0
    // wait_rx (3)
    p.push_back(enc_i(OP_LW,    T1, T0, 16'd0));             // 3  receiver control
    p.push_back(NOP);                                        // 4  load delay slot
    p.push_back(enc_i(OP_ANDI,  T1, T1, 16'h1));             // 5
    p.push_back(enc_i(OP_BEQ,   T1, 5'd0, 16'hFFFC));        // 6  -> 3 ($t1 forwarded)
    p.push_back(NOP);                                        // 7  branch delay slot
    p.push_back(enc_i(OP_LW,    V0, T0, 16'd4));             // 8  receiver data
    p.push_back(enc_r(FN_OR,    OLD, V0, 5'd0));             // 9  load delay slot: old $v0
    p.push_back(enc_i(OP_SB,    V0, BUF, 16'd0));            // 10 buffer[i] = char
    p.push_back(enc_i(OP_SB,    OLD, BUF, 16'h0100));        // 11 oldbuf[i] = previous char
    p.push_back(enc_i(OP_ADDIU, A0, V0, 16'd1));             // 12 $a0 = char + 1
    p.push_back(enc_i(OP_ADDIU, BUF, BUF, 16'd1));           // 13
    // wait_tx (14)
    p.push_back(enc_i(OP_LW,    T1, T0, 16'd8));             // 14 transmitter control
    p.push_back(NOP);                                        // 15
    p.push_back(enc_i(OP_ANDI,  T1, T1, 16'h1));             // 16
    p.push_back(enc_i(OP_BEQ,   T1, 5'd0, 16'hFFFC));        // 17 -> 14
    p.push_back(NOP);                                        // 18
    p.push_back(enc_j(OP_J,     26'd3));                     // 19 back to wait_rx
    p.push_back(enc_i(OP_SW,    A0, T0, 16'd12));            // 20 delay slot: send $a0
    foreach (p[i]) dut.u_imem.mem[i] = p[i];
  endfunction

  // ------------------------------------------------- mechanism counters
  always @(posedge clk) if (!rst) begin
    if (dut.u_cpu.fwd_a || dut.u_cpu.fwd_b) n_fwd++;
    if (dut.u_cpu.x_taken && dut.u_cpu.x_ctrl.branch != BR_NONE) n_taken++;
    if (dut.u_cpu.m_load && dut.u_cpu.m_wa != 0 &&
        (dut.u_cpu.x_rs == dut.u_cpu.m_wa || dut.u_cpu.x_rt == dut.u_cpu.m_wa) &&
        dut.u_cpu.x_instr != NOP) n_load_slot++;
    if (dut.dreq.re && dut.dreq.addr == IO_RX_CTRL && !dut.u_io.rx_ready) n_rx_empty++;
    if (dut.dreq.re && dut.dreq.addr == IO_TX_CTRL && !dut.u_uart.data_in_ready) n_tx_busy++;
    if (dut.dreq.re && dut.dreq.addr == IO_RX_DATA && dut.u_io.rx_ready) n_rx_clear++;
  end

  // -------------------------------------------------------- terminal
  task automatic send_byte(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      serial_in = f[i];
      repeat (CPB) @(negedge clk);
    end
    serial_in = 1'b1;
  endtask

  initial begin : receiver
    forever begin
      logic [7:0] b;
      @(negedge serial_out);
      if (rst) continue;
      repeat (CPB / 2) @(negedge clk);
      chk(serial_out == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        b[i] = serial_out;
      end
      repeat (CPB) @(negedge clk);
      chk(serial_out == 1'b1, "stop bit");
      echoed.push_back(b);
    end
  end

  // bit period of the transmitter: the start bit lasts exactly CPB cycles
  initial begin : bit_period
    int w;
    @(negedge rst);
    @(negedge serial_out);
    w = 0;
    do begin @(negedge clk); w++; end while (serial_out == 1'b0);
    w = w - 1;
    // the first echoed byte has b0 = 1 (see stimulus), so the low run is the start bit
    chk(w == CPB, $sformatf("start bit lasts %0d cycles, expected %0d", w, CPB));
  end

  initial begin
    repeat (60 * NBYTE * CPB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; serial_in = 1;
    load_program();
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (3 * CPB) @(negedge clk);       // program polls an empty receiver
    // 'J' + 1 = 'K' is echoed first (b0 of 'K' is 1)
    sent.push_back(8'h4A);
    for (int i = 1; i < NBYTE; i++) sent.push_back(8'($urandom_range(8'h20, 8'h7D)));
    foreach (sent[i]) send_byte(sent[i]);  // back to back: transmitter still busy
    repeat (14 * CPB) @(negedge clk);
    chk(echoed.size() == NBYTE, $sformatf("echoed %0d of %0d", echoed.size(), NBYTE));
    foreach (sent[i]) begin
      logic [7:0] exp_old;
      exp_old = (i == 0) ? 8'h00 : sent[i-1];
      if (i < echoed.size()) chk(echoed[i] == sent[i] + 8'd1, $sformatf("echo %0d got %h exp %h", i, echoed[i], sent[i] + 8'd1));
      chk(dut.u_dmem.mem[(32'h100 + i) >> 2][8*(i % 4) +: 8] == sent[i], $sformatf("buffer[%0d]", i));
      chk(dut.u_dmem.mem[(32'h200 + i) >> 2][8*(i % 4) +: 8] == exp_old, $sformatf("load-delay-slot buffer[%0d] %h exp %h", i, dut.u_dmem.mem[(32'h200 + i) >> 2][8*(i % 4) +: 8], exp_old));
    end
    $display("forwarded=%0d taken=%0d load_slot=%0d rx_empty_polls=%0d tx_busy_polls=%0d rx_clears=%0d",
             n_fwd, n_taken, n_load_slot, n_rx_empty, n_tx_busy, n_rx_clear);
    chk(n_fwd > 0, "forwarding happened");
    chk(n_taken > 0, "taken branch with delay slot happened");
    chk(n_load_slot > 0, "load delay slot read happened");
    chk(n_rx_empty > 0, "receiver polled while empty");
    chk(n_tx_busy > 0, "transmitter polled while busy");
    chk(n_rx_clear == NBYTE, "receiver Ready cleared once per byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
