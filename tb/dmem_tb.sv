// dmem_tb: self-checking test of the data memory. Random word, halfword and
// byte writes (byte enables) and reads against a shadow array; checks the
// one-edge read timing and that requests to the I/O region (0xFFFFxxxx)
// leave the memory untouched.
module dmem_tb;
  import mips150_pkg::*;
  localparam int WORDS = 64;
  logic        clk = 0;
  mem_req_t    req;
  logic [31:0] rdata;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.clk, .req, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      req.addr = 32'(i * 4); req.we = 1; req.be = 4'hF; req.wdata = $urandom;
      shadow[i] = req.wdata;
    end
    repeat (3000) begin
      int w;
      @(negedge clk);
      w = $urandom_range(WORDS - 1);
      req.addr  = 32'(w * 4);
      req.wdata = $urandom;
      req.be    = 4'($urandom);
      req.we    = 1'($urandom);
      req.re    = !req.we || ($urandom_range(1) == 1);
      if ($urandom_range(7) == 0) req.addr = IO_RX_CTRL | 32'(w * 4);
      @(posedge clk); #1;
      if (req.re && !is_io(req.addr)) begin
        checks++;
        if (rdata !== shadow[w]) begin
          failures++;
          $display("FAIL read w=%0d got=%h exp=%h", w, rdata, shadow[w]);
        end
      end
      if (req.we && !is_io(req.addr))
        for (int b = 0; b < 4; b++) if (req.be[b]) shadow[w][8*b +: 8] = req.wdata[8*b +: 8];
    end
    // final sweep of all words
    req.we = 0; req.re = 1;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); req.addr = 32'(i * 4);
      @(posedge clk); #1;
      checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL sweep %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
