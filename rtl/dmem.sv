// dmem: data memory of the MIPS150 processor.
//
// A word-organised synchronous memory with four byte-write enables. Loads
// and stores both use the rising edge that starts the M stage: the X stage
// presents a request (address, lane-aligned store data, byte enables) and on
// that edge a store updates the enabled bytes and a load captures the
// addressed word in `rdata`, valid for the whole M stage. Requests for the
// I/O region (0xFFFFxxxx) are ignored here and served by the I/O adapter.
// Byte lane 0 is address bits 1:0 = 0 (little-endian), this design's
// choice; the depth is also this design's choice.
module dmem
  import mips150_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  mem_req_t    req,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;
  logic          sel;

  assign widx = req.addr[AW+1:2];
  assign sel  = !is_io(req.addr);

  always_ff @(posedge clk) begin
    if (sel && req.we) begin
      for (int i = 0; i < 4; i++)
        if (req.be[i]) mem[widx][8*i +: 8] <= req.wdata[8*i +: 8];
    end
    if (sel && req.re) rdata <= mem[widx];
  end
endmodule
