// imem: instruction memory of the MIPS150 processor.
//
// A word-organised synchronous-read memory, as a block RAM on the FPGA. The
// processor's PC register drives `addr` throughout the I stage; on the
// rising edge that ends I the addressed word is captured in `rdata`, which
// is the pipeline's instruction register for the X stage. `en` low holds
// the register. Bytes 1:0 of the address are ignored. The depth is this
// design's choice. The processor never writes this memory, so the array
// has no write port: its contents come from INIT_FILE (a $readmemh image,
// when the name is not empty) or are placed in `mem` by the environment
// before the processor runs. Lint therefore reports `mem` as undriven.
module imem #(
  parameter int unsigned WORDS     = 4096,
  parameter string       INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        en,
  input  logic [31:0] addr,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr[AW+1:2]];
  end
endmodule
