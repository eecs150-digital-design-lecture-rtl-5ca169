// regfile: the 32 x 32-bit MIPS register file.
//
// Two combinational read ports serve the X stage; one write port is written
// on the rising clock edge that ends the M stage ("trailing edge of M").
// Because the write lands on that edge, an instruction reading the register
// in the following cycle sees the new value: writes come before reads and
// no bypass inside the register file is needed. Register $0 is not stored
// and always reads zero. No reset: software initialises registers.
module regfile (
  input  logic        clk,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [1:31];

  always_ff @(posedge clk) begin
    if (we && wa != 5'd0) regs[wa] <= wd;
  end

  assign rd1 = (ra1 == 5'd0) ? 32'd0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'd0 : regs[ra2];
endmodule
