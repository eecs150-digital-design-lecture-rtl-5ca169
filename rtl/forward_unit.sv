// forward_unit: hazard detection for the ALU-result forwarding path.
//
// In the three-stage pipeline an ALU instruction's result exists at the end
// of its X stage but reaches the register file only at the end of its M
// stage, while the next instruction needs it at the start of its own X
// stage. This unit compares the X-stage source registers with the M-stage
// destination and tells the X stage to take the M-stage result register
// instead of the register file. A load in M is never forwarded: its value
// is read from memory during M, and the instruction after a load (its
// architected load delay slot) sees the old register value. $0 is never
// forwarded. Purely combinational.
module forward_unit (
  input  logic [4:0] x_rs,
  input  logic [4:0] x_rt,
  input  logic       m_we,
  input  logic       m_load,
  input  logic [4:0] m_wa,
  output logic       fwd_a,
  output logic       fwd_b
);
  logic m_fwd_ok;
  assign m_fwd_ok = m_we && !m_load && (m_wa != 5'd0);
  assign fwd_a = m_fwd_ok && (x_rs == m_wa);
  assign fwd_b = m_fwd_ok && (x_rt == m_wa);
endmodule
