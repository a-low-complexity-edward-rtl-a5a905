// bec_resmux: 3x1 result routing network (MUX3 of the data path).
//
// Picks the value written back to the register file from the adder (A_out),
// the multiplier (M_out) or the multiplier followed by the squarer (MS_out),
// under control signal C6. Combinational.
module bec_resmux #(
  parameter int unsigned M = bec_pkg::M
) (
  input  bec_pkg::res_sel_e sel,
  input  logic [M-1:0]      a_out,
  input  logic [M-1:0]      m_out,
  input  logic [M-1:0]      ms_out,
  output logic [M-1:0]      out
);
  import bec_pkg::*;
  always_comb begin
    unique case (sel)
      RS_ADD:  out = a_out;
      RS_MUL:  out = m_out;
      RS_MSQ:  out = ms_out;
      default: out = a_out;
    endcase
  end
endmodule
