// bec_regfile: memory unit of the point multiplier.
//
// A register file of NREGS (10) cells of M bits holds the ladder points
// W1, Z1, W2, Z2 and the intermediates W0, Z0, T1..T4. Two 10x1 read
// multiplexers, addressed by C1 and C2, drive the operands OP1 and OP2
// combinationally; a 1x10 write demultiplexer, addressed by C3 and enabled by
// we, stores the data-path result at the rising clock edge. The synchronous
// reset and the clr input (used at the start of every point multiplication so
// that W1 = 0 and T4 = 0 without spending cycles) clear all cells; they are
// this design's choice. All cells are also brought out on `cells` so that the
// projective ladder result can be read.
module bec_regfile #(
  parameter int unsigned M     = bec_pkg::M,
  parameter int unsigned NREGS = bec_pkg::NREGS
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clr,
  input  bec_pkg::reg_addr_e    c1,
  input  bec_pkg::reg_addr_e    c2,
  input  bec_pkg::reg_addr_e    c3,
  input  logic                  we,
  input  logic [M-1:0]          wdata,
  output logic [M-1:0]          op1,
  output logic [M-1:0]          op2,
  output logic [NREGS-1:0][M-1:0] cells
);
  logic [NREGS-1:0][M-1:0] mem;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      mem <= '0;
    end else if (we) begin
      mem[c3] <= wdata;
    end
  end

  assign op1   = mem[c1];
  assign op2   = mem[c2];
  assign cells = mem;

  // Every write must address an existing cell.
  assert property (@(posedge clk) disable iff (rst) we |-> 32'(c3) < NREGS)
    else $error("bec_regfile: write to cell %0d", c3);
endmodule
