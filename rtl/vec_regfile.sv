// vec_regfile: the coprocessor's vector register file.
//
// VRMAX registers of VB = 4*VLMAX bytes, three read ports and one write port,
// as in the 8 x 128-bit, three-read one-write file of the 2-way macrocell.
// Registers are stored in memory byte order (byte i is the byte at address
// base+i, see vcop_pkg). Reads are combinational: the address is set up early
// in the decode stage and the data is used in the same cycle. The write is
// clocked and has one enable per byte, which is how operations "under VLEN"
// and single-element moves touch only part of a register. A read in the cycle
// of a write to the same register returns the old contents; forwarding the
// new data is the caller's bypass. Registers reset to zero (this design's
// choice; the reset state is not specified).
module vec_regfile #(
  parameter int unsigned VRMAX = 8,
  parameter int unsigned VLMAX = 4,
  localparam int unsigned VB   = 4 * VLMAX,
  localparam int unsigned AW   = $clog2(VRMAX)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [AW-1:0]          ra1,
  input  logic [AW-1:0]          ra2,
  input  logic [AW-1:0]          ra3,
  output logic [VB-1:0][7:0]     rd1,
  output logic [VB-1:0][7:0]     rd2,
  output logic [VB-1:0][7:0]     rd3,
  input  logic                   we,
  input  logic [AW-1:0]          wa,
  input  logic [VB-1:0]          wbe,
  input  logic [VB-1:0][7:0]     wd
);

  logic [VB-1:0][7:0] regs [VRMAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(VRMAX); r++) regs[r] <= '0;
    end else if (we) begin
      for (int i = 0; i < int'(VB); i++)
        if (wbe[i]) regs[wa][i] <= wd[i];
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
  assign rd3 = regs[ra3];

endmodule
