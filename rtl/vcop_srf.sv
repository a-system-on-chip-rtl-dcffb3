// vcop_srf: the coprocessor's scalar register file.
//
// SRMAX 32-bit registers (16 in the default configuration) that hold
// addresses for vector loads and stores, values moved in from the integer
// unit and the scalars broadcast by VSPLAT. Two combinational read ports
// (the two address operands of a load or store) and one clocked write port.
// A write that is pending in the current cycle is forwarded to the read
// ports, because the move-to-coprocessor data arrives one cycle after its
// instruction and the next instruction may already read the register in that
// cycle. Registers reset to zero (this design's choice).
module vcop_srf #(
  parameter int unsigned SRMAX = 16,
  localparam int unsigned AW   = $clog2(SRMAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [31:0]   rd1,
  output logic [31:0]   rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [31:0]   wd
);

  logic [31:0] regs [SRMAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(SRMAX); r++) regs[r] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (we && wa == ra1) ? wd : regs[ra1];
  assign rd2 = (we && wa == ra2) ? wd : regs[ra2];

endmodule
