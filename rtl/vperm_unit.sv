// vperm_unit: three-operand byte-wise vector permute (VPERM).
//
// Each byte i of the result is chosen from the 2*VB bytes of the
// concatenation {src_a, src_b} by byte i of the control register: control
// values 0..VB-1 select byte of src_a, VB..2*VB-1 select a byte of src_b.
// Only the low log2(2*VB) bits of a control byte are used. The permute and
// its three operands follow the instruction set; the index convention is this
// design's choice (it is that of the AltiVec vperm instruction). Purely
// combinational; bytes are numbered in memory order as everywhere in the
// coprocessor.
module vperm_unit #(
  parameter int unsigned VLMAX = 4,
  localparam int unsigned VB   = 4 * VLMAX,
  localparam int unsigned SW   = $clog2(2 * VB)
) (
  input  logic [VB-1:0][7:0] src_a,
  input  logic [VB-1:0][7:0] src_b,
  input  logic [VB-1:0][7:0] ctrl,
  output logic [VB-1:0][7:0] result
);

  logic [2*VB-1:0][7:0] both;
  assign both = {src_b, src_a};   // byte k < VB is src_a[k], byte VB+k is src_b[k]

  always_comb begin
    for (int i = 0; i < int'(VB); i++)
      result[i] = both[ctrl[i][SW-1:0]];
  end

endmodule
