// vcop_pkg: types and constants shared by the vector coprocessor, its load/store
// unit, the AHB interconnect and the multiprocessor top.
//
// Coprocessor instruction word (20 bits, carried on the coprocessor interface
// as opc[19:0]):
//   [19:16] opcode   (vop_e below, one code per instruction of the vector ISA)
//   [15:12] d        destination vector / scalar register
//   [11:8]  a        first source (vector or coprocessor scalar register)
//   [7:4]   b        second source, or element index for the element moves
//   [3:0]   c        third vector source (VPERM), accumulator select (VFPMAC)
// The instruction set (the thirteen operations) follows the vector ISA table
// of the design; the field layout and the opcode numbers are this design's
// own, since no encoding is specified for them.
//
// Vector registers are held in memory byte order: byte i of a register is
// the byte that sits at address base+i when the register is stored. SPARC is
// big-endian, so element e is the 32-bit word {byte 4e, 4e+1, 4e+2, 4e+3}.
package vcop_pkg;

  // Default configuration: the 2-way macrocell (16 x 32 scalar registers,
  // 8 x 128-bit vector registers, i.e. four single-precision elements).
  localparam int unsigned NCPU_DEF  = 2;
  localparam int unsigned VRMAX_DEF = 8;
  localparam int unsigned VLMAX_DEF = 4;
  localparam int unsigned SRMAX_DEF = 16;
  localparam int unsigned VLEN_W    = 10;   // vector length register width (bytes)

  typedef enum logic [3:0] {
    OP_MVSR2VLEN = 4'd0,   // VLEN      <= din
    OP_MVSR2CSR  = 4'd1,   // SR[d]     <= din
    OP_MVCSR2R   = 4'd2,   // dout      <= SR[a]
    OP_MVSR2CVEL = 4'd3,   // VR[d][b]  <= din
    OP_MVCVEL2R  = 4'd4,   // dout      <= VR[a][b]
    OP_VLDU      = 4'd5,   // VR[d]     <= mem[SR[a]+SR[b] ...], VLEN bytes
    OP_VSTU      = 4'd6,   // mem[SR[a]+SR[b] ...] <= VR[d], VLEN bytes
    OP_VPERM     = 4'd7,   // VR[d].byte[i] <= {VR[a],VR[b]}.byte[VR[c].byte[i]]
    OP_VSPLAT    = 4'd8,   // VR[d][*]  <= SR[a]
    OP_VFPADD    = 4'd9,   // VR[d]     <= VR[a] + VR[b], under VLEN
    OP_VFPSUB    = 4'd10,  // VR[d]     <= VR[a] - VR[b], under VLEN
    OP_VFPMUL    = 4'd11,  // VR[d]     <= VR[a] * VR[b], under VLEN
    OP_VFPMAC    = 4'd12   // VACC[c0]  <= (c1 ? 0 : VACC[c0]) + VR[a]*VR[b]; VR[d] <= VACC[c0]
  } vop_e;

  typedef struct packed {
    vop_e       op;
    logic [3:0] d;
    logic [3:0] a;
    logic [3:0] b;
    logic [3:0] c;
  } vinstr_t;

  // Operation performed by one floating-point lane.
  typedef enum logic [2:0] {
    L_PASS = 3'd0,   // forward operand a (or din for an element insert)
    L_ADD  = 3'd1,
    L_SUB  = 3'd2,
    L_MUL  = 3'd3,
    L_MAC  = 3'd4
  } lane_op_e;

  // Processor -> coprocessor channel (one per CPU, as pcop_in in the
  // interface timing diagram).
  typedef struct packed {
    logic        cop_no;   // coprocessor addressed by this transfer
    logic        holdn;    // 0: the integer pipeline is held this cycle
    logic        valid;    // opc carries a coprocessor instruction
    logic [19:0] opc;      // instruction word (vinstr_t)
    logic [31:0] din;      // scalar data, valid the cycle after a move-to-coprocessor
  } pcop_in_t;

  // Coprocessor -> processor channel (pcop_out).
  typedef struct packed {
    logic        holdn;    // 0: hold the integer pipeline
    logic [31:0] dout;     // result of a move-from-coprocessor
  } pcop_out_t;

  // AMBA AHB (rev. 2) signal bundles.
  typedef enum logic [1:0] {HT_IDLE = 2'b00, HT_BUSY = 2'b01, HT_NONSEQ = 2'b10, HT_SEQ = 2'b11} htrans_e;
  localparam logic [2:0] HSIZE_BYTE = 3'b000;
  localparam logic [2:0] HSIZE_HALF = 3'b001;
  localparam logic [2:0] HSIZE_WORD = 3'b010;

  typedef struct packed {          // master -> bus
    logic        hbusreq;
    htrans_e     htrans;
    logic [31:0] haddr;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
  } ahb_mo_t;

  typedef struct packed {          // bus -> master
    logic        hgrant;
    logic        hready;
    logic [1:0]  hresp;
    logic [31:0] hrdata;
  } ahb_mi_t;

  typedef struct packed {          // bus -> slave
    htrans_e     htrans;
    logic [31:0] haddr;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
    logic [3:0]  hmaster;
  } ahb_si_t;

  typedef struct packed {          // slave -> bus
    logic        hready;
    logic [1:0]  hresp;
    logic [31:0] hrdata;
  } ahb_so_t;

endpackage
