// vcop: the vector floating-point coprocessor tightly coupled to one SPARC
// integer unit.
//
// It holds the programmer-visible state of the vector ISA: VRMAX vector
// registers of VLMAX single-precision elements, SRMAX coprocessor scalar
// registers, the two vector accumulators (kept element-wise in the lanes) and
// the 10-bit vector length register VLEN, which counts the bytes an operation
// "under VLEN" affects (VLDU, VSTU, VFPADD, VFPSUB, VFPMUL; the other
// operations act on whole registers).
//
// Pipeline, in lockstep with the integer pipeline:
//   DECODE  the instruction arrives on the coprocessor channel; operands are
//           read from the register files, with a bypass from the commit stage
//   EXEC    first floating-point stage (vfp_lane)
//   EXEC2   second floating-point stage (accumulation of VFPMAC)
//   COMMIT  the result waits in the intermediate register and is written to
//           the vector register file with per-byte enables
// An instruction whose vector source is still in EXEC or EXEC2 waits in
// DECODE and the coprocessor drops holdn, which holds the integer pipeline.
// This reproduces the described timing: a data operation in cycle 1 and a
// read of its result in cycle 3 make holdn low in cycle 4 and the data valid
// on dout in cycle 5 instead of cycle 4.
//
// Coprocessor channel (see vcop_pkg for the instruction fields):
//   transfer   cycle t with cop_i.valid, cop_i.holdn, cop_o.holdn high and
//              cop_i.cop_no == COP_ID
//   to cop     MVSR2VLEN, MVSR2CSR, MVSR2CVEL take their scalar from cop_i.din
//              in cycle t+1
//   from cop   MVCSR2R, MVCVEL2R drive cop_o.dout in the first cycle after
//              the instruction leaves DECODE, normally t+1
//   hold       cop_o.holdn is low while an instruction waits in DECODE and
//              while a vector load or store is in progress
// VLDU and VSTU wait in DECODE until the pipeline is empty, then run in the
// memory pipe (vcache in front of the bus controller vlsu), address
// SR[a] + SR[b], with holdn low until the access is done. snoop_valid and
// snoop_addr report bus writes of other masters to the vector cache.
//
// What follows the document: the register files and their sizes, the VLEN
// register, the ISA, the three-stage floating-point pipeline with an
// intermediate register, decode-stage operand access, and the holdn/din/dout
// channel. This design's own choices: the instruction encoding, the address
// form SR[a]+SR[b], the interlock rules, and zero reset values (VLEN resets
// to a full register).
module vcop
  import vcop_pkg::*;
#(
  parameter int unsigned VRMAX  = 8,
  parameter int unsigned VLMAX  = 4,
  parameter int unsigned SRMAX  = 16,
  parameter bit          COP_ID = 1'b0,
  localparam int unsigned VB    = 4 * VLMAX,
  localparam int unsigned VAW   = $clog2(VRMAX),
  localparam int unsigned SAW   = $clog2(SRMAX),
  localparam int unsigned EW    = (VLMAX > 1) ? $clog2(VLMAX) : 1,
  localparam int unsigned NW    = $clog2(VB + 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pcop_in_t  cop_i,
  output pcop_out_t cop_o,
  input  logic      snoop_valid,
  input  logic [31:0] snoop_addr,
  output ahb_mo_t   ahb_o,
  input  ahb_mi_t   ahb_i
);

  typedef logic [VB-1:0][7:0] vreg_t;

  typedef struct packed {
    logic           valid;
    logic [VAW-1:0] dest;
    logic [VB-1:0]  be;
  } ctl_t;

  function automatic logic [31:0] elem(input vreg_t v, input int e);
    return {v[4*e], v[4*e+1], v[4*e+2], v[4*e+3]};
  endfunction

  // ------------------------------------------------------------- decode
  logic     pend_q;
  vinstr_t  pend_instr_q;
  logic     lsu_busy, lsu_done;
  logic     holdn;
  logic     xfer, dvalid, exec, hazard;
  vinstr_t  ins;

  assign holdn  = !(pend_q || lsu_busy);
  assign xfer   = cop_i.valid && (cop_i.cop_no == COP_ID) && cop_i.holdn && holdn;
  assign ins    = pend_q ? pend_instr_q : vinstr_t'(cop_i.opc);
  assign dvalid = pend_q || xfer;

  // register file ports
  vreg_t          vrd1, vrd2, vrd3, va, vb, vc;
  logic [VAW-1:0] ra1, ra2, ra3;
  logic [31:0]    srd1, srd2;
  logic           sr_we_q, vlen_we_q;
  logic [SAW-1:0] sr_wa_q;
  logic [VLEN_W-1:0] vlen_q, vlen_eff;

  assign ra1 = VAW'(ins.a);
  assign ra2 = VAW'(ins.b);
  assign ra3 = (ins.op == OP_VPERM) ? VAW'(ins.c) : VAW'(ins.d);

  // commit stage and its bypass into decode
  ctl_t  ex1_q, ex2_q, wb_q;
  vreg_t wb_data;

  function automatic vreg_t bypass(input logic [VAW-1:0] r, input vreg_t rf);
    vreg_t v;
    v = rf;
    if (wb_q.valid && wb_q.dest == r)
      for (int i = 0; i < int'(VB); i++) if (wb_q.be[i]) v[i] = wb_data[i];
    return v;
  endfunction

  assign va = bypass(ra1, vrd1);
  assign vb = bypass(ra2, vrd2);
  assign vc = bypass(ra3, vrd3);

  function automatic logic in_flight(input logic [VAW-1:0] r);
    return (ex1_q.valid && ex1_q.dest == r) || (ex2_q.valid && ex2_q.dest == r);
  endfunction

  logic pipe_busy;
  assign pipe_busy = ex1_q.valid || ex2_q.valid || wb_q.valid;

  always_comb begin
    unique case (ins.op)
      OP_VFPADD, OP_VFPSUB, OP_VFPMUL, OP_VFPMAC:
                   hazard = in_flight(ra1) || in_flight(ra2);
      OP_VPERM:    hazard = in_flight(ra1) || in_flight(ra2) || in_flight(ra3);
      OP_MVCVEL2R: hazard = in_flight(ra1);
      OP_VLDU, OP_VSTU: hazard = pipe_busy;
      default:     hazard = 1'b0;
    endcase
  end
  assign exec = dvalid && !hazard;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q       <= 1'b0;
      pend_instr_q <= '0;
    end else begin
      pend_q <= dvalid && hazard;
      if (dvalid) pend_instr_q <= ins;
    end
  end

  // VLEN and the byte mask of operations under VLEN
  assign vlen_eff = vlen_we_q ? cop_i.din[VLEN_W-1:0] : vlen_q;

  logic [VB-1:0] vlen_mask;
  always_comb
    for (int i = 0; i < int'(VB); i++) vlen_mask[i] = (VLEN_W'(i) < vlen_eff);

  // scalar moves into the coprocessor: data follows one cycle later on din
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_we_q   <= 1'b0;
      sr_wa_q   <= '0;
      vlen_we_q <= 1'b0;
      vlen_q    <= VLEN_W'(VB);
    end else begin
      sr_we_q   <= exec && ins.op == OP_MVSR2CSR;
      sr_wa_q   <= SAW'(ins.d);
      vlen_we_q <= exec && ins.op == OP_MVSR2VLEN;
      if (vlen_we_q) vlen_q <= cop_i.din[VLEN_W-1:0];
    end
  end

  vcop_srf #(.SRMAX(SRMAX)) u_srf (
    .clk, .rst_n,
    .ra1(SAW'(ins.a)), .ra2(SAW'(ins.b)), .rd1(srd1), .rd2(srd2),
    .we(sr_we_q), .wa(sr_wa_q), .wd(cop_i.din)
  );

  // ------------------------------------------------- issue to the lanes
  vreg_t perm;
  vperm_unit #(.VLMAX(VLMAX)) u_perm (.src_a(va), .src_b(vb), .ctrl(vc), .result(perm));

  logic     issue;
  lane_op_e lop;
  logic [VB-1:0] issue_be;
  always_comb begin
    issue    = exec;
    lop      = L_PASS;
    issue_be = '1;
    unique case (ins.op)
      OP_VFPADD:    begin lop = L_ADD; issue_be = vlen_mask; end
      OP_VFPSUB:    begin lop = L_SUB; issue_be = vlen_mask; end
      OP_VFPMUL:    begin lop = L_MUL; issue_be = vlen_mask; end
      OP_VFPMAC:    lop = L_MAC;
      OP_VPERM, OP_VSPLAT: lop = L_PASS;
      OP_MVSR2CVEL: begin
        for (int i = 0; i < int'(VB); i++) issue_be[i] = (i / 4 == int'(ins.b[EW-1:0]));
      end
      default:      issue = 1'b0;
    endcase
  end

  logic [VLMAX-1:0]       lane_valid;
  logic [VLMAX-1:0][31:0] lane_res;
  logic [VLMAX-1:0][31:0] lane_acc0, lane_acc1;

  for (genvar e = 0; e < VLMAX; e++) begin : g_lane
    logic [31:0] a_in;
    always_comb begin
      unique case (ins.op)
        OP_VPERM:  a_in = elem(perm, e);
        OP_VSPLAT: a_in = srd1;
        default:   a_in = elem(va, e);
      endcase
    end
    vfp_lane u_lane (
      .clk, .rst_n,
      .in_valid(issue), .in_op(lop), .in_a(a_in), .in_b(elem(vb, e)),
      .in_acc_sel(ins.c[0]), .in_acc_clr(ins.c[1]),
      .in_ins(ins.op == OP_MVSR2CVEL), .din(cop_i.din),
      .out_valid(lane_valid[e]), .out_res(lane_res[e]),
      .acc0(lane_acc0[e]), .acc1(lane_acc1[e])
    );
    for (genvar k = 0; k < 4; k++) begin : g_byte
      assign wb_data[4*e+k] = lane_res[e][31-8*k -: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex1_q <= '0;
      ex2_q <= '0;
      wb_q  <= '0;
    end else begin
      ex1_q <= '{valid: issue, dest: VAW'(ins.d), be: issue_be};
      ex2_q <= ex1_q;
      wb_q  <= ex2_q;
    end
  end

  // ------------------------------------------------ vector loads/stores
  logic [NW-1:0]  lsu_n;
  vreg_t          lsu_rdata;
  logic           ld_q;
  logic [VAW-1:0] ld_dest_q;
  logic [VB-1:0]  ld_be_q;

  assign lsu_n = (vlen_eff >= VLEN_W'(VB)) ? NW'(VB) : NW'(vlen_eff);

  vcache #(.VLMAX(VLMAX)) u_lsu (
    .clk, .rst_n,
    .start(exec && (ins.op == OP_VLDU || ins.op == OP_VSTU)),
    .is_store(ins.op == OP_VSTU), .addr(srd1 + srd2), .nbytes(lsu_n), .wdata(vc),
    .busy(lsu_busy), .done(lsu_done), .rdata(lsu_rdata),
    .snoop_valid, .snoop_addr, .hit(), .miss(),
    .ahb_o, .ahb_i
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_q      <= 1'b0;
      ld_dest_q <= '0;
      ld_be_q   <= '0;
    end else if (exec && (ins.op == OP_VLDU || ins.op == OP_VSTU)) begin
      ld_q      <= (ins.op == OP_VLDU);
      ld_dest_q <= VAW'(ins.d);
      ld_be_q   <= vlen_mask;
    end
  end

  // ------------------------------------------------- register file write
  logic           vwe;
  logic [VAW-1:0] vwa;
  logic [VB-1:0]  vwbe;
  vreg_t          vwd;
  always_comb begin
    if (wb_q.valid) begin
      vwe = 1'b1; vwa = wb_q.dest; vwbe = wb_q.be; vwd = wb_data;
    end else begin
      vwe = lsu_done && ld_q; vwa = ld_dest_q; vwbe = ld_be_q; vwd = lsu_rdata;
    end
  end

  vec_regfile #(.VRMAX(VRMAX), .VLMAX(VLMAX)) u_vrf (
    .clk, .rst_n,
    .ra1, .ra2, .ra3, .rd1(vrd1), .rd2(vrd2), .rd3(vrd3),
    .we(vwe), .wa(vwa), .wbe(vwbe), .wd(vwd)
  );

  // ------------------------------------------------------ data to the CPU
  logic [31:0] dout_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout_q <= '0;
    else if (exec && ins.op == OP_MVCSR2R)  dout_q <= srd1;
    else if (exec && ins.op == OP_MVCVEL2R) dout_q <= elem(va, int'(ins.b[EW-1:0]));
  end

  assign cop_o.holdn = holdn;
  assign cop_o.dout  = dout_q;

  // the pipeline and a load never compete for the write port
  a_one_writer : assert property (@(posedge clk) disable iff (!rst_n)
    !(wb_q.valid && lsu_done && ld_q))
    else $error("register file write port conflict");

endmodule
