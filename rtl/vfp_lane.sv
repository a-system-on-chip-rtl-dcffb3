// vfp_lane: one 32-bit element lane of the vector floating-point datapath.
//
// A lane carries element e of every vector operation through the two
// execution stages of the coprocessor pipeline and holds element e of the
// two vector accumulators VACC0 and VACC1.
//   stage 1 (EXEC):      single-precision add, subtract or multiply
//   stage 2 (DMEM/EXEC2): the accumulate add of VFPMAC, pass-through otherwise
//   result register:     the intermediate register in which results wait one
//                        cycle before they are committed to the register file
// Two execution stages and the intermediate register follow the described
// microarchitecture; how the work is divided between the stages (the whole
// product or sum in stage 1, the accumulation in stage 2) is this design's
// choice, which makes VFPMAC an unfused multiply-then-add.
//
// Arithmetic: IEEE 754 single precision, round to nearest even. Denormal
// inputs and results are flushed to signed zero, overflow gives infinity,
// any NaN operand or invalid operation (inf-inf, 0*inf) gives the quiet NaN
// 0x7FC00000. These corner-case rules are this design's choice.
//
// Interface and timing: an operation presented on in_* in cycle t (in_valid
// high) appears on out_valid/out_res in cycle t+3. The lane never stalls.
// For L_PASS the result is in_a, or din sampled in cycle t+1 when in_ins is
// set (the scalar operand of a move-to-coprocessor arrives one cycle after
// its instruction). VFPMAC (L_MAC) updates accumulator in_acc_sel at the end
// of stage 2 with (in_acc_clr ? 0 : acc) + a*b; back-to-back MACs on the same
// accumulator see each other's results.
module vfp_lane
  import vcop_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  lane_op_e    in_op,
  input  logic [31:0] in_a,
  input  logic [31:0] in_b,
  input  logic        in_acc_sel,
  input  logic        in_acc_clr,
  input  logic        in_ins,
  input  logic [31:0] din,
  output logic        out_valid,
  output logic [31:0] out_res,
  output logic [31:0] acc0,
  output logic [31:0] acc1
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Round a normalised 24-bit mantissa with guard and sticky bits; pack.
  function automatic logic [31:0] fp_round_pack(input logic s, input int e,
                                                input logic [23:0] m,
                                                input logic g, input logic st);
    logic [24:0] mr;
    int          er;
    mr = {1'b0, m} + 25'((g && (st || m[0])) ? 1 : 0);
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 1;
    end
    if (er >= 255)     return {s, 8'hFF, 23'd0};
    else if (er <= 0)  return {s, 31'd0};
    else               return {s, 8'(er), mr[22:0]};
  endfunction

  function automatic logic [31:0] fp_mul(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    logic        az, bz, ai, bi, an, bn;
    logic [47:0] p;
    int          e;
    s  = a[31] ^ b[31];
    az = (a[30:23] == 8'd0);  bz = (b[30:23] == 8'd0);
    ai = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    bi = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    an = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    bn = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    if (an || bn || (ai && bz) || (bi && az)) return QNAN;
    if (ai || bi) return {s, 8'hFF, 23'd0};
    if (az || bz) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return fp_round_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else       return fp_round_pack(s, e,     p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic logic [31:0] fp_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] x, y;
    logic        ai, bi, an, bn;
    logic [26:0] mx, my;      // 24-bit mantissa + guard, round, sticky
    logic [27:0] sum;
    int          ex, ey, d, lz;
    logic        st;
    ai = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    bi = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    an = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    bn = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    if (an || bn || (ai && bi && (a[31] != b[31]))) return QNAN;
    if (ai) return a;
    if (bi) return b;
    // flush denormal operands to zero
    x = (a[30:23] == 0) ? {a[31], 31'd0} : a;
    y = (b[30:23] == 0) ? {b[31], 31'd0} : b;
    if (x[30:0] == 0 && y[30:0] == 0) return {x[31] & y[31], 31'd0};
    if (x[30:0] == 0) return y;
    if (y[30:0] == 0) return x;
    // order by magnitude: |x| >= |y|
    if (y[30:0] > x[30:0]) begin
      {x, y} = {y, x};
    end
    ex = int'(x[30:23]);
    ey = int'(y[30:23]);
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    d  = ex - ey;
    if (d >= 27) my = 27'd1;            // only the sticky bit survives
    else if (d > 0) begin
      st = |(my & ((27'd1 << d) - 27'd1));
      my = (my >> d) | {26'd0, st};
    end
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[27]) begin
        sum = {1'b0, sum[27:1]} | {27'd0, sum[0]};
        ex  = ex + 1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my};
      if (sum == 0) return 32'd0;       // exact cancellation gives +0
      lz = 0;
      for (int i = 0; i < 27; i++) if (sum[i]) lz = 26 - i;
      sum = sum << lz;
      ex  = ex - lz;
    end
    return fp_round_pack(x[31], ex, sum[26:3], sum[2], |sum[1:0]);
  endfunction

  // ---------------------------------------------------------------- stage 1
  logic        s1_valid, s1_sel, s1_clr, s1_ins;
  lane_op_e    s1_op;
  logic [31:0] s1_a, s1_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_op    <= L_PASS;
      s1_a     <= '0;
      s1_b     <= '0;
      s1_sel   <= 1'b0;
      s1_clr   <= 1'b0;
      s1_ins   <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      s1_op    <= in_op;
      s1_a     <= in_a;
      s1_b     <= in_b;
      s1_sel   <= in_acc_sel;
      s1_clr   <= in_acc_clr;
      s1_ins   <= in_ins;
    end
  end

  logic [31:0] r1;
  always_comb begin
    unique case (s1_op)
      L_ADD:        r1 = fp_add(s1_a, s1_b);
      L_SUB:        r1 = fp_add(s1_a, {~s1_b[31], s1_b[30:0]});
      L_MUL, L_MAC: r1 = fp_mul(s1_a, s1_b);
      default:      r1 = s1_ins ? din : s1_a;
    endcase
  end

  // ---------------------------------------------------------------- stage 2
  logic        s2_valid, s2_sel, s2_clr;
  lane_op_e    s2_op;
  logic [31:0] s2_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_op    <= L_PASS;
      s2_r     <= '0;
      s2_sel   <= 1'b0;
      s2_clr   <= 1'b0;
    end else begin
      s2_valid <= s1_valid;
      s2_op    <= s1_op;
      s2_r     <= r1;
      s2_sel   <= s1_sel;
      s2_clr   <= s1_clr;
    end
  end

  logic [31:0] acc_q [2];
  logic [31:0] acc_in, r2;
  always_comb begin
    acc_in = s2_clr ? 32'd0 : acc_q[s2_sel];
    r2     = (s2_op == L_MAC) ? fp_add(acc_in, s2_r) : s2_r;
  end

  // ------------------------------------------- accumulators, result register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q[0]  <= '0;
      acc_q[1]  <= '0;
      out_valid <= 1'b0;
      out_res   <= '0;
    end else begin
      if (s2_valid && s2_op == L_MAC) acc_q[s2_sel] <= r2;
      out_valid <= s2_valid;
      out_res   <= r2;
    end
  end

  assign acc0 = acc_q[0];
  assign acc1 = acc_q[1];

endmodule
