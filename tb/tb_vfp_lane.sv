// tb_vfp_lane: self-checking test of one floating-point lane.
// Streams one random operation per cycle (add, sub, mul, MAC on both
// accumulators, pass and element insert) and checks each result exactly three
// cycles later against double-precision reference arithmetic. Also checks
// special values (zero, infinity, NaN, overflow) and exact cancellation.
module tb_vfp_lane;
  import vcop_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_acc_sel, in_acc_clr, in_ins, out_valid;
  lane_op_e    in_op;
  logic [31:0] in_a, in_b, din, out_res, acc0, acc1;

  vfp_lane dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] exp_q[$];
  logic [31:0] ref_acc[2];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker: every result must come exactly three cycles after issue
  logic [3:0] vpipe;
  always_ff @(posedge clk) begin
    vpipe <= {vpipe[2:0], in_valid};
    if (rst_n && vpipe[2] !== out_valid) begin
      failures++;
      $display("latency mismatch");
    end
    if (rst_n && out_valid) begin
      logic [31:0] e;
      e = exp_q.pop_front();
      checks++;
      if (out_res !== e) begin
        failures++;
        $display("result mismatch got %h exp %h", out_res, e);
      end
    end
  end

  task automatic issue(input lane_op_e op, input logic [31:0] a, input logic [31:0] b,
                       input logic sel, input logic clr, input logic ins,
                       input logic [31:0] d, input logic [31:0] expected);
    in_valid = 1; in_op = op; in_a = a; in_b = b; in_acc_sel = sel; in_acc_clr = clr;
    in_ins = ins;
    exp_q.push_back(expected);
    @(posedge clk); #1;
    din = d;              // insert data arrives one cycle after the operation
    in_valid = 0;
  endtask

  initial begin
    logic [31:0] a, b, p, e;
    int k;
    vpipe = 0;
    in_valid = 0; in_op = L_PASS; in_a = 0; in_b = 0; in_acc_sel = 0; in_acc_clr = 0;
    in_ins = 0; din = 0;
    ref_acc[0] = 0; ref_acc[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    // directed special cases
    issue(L_ADD, 32'h3f800000, 32'h3f800000, 0, 0, 0, 0, 32'h40000000);   // 1+1=2
    issue(L_SUB, 32'h40400000, 32'h40400000, 0, 0, 0, 0, 32'h00000000);   // 3-3=+0
    issue(L_MUL, 32'h7f000000, 32'h40000000, 0, 0, 0, 0, 32'h7f800000);   // overflow
    issue(L_MUL, 32'h7f800000, 32'h00000000, 0, 0, 0, 0, 32'h7fc00000);   // inf*0
    issue(L_ADD, 32'h7f800000, 32'hff800000, 0, 0, 0, 0, 32'h7fc00000);   // inf-inf
    issue(L_ADD, 32'h3f800000, 32'h33800000, 0, 0, 0, 0, 32'h3f800000);   // tie to even
    issue(L_ADD, 32'h3f800001, 32'h33800000, 0, 0, 0, 0, 32'h3f800002);   // tie rounds up
    issue(L_MUL, 32'hc0000000, 32'h3fc00000, 0, 0, 0, 0, 32'hc0400000);   // -2*1.5
    issue(L_PASS, 32'h12345678, 0, 0, 0, 0, 32'hdeadbeef, 32'h12345678);
    issue(L_PASS, 32'h12345678, 0, 0, 0, 1, 32'hdeadbeef, 32'hdeadbeef);
    // random stream, one operation per cycle, MACs interleaved
    for (int i = 0; i < 4000; i++) begin
      k = int'($urandom % 6);
      a = rand_sp(110, 140);
      b = rand_sp(110, 140);
      if (k == 0) issue(L_ADD, a, b, 0, 0, 0, 0, ref_add(a, b));
      else if (k == 1) issue(L_SUB, a, b, 0, 0, 0, 0, ref_sub(a, b));
      else if (k == 2) issue(L_MUL, a, b, 0, 0, 0, 0, ref_mul(a, b));
      else begin
        logic sel, clr;
        sel = 1'($urandom);
        clr = ($urandom % 8) == 0;
        a = rand_sp(120, 132);
        b = rand_sp(120, 132);
        p = ref_mul(a, b);
        e = ref_add(clr ? 32'd0 : ref_acc[sel], p);
        ref_acc[sel] = e;
        issue(L_MAC, a, b, sel, clr, 0, 0, e);
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (acc0 !== ref_acc[0] || acc1 !== ref_acc[1]) begin
      failures++;
      $display("accumulator mismatch");
    end
    if (exp_q.size() != 0) begin
      failures++;
      $display("missing results");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
