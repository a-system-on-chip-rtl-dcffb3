// tb_barrier_ctrl: four processors reach a series of barriers at random
// times; each is held from its arrival until the last participant arrives,
// and all leave in the same cycle. Also checks a non-participating processor
// is never held or waited for, and that the last arrival is not held.
module tb_barrier_ctrl;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] participate, barrier, hold;
  logic release_pulse;
  barrier_ctrl #(.NCPU(N)) dut (.*);
  int checks = 0, failures = 0, releases = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // reference: arrival flags
  logic [N-1:0] arr;
  initial begin
    int delay [N];
    participate = '1; barrier = '0; arr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 200; round++) begin
      participate = (round >= 100) ? 4'b1011 : 4'b1111;
      for (int k = 0; k < N; k++) delay[k] = int'($urandom % 8);
      arr = '0;
      for (int cyc = 0; cyc < 10; cyc++) begin
        logic [N-1:0] exp_hold, now;
        logic exp_rel;
        @(negedge clk);
        for (int k = 0; k < N; k++) barrier[k] = (delay[k] == cyc) && participate[k];
        now = (arr | barrier) & participate;
        exp_rel = (now == participate);
        exp_hold = exp_rel ? '0 : now;
        #1;
        checks++;
        if (hold !== exp_hold || release_pulse !== exp_rel) begin
          failures++;
          $display("round %0d cyc %0d hold %b exp %b", round, cyc, hold, exp_hold);
        end
        if (exp_rel) releases++;
        arr = exp_rel ? '0 : now;
        @(posedge clk);
        if (exp_rel) break;
      end
      @(negedge clk); barrier = '0;
    end
    checks++;
    if (releases != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
