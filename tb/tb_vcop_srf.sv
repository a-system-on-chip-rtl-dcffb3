// tb_vcop_srf: random writes and reads of the scalar register file against a
// shadow copy, including forwarding of a write to a read in the same cycle.
module tb_vcop_srf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  vcop_srf #(.SRMAX(16)) dut (.*);
  logic [31:0] shadow [16];
  int checks = 0, failures = 0, fwd = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int r = 0; r < 16; r++) shadow[r] = 0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] e1, e2;
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = $urandom;
      ra1 = 4'($urandom); ra2 = (n % 4 == 0) ? wa : 4'($urandom);
      #1;
      e1 = (we && wa == ra1) ? wd : shadow[ra1];
      e2 = (we && wa == ra2) ? wd : shadow[ra2];
      if (we && wa == ra2) fwd++;
      checks++;
      if (rd1 !== e1 || rd2 !== e2) begin
        failures++;
        $display("read mismatch at %0t", $time);
      end
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    checks++;
    if (fwd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
