// tb_vec_regfile: random writes with random byte enables against a shadow
// copy; all three read ports are checked every cycle, including the
// read-old-data rule for a read of the register being written.
module tb_vec_regfile;
  localparam int VRMAX = 8, VLMAX = 4, VB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] ra1, ra2, ra3, wa;
  logic [VB-1:0][7:0] rd1, rd2, rd3, wd;
  logic we;
  logic [VB-1:0] wbe;
  vec_regfile #(.VRMAX(VRMAX), .VLMAX(VLMAX)) dut (.*);
  logic [VB-1:0][7:0] shadow [VRMAX];
  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int r = 0; r < VRMAX; r++) shadow[r] = '0;
    we = 0; wa = 0; wbe = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 3'($urandom); wbe = 16'($urandom);
      for (int i = 0; i < VB; i++) wd[i] = 8'($urandom);
      ra1 = 3'($urandom); ra2 = 3'($urandom); ra3 = (n % 3 == 0) ? wa : 3'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2] || rd3 !== shadow[ra3]) begin
        failures++;
        $display("read mismatch at %0t", $time);
      end
      @(posedge clk);
      if (we) for (int i = 0; i < VB; i++) if (wbe[i]) shadow[wa][i] = wd[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
