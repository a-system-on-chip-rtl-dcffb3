// tb_vperm_unit: random sources and control words; each result byte is
// compared with the byte the control selects from the 32-byte concatenation
// (including control bytes with the unused high bits set), plus the identity
// and reverse permutations.
module tb_vperm_unit;
  localparam int VB = 16;
  logic [VB-1:0][7:0] src_a, src_b, ctrl, result;
  vperm_unit #(.VLMAX(4)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < VB; i++) begin
        src_a[i] = 8'($urandom); src_b[i] = 8'($urandom);
        if (n == 0) ctrl[i] = 8'(i);
        else if (n == 1) ctrl[i] = 8'(31 - i);
        else ctrl[i] = 8'($urandom);
      end
      #1;
      for (int i = 0; i < VB; i++) begin
        int s;
        logic [7:0] e;
        s = int'(ctrl[i]) % 32;
        e = (s < VB) ? src_a[s] : src_b[s - VB];
        checks++;
        if (result[i] !== e) begin
          failures++;
          $display("byte %0d mismatch: ctrl %h got %h exp %h", i, ctrl[i], result[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
