// tb_ahb_arbiter: four vector load/store units share one memory through the
// arbiter. Each unit repeatedly stores a random vector into its own region
// and loads it back, at random times, so requests collide. Checks every
// load, that hmaster names the master driving each address phase, that only
// one master drives a transfer at a time (the arbiter's own assertion) and
// that every master is served (no starvation under round-robin), and counts
// ownership changes.
module tb_ahb_arbiter;
  import vcop_pkg::*;
  localparam int NM = 4, VB = 16, MEMB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_mo_t m_o [NM];
  ahb_mi_t m_i [NM];
  ahb_si_t s_i;
  ahb_so_t s_o;
  logic [NM-1:0] start, is_store, busy, done;
  logic [31:0] addr [NM];
  logic [VB-1:0][7:0] wdata [NM], rdata [NM];

  ahb_arbiter #(.NM(NM)) dut (.clk, .rst_n, .m_o, .m_i, .s_i, .s_o);
  ahb_mem_model #(.BYTES(MEMB), .MAXWAIT(2)) u_mem (.clk, .rst_n, .s_i, .s_o);
  for (genvar k = 0; k < NM; k++) begin : g_m
    vlsu #(.VLMAX(4)) u_m (.clk, .rst_n, .start(start[k]), .is_store(is_store[k]),
      .addr(addr[k]), .nbytes(5'd16), .wdata(wdata[k]), .busy(busy[k]), .done(done[k]),
      .rdata(rdata[k]), .ahb_o(m_o[k]), .ahb_i(m_i[k]));
  end

  int checks = 0, failures = 0, switches = 0;
  int served [NM];
  logic [3:0] last_master;
  always @(posedge clk) if (rst_n && s_i.htrans == HT_NONSEQ) begin
    // hmaster must name the master whose address phase is on the bus
    checks++;
    if (m_o[s_i.hmaster[1:0]].htrans != HT_NONSEQ || m_o[s_i.hmaster[1:0]].haddr != s_i.haddr) begin
      failures++;
      $display("hmaster %0d does not drive the address phase %h", s_i.hmaster, s_i.haddr);
    end
    if (s_i.hmaster != last_master) switches++;
    last_master <= s_i.hmaster;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NM; k++) begin : g_drv
    initial begin
      logic [VB-1:0][7:0] v;
      served[k] = 0;
      start[k] = 0; is_store[k] = 0; addr[k] = 0; wdata[k] = '0;
      @(posedge rst_n);
      for (int n = 0; n < 100; n++) begin
        repeat (int'($urandom % 4)) @(negedge clk);
        @(negedge clk);
        for (int i = 0; i < VB; i++) v[i] = 8'($urandom);
        addr[k] = 32'(k * 256 + int'($urandom % 200));
        wdata[k] = v; is_store[k] = 1; start[k] = 1;
        @(negedge clk); start[k] = 0;
        while (!done[k]) @(negedge clk);
        @(negedge clk);
        is_store[k] = 0; start[k] = 1;
        @(negedge clk); start[k] = 0;
        while (!done[k]) @(negedge clk);
        checks++;
        if (rdata[k] !== v) begin
          failures++;
          $display("master %0d read back %h exp %h", k, rdata[k], v);
        end
        served[k]++;
      end
    end
  end

  initial begin
    last_master = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (served[0] == 100 && served[1] == 100 && served[2] == 100 && served[3] == 100);
    checks++;
    if (switches < 100) begin failures++; $display("too few ownership changes: %0d", switches); end
    $display("ownership changes %0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
