// tb_vcache: random unaligned vector loads and stores of 0..20 bytes in a
// small address range (so lines are reused and evicted) against a byte-array
// mirror of memory. A second "master" writes memory behind the cache's back
// and signals it on the snoop input; later loads must see the new data.
// Checks load data, the memory image, that hits, misses and snoop
// invalidations all occur, and the hit latency (2 cycles for one line,
// 3 cycles for a vector spanning two lines).
module tb_vcache;
  import vcop_pkg::*;
  localparam int VB = 16, MEMB = 1024, RANGE = 768;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, is_store, busy, done, snoop_valid, hit, miss;
  logic [31:0] addr, snoop_addr;
  logic [4:0] nbytes;
  logic [VB-1:0][7:0] wdata, rdata;
  ahb_mo_t ahb_o;
  ahb_mi_t ahb_i;
  ahb_si_t s_i;
  ahb_so_t s_o;
  vcache #(.VLMAX(4), .SETS(32), .WAYS(2)) dut (.*);
  ahb_mem_model #(.BYTES(MEMB), .MAXWAIT(2)) u_mem (.clk, .rst_n, .s_i, .s_o);
  always_comb begin
    s_i = '{htrans: ahb_o.htrans, haddr: ahb_o.haddr, hwrite: ahb_o.hwrite,
            hsize: ahb_o.hsize, hwdata: ahb_o.hwdata, hmaster: 4'd0};
    ahb_i = '{hgrant: 1'b1, hready: s_o.hready, hresp: s_o.hresp, hrdata: s_o.hrdata};
  end

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_snoop = 0, n_fast = 0;
  logic [7:0] mirror [MEMB];
  always @(posedge clk) begin
    if (hit) n_hit++;
    if (miss) n_miss++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic st, input logic [31:0] a, input int n, output int cycles);
    @(negedge clk);
    is_store = st; addr = a; nbytes = 5'(n);
    for (int i = 0; i < VB; i++) wdata[i] = 8'($urandom);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc, len, nl;
    logic [31:0] a;
    for (int k = 0; k < MEMB; k++) mirror[k] = 8'(k) ^ 8'h5A;
    start = 0; is_store = 0; addr = 0; nbytes = 0; wdata = '0;
    snoop_valid = 0; snoop_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int k;
      k = int'($urandom % 10);
      a = 32'($urandom % RANGE);
      len = int'($urandom % 21);
      if (k < 2) begin
        // another master writes a word; the cache is told by the snoop port
        logic [31:0] w;
        w = {a[31:2], 2'b00};
        @(negedge clk);
        for (int j = 0; j < 4; j++) begin
          logic [7:0] b;
          b = 8'($urandom);
          mirror[w + 32'(j)] = b;
          u_mem.mem[w + 32'(j)] = b;
        end
        snoop_valid = 1; snoop_addr = w;
        @(negedge clk);
        snoop_valid = 0;
        n_snoop++;
      end else if (k < 5) begin
        access(1, a, len, cyc);
        for (int i = 0; i < ((len > VB) ? VB : len); i++) mirror[a + 32'(i)] = wdata[i];
      end else begin
        access(0, a, len, cyc);
        if (len > VB) len = VB;
        for (int i = 0; i < VB; i++) begin
          checks++;
          if (rdata[i] !== ((i < len) ? mirror[a + 32'(i)] : 8'h00)) begin
            failures++;
            $display("load %h len %0d byte %0d got %h exp %h", a, len, i, rdata[i], mirror[a + 32'(i)]);
          end
        end
        // the same load again must hit and be fast
        if (len > 0 && k == 9) begin
          nl = ((int'(a) % VB) + len > VB) ? 2 : 1;
          access(0, a, len, cyc);
          checks++;
          if (cyc != nl + 1) begin
            failures++;
            $display("hit latency %0d cycles for %0d lines", cyc, nl);
          end else n_fast++;
        end
      end
    end
    repeat (5) @(posedge clk);
    for (int k = 0; k < MEMB; k++) begin
      checks++;
      if (u_mem.mem[k] !== mirror[k]) begin failures++; $display("mem[%0d] differs", k); end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_snoop == 0 || n_fast == 0) failures++;
    $display("hits %0d misses %0d snoops %0d fast re-loads %0d", n_hit, n_miss, n_snoop, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
