// tb_vlsu: random unaligned vector loads and stores of 0..20 bytes (above 16
// the unit clamps to one register) against a byte-array mirror of memory.
// The bus grant comes after a random delay and the memory inserts random
// wait states. Checks loaded bytes, the memory image, zero fill above the
// length, and that each access uses the expected number of bus transfers
// (word transfers on aligned words, byte transfers at the ends).
module tb_vlsu;
  import vcop_pkg::*;
  localparam int VB = 16, MEMB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, is_store, busy, done;
  logic [31:0] addr;
  logic [4:0] nbytes;
  logic [VB-1:0][7:0] wdata, rdata;
  ahb_mo_t ahb_o;
  ahb_mi_t ahb_i;
  ahb_si_t s_i;
  ahb_so_t s_o;
  logic gnt;
  vlsu #(.VLMAX(4)) dut (.*);
  ahb_mem_model #(.BYTES(MEMB), .MAXWAIT(3)) u_mem (.clk, .rst_n, .s_i, .s_o);
  always_comb begin
    s_i = '{htrans: ahb_o.htrans, haddr: ahb_o.haddr, hwrite: ahb_o.hwrite,
            hsize: ahb_o.hsize, hwdata: ahb_o.hwdata, hmaster: 4'd0};
    ahb_i = '{hgrant: gnt, hready: s_o.hready, hresp: s_o.hresp, hrdata: s_o.hrdata};
  end
  always_ff @(posedge clk) gnt <= ahb_o.hbusreq ? (gnt | (($urandom % 3) == 0)) : 1'b0;

  int checks = 0, failures = 0;
  logic [7:0] mirror [MEMB];
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int k = 0; k < MEMB; k++) mirror[k] = 8'(k) ^ 8'h5A;
    start = 0; is_store = 0; addr = 0; nbytes = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int len, ntr, t0, expn;
      logic [31:0] p;
      @(negedge clk);
      is_store = 1'($urandom);
      addr = 32'($urandom % (MEMB - 32));
      nbytes = 5'($urandom % 21);
      for (int i = 0; i < VB; i++) wdata[i] = 8'($urandom);
      start = 1;
      t0 = u_mem.n_transfers;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      len = (nbytes > VB) ? VB : int'(nbytes);
      // expected transfer count
      expn = 0; p = addr;
      for (int r = len; r > 0; ) begin
        if (p[1:0] == 0 && r >= 4) begin p += 4; r -= 4; end else begin p += 1; r -= 1; end
        expn++;
      end
      checks++;
      if (u_mem.n_transfers - t0 != expn) begin
        failures++;
        $display("transfer count %0d exp %0d", u_mem.n_transfers - t0, expn);
      end
      if (is_store) begin
        for (int i = 0; i < len; i++) mirror[addr + 32'(i)] = wdata[i];
      end else begin
        for (int i = 0; i < VB; i++) begin
          checks++;
          if (rdata[i] !== ((i < len) ? mirror[addr + 32'(i)] : 8'h00)) begin
            failures++;
            $display("load byte %0d of %0d at %h: got %h", i, len, addr, rdata[i]);
          end
        end
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("still busy after done"); end
    end
    repeat (5) @(posedge clk);
    for (int k = 0; k < MEMB; k++) begin
      checks++;
      if (u_mem.mem[k] !== mirror[k]) begin failures++; $display("mem[%0d] differs", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
