// tb_vcop: self-checking test of one vector coprocessor.
// A processor-side driver issues instructions over the coprocessor channel;
// memory is the behavioural AHB memory with random wait states. Every
// instruction is also applied to an instruction-level reference model of the
// programmer-visible state (vector and scalar registers, VLEN, accumulators,
// memory). Results moved back to the processor are compared as they arrive,
// and all registers and memory are compared at the end.
// Timing checks: the read-after-write stall of the channel timing diagram
// (data operation, register move in, read of the result two cycles after the
// data operation: holdn low for exactly one cycle, data one cycle late), a
// read with no pending write returning in the next cycle, and one
// floating-point operation accepted per cycle.
module tb_vcop;
  import vcop_pkg::*;
  import fp_ref_pkg::*;

  localparam int VB = 16;
  localparam int MEMB = 4096;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pcop_in_t  cop_i;
  pcop_out_t cop_o;
  ahb_mo_t   ahb_o;
  ahb_mi_t   ahb_i;
  ahb_si_t   s_i;
  ahb_so_t   s_o;
  logic      cpu_holdn = 1;

  vcop dut (.clk, .rst_n, .cop_i, .cop_o, .snoop_valid(1'b0), .snoop_addr(32'd0), .ahb_o, .ahb_i);
  ahb_mem_model #(.BYTES(MEMB), .MAXWAIT(2)) u_mem (.clk, .rst_n, .s_i, .s_o);

  always_comb begin
    s_i = '{htrans: ahb_o.htrans, haddr: ahb_o.haddr, hwrite: ahb_o.hwrite,
            hsize: ahb_o.hsize, hwdata: ahb_o.hwdata, hmaster: 4'd0};
    ahb_i = '{hgrant: 1'b1, hready: s_o.hready, hresp: s_o.hresp, hrdata: s_o.hrdata};
  end

  int checks = 0, failures = 0;
  int n_stall = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ reference model
  typedef logic [VB-1:0][7:0] vreg_t;
  vreg_t       m_vr [8];
  logic [31:0] m_sr [16];
  logic [9:0]  m_vlen;
  logic [31:0] m_acc [2][4];
  logic [7:0]  m_mem [MEMB];

  function automatic logic [31:0] gete(input vreg_t v, input int e);
    return {v[4*e], v[4*e+1], v[4*e+2], v[4*e+3]};
  endfunction
  function automatic vreg_t sete(input vreg_t v, input int e, input logic [31:0] x);
    vreg_t r;
    r = v;
    for (int k = 0; k < 4; k++) r[4*e+k] = x[31-8*k -: 8];
    return r;
  endfunction

  // apply one instruction; returns the value a move-from-coprocessor yields
  function automatic logic [31:0] model(input vinstr_t i, input logic [31:0] d);
    vreg_t a, b, c, r;
    logic [31:0] addr, x;
    int n;
    a = m_vr[i.a[2:0]]; b = m_vr[i.b[2:0]]; c = m_vr[i.c[2:0]];
    n = (m_vlen > 16) ? 16 : int'(m_vlen);
    addr = m_sr[i.a] + m_sr[i.b];
    model = 0;
    case (i.op)
      OP_MVSR2VLEN: m_vlen = d[9:0];
      OP_MVSR2CSR:  m_sr[i.d] = d;
      OP_MVCSR2R:   model = m_sr[i.a];
      OP_MVSR2CVEL: m_vr[i.d[2:0]] = sete(m_vr[i.d[2:0]], int'(i.b[1:0]), d);
      OP_MVCVEL2R:  model = gete(a, int'(i.b[1:0]));
      OP_VLDU: for (int j = 0; j < n; j++) m_vr[i.d[2:0]][j] = m_mem[(addr + 32'(j)) % MEMB];
      OP_VSTU: for (int j = 0; j < n; j++) m_mem[(addr + 32'(j)) % MEMB] = m_vr[i.d[2:0]][j];
      OP_VPERM: begin
        for (int j = 0; j < VB; j++) begin
          int s;
          s = int'(c[j]) % 32;
          r[j] = (s < 16) ? a[s] : b[s - 16];
        end
        m_vr[i.d[2:0]] = r;
      end
      OP_VSPLAT: for (int e = 0; e < 4; e++) m_vr[i.d[2:0]] = sete(m_vr[i.d[2:0]], e, m_sr[i.a]);
      OP_VFPADD, OP_VFPSUB, OP_VFPMUL: begin
        r = m_vr[i.d[2:0]];
        for (int e = 0; e < 4; e++) begin
          if (i.op == OP_VFPADD)      x = ref_add(gete(a, e), gete(b, e));
          else if (i.op == OP_VFPSUB) x = ref_sub(gete(a, e), gete(b, e));
          else                        x = ref_mul(gete(a, e), gete(b, e));
          for (int k = 0; k < 4; k++) if (4*e+k < n) r[4*e+k] = x[31-8*k -: 8];
        end
        m_vr[i.d[2:0]] = r;
      end
      OP_VFPMAC: begin
        for (int e = 0; e < 4; e++) begin
          x = ref_add(i.c[1] ? 32'd0 : m_acc[i.c[0]][e], ref_mul(gete(a, e), gete(b, e)));
          m_acc[i.c[0]][e] = x;
          r = sete(r, e, x);
        end
        m_vr[i.d[2:0]] = r;
      end
      default: ;
    endcase
  endfunction

  // --------------------------------------------------- processor driver
  assign cop_i.holdn = cop_o.holdn & cpu_holdn;

  // Issue one instruction. Returns the cycle of the transfer, the number of
  // cycles holdn was low afterwards, and the data moved back (if any).
  task automatic send(input vinstr_t i, input logic [31:0] d, output logic [31:0] dout,
                      output int stall, output longint tcyc);
    cop_i.valid  = 1;
    cop_i.opc    = i;
    cop_i.cop_no = 1'b0;
    forever begin
      @(negedge clk);
      if (cop_i.holdn) break;
    end
    tcyc = $time / 10;
    @(posedge clk); #1;
    cop_i.valid = 0;
    cop_i.din   = d;
    stall = 0;
    if (i.op == OP_MVCSR2R || i.op == OP_MVCVEL2R) begin
      forever begin
        @(negedge clk);
        if (cop_o.holdn) break;
        stall++;
      end
      dout = cop_o.dout;
      @(posedge clk); #1;
    end else dout = 0;
  endtask

  task automatic run(input vinstr_t i, input logic [31:0] d);
    logic [31:0] got, exp;
    int st;
    longint tc;
    exp = model(i, d);
    send(i, d, got, st, tc);
    if (st > 0) n_stall++;
    if (i.op == OP_MVCSR2R || i.op == OP_MVCVEL2R)
      check(got === exp, $sformatf("move-from result op %0d got %h exp %h", i.op, got, exp));
  endtask

  function automatic vinstr_t mk(input vop_e op, input int d, input int a, input int b, input int c);
    return '{op: op, d: 4'(d), a: 4'(a), b: 4'(b), c: 4'(c)};
  endfunction

  initial begin
    logic [31:0] got;
    int st;
    longint t0, t1;
    cop_i = '0;
    for (int r = 0; r < 8; r++) m_vr[r] = '0;
    for (int r = 0; r < 16; r++) m_sr[r] = 0;
    for (int r = 0; r < 2; r++) for (int e = 0; e < 4; e++) m_acc[r][e] = 0;
    m_vlen = 16;
    for (int k = 0; k < MEMB; k++) m_mem[k] = 8'(k) ^ 8'h5A;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // load vector registers 1 and 2 with numbers
    for (int e = 0; e < 4; e++) begin
      run(mk(OP_MVSR2CVEL, 1, 0, e, 0), rand_sp(120, 132));
      run(mk(OP_MVSR2CVEL, 2, 0, e, 0), rand_sp(120, 132));
    end
    repeat (5) @(posedge clk); #1;

    // channel timing: data op (cycle 1), move in (cycle 2), read of the
    // data op's result (cycle 3) -> one hold cycle, data in cycle 5
    void'(model(mk(OP_VFPADD, 5, 1, 2, 0), 0));
    send(mk(OP_VFPADD, 5, 1, 2, 0), 0, got, st, t0);
    void'(model(mk(OP_MVSR2CSR, 3, 0, 0, 0), 32'h0000_0100));
    send(mk(OP_MVSR2CSR, 3, 0, 0, 0), 32'h0000_0100, got, st, t1);
    check(t1 == t0 + 1, "move-in accepted in the cycle after the data op");
    send(mk(OP_MVCVEL2R, 0, 5, 0, 0), 0, got, st, t1);
    check(t1 == t0 + 2, "read accepted two cycles after the data op");
    check(st == 1, $sformatf("read-after-write hold lasts one cycle (got %0d)", st));
    check(got === gete(m_vr[5], 0), "read-after-write data");
    send(mk(OP_MVCSR2R, 0, 3, 0, 0), 0, got, st, t1);
    check(st == 0 && got === 32'h100, "scalar read without hold, forwarded move-in");
    // one floating-point operation per cycle
    send(mk(OP_VFPMUL, 6, 1, 2, 0), 0, got, st, t0);
    void'(model(mk(OP_VFPMUL, 6, 1, 2, 0), 0));
    for (int k = 0; k < 6; k++) begin
      void'(model(mk(OP_VFPADD, 7, 1, 2, 0), 0));
      send(mk(OP_VFPADD, 7, 1, 2, 0), 0, got, st, t1);
    end
    check(t1 == t0 + 6, "seven independent operations in seven cycles");
    repeat (5) @(posedge clk); #1;

    // random program with random processor-side holds
    fork
      forever begin
        @(posedge clk);
        cpu_holdn <= ($urandom % 6) != 0;
      end
    join_none
    for (int n = 0; n < 3000; n++) begin
      int k, d, a, b, c;
      logic [31:0] val;
      k = int'($urandom % 100);
      d = int'($urandom % 8); a = int'($urandom % 8); b = int'($urandom % 8); c = int'($urandom % 8);
      if (k < 15)      run(mk(OP_MVSR2CVEL, d, 0, int'($urandom % 4), 0), rand_sp(118, 136));
      else if (k < 24) run(mk(OP_VFPADD, d, a, b, 0), 0);
      else if (k < 32) run(mk(OP_VFPSUB, d, a, b, 0), 0);
      else if (k < 40) run(mk(OP_VFPMUL, d, a, b, 0), 0);
      else if (k < 48) run(mk(OP_VFPMAC, d, a, b, int'($urandom % 4)), 0);
      else if (k < 52) run(mk(OP_VPERM, d, a, b, c), 0);
      else if (k < 56) run(mk(OP_VSPLAT, d, int'($urandom % 16), 0, 0), 0);
      else if (k < 61) run(mk(OP_MVSR2VLEN, 0, 0, 0, 0), 32'($urandom % 21));
      else if (k < 70) begin
        val = ($urandom % 2) ? 32'($urandom % 4096) : rand_sp(120, 132);
        run(mk(OP_MVSR2CSR, int'($urandom % 16), 0, 0, 0), val);
      end
      else if (k < 76) run(mk(OP_MVCSR2R, 0, int'($urandom % 16), 0, 0), 0);
      else if (k < 88) run(mk(OP_MVCVEL2R, 0, a, int'($urandom % 4), 0), 0);
      else if (k < 94) run(mk(OP_VLDU, d, int'($urandom % 16), int'($urandom % 16), 0), 0);
      else             run(mk(OP_VSTU, d, int'($urandom % 16), int'($urandom % 16), 0), 0);
    end
    cpu_holdn <= 1;
    disable fork;
    cpu_holdn = 1;
    // read back all state
    for (int r = 0; r < 8; r++)
      for (int e = 0; e < 4; e++) run(mk(OP_MVCVEL2R, 0, r, e, 0), 0);
    for (int r = 0; r < 16; r++) run(mk(OP_MVCSR2R, 0, r, 0, 0), 0);
    repeat (10) @(posedge clk);
    begin
      int bad;
      bad = 0;
      for (int k = 0; k < MEMB; k++) if (u_mem.mem[k] !== m_mem[k]) bad++;
      check(bad == 0, $sformatf("memory image (%0d bytes differ)", bad));
    end
    check(n_stall > 10, $sformatf("read-after-write holds seen: %0d", n_stall));
    $display("holds %0d, bus transfers %0d, wait states %0d", n_stall, u_mem.n_transfers, u_mem.n_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
