// tb_tlm_vmp_top: end-to-end run of the 2-way vector multiprocessor at its
// default configuration, on a small TLM-like kernel split between the two
// processors (thread-level parallelism) and vectorised four elements at a
// time (data-level parallelism).
//
// Each processor model owns half of a 64-element mesh line and, for each
// group of four elements ("scatter" phase):
//     y = y + s_c * x          (VLDU, VFPMUL, VFPADD, VSTU)
//     acc0 += x * x            (VFPMAC into accumulator 0)
// reading one result back at once (a read-after-write hold on the channel).
// The last group of each processor is added under VLEN = 10 bytes, so half of
// an element is updated. Both processors then meet at the hardware barrier.
// In the "connect" phase each processor loads the other's results at an
// unaligned address, reverses the bytes with VPERM and stores them, again
// unaligned (one byte past each group), to a third array. The integer units' own bus masters read memory at random meanwhile,
// so the bus is contended, and the memory inserts random wait states.
// Expected memory contents and accumulators come from a byte-level reference
// model with double-precision arithmetic rounded to single precision.
// Every mechanism (read-after-write hold, load/store hold, processor-side
// hold, barrier hold and release, bus contention, wait states, byte
// transfers of unaligned accesses, partial VLEN, MAC, VPERM, VSPLAT, vector
// cache hits, misses and snooped writes) is counted and must occur at least
// once.
module tb_tlm_vmp_top;
  import vcop_pkg::*;
  import fp_ref_pkg::*;

  localparam int NCPU = 2, VB = 16, MEMB = 4096;
  localparam int XA = 32'h000, YA = 32'h100, ZA = 32'h300;
  localparam int NE = 64;                    // mesh line length (elements)

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pcop_in_t  cop_i [NCPU];
  pcop_out_t cop_o [NCPU];
  logic [NCPU-1:0] barrier, hold, barrier_mask;
  ahb_mo_t cpu_ahb_o [NCPU];
  ahb_mi_t cpu_ahb_i [NCPU];
  ahb_si_t ahb_s_i;
  ahb_so_t ahb_s_o;

  tlm_vmp_top dut (.*);
  ahb_mem_model #(.BYTES(MEMB), .MAXWAIT(2)) u_mem (.clk, .rst_n, .s_i(ahb_s_i), .s_o(ahb_s_o));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- data and model
  logic [7:0]  ref_mem [MEMB];
  logic [31:0] s_c [NCPU];
  logic [31:0] ref_acc [NCPU][4];

  function automatic logic [31:0] rd32(input int a);
    return {ref_mem[a], ref_mem[a+1], ref_mem[a+2], ref_mem[a+3]};
  endfunction
  task automatic wr32(input int a, input logic [31:0] v, input int firstbyte, input int lastbyte);
    for (int k = firstbyte; k <= lastbyte; k++) ref_mem[a + k] = v[31-8*k -: 8];
  endtask

  // mechanism counters
  int n_raw = 0, n_lsu_hold = 0, n_cpu_hold = 0, n_bar_hold = 0, n_bar_rel = 0;
  int n_contend = 0, n_byte_tr = 0, n_partial = 0, n_mac = 0, n_perm = 0, n_splat = 0;
  int n_scalar_rd = 0, n_vhit = 0, n_vmiss = 0, n_snoop = 0;
  logic [NCPU-1:0] hold_d;

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCPU; c++) begin
      if (!cop_o[c].holdn && dut.m_o[2*c+1].hbusreq) n_lsu_hold++;
      if (hold[c]) n_bar_hold++;
      if (hold_d[c] && !hold[c]) n_bar_rel++;
    end
    hold_d <= hold;
    if (dut.g_cpu[0].u_vcop.u_lsu.hit)  n_vhit++;
    if (dut.g_cpu[1].u_vcop.u_lsu.hit)  n_vhit++;
    if (dut.g_cpu[0].u_vcop.u_lsu.miss) n_vmiss++;
    if (dut.g_cpu[1].u_vcop.u_lsu.miss) n_vmiss++;
    if (|dut.snoop_v) n_snoop++;
    for (int k = 0; k < 2 * NCPU; k++)
      if (dut.m_o[k].hbusreq && !dut.m_i[k].hgrant) n_contend++;
    if (ahb_s_i.htrans == HT_NONSEQ && ahb_s_i.hsize == HSIZE_BYTE && ahb_s_o.hready) n_byte_tr++;
  end

  // --------------------------------------- integer unit models (per CPU)
  logic [NCPU-1:0] done_cpu;
  for (genvar c = 0; c < NCPU; c++) begin : g_cpu
    pcop_in_t ci;
    logic     cpu_holdn;
    assign cop_i[c] = '{cop_no: ci.cop_no, holdn: cop_o[c].holdn & cpu_holdn,
                        valid: ci.valid, opc: ci.opc, din: ci.din};

    function automatic vinstr_t mk(input vop_e op, input int d, input int a, input int b, input int cc);
      return '{op: op, d: 4'(d), a: 4'(a), b: 4'(b), c: 4'(cc)};
    endfunction

    task automatic send(input vinstr_t i, input logic [31:0] d, output logic [31:0] dout);
      int st;
      ci.valid = 1; ci.opc = i; ci.cop_no = 0;
      forever begin
        @(negedge clk);
        if (cop_i[c].holdn) break;
      end
      @(posedge clk); #1;
      ci.valid = 0; ci.din = d;
      dout = 0;
      if (i.op == OP_VFPMAC) n_mac++;
      if (i.op == OP_VPERM) n_perm++;
      if (i.op == OP_VSPLAT) n_splat++;
      if (i.op == OP_MVCSR2R || i.op == OP_MVCVEL2R) begin
        st = 0;
        forever begin
          @(negedge clk);
          if (cop_o[c].holdn) break;
          st++;
        end
        if (st > 0) n_raw++;
        dout = cop_o[c].dout;
        @(posedge clk); #1;
      end
    endtask

    task automatic op(input vop_e o, input int d, input int a, input int b, input int cc);
      logic [31:0] dummy;
      send(mk(o, d, a, b, cc), 0, dummy);
    endtask
    task automatic mvin(input vop_e o, input int d, input int b, input logic [31:0] v);
      logic [31:0] dummy;
      send(mk(o, d, 0, b, 0), v, dummy);
    endtask

    initial begin
      logic [31:0] got;
      int base, other;
      ci = '0; cpu_holdn = 1; done_cpu[c] = 0; barrier[c] = 0;
      @(posedge rst_n);
      repeat (3) @(posedge clk); #1;
      if (c == 1) fork
        forever begin @(posedge clk); cpu_holdn <= ($urandom % 5) != 0; end
      join_none
      // setup: sr0 = 0, sr1 = s_c, v4 = splat(s_c), VLEN = 16
      mvin(OP_MVSR2CSR, 0, 0, 0);
      mvin(OP_MVSR2CSR, 1, 0, s_c[c]);
      op(OP_VSPLAT, 4, 1, 0, 0);
      mvin(OP_MVSR2VLEN, 0, 0, 16);
      // scatter phase
      for (int k = 0; k < 8; k++) begin
        base = 32 * c + 4 * k;
        mvin(OP_MVSR2CSR, 2, 0, 32'(XA + 4 * base));
        mvin(OP_MVSR2CSR, 3, 0, 32'(YA + 4 * base));
        op(OP_VLDU, 1, 2, 0, 0);
        op(OP_VLDU, 2, 3, 0, 0);
        op(OP_VFPMUL, 3, 1, 4, 0);
        if (k == 7) begin mvin(OP_MVSR2VLEN, 0, 0, 10); n_partial++; end
        op(OP_VFPADD, 2, 2, 3, 0);
        if (k == 7) mvin(OP_MVSR2VLEN, 0, 0, 16);
        op(OP_VFPMAC, 5, 1, 1, (k == 0) ? 2 : 0);
        send(mk(OP_MVCVEL2R, 0, 2, 0, 0), 0, got);          // read the new y at once
        check(got === ref_add(rd32(YA + 4 * base), ref_mul(rd32(XA + 4 * base), s_c[c])),
              $sformatf("cpu %0d group %0d element 0 read-back %h", c, k, got));
        op(OP_VSTU, 2, 3, 0, 0);
      end
      for (int e = 0; e < 4; e++) begin
        send(mk(OP_MVCVEL2R, 0, 5, e, 0), 0, got);
        check(got === ref_acc[c][e], $sformatf("cpu %0d accumulator element %0d", c, e));
      end
      // barrier
      @(negedge clk); barrier[c] = 1;
      @(negedge clk); barrier[c] = 0;
      while (hold[c]) @(negedge clk);
      // connect phase: byte-reversed copy of the other processor's results,
      // loaded from 2 bytes past each group (unaligned)
      for (int i = 0; i < VB; i++) mvin(OP_MVSR2CVEL, 8, i / 4, 32'h0f0e0d0c - 32'(i / 4) * 32'h04040404);
      other = 1 - c;
      for (int k = 0; k < 8; k++) begin
        mvin(OP_MVSR2CSR, 2, 0, 32'(YA + 4 * (32 * other + 4 * k) + 2));
        mvin(OP_MVSR2CSR, 3, 0, 32'(ZA + 4 * (32 * c + 4 * k) + 1));
        op(OP_VLDU, 6, 2, 0, 0);
        op(OP_VPERM, 7, 6, 6, 8);
        op(OP_VSTU, 7, 3, 0, 0);
      end
      done_cpu[c] = 1;
    end
  end

  // integer-unit bus masters: random word reads of an untouched region
  for (genvar c = 0; c < NCPU; c++) begin : g_scalar
    initial begin
      logic [31:0] a, got;
      cpu_ahb_o[c] = '{hbusreq: 0, htrans: HT_IDLE, haddr: 0, hwrite: 0, hsize: HSIZE_WORD, hwdata: 0};
      @(posedge rst_n);
      while (!(&done_cpu)) begin
        repeat (int'($urandom % 20)) @(negedge clk);
        a = 32'h800 + 4 * ($urandom % 256);
        cpu_ahb_o[c].hbusreq = 1;
        forever begin @(negedge clk); if (cpu_ahb_i[c].hgrant) break; end
        cpu_ahb_o[c].htrans = HT_NONSEQ; cpu_ahb_o[c].haddr = a;
        forever begin @(negedge clk); if (cpu_ahb_i[c].hready) break; end
        @(posedge clk); #1;
        cpu_ahb_o[c].htrans = HT_IDLE; cpu_ahb_o[c].hbusreq = 0;
        forever begin @(negedge clk); if (cpu_ahb_i[c].hready) break; end
        got = cpu_ahb_i[c].hrdata;
        check(got === {a[7:0] ^ 8'h5A, 8'(a + 1) ^ 8'h5A, 8'(a + 2) ^ 8'h5A, 8'(a + 3) ^ 8'h5A},
              $sformatf("integer unit %0d read %h", c, a));
        n_scalar_rd++;
        @(posedge clk); #1;
      end
    end
  end

  // -------------------------------------------------------------- main
  initial begin
    logic [31:0] x, y, r;
    int bad;
    barrier_mask = '1;
    hold_d = '0;
    #1;
    for (int k = 0; k < MEMB; k++) ref_mem[k] = 8'(k) ^ 8'h5A;
    for (int i = 0; i < NE; i++) begin
      wr32(XA + 4 * i, rand_sp(120, 134), 0, 3);
      wr32(YA + 4 * i, rand_sp(120, 134), 0, 3);
    end
    for (int k = 0; k < MEMB; k++) u_mem.mem[k] = ref_mem[k];
    for (int c = 0; c < NCPU; c++) s_c[c] = rand_sp(125, 129);
    // reference: scatter phase (y += s*x, last group only 10 bytes), accumulators
    for (int c = 0; c < NCPU; c++) begin
      for (int e = 0; e < 4; e++) ref_acc[c][e] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done_cpu);
    repeat (600) @(posedge clk);
    // the reference accumulators were used for the checks above; now apply
    // the scatter phase to the reference memory and derive the connect phase
    // (the read-back checks in the processor models use the not yet updated
    // reference memory, which is why this is done only now)
    for (int i = 0; i < NE; i++) begin
      x = rd32(XA + 4 * i);
      y = rd32(YA + 4 * i);
      r = ref_add(y, ref_mul(x, s_c[i / 32]));
      if (i % 32 >= 28) begin
        // last group, VLEN = 10 bytes: element 28+0, 28+1 full, 28+2 first half
        if (i % 32 == 28 || i % 32 == 29) wr32(YA + 4 * i, r, 0, 3);
        else if (i % 32 == 30) wr32(YA + 4 * i, r, 0, 1);
      end else wr32(YA + 4 * i, r, 0, 3);
    end
    for (int c = 0; c < NCPU; c++)
      for (int k = 0; k < 8; k++)
        for (int j = 0; j < VB; j++)
          ref_mem[ZA + 4 * (32 * c + 4 * k) + 1 + j] = ref_mem[YA + 4 * (32 * (1 - c) + 4 * k) + 2 + (15 - j)];
    bad = 0;
    for (int k = 0; k < MEMB; k++) if (u_mem.mem[k] !== ref_mem[k]) bad++;
    check(bad == 0, $sformatf("final memory image (%0d bytes differ)", bad));
    $display("raw holds %0d, load/store hold cycles %0d, cpu hold cycles %0d", n_raw, n_lsu_hold, n_cpu_hold);
    $display("barrier hold cycles %0d, releases %0d, bus contention cycles %0d, wait states %0d",
             n_bar_hold, n_bar_rel, n_contend, u_mem.n_waits);
    $display("byte transfers %0d, partial VLEN ops %0d, MAC %0d, VPERM %0d, VSPLAT %0d, scalar reads %0d",
             n_byte_tr, n_partial, n_mac, n_perm, n_splat, n_scalar_rd);
    check(n_raw > 0, "read-after-write hold happened");
    check(n_lsu_hold > 0, "load/store hold happened");
    check(n_cpu_hold > 0, "processor-side hold happened");
    check(n_bar_hold > 0, "barrier hold happened");
    check(n_bar_rel > 0, "barrier release happened");
    check(n_contend > 0, "bus contention happened");
    check(u_mem.n_waits > 0, "memory wait states happened");
    check(n_byte_tr > 0, "unaligned byte transfers happened");
    check(n_partial > 0, "partial VLEN operation happened");
    check(n_mac > 0 && n_perm > 0 && n_splat > 0, "MAC, VPERM and VSPLAT issued");
    check(n_scalar_rd > 0, "integer unit bus reads happened");
    check(n_vhit > 0 && n_vmiss > 0, "vector cache hits and misses happened");
    check(n_snoop > 0, "vector cache snoops happened");
    $display("vector cache hits %0d, misses %0d, snooped writes %0d", n_vhit, n_vmiss, n_snoop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && !g_cpu[1].cpu_holdn) n_cpu_hold++;

  // reference accumulators: acc0 of processor c after its 8 groups
  initial begin
    @(posedge rst_n);
    for (int c = 0; c < NCPU; c++)
      for (int k = 0; k < 8; k++)
        for (int e = 0; e < 4; e++) begin
          logic [31:0] x;
          x = rd32(XA + 4 * (32 * c + 4 * k + e));
          ref_acc[c][e] = ref_add((k == 0) ? 32'd0 : ref_acc[c][e], ref_mul(x, x));
        end
  end
endmodule
