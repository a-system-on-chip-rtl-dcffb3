// tlm_vmp_top: N-way vector multiprocessor for transmission-line-modelling
// (TLM) kernels.
//
// Each of the NCPU processor/coprocessor pairs is a SPARC V8 integer unit
// with its caches (outside this module) and a tightly coupled vector
// floating-point coprocessor (vcop) with its own vector cache, load/store
// unit and AHB bus controller. Each vector cache snoops the bus: a write by
// any other master invalidates its copy of the line. The pairs exploit
// data-level parallelism inside a processor (one vector instruction works on VLMAX single-precision elements) and
// thread-level parallelism across processors (each processor runs its own
// slice of the mesh). All processors and coprocessors are masters on one
// shared AHB, whose slave side (the SDRAM controller and the bridge to the
// peripheral bus) is brought out of this module. A barrier controller gives
// the processors a hardware barrier: processor i pulses barrier[i] and is
// held by hold[i] until all participating processors have arrived.
//
// Ports per processor i, for the integer unit that is not part of this RTL:
//   cop_i[i]/cop_o[i]      coprocessor channel of processor i (see vcop)
//   cpu_ahb_o/cpu_ahb_i[i] the integer unit's own AHB master (caches)
//   barrier[i]/hold[i]     barrier arrival pulse and hold
// AHB master numbering: 2i is integer unit i, 2i+1 is coprocessor i.
// Slave side: ahb_s_i/ahb_s_o, one slave port with hmaster.
//
// The 2-way configuration and the register file sizes are the defaults, as in
// the implemented macrocell. The numbering of the bus masters, the single
// slave port, the participation mask of the barrier and the snoop wiring are
// this design's choices.
module tlm_vmp_top
  import vcop_pkg::*;
#(
  parameter int unsigned NCPU  = 2,
  parameter int unsigned VRMAX = 8,
  parameter int unsigned VLMAX = 4,
  parameter int unsigned SRMAX = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pcop_in_t        cop_i     [NCPU],
  output pcop_out_t       cop_o     [NCPU],
  input  logic [NCPU-1:0] barrier_mask,
  input  logic [NCPU-1:0] barrier,
  output logic [NCPU-1:0] hold,
  input  ahb_mo_t         cpu_ahb_o [NCPU],
  output ahb_mi_t         cpu_ahb_i [NCPU],
  output ahb_si_t         ahb_s_i,
  input  ahb_so_t         ahb_s_o
);

  localparam int unsigned NM = 2 * NCPU;

  ahb_mo_t m_o [NM];
  ahb_mi_t m_i [NM];

  // bus writes seen by the vector caches: every accepted write address phase
  // of a master other than the cache's own coprocessor
  logic [NCPU-1:0] snoop_v;
  logic            bus_wr;
  assign bus_wr = (ahb_s_i.htrans == HT_NONSEQ || ahb_s_i.htrans == HT_SEQ) &&
                  ahb_s_i.hwrite && ahb_s_o.hready;

  for (genvar i = 0; i < NCPU; i++) begin : g_cpu
    vcop #(.VRMAX(VRMAX), .VLMAX(VLMAX), .SRMAX(SRMAX), .COP_ID(1'b0)) u_vcop (
      .clk, .rst_n,
      .cop_i(cop_i[i]), .cop_o(cop_o[i]),
      .snoop_valid(snoop_v[i]), .snoop_addr(ahb_s_i.haddr),
      .ahb_o(m_o[2*i+1]), .ahb_i(m_i[2*i+1])
    );
    assign snoop_v[i]   = bus_wr && (ahb_s_i.hmaster != 4'(2*i+1));
    assign m_o[2*i]     = cpu_ahb_o[i];
    assign cpu_ahb_i[i] = m_i[2*i];
  end

  ahb_arbiter #(.NM(NM)) u_ahb (
    .clk, .rst_n, .m_o, .m_i, .s_i(ahb_s_i), .s_o(ahb_s_o)
  );

  barrier_ctrl #(.NCPU(NCPU)) u_barrier (
    .clk, .rst_n, .participate(barrier_mask), .barrier, .hold, .release_pulse()
  );

endmodule
