// ahb_arbiter: shared AHB (AMBA 2) bus for the processors' and coprocessors'
// bus controllers.
//
// NM masters share one slave port (the memory controller and the peripheral
// bridge hang behind it). Bus ownership is granted round-robin: the owner
// keeps the bus while it holds hbusreq, and ownership moves to the next
// requesting master only when the owner has dropped hbusreq and drives an
// IDLE address phase. The address and control of the owner are forwarded to
// the slave; write data is taken from the master that owned the previous
// address phase (the data-phase owner), as AHB pipelining requires. hready,
// hresp and hrdata go back to all masters. The arbitration policy is this
// design's choice; the document specifies only that all processors and
// coprocessors sit on a shared AHB.
module ahb_arbiter
  import vcop_pkg::*;
#(
  parameter int unsigned NM = 4,
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  ahb_mo_t m_o [NM],   // from the masters
  output ahb_mi_t m_i [NM],   // to the masters
  output ahb_si_t s_i,        // to the slave
  input  ahb_so_t s_o         // from the slave
);

  logic [MW-1:0] owner_q, downer_q, next_owner;
  logic          switch_ok;

  // round-robin search starting after the current owner
  always_comb begin
    next_owner = owner_q;
    for (int k = int'(NM) - 1; k >= 1; k--) begin
      logic [MW-1:0] idx;
      idx = MW'((int'(owner_q) + k) % int'(NM));
      if (m_o[idx].hbusreq) next_owner = idx;
    end
  end

  assign switch_ok = !m_o[owner_q].hbusreq && (m_o[owner_q].htrans == HT_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_q  <= '0;
      downer_q <= '0;
    end else if (s_o.hready) begin
      downer_q <= owner_q;
      if (switch_ok) owner_q <= next_owner;
    end
  end

  always_comb begin
    s_i.htrans  = m_o[owner_q].htrans;
    s_i.haddr   = m_o[owner_q].haddr;
    s_i.hwrite  = m_o[owner_q].hwrite;
    s_i.hsize   = m_o[owner_q].hsize;
    s_i.hwdata  = m_o[downer_q].hwdata;
    s_i.hmaster = 4'(owner_q);
    for (int k = 0; k < int'(NM); k++) begin
      m_i[k].hgrant = (owner_q == MW'(k));
      m_i[k].hready = s_o.hready;
      m_i[k].hresp  = s_o.hresp;
      m_i[k].hrdata = s_o.hrdata;
    end
  end

  // Only the granted master may start a transfer.
  for (genvar k = 0; k < NM; k++) begin : g_chk
    a_grant_only : assert property (@(posedge clk) disable iff (!rst_n)
      (m_o[k].htrans != HT_IDLE) |-> (owner_q == MW'(k)))
      else $error("master %0d started a transfer without grant", k);
  end

endmodule
