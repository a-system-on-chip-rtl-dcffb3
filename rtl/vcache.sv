// vcache: vector data cache of the coprocessor's memory pipe.
//
// Sits between the coprocessor and its bus controller (vlsu) and has the same
// start/busy/done interface as vlsu, so the coprocessor sees one memory port.
// Lines are one vector register wide (VB bytes). An unaligned vector of up to
// VB bytes touches at most two consecutive lines; the address logic forms
// both line addresses, each line is looked up in the WAYS ways of its set
// (way select), and the requested bytes are assembled from the two lines
// (block merge).
//   load:  each missing line is fetched from the bus as one aligned VB-byte
//          access and written into the least recently used way of its set.
//   store: write-through without allocation. Bytes of lines that are present
//          are updated, and the store goes to the bus unchanged.
//   snoop: a write on the bus by any other master (snoop_valid with its
//          address) invalidates the line holding that address, so the cache
//          stays coherent with the other processors and coprocessors.
// Timing: done comes 2 cycles after start for a load that hits in one line,
// 3 cycles for one that spans two lines and hits in both (one look-up per
// line, then the merged data); every miss adds one line fetch.
// A store takes as long as its bus transfers. busy is high from the cycle
// after start up to and including the done cycle.
//
// The cache, its way select and block merge follow the block structure of the
// vector memory pipe; its size, associativity, line size, write-through
// policy, LRU replacement and snooping are this design's choices, as none of
// them is specified. The vector write buffers of that memory pipe are not
// built: a store holds the coprocessor until it has reached memory.
module vcache
  import vcop_pkg::*;
#(
  parameter int unsigned VLMAX = 4,
  parameter int unsigned SETS  = 32,
  parameter int unsigned WAYS  = 2,
  localparam int unsigned VB   = 4 * VLMAX,
  localparam int unsigned NW   = $clog2(VB + 1),
  localparam int unsigned LB   = $clog2(VB),
  localparam int unsigned SB   = $clog2(SETS),
  localparam int unsigned TW   = 32 - LB - SB,
  localparam int unsigned WW   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               is_store,
  input  logic [31:0]        addr,
  input  logic [NW-1:0]      nbytes,
  input  logic [VB-1:0][7:0] wdata,
  output logic               busy,
  output logic               done,
  output logic [VB-1:0][7:0] rdata,
  input  logic               snoop_valid,
  input  logic [31:0]        snoop_addr,
  output logic               hit,        // one-cycle pulse per line found in the cache
  output logic               miss,       // one-cycle pulse per line fetched
  output ahb_mo_t            ahb_o,
  input  ahb_mi_t            ahb_i
);

  typedef logic [VB-1:0][7:0] line_t;
  typedef enum logic [2:0] {C_IDLE, C_LOOK, C_FILL, C_WAIT, C_STORE, C_FIN} cstate_e;

  line_t           data_q  [SETS][WAYS];
  logic [TW-1:0]   tag_q   [SETS][WAYS];
  logic [WAYS-1:0] valid_q [SETS];
  logic [WW-1:0]   lru_q   [SETS];        // way to replace next

  cstate_e         st_q;
  logic [31:0]     addr_q;
  logic [NW-1:0]   n_q;
  line_t           wdata_q;
  logic            p_q;                   // which of the two lines is being handled
  line_t           lbuf_q [2];

  // ---------------------------------------------------- address update logic
  logic [31-LB:0] line0, line_p, sline;
  logic [31:0]    line1;
  logic [NW-1:0]  nlen;
  always_comb begin
    nlen   = (n_q > NW'(VB)) ? NW'(VB) : n_q;
    line0  = addr_q[31:LB];
    line1  = (32'(addr_q) + 32'(nlen) - 32'd1) >> LB;
    line_p = p_q ? line1[31-LB:0] : line0;
    sline  = snoop_addr[31:LB];
  end

  function automatic logic [SB-1:0] set_of(input logic [31-LB:0] l);
    return l[SB-1:0];
  endfunction
  function automatic logic [TW-1:0] tag_of(input logic [31-LB:0] l);
    return l[31-LB:SB];
  endfunction

  // ------------------------------------------------------------- way select
  logic          hit_p;
  logic [WW-1:0] way_p;
  always_comb begin
    hit_p = 1'b0;
    way_p = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (valid_q[set_of(line_p)][w] && tag_q[set_of(line_p)][w] == tag_of(line_p)) begin
        hit_p = 1'b1;
        way_p = WW'(w);
      end
  end

  // ------------------------------------------------------------ bus access
  logic  lsu_start, lsu_store, lsu_busy, lsu_done;
  logic [31:0]   lsu_addr;
  logic [NW-1:0] lsu_n;
  line_t lsu_rdata;

  assign lsu_start = (st_q == C_FILL) || (st_q == C_IDLE && start && is_store);
  assign lsu_store = (st_q == C_IDLE);
  assign lsu_addr  = (st_q == C_IDLE) ? addr : {line_p, {LB{1'b0}}};
  assign lsu_n     = (st_q == C_IDLE) ? nbytes : NW'(VB);

  vlsu #(.VLMAX(VLMAX)) u_bus (
    .clk, .rst_n, .start(lsu_start), .is_store(lsu_store), .addr(lsu_addr), .nbytes(lsu_n),
    .wdata(wdata), .busy(lsu_busy), .done(lsu_done), .rdata(lsu_rdata), .ahb_o, .ahb_i
  );

  // ------------------------------------------------------------ controller
  logic last_p;
  assign last_p = p_q || (line1[31-LB:0] == line0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= C_IDLE;
      addr_q  <= '0;
      n_q     <= '0;
      wdata_q <= '0;
      p_q     <= 1'b0;
      lbuf_q  <= '{default: '0};
      for (int s = 0; s < int'(SETS); s++) begin
        valid_q[s] <= '0;
        lru_q[s]   <= '0;
        for (int w = 0; w < int'(WAYS); w++) begin
          tag_q[s][w]  <= '0;
          data_q[s][w] <= '0;
        end
      end
    end else begin
      unique case (st_q)
        C_IDLE: if (start) begin
          addr_q  <= addr;
          n_q     <= nbytes;
          wdata_q <= wdata;
          p_q     <= 1'b0;
          if (nbytes == 0)   st_q <= C_FIN;
          else if (is_store) st_q <= C_STORE;
          else               st_q <= C_LOOK;
        end
        C_LOOK: begin
          if (hit_p) begin
            lbuf_q[p_q] <= data_q[set_of(line_p)][way_p];
            if (WAYS > 1) lru_q[set_of(line_p)] <= WW'(way_p + 1'b1);
            if (last_p) st_q <= C_FIN;
            else        p_q  <= 1'b1;
          end else begin
            st_q <= C_FILL;
          end
        end
        C_FILL: st_q <= C_WAIT;
        C_WAIT: if (lsu_done) begin
          data_q[set_of(line_p)][lru_q[set_of(line_p)]]  <= lsu_rdata;
          tag_q[set_of(line_p)][lru_q[set_of(line_p)]]   <= tag_of(line_p);
          valid_q[set_of(line_p)][lru_q[set_of(line_p)]] <= 1'b1;
          if (WAYS > 1) lru_q[set_of(line_p)] <= WW'(lru_q[set_of(line_p)] + 1'b1);
          st_q <= C_LOOK;                 // look up again: now a hit
        end
        C_STORE: if (lsu_done) st_q <= C_FIN;   // the bus transfer runs in vlsu
        C_FIN:  st_q <= C_IDLE;
        default: st_q <= C_IDLE;
      endcase

      // store update of present lines (both lines, in the first store cycle)
      if (st_q == C_STORE && !p_q) begin
        p_q <= 1'b1;
        for (int i = 0; i < int'(VB); i++) begin
          logic [31:0]    ab;
          logic [31-LB:0] l;
          ab = addr_q + 32'(i);
          l  = ab[31:LB];
          if (i < int'(nlen))
            for (int w = 0; w < int'(WAYS); w++)
              if (valid_q[set_of(l)][w] && tag_q[set_of(l)][w] == tag_of(l))
                data_q[set_of(l)][w][ab[LB-1:0]] <= wdata_q[i];
        end
      end

      // snooped writes of other masters invalidate the line
      if (snoop_valid)
        for (int w = 0; w < int'(WAYS); w++)
          if (tag_q[set_of(sline)][w] == tag_of(sline)) valid_q[set_of(sline)][w] <= 1'b0;
    end
  end

  // ----------------------------------------------------------- block merge
  always_comb begin
    for (int i = 0; i < int'(VB); i++) begin
      int off;
      off = int'(addr_q[LB-1:0]) + i;
      if (i >= int'(nlen) || st_q != C_FIN) rdata[i] = 8'h00;
      else if (off < int'(VB)) rdata[i] = lbuf_q[0][off];
      else                     rdata[i] = lbuf_q[1][off - int'(VB)];
    end
  end

  assign busy = (st_q != C_IDLE);
  assign done = (st_q == C_FIN);
  assign hit  = (st_q == C_LOOK) && hit_p;
  assign miss = (st_q == C_FILL);

endmodule
