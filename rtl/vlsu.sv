// vlsu: vector load/store unit of one coprocessor, with its AHB master bus
// controller.
//
// Executes VLDU and VSTU: move the first nbytes bytes (VLEN, at most one full
// register of VB bytes) between a vector register and memory starting at any
// byte address. The access is split into AHB single transfers: a word
// transfer wherever the current address is word aligned and at least four
// bytes remain, a byte transfer otherwise, so an unaligned vector costs at
// most three byte transfers at each end. The bus is big-endian (SPARC): the
// byte at address offset k of a word is on bits [31-8k -: 8]; byte data of a
// write is replicated on all four lanes.
//
// In the coprocessor this unit sits behind the vector cache (vcache), which
// uses it for aligned line fills and for write-through stores. The vector
// write buffers of the described memory pipe are not built. Transfers are not
// pipelined: each address phase is followed by its data phase before the
// next address phase.
//
// Interface and timing: start (one cycle, while busy is low) with is_store,
// addr, nbytes and, for a store, wdata. busy is high from the next cycle
// until done. done pulses for one cycle when the last data phase has ended;
// for a load, rdata holds bytes 0..nbytes-1 of the vector in that cycle
// (bytes above nbytes are zero). hresp errors are not reported.
module vlsu
  import vcop_pkg::*;
#(
  parameter int unsigned VLMAX = 4,
  localparam int unsigned VB   = 4 * VLMAX,
  localparam int unsigned NW   = $clog2(VB + 1)
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
  output ahb_mo_t            ahb_o,
  input  ahb_mi_t            ahb_i
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_ADDR, S_DATA, S_FIN} state_e;

  state_e             state_q;
  logic               store_q, word_q;
  logic [31:0]        ptr_q;           // address of the current transfer
  logic [NW-1:0]      off_q;           // vector byte index of the current transfer
  logic [NW-1:0]      rem_q;           // bytes still to move
  logic [VB-1:0][7:0] buf_q;

  // size of the next transfer
  logic               word_now;
  assign word_now = (ptr_q[1:0] == 2'b00) && (rem_q >= NW'(4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      store_q <= 1'b0;
      word_q  <= 1'b0;
      ptr_q   <= '0;
      off_q   <= '0;
      rem_q   <= '0;
      buf_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          store_q <= is_store;
          ptr_q   <= addr;
          off_q   <= '0;
          rem_q   <= (nbytes > NW'(VB)) ? NW'(VB) : nbytes;
          buf_q   <= is_store ? wdata : '0;
          state_q <= (nbytes == 0) ? S_FIN : S_REQ;
        end
        S_REQ:  if (ahb_i.hgrant) state_q <= S_ADDR;
        S_ADDR: if (ahb_i.hgrant && ahb_i.hready) begin
          word_q  <= word_now;
          state_q <= S_DATA;
        end
        S_DATA: if (ahb_i.hready) begin
          if (!store_q) begin
            if (word_q) begin
              for (int k = 0; k < 4; k++)
                buf_q[int'(off_q) + k] <= ahb_i.hrdata[31-8*k -: 8];
            end else begin
              buf_q[off_q] <= ahb_i.hrdata[31-8*int'(ptr_q[1:0]) -: 8];
            end
          end
          ptr_q   <= ptr_q + (word_q ? 32'd4 : 32'd1);
          off_q   <= off_q + (word_q ? NW'(4) : NW'(1));
          rem_q   <= rem_q - (word_q ? NW'(4) : NW'(1));
          state_q <= (rem_q == (word_q ? NW'(4) : NW'(1))) ? S_FIN : S_ADDR;
        end
        S_FIN:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // write data of the transfer in its data phase
  logic [31:0] wword;
  always_comb begin
    if (word_q) wword = {buf_q[off_q], buf_q[int'(off_q) + 1], buf_q[int'(off_q) + 2], buf_q[int'(off_q) + 3]};
    else        wword = {4{buf_q[off_q]}};
  end

  always_comb begin
    ahb_o.hbusreq = (state_q == S_REQ) || (state_q == S_ADDR) ||
                    (state_q == S_DATA && !(ahb_i.hready && rem_q == (word_q ? NW'(4) : NW'(1))));
    ahb_o.htrans  = (state_q == S_ADDR && ahb_i.hgrant) ? HT_NONSEQ : HT_IDLE;
    ahb_o.haddr   = ptr_q;
    ahb_o.hwrite  = store_q;
    ahb_o.hsize   = word_now ? HSIZE_WORD : HSIZE_BYTE;
    ahb_o.hwdata  = wword;
  end

  assign busy  = (state_q != S_IDLE);
  assign done  = (state_q == S_FIN);
  assign rdata = buf_q;

endmodule
