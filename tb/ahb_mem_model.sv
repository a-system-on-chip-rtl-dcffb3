// ahb_mem_model: behavioural model of the memory side of the AHB: the SDRAM
// controller (an AHB slave) together with the SDRAM behind it. Not
// synthesizable logic, only a stand-in for the testbenches.
// Byte-addressed, big-endian (the byte at word offset k is on bits
// [31-8k -: 8]), byte/halfword/word transfers, and a random number of wait
// states (0..MAXWAIT) in every data phase. Contents start as a fixed pattern:
// byte at address x is x[7:0] ^ 8'h5A. Counts transfers and wait states.
module ahb_mem_model
  import vcop_pkg::*;
#(
  parameter int unsigned BYTES   = 4096,
  parameter int unsigned MAXWAIT = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  ahb_si_t s_i,
  output ahb_so_t s_o
);
  logic [7:0]  mem [BYTES];
  logic        dph;
  logic [31:0] daddr;
  logic        dwrite;
  logic [2:0]  dsize;
  int          wait_cnt;
  int          n_transfers = 0, n_waits = 0;

  initial for (int i = 0; i < int'(BYTES); i++) mem[i] = 8'(i) ^ 8'h5A;

  function automatic int unsigned idx(input logic [31:0] a);
    return int'(a % BYTES);
  endfunction

  assign s_o.hready = !dph || (wait_cnt == 0);
  assign s_o.hresp  = 2'b00;
  always_comb begin
    logic [31:0] w;
    w = {daddr[31:2], 2'b00};
    s_o.hrdata = {mem[idx(w)], mem[idx(w + 1)], mem[idx(w + 2)], mem[idx(w + 3)]};
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dph <= 0; wait_cnt <= 0; daddr <= 0; dwrite <= 0; dsize <= 0;
    end else begin
      if (dph && wait_cnt > 0) begin
        wait_cnt <= wait_cnt - 1;
        n_waits++;
      end else begin
        if (dph && dwrite) begin
          int k;
          k = int'(daddr[1:0]);
          if (dsize == HSIZE_BYTE) mem[idx(daddr)] = s_i.hwdata[31-8*k -: 8];
          else if (dsize == HSIZE_HALF) begin
            mem[idx(daddr)]     = s_i.hwdata[31-8*k -: 8];
            mem[idx(daddr + 1)] = s_i.hwdata[23-8*k -: 8];
          end else
            for (int j = 0; j < 4; j++) mem[idx({daddr[31:2], 2'b00} + 32'(j))] = s_i.hwdata[31-8*j -: 8];
        end
        if (s_i.htrans == HT_NONSEQ || s_i.htrans == HT_SEQ) begin
          dph      <= 1;
          daddr    <= s_i.haddr;
          dwrite   <= s_i.hwrite;
          dsize    <= s_i.hsize;
          wait_cnt <= int'($urandom % (MAXWAIT + 1));
          n_transfers++;
        end else begin
          dph <= 0;
        end
      end
    end
  end
endmodule
