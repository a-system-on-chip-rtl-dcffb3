// barrier_ctrl: hardware barrier for the N processor/coprocessor pairs.
//
// Replaces barrier synchronisation through atomic instructions. Processor i
// signals its arrival at a barrier with a one-cycle pulse on barrier[i]; from
// that cycle on hold[i] is high and stalls it, until the last processor
// arrives. In the cycle the last arrival is seen, no processor is held and
// the arrival flags are cleared, so all of them leave the barrier together
// and the next barrier can start at once. A processor that is not
// participating (participate[i] low) is neither waited for nor held.
// The Barrier/Hold pair per processor is that of the multiprocessor block
// diagram; pulse signalling, the participation mask and the release rule are
// this design's choices, since only the signal names are specified.
module barrier_ctrl #(
  parameter int unsigned NCPU = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NCPU-1:0] participate,
  input  logic [NCPU-1:0] barrier,
  output logic [NCPU-1:0] hold,
  output logic            release_pulse
);

  logic [NCPU-1:0] arrived_q, arrived_now;

  assign arrived_now   = (arrived_q | barrier) & participate;
  assign release_pulse = (arrived_now == participate) && (|arrived_now);
  assign hold          = release_pulse ? '0 : arrived_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             arrived_q <= '0;
    else if (release_pulse) arrived_q <= '0;
    else                    arrived_q <= arrived_now;
  end

endmodule
