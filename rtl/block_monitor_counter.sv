// block_monitor_counter: retention-time monitor of one relaxed-retention
// STT-RAM cache block.
//
// An N-state counter (N = 4 gives two bits per block) restarts in state 0
// whenever the block is written, whether by a regular write, a fill or a
// stored PiC result, and steps up once per tick of the shared counter clock
// while the block holds data. When it reaches its last state the retention
// time is about to run out and expire is raised, so that the block is written
// back (if dirty) or dropped before its cells lose the data. The counter holds
// in the last state. With the tick period set to retention / N, expire rises
// between (N-2) and (N-1) tick periods after the last write, always before
// the retention time has elapsed. The state count, the reset on write and the
// expiry flag follow the published architecture; saturating in the last state and counting only
// while the block is valid are this design's choices.
//
// Interface: clear (block written) wins over tick; expire is registered state
// decoded combinationally.
module block_monitor_counter #(
  parameter int unsigned N = 4,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         clear,
  input  logic         valid,
  output logic [W-1:0] state,
  output logic         expire
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  state <= '0;
    else if (clear)                              state <= '0;
    else if (tick && valid && state != W'(N - 1)) state <= state + 1'b1;
  end

  assign expire = valid && (state == W'(N - 1));

endmodule
