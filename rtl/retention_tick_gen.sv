// retention_tick_gen: clock for the block monitor counters.
//
// Divides the core clock into a one-cycle tick every PERIOD cycles. The
// default, 37,500 cycles, is the 18.75 us counter clock period given for the
// design at a 2 GHz core clock; with four counter states this covers the
// 75 us L1 retention time. Producing the counter clock as an enable from the
// core clock is this design's choice.
//
// Interface: tick is high for one core-clock cycle every PERIOD cycles,
// the first one PERIOD cycles after reset.
module retention_tick_gen #(
  parameter int unsigned PERIOD = 37500,
  localparam int unsigned W = (PERIOD > 1) ? $clog2(PERIOD) : 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  logic [W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      tick  <= 1'b0;
    end else begin
      tick <= (cnt_q == W'(PERIOD - 1));
      if (cnt_q == W'(PERIOD - 1)) cnt_q <= '0;
      else                         cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
