// pic_lane: one 32-bit compute lane of a PiC/PiM subarray.
//
// WIDTH bit-lines, each with its own bl_logic, sit side by side; the carry out
// of each column feeds the carry in of the next, so the lane is a ripple-carry
// adder. Logical operations (AND, NAND, OR, NOR, XOR, and the OR-based read)
// need no carry and are ready combinationally as soon as the sense amplifiers
// settle. ADD is bit-serial in chunks: the adder resolves BPC bits per cycle
// and keeps the carry in a register between cycles, so an addition occupies
// ADD_STEPS cycles, with BPC = ceil(WIDTH / ADD_STEPS). ADD_STEPS is the add
// latency of the memory level minus its read and write latency (its defaults
// come from the level), which is how the level meets its add latency; a level
// with more slack per read cycle adds more bits per cycle. The ripple-carry
// structure and the latencies follow the published architecture, the chunking is this design's
// way of meeting them.
//
// Interface: s_* are the sensed values of the column pairs, sel the bit-line
// selects. add_start (one cycle) begins an addition with the sensed values
// held stable; add_done pulses in the cycle the last step is taken and result
// is valid from the next cycle on. For other operations result follows the
// inputs combinationally.
module pic_lane
  import pic_pkg::*;
#(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned ADD_STEPS = 12   // L1 STT-RAM: 15 - 1 - 2 cycles
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bl_sel_t          sel,
  input  logic [WIDTH-1:0] s_and,
  input  logic [WIDTH-1:0] s_nand,
  input  logic [WIDTH-1:0] s_or,
  input  logic [WIDTH-1:0] s_nor,
  input  logic             add_start,
  output logic             add_busy,
  output logic             add_done,
  output logic [WIDTH-1:0] result
);

  localparam int unsigned BPC    = (WIDTH + ADD_STEPS - 1) / ADD_STEPS;
  localparam int unsigned STEP_W = (ADD_STEPS > 1) ? $clog2(ADD_STEPS) : 1;

  logic [WIDTH-1:0]  bitout, co, cin, sum_q;
  logic              carry_q;
  logic [STEP_W-1:0] step_q;

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    if (i == 0) begin : g_first
      assign cin[i] = 1'b0;
    end else if (i % BPC == 0) begin : g_chunk
      assign cin[i] = carry_q;
    end else begin : g_ripple
      assign cin[i] = co[i-1];
    end
    bl_logic u_bl (
      .s_and (s_and[i]), .s_nand(s_nand[i]), .s_or(s_or[i]), .s_nor(s_nor[i]),
      .cin   (cin[i]),   .sel   (sel),       .bitout(bitout[i]), .co(co[i])
    );
  end

  assign add_done = add_busy && (step_q == STEP_W'(ADD_STEPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      add_busy <= 1'b0;
      step_q   <= '0;
      carry_q  <= 1'b0;
      sum_q    <= '0;
    end else begin
      if (add_start && !add_busy) begin
        add_busy <= 1'b1;
        step_q   <= '0;
        carry_q  <= 1'b0;
      end else if (add_busy) begin
        for (int i = 0; i < WIDTH; i++)
          if (int'(step_q) == i / BPC) sum_q[i] <= bitout[i];
        if (int'(step_q) * BPC + BPC - 1 < WIDTH)
          carry_q <= co[int'(step_q) * BPC + BPC - 1];
        if (add_done) add_busy <= 1'b0;
        else          step_q   <= step_q + 1'b1;
      end
    end
  end

  assign result = sel.sum_sel ? sum_q : bitout;

endmodule
