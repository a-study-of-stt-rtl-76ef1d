// pic_subarray: STT-RAM array with in-array computation.
//
// ROWS word-lines by LANES*32 bit-lines. The word-line decoder can raise two
// word-lines at once; every bit-line then carries the summed current of the
// two selected cells (stt_bitline), and two sense amplifiers per bit-line,
// one on the AND reference and one on the OR reference (mwl_sense_amp), turn
// it into AND/NAND and OR/NOR. The bit-line logic of each 32-bit lane
// (pic_lane) selects the requested operation, and the row-wide result is
// written back into one destination row with a single word-line. A row
// holds BLOCKS_PER_ROW cache blocks, so a computation always rewrites whole
// blocks.
//
// Regular accesses use the same circuits. A read raises the addressed
// word-line together with a reference word-line that holds '0' and takes the
// OR output; the bit-line decoder then picks the addressed block out of the
// row. A write drives one word-line and the bit-line decoder enables only the
// addressed block's columns.
//
// Timing (cycles from the accepting clock edge to the cycle where done is
// high, the write taking effect at the end of that cycle):
//   read           READ_LAT
//   write          WRITE_LAT
//   logical op     READ_LAT + WRITE_LAT
//   add            ADD_LAT  (READ_LAT + bit-serial add steps + WRITE_LAT)
// The defaults are the L1 STT-RAM numbers of the published latency table
// (read 1, write 2, logical 3, add 15). Sensing two word-lines, the reference
// '0' word-line for reads and the latencies follow the published architecture; the handshake,
// the phase sequencing and the one-array view of a level are this design's
// own.
//
// Interface: req_valid/req_ready handshake (ready only when idle); row
// addresses in rows, req_col selects the block within a row for reads and
// writes. done is a one-cycle pulse; rdata is valid with done for a read.
module pic_subarray
  import pic_pkg::*;
#(
  parameter int unsigned ROWS      = 512,
  parameter int unsigned LANES     = 16,
  parameter int unsigned READ_LAT  = 1,
  parameter int unsigned WRITE_LAT = 2,
  parameter int unsigned ADD_LAT   = 15,
  localparam int unsigned ROW_W    = LANES * WORD_W,
  localparam int unsigned BPR      = ROW_W / BLOCK_BITS,
  localparam int unsigned ROW_AW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned COL_AW   = (BPR > 1) ? $clog2(BPR) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  pic_op_e               req_op,
  input  logic [ROW_AW-1:0]     req_row_a,
  input  logic [ROW_AW-1:0]     req_row_b,
  input  logic [ROW_AW-1:0]     req_row_d,
  input  logic [COL_AW-1:0]     req_col,
  input  logic [BLOCK_BITS-1:0] req_wdata,
  output logic                  done,
  output logic [BLOCK_BITS-1:0] rdata
);

  localparam int unsigned ADD_STEPS = ADD_LAT - READ_LAT - WRITE_LAT;
  localparam int unsigned CNT_W     = $clog2(ADD_LAT + 1);

  typedef enum logic [1:0] {S_IDLE, S_SENSE, S_ADD, S_WRITE} state_e;

  logic [ROW_W-1:0] mem [ROWS];

  state_e                  state_q;
  logic [CNT_W-1:0]        cnt_q;
  pic_op_e                 op_q;
  logic [ROW_AW-1:0]       row_a_q, row_b_q, row_d_q;
  logic [COL_AW-1:0]       col_q;
  logic [BLOCK_BITS-1:0]   wdata_q;

  // ---- word-line decoder: two activated rows (second is the '0' reference on reads)
  logic [ROW_W-1:0] wl_a, wl_b;
  assign wl_a = mem[row_a_q];
  assign wl_b = (op_q == OP_READ) ? '0 : mem[row_b_q];

  // ---- bit-lines and sense amplifiers
  logic [ROW_W-1:0] s_and, s_nand, s_or, s_nor;
  logic [CUR_W-1:0] i_bl [ROW_W];
  stt_bitline #(.COLS(ROW_W)) u_bitlines (
    .bit_a(wl_a), .bit_b(wl_b), .wl_a(1'b1), .wl_b(1'b1), .i_bl(i_bl)
  );
  mwl_sense_amp #(.COLS(ROW_W)) u_sa_and (.i_bl(i_bl), .i_ref(I_REF_AND), .o(s_and), .o_n(s_nand));
  mwl_sense_amp #(.COLS(ROW_W)) u_sa_or  (.i_bl(i_bl), .i_ref(I_REF_OR),  .o(s_or),  .o_n(s_nor));

  // ---- bit-line logic, one 32-bit lane per word
  bl_sel_t          sel;
  logic [ROW_W-1:0] row_res;
  logic [LANES-1:0] lane_done;
  logic             add_start;
  assign sel = op_to_sel(op_q);
  assign add_start = (state_q == S_SENSE) && (cnt_q == CNT_W'(READ_LAT - 1)) && (op_q == OP_ADD);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic busy_unused;
    pic_lane #(.WIDTH(WORD_W), .ADD_STEPS(ADD_STEPS)) u_lane (
      .clk, .rst_n, .sel,
      .s_and (s_and [l*WORD_W +: WORD_W]), .s_nand(s_nand[l*WORD_W +: WORD_W]),
      .s_or  (s_or  [l*WORD_W +: WORD_W]), .s_nor (s_nor [l*WORD_W +: WORD_W]),
      .add_start(add_start), .add_busy(busy_unused), .add_done(lane_done[l]),
      .result(row_res[l*WORD_W +: WORD_W])
    );
  end

  // ---- bit-line decoder: block select for reads
  assign rdata = row_res[col_q*BLOCK_BITS +: BLOCK_BITS];

  // ---- sequencing
  assign req_ready = (state_q == S_IDLE);
  assign done = ((state_q == S_SENSE) && (op_q == OP_READ)  && (cnt_q == CNT_W'(READ_LAT - 1)))
             || ((state_q == S_WRITE) && (cnt_q == CNT_W'(WRITE_LAT - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      op_q    <= OP_READ;
      row_a_q <= '0;
      row_b_q <= '0;
      row_d_q <= '0;
      col_q   <= '0;
      wdata_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          op_q    <= req_op;
          row_a_q <= req_row_a;
          row_b_q <= req_row_b;
          row_d_q <= req_row_d;
          col_q   <= req_col;
          wdata_q <= req_wdata;
          cnt_q   <= '0;
          state_q <= (req_op == OP_WRITE) ? S_WRITE : S_SENSE;
        end
        S_SENSE: begin
          if (cnt_q == CNT_W'(READ_LAT - 1)) begin
            cnt_q   <= '0;
            state_q <= (op_q == OP_READ) ? S_IDLE : (op_q == OP_ADD) ? S_ADD : S_WRITE;
          end else cnt_q <= cnt_q + 1'b1;
        end
        S_ADD: begin
          if (&lane_done) state_q <= S_WRITE;
        end
        S_WRITE: begin
          if (cnt_q == CNT_W'(WRITE_LAT - 1)) begin
            cnt_q   <= '0;
            state_q <= S_IDLE;
          end else cnt_q <= cnt_q + 1'b1;
        end
      endcase
    end
  end

  // ---- array write port: one word-line, whole row for results, one block for writes
  always_ff @(posedge clk) begin
    if (state_q == S_WRITE && cnt_q == CNT_W'(WRITE_LAT - 1)) begin
      if (op_q == OP_WRITE) mem[row_d_q][col_q*BLOCK_BITS +: BLOCK_BITS] <= wdata_q;
      else                  mem[row_d_q] <= row_res;
    end
  end

endmodule
