// pic_level: one level of the PiC/PiM memory hierarchy.
//
// A level is a pic_subarray of ROWS rows of LANES 32-bit words plus, for the
// relaxed-retention cache levels (RELAXED = 1), per-block state: a valid bit,
// a dirty bit, the block's home address in the level below, and a
// block_monitor_counter driven by a shared retention_tick_gen. A write, a
// fill and a stored PiC result all restart the counters of the blocks they
// rewrite; a PiC result always rewrites whole blocks (LANES is a multiple of
// 16), which keeps one counter per block sufficient.
//
// Expiry: a scanner walks the blocks one per cycle. When it meets a block
// whose counter has raised expire it stops and presents the block on the
// exp_* port: exp_dirty tells the controller to write it back to exp_home
// in the level below first. exp_ack invalidates the block and the scan moves
// on. A full sweep takes BLOCKS cycles, which must be shorter than one tick
// period so every block is seen in the last counter state (512 and 16,384
// cycles against 37,500 and 5,000,000 at the defaults).
//
// The non-volatile memory level (RELAXED = 0) has no per-block state: every
// block reads as valid and nothing expires.
//
// Block addresses: block = row * BPR + column, BPR = LANES*32/512 blocks per
// row. Computations name rows by the block address of any block in them.
//
// What follows the published architecture: counters per block, reset on write, evict or write
// back on expiry, whole-block PiC results, latencies and sizes (defaults:
// L1 32 KB STT-RAM, 16 lanes, 75 us retention). The scanner, the home
// address register and the port protocol are this design's own: the published architecture
// takes the cache organisation (tags, replacement) from its simulator and
// does not describe it.
//
// Interface: as pic_subarray, with block addresses; req_dirty marks written
// blocks dirty (StorePIM, results) or clean (fills); req_home is recorded as
// the home of the written block (of the first block of a result row, the
// others following in order) unless req_keep_home is set, as it is for
// write-backs from the level above, and the block already holds valid data. rd_hit is the valid bit of the block read.
module pic_level
  import pic_pkg::*;
#(
  parameter int unsigned ROWS        = 512,
  parameter int unsigned LANES       = 16,
  parameter int unsigned READ_LAT    = 1,
  parameter int unsigned WRITE_LAT   = 2,
  parameter int unsigned ADD_LAT     = 15,
  parameter bit          RELAXED     = 1'b1,
  parameter int unsigned N_STATES    = 4,
  parameter int unsigned TICK_PERIOD = 37500,
  localparam int unsigned BPR        = LANES * WORD_W / BLOCK_BITS,
  localparam int unsigned BLOCKS     = ROWS * BPR
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  pic_op_e               req_op,
  input  logic [BADDR_W-1:0]    req_addr_a,
  input  logic [BADDR_W-1:0]    req_addr_b,
  input  logic [BADDR_W-1:0]    req_addr_d,
  input  logic [BADDR_W-1:0]    req_home,
  input  logic                  req_dirty,
  input  logic                  req_keep_home,
  input  logic [BLOCK_BITS-1:0] req_wdata,
  output logic                  done,
  output logic [BLOCK_BITS-1:0] rdata,
  output logic                  rd_hit,
  output logic                  exp_req,
  output logic [BADDR_W-1:0]    exp_addr,
  output logic [BADDR_W-1:0]    exp_home,
  output logic                  exp_dirty,
  input  logic                  exp_ack
);

  localparam int unsigned ROW_AW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned COL_AW = (BPR > 1) ? $clog2(BPR) : 1;
  localparam int unsigned BLK_AW = (BLOCKS > 1) ? $clog2(BLOCKS) : 1;

  function automatic logic [ROW_AW-1:0] row_of(logic [BADDR_W-1:0] a);
    return ROW_AW'(a / BPR);
  endfunction
  function automatic logic [COL_AW-1:0] col_of(logic [BADDR_W-1:0] a);
    return (BPR > 1) ? COL_AW'(a % BPR) : '0;
  endfunction

  // Request as seen by the block state: captured when the subarray accepts it
  pic_op_e            op_q;
  logic [BADDR_W-1:0] addr_a_q, addr_d_q, home_q;
  logic               dirty_q, keep_home_q;
  logic               accept;

  assign accept = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q     <= OP_READ;
      addr_a_q <= '0;
      addr_d_q <= '0;
      home_q   <= '0;
      dirty_q  <= 1'b0;
      keep_home_q <= 1'b0;
    end else if (accept) begin
      op_q     <= req_op;
      addr_a_q <= req_addr_a;
      addr_d_q <= req_addr_d;
      home_q   <= req_home;
      dirty_q  <= req_dirty;
      keep_home_q <= req_keep_home;
    end
  end

  pic_subarray #(
    .ROWS(ROWS), .LANES(LANES),
    .READ_LAT(READ_LAT), .WRITE_LAT(WRITE_LAT), .ADD_LAT(ADD_LAT)
  ) u_array (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_op,
    .req_row_a(row_of(req_addr_a)), .req_row_b(row_of(req_addr_b)),
    .req_row_d(row_of(req_addr_d)),
    .req_col  ((req_op == OP_WRITE) ? col_of(req_addr_d) : col_of(req_addr_a)),
    .req_wdata,
    .done, .rdata
  );

  if (RELAXED) begin : g_relaxed
    logic [BLOCKS-1:0]  valid_q, dirty_bits_q, wr_blk, expire;
    logic [BADDR_W-1:0] home_mem [BLOCKS];
    logic [BLK_AW-1:0]  scan_q;
    logic               tick;

    retention_tick_gen #(.PERIOD(TICK_PERIOD)) u_tick (.clk, .rst_n, .tick);

    // Blocks rewritten by the operation that completes in this cycle
    always_comb begin
      wr_blk = '0;
      if (done && op_q == OP_WRITE)
        wr_blk[BLK_AW'(addr_d_q)] = 1'b1;
      else if (done && op_q != OP_READ)
        for (int i = 0; i < BPR; i++)
          wr_blk[BLK_AW'(row_of(addr_d_q)) * BLK_AW'(BPR) + BLK_AW'(i)] = 1'b1;
    end

    for (genvar b = 0; b < BLOCKS; b++) begin : g_blk
      block_monitor_counter #(.N(N_STATES)) u_cnt (
        .clk, .rst_n, .tick, .clear(wr_blk[b]), .valid(valid_q[b]),
        .state(), .expire(expire[b])
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid_q      <= '0;
        dirty_bits_q <= '0;
        scan_q       <= '0;
      end else begin
        if (exp_ack) begin
          valid_q[scan_q]      <= 1'b0;
          dirty_bits_q[scan_q] <= 1'b0;
        end
        for (int b = 0; b < BLOCKS; b++)
          if (wr_blk[b]) begin
            valid_q[b]      <= 1'b1;
            dirty_bits_q[b] <= dirty_q;
          end
        if (!expire[scan_q] || exp_ack)
          scan_q <= (scan_q == BLK_AW'(BLOCKS - 1)) ? '0 : scan_q + 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (keep_home_q && valid_q[BLK_AW'(addr_d_q)]) begin
        // write-back from the level above into a valid block: it keeps its own home
      end else if (done && op_q == OP_WRITE)
        home_mem[BLK_AW'(addr_d_q)] <= home_q;
      else if (done && op_q != OP_READ)
        for (int i = 0; i < BPR; i++)
          home_mem[BLK_AW'(row_of(addr_d_q)) * BLK_AW'(BPR) + BLK_AW'(i)] <= home_q + BADDR_W'(i);
    end

    assign exp_req   = expire[scan_q];
    assign exp_addr  = BADDR_W'(scan_q);
    assign exp_home  = home_mem[scan_q];
    assign exp_dirty = dirty_bits_q[scan_q];
    assign rd_hit    = valid_q[BLK_AW'(addr_a_q)];

    a_ack_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) exp_ack |-> exp_req)
      else $error("exp_ack without an expiring block");
  end else begin : g_nonvolatile
    logic unused;
    assign unused    = ^{exp_ack, op_q, home_q, dirty_q, keep_home_q, addr_a_q, addr_d_q};
    assign exp_req   = 1'b0;
    assign exp_addr  = '0;
    assign exp_home  = '0;
    assign exp_dirty = 1'b0;
    assign rd_hit    = 1'b1;
  end

endmodule
