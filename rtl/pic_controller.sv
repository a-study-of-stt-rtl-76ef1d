// pic_controller: PiC/PiM controller between the processor and the three
// levels of the hierarchy (L1 cache, L2 cache, main memory).
//
// Operation chaining: the processor does not wait for the in-memory units.
// It pushes commands into a queue of QDEPTH entries and carries on: StorePIM
// places an operand block in a level, Compute_Inst_PIM (CMD_COMPUTE) starts a
// row-wide PiC/PiM operation, and the controller answers each completed
// computation with a one-cycle DONE pulse. Loads return a block on the rsp_*
// port; CMD_MOVE copies one block between levels (a fill from below, or a
// write-back to below). Only a full queue stalls the processor (cmd_ready
// low). The compiler is responsible for ordering dependent operations, so no
// hazard checks are made: commands run one at a time in queue order.
//
// Retention: before taking a new command the controller serves the expiry
// port of the L1, then of the L2. A dirty expiring block is read and written
// into its home address in the level below (keeping that block's own home
// if it holds valid data there, else taking the same address as its home),
// then acknowledged, which invalidates it; a clean one is acknowledged at
// once. Write-backs and moves into a lower level mark the target dirty,
// fills into an upper level leave it clean.
//
// What follows the published architecture: the Compute/DONE handshake, StorePIM and
// Compute_Inst_PIM, concurrency between processor and PiC/PiM, write-back or
// eviction of expiring blocks. The queue, the command format, the priority
// of expiry handling and the move command are this design's own.
//
// Interface: cmd_valid/cmd_ready handshake; done and rsp_valid are
// one-cycle pulses. Level ports are arrays indexed by level_e; request
// fields are shared and qualified by the per-level lvl_valid.
module pic_controller
  import pic_pkg::*;
#(
  parameter int unsigned QDEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor side
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  pic_cmd_t              cmd,
  output logic                  done,
  output logic                  rsp_valid,
  output logic [BLOCK_BITS-1:0] rsp_data,
  output logic                  rsp_hit,
  output logic                  busy,
  output logic [$clog2(QDEPTH):0] queue_count,
  // level side
  output logic [2:0]            lvl_valid,
  input  logic [2:0]            lvl_ready,
  output pic_op_e               lvl_op,
  output logic [BADDR_W-1:0]    lvl_addr_a,
  output logic [BADDR_W-1:0]    lvl_addr_b,
  output logic [BADDR_W-1:0]    lvl_addr_d,
  output logic [BADDR_W-1:0]    lvl_home,
  output logic                  lvl_dirty,
  output logic                  lvl_keep_home,
  output logic [BLOCK_BITS-1:0] lvl_wdata,
  input  logic [2:0]            lvl_done,
  input  logic [BLOCK_BITS-1:0] lvl_rdata [3],
  input  logic [2:0]            lvl_hit,
  // expiry ports of the two relaxed-retention levels (0 = L1, 1 = L2)
  input  logic [1:0]            exp_req,
  input  logic [BADDR_W-1:0]    exp_addr [2],
  input  logic [BADDR_W-1:0]    exp_home [2],
  input  logic [1:0]            exp_dirty,
  output logic [1:0]            exp_ack
);

  typedef enum logic [2:0] {
    C_IDLE,     // choose expiry or next command
    C_ISSUE,    // present the request to the level until accepted
    C_WAIT,     // wait for the level's done
    C_ISSUE2,   // second half of a move / write-back: write the lower level
    C_WAIT2,
    C_ACK       // one cycle for the level to take the acknowledge
  } cstate_e;

  typedef struct packed {
    logic                  is_exp;    // serving an expiring block
    logic                  exp_l2;    // ... of the L2 (else L1)
    cmd_kind_e             kind;
    pic_op_e               op;
    level_e                lvl;       // level of the first access
    level_e                lvl2;      // level written by the second access
    logic [BADDR_W-1:0]    a, b, d, home;
    logic                  dirty2;    // dirty flag of the second access
    logic                  keep2;     // keep-home flag of the second access
  } job_t;

  cstate_e               st_q;
  job_t                  job_q;
  logic [BLOCK_BITS-1:0] buf_q;

  // ---- command queue
  pic_cmd_t q_data;
  logic     q_valid, q_pop;

  sync_fifo #(.T(pic_cmd_t), .DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid(cmd_valid), .in_ready(cmd_ready), .in_data(cmd),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_data), .count(queue_count)
  );

  assign q_pop = (st_q == C_IDLE) && !(|exp_req) && q_valid;
  assign busy  = q_valid || (st_q != C_IDLE);

  function automatic level_e below(level_e l);
    return (l == LVL_L1) ? LVL_L2 : LVL_MEM;
  endfunction

  // ---- request presented to the levels
  always_comb begin
    lvl_valid     = '0;
    lvl_op        = OP_READ;
    lvl_addr_a    = job_q.a;
    lvl_addr_b    = job_q.b;
    lvl_addr_d    = job_q.d;
    lvl_home      = job_q.home;
    lvl_dirty     = 1'b1;
    lvl_keep_home = 1'b0;
    lvl_wdata     = buf_q;
    if (st_q == C_ISSUE) begin
      lvl_valid[job_q.lvl] = 1'b1;
      unique case (job_q.kind)
        CMD_STORE:   lvl_op = OP_WRITE;
        CMD_COMPUTE: lvl_op = job_q.op;
        default:     lvl_op = OP_READ;   // load, first half of move / write-back
      endcase
    end else if (st_q == C_ISSUE2) begin
      lvl_valid[job_q.lvl2] = 1'b1;
      lvl_op        = OP_WRITE;
      lvl_dirty     = job_q.dirty2;
      lvl_keep_home = job_q.keep2;
    end
  end

  // ---- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= C_IDLE;
      job_q     <= '0;
      buf_q     <= '0;
      done      <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      rsp_hit   <= 1'b0;
      exp_ack   <= '0;
    end else begin
      done      <= 1'b0;
      rsp_valid <= 1'b0;
      exp_ack   <= '0;
      unique case (st_q)
        C_IDLE: begin
          if (|exp_req) begin
            // L1 first, then L2
            job_q        <= '0;
            job_q.is_exp <= 1'b1;
            job_q.exp_l2 <= !exp_req[0];
            job_q.kind   <= CMD_MOVE;
            if (exp_req[0]) begin
              job_q.lvl <= LVL_L1; job_q.lvl2 <= LVL_L2;
              job_q.a   <= exp_addr[0]; job_q.d <= exp_home[0]; job_q.home <= exp_home[0];
            end else begin
              job_q.lvl <= LVL_L2; job_q.lvl2 <= LVL_MEM;
              job_q.a   <= exp_addr[1]; job_q.d <= exp_home[1]; job_q.home <= exp_home[1];
            end
            job_q.dirty2 <= 1'b1;
            job_q.keep2  <= 1'b1;
            if (exp_req[0] ? exp_dirty[0] : exp_dirty[1]) st_q <= C_ISSUE;
            else begin                                     // clean: just drop it
              exp_ack <= exp_req[0] ? 2'b01 : 2'b10;
              st_q    <= C_ACK;
            end
          end else if (q_valid) begin
            job_q.is_exp <= 1'b0;
            job_q.exp_l2 <= 1'b0;
            job_q.kind   <= q_data.kind;
            job_q.op     <= q_data.op;
            job_q.a      <= q_data.addr_a;
            job_q.b      <= q_data.addr_b;
            job_q.d      <= q_data.addr_d;
            job_q.home   <= q_data.home;
            buf_q        <= q_data.data;
            if (q_data.kind == CMD_MOVE) begin
              job_q.lvl    <= q_data.src_level;
              job_q.lvl2   <= q_data.level;
              // moving down is a write-back (dirty, keeps home); moving up is a fill
              job_q.dirty2 <= (q_data.level > q_data.src_level);
              job_q.keep2  <= (q_data.level > q_data.src_level);
            end else begin
              job_q.lvl    <= q_data.level;
              job_q.lvl2   <= q_data.level;
              job_q.dirty2 <= 1'b1;
              job_q.keep2  <= 1'b0;
            end
            st_q <= C_ISSUE;
          end
        end
        C_ISSUE:  if (lvl_ready[job_q.lvl]) st_q <= C_WAIT;
        C_WAIT: if (lvl_done[job_q.lvl]) begin
          unique case (job_q.kind)
            CMD_LOAD: begin
              rsp_valid <= 1'b1;
              rsp_data  <= lvl_rdata[job_q.lvl];
              rsp_hit   <= lvl_hit[job_q.lvl];
              st_q      <= C_IDLE;
            end
            CMD_MOVE: begin
              buf_q <= lvl_rdata[job_q.lvl];
              st_q  <= C_ISSUE2;
            end
            CMD_COMPUTE: begin
              done <= 1'b1;
              st_q <= C_IDLE;
            end
            default: st_q <= C_IDLE;
          endcase
        end
        C_ISSUE2: if (lvl_ready[job_q.lvl2]) st_q <= C_WAIT2;
        C_WAIT2: if (lvl_done[job_q.lvl2]) begin
          if (job_q.is_exp) begin
            exp_ack <= job_q.exp_l2 ? 2'b10 : 2'b01;
            st_q    <= C_ACK;
          end else st_q <= C_IDLE;
        end
        default: st_q <= C_IDLE;
      endcase
    end
  end

  a_one_level: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lvl_valid));

endmodule
