// pic_system: STT-RAM memory hierarchy with processing in cache (PiC) in the
// L1 and L2 caches and processing in memory (PiM) in main memory.
//
// Three pic_level instances sit behind one pic_controller:
//   L1  32 KB relaxed-retention STT-RAM, 75 us retention, 16 parallel 32-bit
//       lanes (one 64 B block per row), read 1 / write 2 / add 15 cycles;
//   L2  1 MB relaxed-retention STT-RAM, 10 ms retention, 64 lanes (four
//       blocks per row), read 2 / write 4 / add 16 cycles;
//   MEM 512 MB non-volatile STT-RAM PiM region, 256 lanes (sixteen blocks
//       per row, the 256-computation memory configuration), read 32 /
//       write 56 / add 97 cycles.
// Logical operations take read + write cycles at every level. Counter clock
// periods are retention / 4 at a 2 GHz core clock: 37,500 cycles (18.75 us)
// for the L1 and 5,000,000 cycles (2.5 ms) for the L2.
//
// The processor itself is outside this module: its command port (StorePIM,
// Compute_Inst_PIM, load, move), the DONE pulse and the load response are
// the ports of the top. Sizes, latencies, lane counts and retention times
// follow the published tables; the choice of the 10 ms L2 and of the
// 256-lane memory among the configurations studied, the single-array view of
// each level and the command format are this design's own.
module pic_system
  import pic_pkg::*;
#(
  parameter int unsigned L1_ROWS     = 512,
  parameter int unsigned L1_LANES    = 16,
  parameter int unsigned L1_READ     = 1,
  parameter int unsigned L1_WRITE    = 2,
  parameter int unsigned L1_ADD      = 15,
  parameter int unsigned L1_TICK     = 37500,
  parameter int unsigned L2_ROWS     = 4096,
  parameter int unsigned L2_LANES    = 64,
  parameter int unsigned L2_READ     = 2,
  parameter int unsigned L2_WRITE    = 4,
  parameter int unsigned L2_ADD      = 16,
  parameter int unsigned L2_TICK     = 5000000,
  parameter int unsigned MEM_ROWS    = 524288,
  parameter int unsigned MEM_LANES   = 256,
  parameter int unsigned MEM_READ    = 32,
  parameter int unsigned MEM_WRITE   = 56,
  parameter int unsigned MEM_ADD     = 97,
  parameter int unsigned N_STATES    = 4,
  parameter int unsigned QDEPTH      = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  pic_cmd_t              cmd,
  output logic                  done,
  output logic                  rsp_valid,
  output logic [BLOCK_BITS-1:0] rsp_data,
  output logic                  rsp_hit,
  output logic                  busy,
  output logic [1:0]            expiring   // L2, L1 blocks waiting for eviction
);

  logic [2:0]            lvl_valid, lvl_ready, lvl_done, lvl_hit;
  pic_op_e               lvl_op;
  logic [BADDR_W-1:0]    lvl_addr_a, lvl_addr_b, lvl_addr_d, lvl_home;
  logic                  lvl_dirty, lvl_keep_home;
  logic [BLOCK_BITS-1:0] lvl_wdata;
  logic [BLOCK_BITS-1:0] lvl_rdata [3];
  logic [2:0]            exp_req_all, exp_dirty_all, exp_ack_all;
  logic [BADDR_W-1:0]    exp_addr_all [3];
  logic [BADDR_W-1:0]    exp_home_all [3];
  logic [$clog2(QDEPTH):0] queue_count;

  pic_controller #(.QDEPTH(QDEPTH)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .done, .rsp_valid, .rsp_data, .rsp_hit, .busy,
    .queue_count,
    .lvl_valid, .lvl_ready, .lvl_op, .lvl_addr_a, .lvl_addr_b, .lvl_addr_d,
    .lvl_home, .lvl_dirty, .lvl_keep_home, .lvl_wdata, .lvl_done, .lvl_rdata, .lvl_hit,
    .exp_req  (exp_req_all[1:0]),
    .exp_addr ('{exp_addr_all[0], exp_addr_all[1]}),
    .exp_home ('{exp_home_all[0], exp_home_all[1]}),
    .exp_dirty(exp_dirty_all[1:0]),
    .exp_ack  (exp_ack_all[1:0])
  );
  assign exp_ack_all[2] = 1'b0;
  assign expiring = exp_req_all[1:0];

  localparam int unsigned ROWS  [3] = '{L1_ROWS,  L2_ROWS,  MEM_ROWS};
  localparam int unsigned LANES [3] = '{L1_LANES, L2_LANES, MEM_LANES};
  localparam int unsigned RD    [3] = '{L1_READ,  L2_READ,  MEM_READ};
  localparam int unsigned WR    [3] = '{L1_WRITE, L2_WRITE, MEM_WRITE};
  localparam int unsigned ADD   [3] = '{L1_ADD,   L2_ADD,   MEM_ADD};
  localparam int unsigned TICK  [3] = '{L1_TICK,  L2_TICK,  1};

  for (genvar l = 0; l < 3; l++) begin : g_lvl
    pic_level #(
      .ROWS(ROWS[l]), .LANES(LANES[l]),
      .READ_LAT(RD[l]), .WRITE_LAT(WR[l]), .ADD_LAT(ADD[l]),
      .RELAXED(l < 2), .N_STATES(N_STATES), .TICK_PERIOD(TICK[l])
    ) u_level (
      .clk, .rst_n,
      .req_valid(lvl_valid[l]), .req_ready(lvl_ready[l]), .req_op(lvl_op),
      .req_addr_a(lvl_addr_a), .req_addr_b(lvl_addr_b), .req_addr_d(lvl_addr_d),
      .req_home(lvl_home), .req_dirty(lvl_dirty), .req_keep_home(lvl_keep_home),
      .req_wdata(lvl_wdata),
      .done(lvl_done[l]), .rdata(lvl_rdata[l]), .rd_hit(lvl_hit[l]),
      .exp_req(exp_req_all[l]), .exp_addr(exp_addr_all[l]), .exp_home(exp_home_all[l]),
      .exp_dirty(exp_dirty_all[l]), .exp_ack(exp_ack_all[l])
    );
  end

endmodule
