// tb_pic_system: end-to-end test of the hierarchy at reduced sizes (L1 8 rows
// x 16 lanes, L2 16 rows x 64 lanes, memory 8 rows x 256 lanes, counter
// ticks every 400 / 4000 cycles; latencies at their table values). A model
// kept here mirrors every level block by block. The test
//   * stores operands in all three levels (StorePIM) and runs every
//     operation in the L1, and additions / XOR in the L2 and in memory,
//     pushing further stores while computations run (operation chaining);
//   * reads results back and compares them with the model;
//   * fills a block from memory into the L1 and writes one back to the L2;
//   * waits for the retention counters: dirty L1 blocks must appear in their
//     L2 homes and dirty L2 blocks in their memory homes, clean blocks are
//     just dropped, and expired blocks read as misses;
//   * fills the command queue to stall the processor.
// Each of these mechanisms is counted and must occur at least once; every
// computation's latency, seen from the level, is checked against the table.
module tb_pic_system;
  import pic_pkg::*;
  localparam int L1B = 8, L2B = 64, MEMB = 128;          // blocks per level
  localparam int BPR [3] = '{1, 4, 16};
  localparam int RD [3] = '{1, 2, 32}, WR [3] = '{2, 4, 56}, ADDL [3] = '{15, 16, 97};
  localparam int L1_TICK = 400, L2_TICK = 4000;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic cmd_valid, cmd_ready, done, rsp_valid, rsp_hit, busy;
  pic_cmd_t cmd;
  logic [511:0] rsp_data;
  logic [1:0] expiring;

  pic_system #(
    .L1_ROWS(8), .L1_TICK(L1_TICK), .L2_ROWS(16), .L2_TICK(L2_TICK), .MEM_ROWS(8)
  ) dut (.*);

  // ---- reference model
  logic [511:0] m [3][int];
  logic         m_valid [2][int];

  function automatic logic [511:0] blk_op(pic_op_e op, logic [511:0] x, logic [511:0] y);
    logic [511:0] r;
    for (int k = 0; k < 16; k++) begin
      logic [31:0] p, q;
      p = x[k*32 +: 32]; q = y[k*32 +: 32];
      unique case (op)
        OP_AND: r[k*32 +: 32] = p & q;     OP_NAND: r[k*32 +: 32] = ~(p & q);
        OP_OR:  r[k*32 +: 32] = p | q;     OP_NOR:  r[k*32 +: 32] = ~(p | q);
        OP_XOR: r[k*32 +: 32] = p ^ q;     default: r[k*32 +: 32] = p + q;
      endcase
    end
    return r;
  endfunction

  // ---- mechanism counters
  int n_store = 0, n_load = 0, n_compute [3] = '{0, 0, 0}, n_add = 0, n_logic = 0;
  int n_fill = 0, n_wb_move = 0, n_exp_wb [2] = '{0, 0}, n_exp_clean = 0, n_miss = 0;
  int n_exp_ack = 0, n_stall = 0, n_chained = 0, n_done = 0;
  logic [511:0] rsps [$];
  logic         rsp_hits [$];

  always @(negedge clk) if (rst_n) begin
    if (done) n_done++;
    if (rsp_valid) begin rsps.push_back(rsp_data); rsp_hits.push_back(rsp_hit); end
    if (cmd_valid && !cmd_ready) n_stall++;
    if (cmd_valid && cmd_ready && dut.u_ctrl.st_q != 0 && dut.u_ctrl.job_q.kind == CMD_COMPUTE) n_chained++;
    for (int l = 0; l < 2; l++) begin
      if (dut.u_ctrl.exp_ack[l]) n_exp_ack++;
      if (dut.lvl_valid[l+1] && dut.lvl_ready[l+1] && dut.u_ctrl.job_q.is_exp && dut.u_ctrl.st_q == 3) n_exp_wb[l]++;
    end
    n_exp_clean = n_exp_ack - n_exp_wb[0] - n_exp_wb[1];
  end

  // latency of every level access, from acceptance to done
  int lat_start [3];
  pic_op_e lat_op [3];
  for (genvar l = 0; l < 3; l++) begin : g_lat
    always @(negedge clk) if (rst_n) begin
      if (dut.lvl_valid[l] && dut.lvl_ready[l]) begin lat_start[l] = 0; lat_op[l] = dut.lvl_op; end
      else lat_start[l]++;
      if (dut.lvl_done[l]) begin
        int exp_lat;
        exp_lat = (lat_op[l] == OP_READ) ? RD[l] : (lat_op[l] == OP_WRITE) ? WR[l] :
                  (lat_op[l] == OP_ADD) ? ADDL[l] : RD[l] + WR[l];
        checks++;
        if (lat_start[l] != exp_lat) begin
          failures++;
          $display("FAIL level %0d %s latency %0d expected %0d", l, lat_op[l].name(), lat_start[l], exp_lat);
        end
      end
    end
  end

  task automatic push(input pic_cmd_t c);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask

  function automatic pic_cmd_t mk(cmd_kind_e k, pic_op_e op, level_e lv, level_e src,
                                  int a, int b, int d, int home, logic [511:0] data);
    pic_cmd_t c;
    c.kind = k; c.op = op; c.level = lv; c.src_level = src;
    c.addr_a = BADDR_W'(a); c.addr_b = BADDR_W'(b); c.addr_d = BADDR_W'(d); c.home = BADDR_W'(home);
    c.data = data;
    return c;
  endfunction

  function automatic logic [511:0] rnd_blk();
    logic [511:0] r;
    for (int k = 0; k < 16; k++) r[k*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic store(level_e l, int a, int home);
    logic [511:0] d;
    d = rnd_blk();
    push(mk(CMD_STORE, OP_READ, l, l, 0, 0, a, home, d));
    m[l][a] = d;
    if (l != LVL_MEM) m_valid[l][a] = 1'b1;
    n_store++;
  endtask

  // row-wide computation: rows named by block addresses
  task automatic compute(level_e l, pic_op_e op, int a, int b, int d, int home);
    int bpr;
    bpr = BPR[l];
    push(mk(CMD_COMPUTE, op, l, l, a, b, d, home, '0));
    for (int i = 0; i < bpr; i++) begin
      m[l][(d/bpr)*bpr + i] = blk_op(op, m[l][(a/bpr)*bpr + i], m[l][(b/bpr)*bpr + i]);
      if (l != LVL_MEM) m_valid[l][(d/bpr)*bpr + i] = 1'b1;
    end
    n_compute[l]++;
    if (op == OP_ADD) n_add++; else n_logic++;
  endtask

  task automatic load_check(level_e l, int a, logic exp_hit, string what);
    push(mk(CMD_LOAD, OP_READ, l, l, a, 0, 0, 0, '0));
    while (busy) @(negedge clk);
    @(negedge clk);
    n_load++;
    checks++;
    if (rsps.size() == 0) begin failures++; $display("FAIL %s: no response", what); return; end
    begin
      logic [511:0] got;
      logic hit;
      got = rsps.pop_front(); hit = rsp_hits.pop_front();
      if (!hit) n_miss++;
      if (hit != exp_hit || (exp_hit && got != m[l][a])) begin
        failures++; $display("FAIL %s: level %0d block %0d hit %b", what, l, a, hit);
      end
    end
  endtask

  initial begin
    pic_op_e lops [6] = '{OP_AND, OP_NAND, OP_OR, OP_NOR, OP_XOR, OP_ADD};
    cmd_valid = 0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // L1: operands in blocks 0..1 (home L2 blocks 32, 33), every operation
    store(LVL_L1, 0, 32); store(LVL_L1, 1, 33);
    for (int k = 0; k < 6; k++) begin
      compute(LVL_L1, lops[k], 0, 1, 2 + (k % 3), 34 + (k % 3));
      store(LVL_L1, 5, 37);           // chained: next operand while the PiC works
    end
    for (int b = 0; b < 6; b++) load_check(LVL_L1, b, 1'b1, "L1 result");
    // L2: rows 0 and 1 (blocks 0..7, homes 64..71 in memory) -> row 2
    for (int b = 0; b < 8; b++) store(LVL_L2, b, 64 + b);
    compute(LVL_L2, OP_ADD, 0, 4, 8, 72);
    compute(LVL_L2, OP_XOR, 0, 4, 12, 76);
    store(LVL_L2, 16, 80);
    for (int b = 8; b < 16; b++) load_check(LVL_L2, b, 1'b1, "L2 result");
    // memory: rows 0 and 1 (blocks 0..31) -> rows 2, 3
    for (int b = 0; b < 32; b++) store(LVL_MEM, b, 0);
    compute(LVL_MEM, OP_ADD, 0, 16, 32, 0);
    compute(LVL_MEM, OP_XOR, 5, 21, 48, 0);
    for (int b = 32; b < 64; b += 5) load_check(LVL_MEM, b, 1'b1, "memory result");
    // data movement: fill memory block 40 into L1 block 6 (clean), write L1 block 2 back to L2 block 40
    push(mk(CMD_MOVE, OP_READ, LVL_L1, LVL_MEM, 40, 0, 6, 40, '0));
    m[LVL_L1][6] = m[LVL_MEM][40]; m_valid[LVL_L1][6] = 1'b1; n_fill++;
    push(mk(CMD_MOVE, OP_READ, LVL_L2, LVL_L1, 2, 0, 40, 96, '0));
    m[LVL_L2][40] = m[LVL_L1][2]; m_valid[LVL_L2][40] = 1'b1; n_wb_move++;
    load_check(LVL_L1, 6, 1'b1, "filled block");
    load_check(LVL_L2, 40, 1'b1, "written-back block");
    // queue full: a burst of stores into the memory level
    for (int i = 0; i < 12; i++) store(LVL_MEM, 100 + i, 0);
    while (busy) @(negedge clk);
    // retention: L1 blocks are dirty (home 32..37 in L2) except block 6 (clean fill)
    repeat (4 * L1_TICK) @(negedge clk);
    while (busy) @(negedge clk);
    for (int b = 0; b < 6; b++) if (b != 4) begin
      m[LVL_L2][32 + b] = m[LVL_L1][b]; m_valid[LVL_L2][32 + b] = 1'b1;
    end
    m[LVL_L2][37] = m[LVL_L1][5];
    for (int b = 0; b < 7; b++) load_check(LVL_L1, b, 1'b0, "expired L1 block misses");
    for (int b = 32; b < 38; b++) if (b != 36) load_check(LVL_L2, b, 1'b1, "L1 block written back to its home");
    // L2 expiry: stored blocks 0..7 go to memory 64..71, results 8..15 to 72..79
    repeat (4 * L2_TICK) @(negedge clk);
    while (busy) @(negedge clk);
    for (int b = 0; b < 16; b++) m[LVL_MEM][64 + b] = m[LVL_L2][b];
    for (int b = 64; b < 80; b += 3) load_check(LVL_MEM, b, 1'b1, "L2 block written back to memory");
    load_check(LVL_L2, 0, 1'b0, "expired L2 block misses");
    // mechanisms
    begin
      int cnt [string];
      cnt["store"] = n_store; cnt["load"] = n_load; cnt["L1 PiC"] = n_compute[0];
      cnt["L2 PiC"] = n_compute[1]; cnt["PiM"] = n_compute[2]; cnt["add"] = n_add;
      cnt["logical"] = n_logic; cnt["fill"] = n_fill; cnt["write-back move"] = n_wb_move;
      cnt["L1 expiry write-back"] = n_exp_wb[0]; cnt["L2 expiry write-back"] = n_exp_wb[1];
      cnt["clean expiry"] = n_exp_clean; cnt["miss"] = n_miss; cnt["queue stall"] = n_stall;
      cnt["chained command"] = n_chained; cnt["DONE"] = n_done;
      foreach (cnt[k]) begin
        $display("mechanism %-22s %0d", k, cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
      checks++;
      if (n_done != n_compute[0] + n_compute[1] + n_compute[2]) begin failures++; $display("FAIL DONE count"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
