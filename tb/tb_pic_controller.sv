// tb_pic_controller: checks the PiC/PiM controller against three simple
// level models kept here (block stores with a fixed 3-cycle latency that log
// every request). It checks that
//   * StorePIM, load, compute and move reach the right level with the right
//     operation, addresses and dirty/keep-home flags, in queue order;
//   * loads return the stored block, each compute gives one DONE pulse;
//   * the queue takes commands while the levels work and stalls the
//     processor (cmd_ready low) only when full;
//   * a dirty expiring L1 block is read and written to its home in the L2
//     before it is acknowledged, a clean expiring L2 block is acknowledged
//     without any access, and expiry is served before queued commands.
module tb_pic_controller;
  import pic_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic cmd_valid, cmd_ready, done, rsp_valid, rsp_hit, busy;
  pic_cmd_t cmd;
  logic [511:0] rsp_data;
  logic [3:0] queue_count;
  logic [2:0] lvl_valid, lvl_ready, lvl_done, lvl_hit;
  pic_op_e lvl_op;
  logic [BADDR_W-1:0] lvl_addr_a, lvl_addr_b, lvl_addr_d, lvl_home;
  logic lvl_dirty, lvl_keep_home;
  logic [511:0] lvl_wdata;
  logic [511:0] lvl_rdata [3];
  logic [1:0] exp_req, exp_dirty, exp_ack;
  logic [BADDR_W-1:0] exp_addr [2];
  logic [BADDR_W-1:0] exp_home [2];

  pic_controller #(.QDEPTH(8)) dut (.*);

  // ---- level models
  typedef struct {
    int lvl; pic_op_e op; int a, b, d, home; logic dirty, keep;
  } acc_t;
  acc_t log_q [$];
  logic [511:0] store [3][int];
  int busy_cnt [3];
  acc_t cur [3];

  for (genvar l = 0; l < 3; l++) begin : g_model
    assign lvl_ready[l] = (busy_cnt[l] == 0);
    assign lvl_done[l]  = (busy_cnt[l] == 1);
    assign lvl_hit[l]   = 1'b1;
    assign lvl_rdata[l] = store[l].exists(cur[l].a) ? store[l][cur[l].a] : '0;
    always @(posedge clk) begin
      if (busy_cnt[l] == 1 && cur[l].op == OP_WRITE) store[l][cur[l].d] = lvl_wdata_q[l];
      if (busy_cnt[l] > 0) busy_cnt[l] <= busy_cnt[l] - 1;
      if (lvl_valid[l] && lvl_ready[l]) begin
        acc_t x;
        x = '{l, lvl_op, int'(lvl_addr_a), int'(lvl_addr_b), int'(lvl_addr_d), int'(lvl_home), lvl_dirty, lvl_keep_home};
        cur[l] <= x;
        lvl_wdata_q[l] <= lvl_wdata;
        log_q.push_back(x);
        busy_cnt[l] <= 3;
      end
    end
  end
  logic [511:0] lvl_wdata_q [3];

  int dones = 0, stalls = 0;
  logic [511:0] rsps [$];
  always @(negedge clk) begin
    if (done) dones++;
    if (rsp_valid) rsps.push_back(rsp_data);
    if (cmd_valid && !cmd_ready) stalls++;
  end

  task automatic push(input pic_cmd_t c);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask

  function automatic pic_cmd_t mk(cmd_kind_e k, pic_op_e op, level_e lv, level_e src, int a, int b, int d, int home, logic [511:0] data);
    pic_cmd_t c;
    c.kind = k; c.op = op; c.level = lv; c.src_level = src;
    c.addr_a = BADDR_W'(a); c.addr_b = BADDR_W'(b); c.addr_d = BADDR_W'(d); c.home = BADDR_W'(home);
    c.data = data;
    return c;
  endfunction

  task automatic expect_acc(int lvl, pic_op_e op, int a, int d, logic dirty, logic keep, string what);
    acc_t x;
    checks++;
    if (log_q.size() == 0) begin failures++; $display("FAIL %s: no access", what); return; end
    x = log_q.pop_front();
    if (x.lvl != lvl || x.op != op || (op != OP_WRITE && x.a != a) || (op != OP_READ && x.d != d) ||
        (op == OP_WRITE && (x.dirty != dirty || x.keep != keep))) begin
      failures++;
      $display("FAIL %s: got lvl %0d %s a=%0d d=%0d dirty=%b keep=%b", what, x.lvl, x.op.name(), x.a, x.d, x.dirty, x.keep);
    end
  endtask

  initial begin
    logic [511:0] d0, d1;
    d0 = {16{$urandom}}; d1 = {16{$urandom}};
    cmd_valid = 0; cmd = '0; exp_req = 0; exp_dirty = 0;
    exp_addr = '{0, 0}; exp_home = '{0, 0};
    for (int l = 0; l < 3; l++) busy_cnt[l] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // operation-chained burst: stores, a compute, more stores, loads, moves
    push(mk(CMD_STORE,   OP_READ, LVL_L1,  LVL_L1, 0, 0, 10, 1000, d0));
    push(mk(CMD_STORE,   OP_READ, LVL_L1,  LVL_L1, 0, 0, 11, 1001, d1));
    push(mk(CMD_COMPUTE, OP_ADD,  LVL_L1,  LVL_L1, 10, 11, 12, 1002, '0));
    push(mk(CMD_STORE,   OP_READ, LVL_L2,  LVL_L2, 0, 0, 40, 2000, d1));
    push(mk(CMD_LOAD,    OP_READ, LVL_L1,  LVL_L1, 10, 0, 0, 0, '0));
    push(mk(CMD_MOVE,    OP_READ, LVL_L1,  LVL_L2, 40, 0, 13, 40, '0));   // fill L2 -> L1
    push(mk(CMD_MOVE,    OP_READ, LVL_MEM, LVL_L1, 11, 0, 77, 0, '0));    // write-back L1 -> MEM
    push(mk(CMD_COMPUTE, OP_XOR,  LVL_MEM, LVL_MEM, 77, 78, 79, 0, '0));
    push(mk(CMD_LOAD,    OP_READ, LVL_L1,  LVL_L1, 13, 0, 0, 0, '0));
    for (int i = 0; i < 10; i++) push(mk(CMD_STORE, OP_READ, LVL_L2, LVL_L2, 0, 0, 50 + i, 0, d0));
    checks++; if (stalls == 0) begin failures++; $display("FAIL queue never filled"); end
    while (busy) @(negedge clk);
    expect_acc(0, OP_WRITE, 0, 10, 1, 0, "store 1");
    expect_acc(0, OP_WRITE, 0, 11, 1, 0, "store 2");
    expect_acc(0, OP_ADD, 10, 12, 1, 0, "compute");
    expect_acc(1, OP_WRITE, 0, 40, 1, 0, "store L2");
    expect_acc(0, OP_READ, 10, 0, 0, 0, "load");
    expect_acc(1, OP_READ, 40, 0, 0, 0, "fill read");
    expect_acc(0, OP_WRITE, 0, 13, 0, 0, "fill write clean");
    expect_acc(0, OP_READ, 11, 0, 0, 0, "write-back read");
    expect_acc(2, OP_WRITE, 0, 77, 1, 1, "write-back write dirty keep-home");
    expect_acc(2, OP_XOR, 77, 79, 1, 0, "memory compute");
    expect_acc(0, OP_READ, 13, 0, 0, 0, "load 2");
    for (int i = 0; i < 10; i++) expect_acc(1, OP_WRITE, 0, 50 + i, 1, 0, "store burst");
    checks++; if (dones != 2) begin failures++; $display("FAIL %0d DONE pulses", dones); end
    checks++; if (rsps.size() != 2 || rsps[0] != d0 || rsps[1] != d1) begin failures++; $display("FAIL load responses"); end
    checks++; if (store[2][77] != d1) begin failures++; $display("FAIL written-back data"); end
    // expiry: dirty L1 block 12 (home 1002 in L2) and clean L2 block 40, with a command queued
    @(negedge clk);
    exp_req = 2'b11; exp_dirty = 2'b01; exp_addr = '{12, 40}; exp_home = '{1002, 2000};
    cmd_valid = 1; cmd = mk(CMD_LOAD, OP_READ, LVL_L2, LVL_L2, 40, 0, 0, 0, '0);
    @(negedge clk); cmd_valid = 0;
    begin
      int guard = 0;
      while (exp_req != 0 && guard < 100) begin
        @(posedge clk); #1;
        if (exp_ack[0]) exp_req[0] = 0;
        if (exp_ack[1]) begin exp_req[1] = 0; checks++; if (exp_req[0]) begin failures++; $display("FAIL L2 before L1"); end end
        guard++;
      end
    end
    while (busy) @(negedge clk);
    expect_acc(0, OP_READ, 12, 0, 0, 0, "expiry read of L1 block");
    expect_acc(1, OP_WRITE, 0, 1002, 1, 1, "expiry write-back to home in L2");
    expect_acc(1, OP_READ, 40, 0, 0, 0, "queued load after expiry");
    checks++; if (log_q.size() != 0) begin failures++; $display("FAIL extra accesses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
