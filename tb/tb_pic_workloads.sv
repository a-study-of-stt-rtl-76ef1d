// tb_pic_workloads: small instances of the kernels the hierarchy is meant
// for, run through the processor command port of a reduced pic_system (same
// sizes as tb_pic_system). Each result is compared with the kernel computed
// directly here.
//   mat_add  16 x 16 matrix addition, one L2 ADD per 64 elements, and the
//            same in memory (one PiM ADD per 256 elements);
//   string   byte-wise comparison of two 256-letter strings with L1 XOR,
//            matching letters counted by the processor;
//   bnn      binarised dot products: L1 XOR of activations and weights,
//            population count and 32 - 2*count by the processor;
//   cmul     32-bit carry-less products in 16 lanes: the processor stores the
//            shifted, bit-gated partial products, the L1 accumulates them with
//            XOR (operation chaining: stores and XORs interleave in the
//            queue).
module tb_pic_workloads;
  import pic_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic cmd_valid, cmd_ready, done, rsp_valid, rsp_hit, busy;
  pic_cmd_t cmd;
  logic [511:0] rsp_data;
  logic [1:0] expiring;

  pic_system #(
    .L1_ROWS(8), .L1_TICK(100000), .L2_ROWS(16), .L2_TICK(100000), .MEM_ROWS(8)
  ) dut (.*);

  logic [511:0] rsps [$];
  int n_done = 0;
  always @(negedge clk) if (rst_n) begin
    if (rsp_valid) rsps.push_back(rsp_data);
    if (done) n_done++;
  end

  task automatic push(input pic_cmd_t c);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask

  function automatic pic_cmd_t mk(cmd_kind_e k, pic_op_e op, level_e lv, int a, int b, int d, logic [511:0] data);
    pic_cmd_t c;
    c = '0;
    c.kind = k; c.op = op; c.level = lv; c.src_level = lv;
    c.addr_a = BADDR_W'(a); c.addr_b = BADDR_W'(b); c.addr_d = BADDR_W'(d); c.home = BADDR_W'(d);
    c.data = data;
    return c;
  endfunction

  task automatic store(level_e l, int a, logic [511:0] d);
    push(mk(CMD_STORE, OP_READ, l, 0, 0, a, d));
  endtask

  task automatic load(level_e l, int a, output logic [511:0] d);
    push(mk(CMD_LOAD, OP_READ, l, a, 0, 0, '0));
    while (busy) @(negedge clk);
    @(negedge clk);
    d = (rsps.size() > 0) ? rsps.pop_front() : '0;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- mat_add: C = A + B, 256 elements, in a level with bpr blocks per row
  task automatic mat_add(level_e l, int bpr);
    logic [31:0] a [256], b [256];
    logic [511:0] blk;
    int rows;
    rows = 256 / (16 * bpr);
    for (int i = 0; i < 256; i++) begin a[i] = $urandom; b[i] = $urandom; end
    for (int i = 0; i < 16; i++) begin                      // A in rows 0.., B after it
      for (int k = 0; k < 16; k++) blk[k*32 +: 32] = a[i*16 + k];
      store(l, i, blk);
      for (int k = 0; k < 16; k++) blk[k*32 +: 32] = b[i*16 + k];
      store(l, 16 + i, blk);
    end
    for (int r = 0; r < rows; r++)
      push(mk(CMD_COMPUTE, OP_ADD, l, r * bpr, 16 + r * bpr, 32 + r * bpr, '0));
    for (int i = 0; i < 16; i++) begin
      logic ok;
      load(l, 32 + i, blk);
      ok = 1;
      for (int k = 0; k < 16; k++) if (blk[k*32 +: 32] != a[i*16 + k] + b[i*16 + k]) ok = 0;
      check(ok, $sformatf("mat_add level %0d block %0d", l, i));
    end
  endtask

  initial begin
    logic [511:0] blk, s1 [4], s2 [4];
    cmd_valid = 0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- mat_add in the L2 (4 blocks per row) and in memory (16 per row)
    mat_add(LVL_L2, 4);
    mat_add(LVL_MEM, 16);

    // ---- string: 256 letters, about one in four differs
    begin
      int match_ref, match_pic;
      match_ref = 0; match_pic = 0;
      for (int i = 0; i < 4; i++) begin
        for (int k = 0; k < 64; k++) begin
          s1[i][k*8 +: 8] = 8'(97 + $urandom_range(25));
          s2[i][k*8 +: 8] = ($urandom_range(3) == 0) ? 8'(97 + $urandom_range(25)) : s1[i][k*8 +: 8];
          if (s1[i][k*8 +: 8] == s2[i][k*8 +: 8]) match_ref++;
        end
      end
      for (int i = 0; i < 4; i++) begin
        store(LVL_L1, 0, s1[i]);
        store(LVL_L1, 1, s2[i]);
        push(mk(CMD_COMPUTE, OP_XOR, LVL_L1, 0, 1, 2, '0));
        load(LVL_L1, 2, blk);
        for (int k = 0; k < 64; k++) if (blk[k*8 +: 8] == 0) match_pic++;
      end
      check(match_pic == match_ref, $sformatf("string: %0d matching letters, expected %0d", match_pic, match_ref));
    end

    // ---- bnn: 16 binarised dot products of 32 inputs
    begin
      logic [511:0] act, wgt;
      logic ok;
      for (int k = 0; k < 16; k++) begin act[k*32 +: 32] = $urandom; wgt[k*32 +: 32] = $urandom; end
      store(LVL_L1, 3, act);
      store(LVL_L1, 4, wgt);
      push(mk(CMD_COMPUTE, OP_XOR, LVL_L1, 3, 4, 5, '0));
      load(LVL_L1, 5, blk);
      ok = 1;
      for (int k = 0; k < 16; k++) begin
        int dot_pic, dot_ref;
        dot_pic = 32 - 2 * $countones(blk[k*32 +: 32]);
        dot_ref = 0;
        for (int j = 0; j < 32; j++) dot_ref += (act[k*32 + j] == wgt[k*32 + j]) ? 1 : -1;
        if (dot_pic != dot_ref) ok = 0;
      end
      check(ok, "bnn dot products");
    end

    // ---- cmul: low 32 bits of 16 carry-less products
    begin
      logic [31:0] x [16], y [16];
      logic ok;
      int dones_before;
      for (int k = 0; k < 16; k++) begin x[k] = $urandom; y[k] = $urandom; end
      store(LVL_L1, 6, '0);                                   // accumulator
      dones_before = n_done;
      for (int i = 0; i < 32; i++) begin
        for (int k = 0; k < 16; k++) blk[k*32 +: 32] = y[k][i] ? (x[k] << i) : 32'h0;
        store(LVL_L1, 7, blk);                                // partial product i
        push(mk(CMD_COMPUTE, OP_XOR, LVL_L1, 6, 7, 6, '0));   // acc ^= partial
      end
      load(LVL_L1, 6, blk);
      ok = 1;
      for (int k = 0; k < 16; k++) begin
        logic [31:0] r;
        r = 0;
        for (int i = 0; i < 32; i++) if (y[k][i]) r ^= (x[k] << i);
        if (blk[k*32 +: 32] != r) ok = 0;
      end
      check(ok, "cmul products");
      check(n_done - dones_before == 32, "cmul: one DONE per accumulation");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
