// tb_pic_level: checks one relaxed-retention level (4 rows of 32 lanes, two
// blocks per row, counter tick every 40 cycles, L2 latencies 2/4/16) and one
// non-volatile level.
//   * reads report the valid bit; written and computed data read back;
//   * a PiC result marks both blocks of its row valid and dirty with
//     consecutive home addresses; a fill is clean; a write-back keeps the
//     home it had;
//   * every valid block is presented exactly once on the expiry port, not
//     earlier than two tick periods and not later than three tick periods
//     plus one scan after its last write, with the right home and dirty bit,
//     and reads as invalid after the acknowledge;
//   * the non-volatile level never expires and always hits.
module tb_pic_level;
  import pic_pkg::*;
  localparam int ROWS = 4, LANES = 32, BLOCKS = 8, TICK = 40;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cycle = 0;
  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  logic req_valid, req_ready, req_dirty, req_keep_home, done, rd_hit;
  pic_op_e req_op;
  logic [BADDR_W-1:0] req_addr_a, req_addr_b, req_addr_d, req_home;
  logic [511:0] req_wdata, rdata;
  logic exp_req, exp_dirty, exp_ack;
  logic [BADDR_W-1:0] exp_addr, exp_home;

  pic_level #(.ROWS(ROWS), .LANES(LANES), .READ_LAT(2), .WRITE_LAT(4), .ADD_LAT(16),
              .RELAXED(1'b1), .N_STATES(4), .TICK_PERIOD(TICK)) dut (.*);

  // non-volatile level on the same request bus, never selected for writes here
  logic nv_ready, nv_done, nv_hit, nv_exp_req, nv_exp_dirty, nv_valid;
  logic [511:0] nv_rdata;
  logic [BADDR_W-1:0] nv_exp_addr, nv_exp_home;
  pic_level #(.ROWS(ROWS), .LANES(LANES), .READ_LAT(32), .WRITE_LAT(56), .ADD_LAT(97),
              .RELAXED(1'b0)) dut_nv (
    .clk, .rst_n, .req_valid(nv_valid), .req_ready(nv_ready), .req_op, .req_addr_a, .req_addr_b,
    .req_addr_d, .req_home, .req_dirty, .req_keep_home, .req_wdata, .done(nv_done), .rdata(nv_rdata),
    .rd_hit(nv_hit), .exp_req(nv_exp_req), .exp_addr(nv_exp_addr), .exp_home(nv_exp_home),
    .exp_dirty(nv_exp_dirty), .exp_ack(1'b0));

  int last_write [BLOCKS];
  int exp_count [BLOCKS];
  int exp_home_seen [BLOCKS];
  logic exp_dirty_seen [BLOCKS];

  // expiry monitor: acknowledge every request, record what was presented
  always @(negedge clk) begin
    exp_ack <= 1'b0;
    if (rst_n && exp_req && !exp_ack) begin
      int b, age;
      b = int'(exp_addr);
      age = cycle - last_write[b];
      exp_count[b]++;
      exp_home_seen[b] = int'(exp_home);
      exp_dirty_seen[b] = exp_dirty;
      checks++;
      if (age < 2 * TICK || age > 3 * TICK + BLOCKS + 2) begin
        failures++; $display("FAIL block %0d expired %0d cycles after its write", b, age);
      end
      exp_ack <= 1'b1;
    end
  end
  always @(posedge clk) if (nv_exp_req) begin failures++; $display("FAIL non-volatile level expired"); end

  task automatic run(input pic_op_e op, input int a, input int b, input int d, input int home,
                     input logic dirty, input logic keep, input logic [511:0] wd,
                     output logic [511:0] rd, output logic hit);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_op = op; req_addr_a = BADDR_W'(a); req_addr_b = BADDR_W'(b);
    req_addr_d = BADDR_W'(d); req_home = BADDR_W'(home); req_dirty = dirty;
    req_keep_home = keep; req_wdata = wd;
    @(negedge clk); req_valid = 0;
    while (!done) @(negedge clk);
    rd = rdata; hit = rd_hit;
    if (op == OP_WRITE) last_write[d] = cycle;
    else if (op != OP_READ) begin last_write[(d/2)*2] = cycle; last_write[(d/2)*2+1] = cycle; end
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [511:0] blk [BLOCKS];

  initial begin
    logic [511:0] rd;
    logic hit;
    req_valid = 0; nv_valid = 0; req_op = OP_READ; req_addr_a = 0; req_addr_b = 0; req_addr_d = 0;
    req_home = 0; req_dirty = 0; req_keep_home = 0; req_wdata = 0;
    for (int b = 0; b < BLOCKS; b++) begin exp_count[b] = 0; last_write[b] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(OP_READ, 0, 0, 0, 0, 0, 0, '0, rd, hit);
    check(!hit, "empty level misses");
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < 16; k++) blk[b][k*32 +: 32] = $urandom;
      run(OP_WRITE, 0, 0, b, 100 + b, 1'b1, 1'b0, blk[b], rd, hit);
    end
    run(OP_READ, 3, 0, 0, 0, 0, 0, '0, rd, hit);
    check(hit && rd == blk[3], "written block reads back and hits");
    // row 0 (blocks 0,1) + row 1 (blocks 2,3) -> row 2 (blocks 4,5)
    run(OP_ADD, 0, 2, 4, 200, 1'b1, 1'b0, '0, rd, hit);
    for (int c = 0; c < 2; c++) begin
      logic [511:0] e;
      for (int k = 0; k < 16; k++) e[k*32 +: 32] = blk[c][k*32 +: 32] + blk[2+c][k*32 +: 32];
      run(OP_READ, 4 + c, 0, 0, 0, 0, 0, '0, rd, hit);
      check(hit && rd == e, "ADD result block");
    end
    run(OP_WRITE, 0, 0, 6, 300, 1'b0, 1'b0, blk[0], rd, hit);   // a clean fill
    run(OP_WRITE, 0, 0, 2, 999, 1'b1, 1'b1, blk[1], rd, hit);   // write-back keeps home 102
    // memory level: a write and a read, latencies 56 and 32
    @(negedge clk); while (!nv_ready) @(negedge clk);
    nv_valid = 1; req_op = OP_WRITE; req_addr_d = 5; req_wdata = blk[3];
    @(negedge clk); nv_valid = 0;
    begin int c; c = 1; while (!nv_done) begin @(negedge clk); c++; end check(c == 56, "memory write latency"); end
    @(negedge clk);
    nv_valid = 1; req_op = OP_READ; req_addr_a = 5;
    @(negedge clk); nv_valid = 0;
    begin int c; c = 1; while (!nv_done) begin @(negedge clk); c++; end check(c == 32, "memory read latency"); end
    check(nv_hit && nv_rdata == blk[3], "memory reads back, always valid");
    // let everything expire
    repeat (5 * TICK) @(negedge clk);
    for (int b = 0; b < BLOCKS; b++) begin
      check(exp_count[b] == ((b == 7) ? 0 : 1), $sformatf("block %0d expiry count %0d", b, exp_count[b]));
      run(OP_READ, b, 0, 0, 0, 0, 0, '0, rd, hit);
      check(!hit, $sformatf("block %0d invalid after expiry", b));
    end
    check(exp_home_seen[3] == 103 && exp_dirty_seen[3], "home/dirty of a stored block");
    check(exp_home_seen[4] == 200 && exp_home_seen[5] == 201 && exp_dirty_seen[5], "home/dirty of result blocks");
    check(exp_home_seen[6] == 300 && !exp_dirty_seen[6], "a fill is clean");
    check(exp_home_seen[2] == 102, "a write-back keeps the home");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
