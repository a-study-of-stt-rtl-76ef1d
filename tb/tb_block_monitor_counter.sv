// tb_block_monitor_counter: checks the retention monitor of one block: it
// counts ticks only while valid, raises expire after N-1 ticks, holds there,
// and restarts on a write (clear), also when clear and tick coincide.
module tb_block_monitor_counter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, tick = 0, clear = 0, valid = 0;
  logic [1:0] state;
  logic expire;
  int checks = 0, failures = 0;

  block_monitor_counter #(.N(N)) dut (.*);

  always #5 clk = !clk;

  task automatic pulse_tick();
    tick = 1; @(posedge clk); #1; tick = 0; @(posedge clk); #1;
  endtask

  task automatic expect_state(int s, logic e, string what);
    checks++;
    if (int'(state) != s || expire !== e) begin
      failures++;
      $display("FAIL %s: state %0d expire %b, expected %0d %b", what, state, expire, s, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    expect_state(0, 0, "after reset");
    pulse_tick();
    expect_state(0, 0, "invalid block does not count");
    valid = 1; clear = 1; @(posedge clk); #1; clear = 0;
    for (int t = 1; t < N; t++) begin
      pulse_tick();
      expect_state(t, t == N - 1, "counting");
    end
    pulse_tick();
    expect_state(N - 1, 1, "holds in last state");
    clear = 1; tick = 1; @(posedge clk); #1; clear = 0; tick = 0;
    expect_state(0, 0, "write restarts the counter");
    pulse_tick(); pulse_tick();
    expect_state(2, 0, "two ticks after write");
    valid = 0; #1;
    expect_state(2, 0, "invalid block never expires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
