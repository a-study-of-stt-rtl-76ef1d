// tb_retention_tick_gen: checks that the tick is a single-cycle pulse every
// PERIOD cycles.
module tb_retention_tick_gen;
  localparam int PERIOD = 13;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0, cyc = 0, last = -1, nticks = 0;

  retention_tick_gen #(.PERIOD(PERIOD)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (PERIOD * 10 + 3) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        nticks++;
        if (last >= 0) begin
          checks++;
          if (cyc - last != PERIOD) begin
            failures++;
            $display("FAIL tick spacing %0d expected %0d", cyc - last, PERIOD);
          end
        end
        last = cyc;
      end
    end
    checks++;
    if (nticks != 10) begin
      failures++;
      $display("FAIL %0d ticks expected 10", nticks);
    end
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
