// tb_pic_lane: checks one 32-bit lane. Random operand pairs are turned into
// the sensed AND/NAND/OR/NOR vectors; logical results are compared with the
// bitwise operation, additions with a + b (mod 2^32), and each addition must
// take exactly ADD_STEPS cycles from add_start to add_done. Two step counts
// are used: 12 (three bits per cycle, L1) and 9 (four bits per cycle).
module tb_pic_lane;
  import pic_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  logic [31:0] a, b;
  bl_sel_t sel;
  logic add_start;
  logic [1:0] busy, add_done;
  logic [31:0] result [2];

  pic_lane #(.WIDTH(32), .ADD_STEPS(12)) dut12 (
    .clk, .rst_n, .sel, .s_and(a & b), .s_nand(~(a & b)), .s_or(a | b), .s_nor(~(a | b)),
    .add_start, .add_busy(busy[0]), .add_done(add_done[0]), .result(result[0]));
  pic_lane #(.WIDTH(32), .ADD_STEPS(9)) dut9 (
    .clk, .rst_n, .sel, .s_and(a & b), .s_nand(~(a & b)), .s_or(a | b), .s_nor(~(a | b)),
    .add_start, .add_busy(busy[1]), .add_done(add_done[1]), .result(result[1]));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h: got %h expected %h", what, a, b, got, exp);
    end
  endtask

  initial begin
    add_start = 0; a = 0; b = 0; sel = op_to_sel(OP_OR);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      a = $urandom; b = $urandom;
      if (n == 0) begin a = 32'hFFFF_FFFF; b = 32'h1; end   // carry through every chunk
      sel = op_to_sel(OP_AND);  #1; check(result[0], a & b,    "AND");
      sel = op_to_sel(OP_NAND); #1; check(result[0], ~(a & b), "NAND");
      sel = op_to_sel(OP_OR);   #1; check(result[1], a | b,    "OR");
      sel = op_to_sel(OP_NOR);  #1; check(result[1], ~(a | b), "NOR");
      sel = op_to_sel(OP_XOR);  #1; check(result[0], a ^ b,    "XOR");
      sel = op_to_sel(OP_ADD);
      @(negedge clk); add_start = 1; @(negedge clk); add_start = 0;
      begin
        int cyc12, cyc9;
        cyc12 = 0; cyc9 = 0;
        for (int c = 1; c <= 20; c++) begin
          if (add_done[0] && cyc12 == 0) cyc12 = c;
          if (add_done[1] && cyc9 == 0)  cyc9 = c;
          @(negedge clk);
        end
        checks++; if (cyc12 != 12) begin failures++; $display("FAIL add took %0d cycles, expected 12", cyc12); end
        checks++; if (cyc9 != 9)   begin failures++; $display("FAIL add took %0d cycles, expected 9", cyc9); end
      end
      check(result[0], a + b, "ADD/12");
      check(result[1], a + b, "ADD/9");
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
