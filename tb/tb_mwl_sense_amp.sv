// tb_mwl_sense_amp: checks the sense-amplifier model. Random bit-line and
// reference currents are compared against "current below reference means
// output 1", and the two references of the design are checked to turn the
// three two-cell current levels (50, 35, 20 units) into AND and OR.
module tb_mwl_sense_amp;
  import pic_pkg::*;
  logic [CUR_W-1:0] i_bl [2];
  logic [CUR_W-1:0] i_ref;
  logic [1:0]       o, o_n;
  int checks = 0, failures = 0;

  mwl_sense_amp #(.COLS(2)) dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      i_bl[0] = CUR_W'($urandom); i_bl[1] = CUR_W'($urandom); i_ref = CUR_W'($urandom);
      #1;
      for (int c = 0; c < 2; c++) begin
        check(o[c],   int'(i_bl[c]) < int'(i_ref),  "o");
        check(o_n[c], int'(i_bl[c]) >= int'(i_ref), "o_n");
      end
    end
    // levels: 0-0 = 50, one '1' = 35, 1-1 = 20
    for (int ones = 0; ones < 3; ones++) begin
      i_bl[0] = CUR_W'(50 - 15 * ones); i_bl[1] = i_bl[0];
      i_ref = I_REF_AND; #1; check(o[0], ones == 2, "AND level");
      i_ref = I_REF_OR;  #1; check(o[0], ones >= 1, "OR level");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
