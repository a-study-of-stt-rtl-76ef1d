// tb_bl_logic: exhaustive check of the bit-line logic. For every pair of
// stored bits, carry in and operation, the sensed AND/NAND/OR/NOR values are
// formed from the two bits and the output is compared with the operation
// computed directly from the bits (sum and carry of a full adder for ADD).
module tb_bl_logic;
  import pic_pkg::*;
  logic    s_and, s_nand, s_or, s_nor, cin, bitout, co;
  bl_sel_t sel;
  int checks = 0, failures = 0;
  pic_op_e ops [6] = '{OP_AND, OP_NAND, OP_OR, OP_NOR, OP_XOR, OP_ADD};

  bl_logic dut (.*);

  initial begin
    for (int k = 0; k < 6; k++)
      for (int v = 0; v < 8; v++) begin
        logic a, b, exp_bit, exp_co;
        {cin, b, a} = 3'(v);
        s_and = a & b; s_nand = !(a & b); s_or = a | b; s_nor = !(a | b);
        sel = op_to_sel(ops[k]);
        #1;
        unique case (ops[k])
          OP_AND:  exp_bit = a & b;
          OP_NAND: exp_bit = !(a & b);
          OP_OR:   exp_bit = a | b;
          OP_NOR:  exp_bit = !(a | b);
          OP_XOR:  exp_bit = a ^ b;
          default: exp_bit = a ^ b ^ cin;
        endcase
        exp_co = (32'(a) + 32'(b) + 32'(cin)) >= 2;
        checks++;
        if (bitout !== exp_bit) begin
          failures++;
          $display("FAIL %s a=%b b=%b cin=%b: bitout %b expected %b", ops[k].name(), a, b, cin, bitout, exp_bit);
        end
        checks++;
        if (co !== exp_co) begin
          failures++;
          $display("FAIL carry a=%b b=%b cin=%b: co %b expected %b", a, b, cin, co, exp_co);
        end
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
