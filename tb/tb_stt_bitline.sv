// tb_stt_bitline: checks the bit-line current model. Every combination of two
// stored bits and two word-line enables on four columns is compared with the
// current computed here from the cell currents (bit '0': 25 units,
// bit '1': 10 units, summed over active word-lines).
module tb_stt_bitline;
  import pic_pkg::*;
  logic [3:0]       bit_a, bit_b;
  logic             wl_a, wl_b;
  logic [CUR_W-1:0] i_bl [4];
  int checks = 0, failures = 0;

  stt_bitline #(.COLS(4)) dut (.*);

  initial begin
    for (int m = 0; m < 1024; m++) begin
      {wl_b, wl_a, bit_b, bit_a} = 10'(m);
      #1;
      for (int c = 0; c < 4; c++) begin
        int exp_i;
        exp_i = (wl_a ? (bit_a[c] ? 10 : 25) : 0) + (wl_b ? (bit_b[c] ? 10 : 25) : 0);
        checks++;
        if (int'(i_bl[c]) != exp_i) begin
          failures++;
          $display("FAIL col %0d a=%b b=%b wl=%b%b: got %0d expected %0d", c, bit_a[c], bit_b[c], wl_a, wl_b, i_bl[c], exp_i);
        end
      end
    end
    // the three sensing levels with both word-lines on
    {wl_b, wl_a} = 2'b11; bit_a = 4'b0011; bit_b = 4'b0101; #1;
    checks++; if (!(i_bl[3] > i_bl[1] && i_bl[1] == i_bl[2] && i_bl[2] > i_bl[0])) failures++;
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
