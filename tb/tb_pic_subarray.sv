// tb_pic_subarray: checks a small subarray (8 rows of 32 lanes, two blocks
// per row) with the L1 latencies. Blocks are written through the bit-line
// decoder and read back; row-wide AND, NAND, OR, NOR, XOR and ADD results are
// compared with a reference model of the array kept here, and every
// operation's latency is compared with the table: read 1, write 2, logical 3,
// add 15 cycles.
module tb_pic_subarray;
  import pic_pkg::*;
  localparam int ROWS = 8, LANES = 32, RW = LANES * 32, BPR = RW / 512;
  localparam int RL = 1, WL = 2, AL = 15;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic req_valid, req_ready, done;
  pic_op_e req_op;
  logic [2:0] req_row_a, req_row_b, req_row_d;
  logic [0:0] req_col;
  logic [511:0] req_wdata, rdata;
  logic [RW-1:0] model [ROWS];

  pic_subarray #(.ROWS(ROWS), .LANES(LANES), .READ_LAT(RL), .WRITE_LAT(WL), .ADD_LAT(AL)) dut (.*);

  // issue one request, return the cycles until done and the read data
  task automatic run(input pic_op_e op, input int ra, input int rb, input int rd, input int col,
                     input logic [511:0] wd, output int cycles, output logic [511:0] rdat);
    @(negedge clk);
    req_valid = 1; req_op = op; req_row_a = 3'(ra); req_row_b = 3'(rb); req_row_d = 3'(rd);
    req_col = 1'(col); req_wdata = wd;
    checks++; if (!req_ready) begin failures++; $display("FAIL not ready"); end
    @(negedge clk); req_valid = 0;
    cycles = 1;
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    rdat = rdata;
  endtask

  function automatic logic [RW-1:0] ref_op(pic_op_e op, logic [RW-1:0] x, logic [RW-1:0] y);
    logic [RW-1:0] r;
    for (int l = 0; l < LANES; l++) begin
      logic [31:0] p, q, s;
      p = x[l*32 +: 32]; q = y[l*32 +: 32];
      unique case (op)
        OP_AND: s = p & q;   OP_NAND: s = ~(p & q);
        OP_OR:  s = p | q;   OP_NOR:  s = ~(p | q);
        OP_XOR: s = p ^ q;   default: s = p + q;
      endcase
      r[l*32 +: 32] = s;
    end
    return r;
  endfunction

  initial begin
    int cyc;
    logic [511:0] rd;
    pic_op_e ops [6] = '{OP_AND, OP_NAND, OP_OR, OP_NOR, OP_XOR, OP_ADD};
    req_valid = 0; req_op = OP_READ; req_row_a = 0; req_row_b = 0; req_row_d = 0; req_col = 0; req_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill every block
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < BPR; c++) begin
        logic [511:0] w;
        for (int k = 0; k < 16; k++) w[k*32 +: 32] = $urandom;
        if (r == 0 && c == 0) w = '1;   // long carries
        model[r][c*512 +: 512] = w;
        run(OP_WRITE, 0, 0, r, c, w, cyc, rd);
        checks++; if (cyc != WL) begin failures++; $display("FAIL write took %0d", cyc); end
      end
    // read back
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < BPR; c++) begin
        run(OP_READ, r, 0, 0, c, '0, cyc, rd);
        checks++; if (cyc != RL) begin failures++; $display("FAIL read took %0d", cyc); end
        checks++; if (rd !== model[r][c*512 +: 512]) begin failures++; $display("FAIL read row %0d col %0d", r, c); end
      end
    // computations
    for (int n = 0; n < 24; n++) begin
      int ra, rb, rdst;
      pic_op_e op;
      ra = $urandom_range(ROWS-1); rb = $urandom_range(ROWS-1); rdst = $urandom_range(ROWS-1);
      if (n == 0) begin ra = 0; rb = 1; end
      op = ops[n % 6];
      run(op, ra, rb, rdst, 0, '0, cyc, rd);
      checks++;
      if (cyc != ((op == OP_ADD) ? AL : RL + WL)) begin
        failures++; $display("FAIL %s took %0d cycles", op.name(), cyc);
      end
      model[rdst] = ref_op(op, model[ra], model[rb]);
      for (int c = 0; c < BPR; c++) begin
        run(OP_READ, rdst, 0, 0, c, '0, cyc, rd);
        checks++;
        if (rd !== model[rdst][c*512 +: 512]) begin
          failures++; $display("FAIL %s result row %0d block %0d", op.name(), rdst, c);
        end
      end
    end
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
