// bl_logic: the computational logic after the sense amplifiers of one
// bit-line.
//
// The two sense amplifiers of a column deliver AND/NAND and OR/NOR of the two
// cells on the activated word-lines. From these the block forms:
//   * one of NAND, AND, OR, NOR through a 4:1 multiplexer (Sel2:Sel1),
//   * XOR = OR & NAND, chosen instead of the 4:1 output by Sel3,
//   * the full-adder sum XOR ^ Cin, chosen by Sel4,
//   * the carry out Co = AND | (XOR & Cin), passed to the next bit-line so
//     that neighbouring columns form a ripple-carry adder.
// The inputs, outputs and the four select lines are those of the published
// bit-line logic circuit; the gate-level way XOR, sum and carry are formed from
// the sensed values is this design's reading of that circuit.
//
// Interface: purely combinational.
module bl_logic
  import pic_pkg::*;
(
  input  logic    s_and,
  input  logic    s_nand,
  input  logic    s_or,
  input  logic    s_nor,
  input  logic    cin,
  input  bl_sel_t sel,
  output logic    bitout,
  output logic    co
);

  logic x, mux4, mux3;

  assign x = s_or & s_nand;

  always_comb begin
    unique case (sel.logic_sel)
      2'd0: mux4 = s_nand;
      2'd1: mux4 = s_and;
      2'd2: mux4 = s_or;
      2'd3: mux4 = s_nor;
    endcase
  end

  assign mux3   = sel.xor_sel ? x : mux4;
  assign bitout = sel.sum_sel ? (x ^ cin) : mux3;
  assign co     = s_and | (x & cin);

endmodule
