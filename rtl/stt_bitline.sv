// stt_bitline: behavioural model of the bit-lines of an STT-RAM array with
// two word-lines activated at once.
//
// This is a model of an analog part, not synthesizable circuitry. Each cell
// is a resistor: a stored '0' (parallel MTJ, R_P) passes the higher current
// I_CELL_P, a stored '1' (anti-parallel, R_AP) the lower current I_CELL_AP.
// Cells on activated word-lines conduct in parallel, so a bit-line current is
// the sum of their currents; two activated cells give the three distinct
// levels I_0-0 > I_1-0 = I_0-1 > I_1-1 that the sense amplifiers resolve.
// The current values are an abstract integer scale set in pic_pkg (TMR ratio
// 150 % as in the published architecture; units this design's own).
//
// Interface: COLS bit-lines side by side. bit_a[c] and bit_b[c] are the bits
// of column c on the two word-lines, wl_a and wl_b say whether each word-line
// is active. i_bl[c] is combinational.
module stt_bitline
  import pic_pkg::*;
#(
  parameter int unsigned COLS = 32
) (
  input  logic [COLS-1:0]  bit_a,
  input  logic [COLS-1:0]  bit_b,
  input  logic             wl_a,
  input  logic             wl_b,
  output logic [CUR_W-1:0] i_bl [COLS]
);

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      i_bl[c] = '0;
      if (wl_a) i_bl[c] = i_bl[c] + (bit_a[c] ? I_CELL_AP : I_CELL_P);
      if (wl_b) i_bl[c] = i_bl[c] + (bit_b[c] ? I_CELL_AP : I_CELL_P);
    end
  end

endmodule
