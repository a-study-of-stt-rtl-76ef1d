// mwl_sense_amp: behavioural model of a row of multi-word-line current sense
// amplifiers, one per bit-line.
//
// This is a model of analog comparators, not synthesizable circuitry. Each
// amplifier compares its bit-line current i_bl[c] with the shared reference
// current i_ref. Stored '1's lower the bit-line current, so o[c] is 1 when
// the bit-line current falls below the reference, and o_n[c] is its
// complement. With the AND reference (between the single-'1' and the 1-1
// levels) the outputs are AND and NAND of the two sensed cells; with the OR
// reference (between 0-0 and the single-'1' level) they are OR and NOR. The
// inputs (bit-line and reference current) and the true/complement outputs
// follow the published sense-amplifier circuits; the comparison direction
// follows from '1' being the high-resistance state.
//
// Interface: currents in pic_pkg units; outputs combinational.
module mwl_sense_amp
  import pic_pkg::*;
#(
  parameter int unsigned COLS = 32
) (
  input  logic [CUR_W-1:0] i_bl [COLS],
  input  logic [CUR_W-1:0] i_ref,
  output logic [COLS-1:0]  o,
  output logic [COLS-1:0]  o_n
);

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      o[c]   = (i_bl[c] < i_ref);
      o_n[c] = !o[c];
    end
  end

endmodule
