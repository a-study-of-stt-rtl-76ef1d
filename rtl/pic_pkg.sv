// pic_pkg: types and constants shared by the STT-RAM processing-in-cache /
// processing-in-memory (PiC/PiM) hierarchy.
//
// Operations: a compute activates two word-lines at once and the bit-line
// logic picks AND, NAND, OR, NOR, XOR or the full-adder sum; ADD runs as a
// ripple-carry adder over 32-bit lanes. Regular reads use the OR path with
// the second word-line held at '0', and writes drive a single word-line.
// The six compute operations and the OR-based read follow the published architecture; the
// 3-bit encoding is this design's own.
//
// Sensing: an STT-RAM cell is a resistor, R_P for bit '0' and R_AP for bit
// '1'. With a TMR ratio of 150 % (R_AP = 2.5 * R_P) the cell currents are set
// here to I_P = 25 and I_AP = 10 arbitrary units; two cells on a bit-line
// give 50 (0-0), 35 (1-0 / 0-1) or 20 (1-1). The OR reference lies between
// the 0-0 and single-'1' levels, the AND reference between the single-'1'
// and 1-1 levels (midpoints). The unit values and midpoints are this design's
// own choice; only the ratio and the three-level scheme come from the published architecture.
package pic_pkg;

  localparam int unsigned WORD_W     = 32;   // one PiC computation is a 32-bit integer op
  localparam int unsigned BLOCK_BITS = 512;  // 64 B cache block
  localparam int unsigned BADDR_W    = 24;   // block address, wide enough for 512 MB / 64 B

  // Sensing current model (arbitrary units)
  localparam int unsigned CUR_W      = 8;
  localparam logic [CUR_W-1:0] I_CELL_P  = 8'd25;   // bit '0', parallel, low resistance
  localparam logic [CUR_W-1:0] I_CELL_AP = 8'd10;   // bit '1', anti-parallel, R_AP = 2.5 R_P
  localparam logic [CUR_W-1:0] I_REF_OR  = 8'd42;   // between I_0-0 = 50 and I_1-0 = 35
  localparam logic [CUR_W-1:0] I_REF_AND = 8'd27;   // between I_1-0 = 35 and I_1-1 = 20

  typedef enum logic [2:0] {
    OP_READ  = 3'd0,
    OP_WRITE = 3'd1,
    OP_AND   = 3'd2,
    OP_NAND  = 3'd3,
    OP_OR    = 3'd4,
    OP_NOR   = 3'd5,
    OP_XOR   = 3'd6,
    OP_ADD   = 3'd7
  } pic_op_e;

  // Select lines of the bit-line logic (Sel1..Sel4)
  typedef struct packed {
    logic [1:0] logic_sel;  // Sel2:Sel1 -> 0 NAND, 1 AND, 2 OR, 3 NOR
    logic       xor_sel;    // Sel3: 1 selects OR & NAND (XOR) instead of the 4:1 mux
    logic       sum_sel;    // Sel4: 1 selects the full-adder sum
  } bl_sel_t;

  function automatic bl_sel_t op_to_sel(pic_op_e op);
    bl_sel_t s;
    s = '{logic_sel: 2'd2, xor_sel: 1'b0, sum_sel: 1'b0};  // OR: used for regular reads
    unique case (op)
      OP_NAND: s.logic_sel = 2'd0;
      OP_AND:  s.logic_sel = 2'd1;
      OP_OR:   s.logic_sel = 2'd2;
      OP_NOR:  s.logic_sel = 2'd3;
      OP_XOR:  s.xor_sel   = 1'b1;
      OP_ADD:  s.sum_sel   = 1'b1;
      default: s.logic_sel = 2'd2;
    endcase
    return s;
  endfunction

  function automatic logic is_compute(pic_op_e op);
    return !(op inside {OP_READ, OP_WRITE});
  endfunction

  // Hierarchy levels (Fig. 1)
  typedef enum logic [1:0] {
    LVL_L1  = 2'd0,
    LVL_L2  = 2'd1,
    LVL_MEM = 2'd2
  } level_e;

  // Commands from the processor to the PiC/PiM controller
  typedef enum logic [1:0] {
    CMD_STORE   = 2'd0,  // StorePIM: write one block into a level
    CMD_LOAD    = 2'd1,  // regular read of one block
    CMD_COMPUTE = 2'd2,  // Compute_Inst_PIM: row-wide operation, answered by DONE
    CMD_MOVE    = 2'd3   // copy one block from one level to another
  } cmd_kind_e;

  typedef struct packed {
    cmd_kind_e              kind;
    pic_op_e                op;       // CMD_COMPUTE only
    level_e                 level;    // level operated on (destination of a move)
    level_e                 src_level;// CMD_MOVE: source level
    logic [BADDR_W-1:0]     addr_a;   // block address: first operand / load / move source
    logic [BADDR_W-1:0]     addr_b;   // second operand row (block address)
    logic [BADDR_W-1:0]     addr_d;   // destination block / row
    logic [BADDR_W-1:0]     home;     // block address in the level below (write-back target)
    logic [BLOCK_BITS-1:0]  data;     // CMD_STORE data
  } pic_cmd_t;

endpackage
