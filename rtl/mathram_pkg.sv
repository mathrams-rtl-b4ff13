// mathram_pkg: types and constants shared by the MathRAM blocks.
//
// A MathRAM is a 16 Kbit block RAM whose physical array is 128 rows by
// 128 columns, with one 1-bit processing element (PE) per column. In hybrid
// mode the block is a fixed 512 x 32 memory; a write to the reserved address
// 0x1ff is not stored but executed as a 32-bit instruction. The instruction
// field layout below follows the published format: predicate [31:30],
// write_sel [29:28], port [27], c_en [26], m_en [25], truth_table [24:21],
// and three 7-bit row fields in [20:0]. The order of the three row fields
// (dst_row [20:14], src2_row [13:7], src1_row [6:0]) and the encodings of
// the predicate and write-select codes are this design's choice.
package mathram_pkg;

  localparam int unsigned ARRAY_ROWS = 128;              // physical wordlines
  localparam int unsigned ARRAY_COLS = 128;              // physical bitline pairs = PEs
  localparam int unsigned ROW_W     = $clog2(ARRAY_ROWS);     // 7-bit row field
  localparam int unsigned HYB_W     = 32;               // hybrid-mode word width
  localparam int unsigned HYB_AW    = 9;                // hybrid-mode address width (512 words)
  localparam int unsigned MEM_AW    = 14;               // 16K x 1 is the deepest memory-mode shape
  localparam logic [HYB_AW-1:0] INSTR_ADDR = 9'h1ff;    // reserved instruction address

  // Configuration-time operating mode (one SRAM configuration cell).
  typedef enum logic {
    MODE_MEMORY = 1'b0,
    MODE_HYBRID = 1'b1
  } mode_e;

  // Memory-mode aspect ratio: 16K x 1 up to 512 x 32.
  typedef enum logic [2:0] {
    WIDTH_1  = 3'd0,
    WIDTH_2  = 3'd1,
    WIDTH_4  = 3'd2,
    WIDTH_8  = 3'd3,
    WIDTH_16 = 3'd4,
    WIDTH_32 = 3'd5
  } width_e;

  // Predication source (S mux): always, mask latch, carry latch, inverted carry.
  typedef enum logic [1:0] {
    PRED_ALWAYS = 2'd0,
    PRED_MASK   = 2'd1,
    PRED_CARRY  = 2'd2,
    PRED_NCARRY = 2'd3
  } pred_e;

  // Write-back source (W1/W2 muxes). WSEL_NEIGH takes the right PE's value on
  // port 1 (shift towards higher columns) and the left PE's value on port 2
  // (shift towards lower columns).
  typedef enum logic [1:0] {
    WSEL_DIN   = 2'd0,
    WSEL_TR    = 2'd1,
    WSEL_SUM   = 2'd2,
    WSEL_NEIGH = 2'd3
  } wsel_e;

  typedef struct packed {
    pred_e             predicate;    // [31:30]
    wsel_e             write_sel;    // [29:28]
    logic              port;         // [27]  0: write through port 1 (A), 1: port 2 (B)
    logic              c_en;         // [26]  load carry latch
    logic              m_en;         // [25]  load mask latch
    logic [3:0]        truth_table;  // [24:21] TR_3..TR_0, TR index = {A, B}
    logic [ROW_W-1:0]  dst_row;      // [20:14]
    logic [ROW_W-1:0]  src2_row;     // [13:7]
    logic [ROW_W-1:0]  src1_row;     // [6:0]
  } instr_t;

  // Common truth tables (index {A,B}: bit 0 = (0,0), bit 3 = (1,1)).
  localparam logic [3:0] TT_ZERO = 4'b0000;
  localparam logic [3:0] TT_AND  = 4'b1000;
  localparam logic [3:0] TT_OR   = 4'b1110;
  localparam logic [3:0] TT_XOR  = 4'b0110;
  localparam logic [3:0] TT_A    = 4'b1100;
  localparam logic [3:0] TT_B    = 4'b1010;
  localparam logic [3:0] TT_NOTA = 4'b0011;

  function automatic instr_t make_instr(pred_e p, wsel_e ws, logic port, logic c_en,
                                        logic m_en, logic [3:0] tt,
                                        logic [ROW_W-1:0] dst, logic [ROW_W-1:0] s1,
                                        logic [ROW_W-1:0] s2);
    instr_t i;
    i.predicate   = p;
    i.write_sel   = ws;
    i.port        = port;
    i.c_en        = c_en;
    i.m_en        = m_en;
    i.truth_table = tt;
    i.dst_row     = dst;
    i.src2_row    = s2;
    i.src1_row    = s1;
    return i;
  endfunction

endpackage
