// mathram_ctrl: instruction detection, row-address steering and sequencing
// of one MathRAM.
//
// The mode bit is a configuration cell: memory mode (plain block RAM of a
// configurable width) or hybrid mode (fixed 512 x 32, compute and storage).
// An equality comparator on port A's address against 0x1ff, ANDed with the
// hybrid mode bit, flags an instruction: the write data on port A is then
// decoded as an instr_t instead of being stored. In that cycle the row mux
// of port A selects src1_row for sensing and dst_row for writing, and the
// row mux of port B selects src2_row and dst_row; port B's own request is
// ignored. The sequencing logic turns the cycle into one long
// read-compute-write cycle: both rows are sensed, the PEs evaluate, and the
// write strobes (wps1/wps2) let the PEs write the result row. In every other
// cycle the rows come from the ports' own decoders, the PEs pass the
// external write data through (write_sel = DIN, predicate = always) and the
// carry and mask latches hold.
//
// Timing: combinational; the MathRAM applies all writes at the clock edge.
// In hybrid mode address bits above bit 8 are ignored, and a port-B write to
// 0x1ff is dropped so that the reserved word is never stored (this design's
// choice).
module mathram_ctrl
  import mathram_pkg::*;
#(
  parameter int unsigned ROWS = 128,
  localparam int unsigned RW  = $clog2(ROWS)
) (
  input  mode_e                 mode,
  input  width_e                width_cfg,
  // port requests
  input  logic                  a_en,
  input  logic                  a_we,
  input  logic [MEM_AW-1:0]     a_addr,
  input  logic [HYB_W-1:0]      a_wdata,
  input  logic                  b_en,
  input  logic                  b_we,
  input  logic [MEM_AW-1:0]     b_addr,
  // rows from the width-configurable decoders
  input  logic [RW-1:0]         dec_row_a,
  input  logic [RW-1:0]         dec_row_b,
  // steered addresses and effective width
  output width_e                width,
  output logic [MEM_AW-1:0]     a_addr_eff,
  output logic [MEM_AW-1:0]     b_addr_eff,
  output logic [RW-1:0]         rd_row1,
  output logic [RW-1:0]         rd_row2,
  output logic [RW-1:0]         wr_row1,
  output logic [RW-1:0]         wr_row2,
  // cycle type
  output logic                  is_instr,
  output logic                  mem_we_a,
  output logic                  mem_we_b,
  output logic                  rd_en_a,
  output logic                  rd_en_b,
  // PE controls
  output logic [3:0]            truth_table,
  output wsel_e                 write_sel,
  output pred_e                 pred_sel,
  output logic                  port,
  output logic                  c_en,
  output logic                  m_en,
  output logic                  wps1,
  output logic                  wps2
);

  instr_t instr;
  logic   hybrid;

  always_comb begin
    hybrid = (mode == MODE_HYBRID);
    width  = hybrid ? WIDTH_32 : width_cfg;
    a_addr_eff = hybrid ? MEM_AW'(a_addr[HYB_AW-1:0]) : a_addr;
    b_addr_eff = hybrid ? MEM_AW'(b_addr[HYB_AW-1:0]) : b_addr;

    // comparator and mode AND gate
    is_instr = hybrid && a_en && a_we && (a_addr[HYB_AW-1:0] == INSTR_ADDR);
    instr    = instr_t'(a_wdata);

    // row-address muxes
    rd_row1 = is_instr ? instr.src1_row : dec_row_a;
    rd_row2 = is_instr ? instr.src2_row : dec_row_b;
    wr_row1 = is_instr ? instr.dst_row  : dec_row_a;
    wr_row2 = is_instr ? instr.dst_row  : dec_row_b;

    // ordinary accesses
    mem_we_a = !is_instr && a_en && a_we;
    mem_we_b = !is_instr && b_en && b_we &&
               !(hybrid && b_addr[HYB_AW-1:0] == INSTR_ADDR);
    rd_en_a  = !is_instr && a_en && !a_we;
    rd_en_b  = !is_instr && b_en && !b_we;

    // PE controls
    if (is_instr) begin
      truth_table = instr.truth_table;
      write_sel   = instr.write_sel;
      pred_sel    = instr.predicate;
      port        = instr.port;
      c_en        = instr.c_en;
      m_en        = instr.m_en;
    end else begin
      truth_table = TT_ZERO;
      write_sel   = WSEL_DIN;
      pred_sel    = PRED_ALWAYS;
      port        = 1'b0;
      c_en        = 1'b0;
      m_en        = 1'b0;
    end
    wps1 = is_instr;
    wps2 = is_instr;
  end

endmodule
