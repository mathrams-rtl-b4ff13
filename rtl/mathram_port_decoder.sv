// mathram_port_decoder: width-configurable column decoder of one MathRAM port.
//
// In memory mode a 16 Kbit MathRAM can be shaped as 16K x 1, 8K x 2, 4K x 4,
// 2K x 8, 1K x 16 or 512 x 32; hybrid mode always uses 512 x 32. The logical
// address is turned into a bit address (address times width); its upper
// bits pick the physical row and its lower bits the first column of the
// word. So consecutive 32-bit hybrid-mode addresses fill one 128-bit row in
// four quarters (address[8:2] is the row, address[1:0] the quarter).
// The decoder also aligns the write word onto the 128 bitlines with a bit
// write mask, and extracts a read word from a sensed row. It is purely
// combinational; the MathRAM registers the read word.
//
// The set of widths (the usual shapes of a 16 Kbit block RAM) and the
// address-to-row/column mapping are this design's choices; the source names
// a width-configurable decoder and a column decoder per port and fixes the
// hybrid shape at 512 x 32.
module mathram_port_decoder
  import mathram_pkg::*;
#(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 128,
  parameter int unsigned DW   = 32,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned CW  = $clog2(COLS),
  localparam int unsigned AW  = $clog2(ROWS * COLS)
) (
  input  width_e          width,
  input  logic [AW-1:0]   addr,
  input  logic [DW-1:0]   wr_word,
  input  logic [COLS-1:0] rd_row_data,
  output logic [RW-1:0]   row,
  output logic [COLS-1:0] wr_row_data,
  output logic [COLS-1:0] wr_mask,
  output logic [DW-1:0]   rd_word
);

  logic [2:0]      lg;       // log2 of the width
  logic [AW-1:0]   bitaddr;
  logic [CW-1:0]   off;
  logic [DW-1:0]   wmask;
  logic [COLS-1:0] shifted;

  always_comb begin
    lg = (width > WIDTH_32) ? 3'(WIDTH_32) : 3'(width);
    wmask   = DW'((64'd1 << (6'd1 << lg)) - 64'd1);
    bitaddr = addr << lg;
    row     = bitaddr[AW-1 -: RW];
    off     = bitaddr[CW-1:0];
    wr_mask     = COLS'(wmask) << off;
    wr_row_data = COLS'(wr_word & wmask) << off;
    shifted     = rd_row_data >> off;
    rd_word     = shifted[DW-1:0] & wmask;
  end

endmodule
