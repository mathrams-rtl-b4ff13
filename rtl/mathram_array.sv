// mathram_array: the dual-port memory cell array of a MathRAM, with its two
// row decoders and, on each port, one sense amplifier and one write driver
// per bitline pair.
//
// The array is ROWS x COLS bits (128 x 128, 16 Kbit). Each port has a read
// row and a write row: within the long MathRAM cycle a port first senses the
// full row selected by rd_row (all COLS bits, not only the 32 that reach the
// routing) and later drives wr_data into row wr_row on the bits whose wr_en
// is set. Reads are combinational (the sense amplifiers' output during the
// cycle); writes take effect at the rising clock edge, so a read in the same
// cycle returns the old contents. The array is not reset, as in a block RAM.
// If both ports write the same bit in one cycle, port 2's value is kept
// (this design's choice; the source leaves the collision undefined).
// Precharge, sense amplifiers and write drivers are analog circuits; only
// their logic function is modelled here.
module mathram_array #(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 128,
  localparam int unsigned RW  = $clog2(ROWS)
) (
  input  logic            clk,
  // port 1
  input  logic [RW-1:0]   rd_row1,
  output logic [COLS-1:0] rd_data1,
  input  logic [RW-1:0]   wr_row1,
  input  logic [COLS-1:0] wr_data1,
  input  logic [COLS-1:0] wr_en1,
  // port 2
  input  logic [RW-1:0]   rd_row2,
  output logic [COLS-1:0] rd_data2,
  input  logic [RW-1:0]   wr_row2,
  input  logic [COLS-1:0] wr_data2,
  input  logic [COLS-1:0] wr_en2
);

  logic [COLS-1:0] cells [ROWS];

  assign rd_data1 = cells[rd_row1];
  assign rd_data2 = cells[rd_row2];

  always_ff @(posedge clk) begin
    for (int c = 0; c < COLS; c++) begin
      if (wr_en1[c]) cells[wr_row1][c] <= wr_data1[c];
      if (wr_en2[c]) cells[wr_row2][c] <= wr_data2[c];
    end
  end

endmodule
