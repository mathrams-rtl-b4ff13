// mathram_swizzle: soft-logic transposer that turns a stream of elements
// into the bit-transposed layout a MathRAM computes on.
//
// Elements arrive one per cycle (ready/valid) and are written into a
// circular FIFO of 2*DW entries. Element e of a batch belongs to MathRAM
// column e (e = 0..COLS-1). As soon as DW elements (one 32-column quarter of
// a row) are buffered, the swizzle emits ELEM_W words: word m holds bit m of
// those DW elements, bit b of the word being element b, and goes to hybrid
// address (base_row + m) * (COLS/DW) + quarter. While one half of the ring
// is being emitted the other half keeps filling, so a stream of ELEM_W <= DW
// bit elements is accepted without gaps. After COLS elements the quarter
// counter wraps and the next batch overwrites the same rows.
//
// Interface: in_valid/in_ready/in_data for elements, out_valid/out_ready/
// out_addr/out_data for MathRAM writes. base_row is a quasi-static setting
// and must be held while a batch is in flight.
// The source gives only that the transposer is a circular-FIFO design in
// soft logic; the depth, word order and handshakes are this design's choice.
module mathram_swizzle
  import mathram_pkg::*;
#(
  parameter int unsigned ELEM_W = 16,
  parameter int unsigned DW     = 32,
  parameter int unsigned COLS   = 128,
  parameter int unsigned ROWS   = 128,
  localparam int unsigned RW    = $clog2(ROWS),
  localparam int unsigned DEPTH = 2 * DW,
  localparam int unsigned PW    = $clog2(DEPTH),
  localparam int unsigned QN    = COLS / DW,
  localparam int unsigned QW    = (QN > 1) ? $clog2(QN) : 1,
  localparam int unsigned MW    = (ELEM_W > 1) ? $clog2(ELEM_W) : 1,
  localparam int unsigned AW    = $clog2(ROWS * QN)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RW-1:0]     base_row,
  // element stream
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [ELEM_W-1:0] in_data,
  // transposed words towards a MathRAM port
  output logic              out_valid,
  input  logic              out_ready,
  output logic [AW-1:0]     out_addr,
  output logic [DW-1:0]     out_data
);

  logic [ELEM_W-1:0] ring [DEPTH];
  logic [PW-1:0]     wr_ptr, rd_base;
  logic [PW:0]       count;
  logic [MW-1:0]     bit_idx;
  logic [QW-1:0]     quarter;
  logic              in_fire, out_fire, last_bit;

  assign in_ready  = (count < (PW+1)'(DEPTH));
  assign out_valid = (count >= (PW+1)'(DW));
  assign in_fire   = in_valid && in_ready;
  assign out_fire  = out_valid && out_ready;
  assign last_bit  = (bit_idx == MW'(ELEM_W - 1));

  always_comb begin
    for (int b = 0; b < DW; b++)
      out_data[b] = ring[PW'(rd_base + PW'(b))][bit_idx];
    out_addr = AW'((32'(base_row) + 32'(bit_idx)) * QN + 32'(quarter));
  end

  always_ff @(posedge clk) begin
    if (in_fire) ring[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_base <= '0;
      count   <= '0;
      bit_idx <= '0;
      quarter <= '0;
    end else begin
      if (in_fire) wr_ptr <= wr_ptr + 1'b1;
      if (out_fire) begin
        if (last_bit) begin
          bit_idx <= '0;
          rd_base <= PW'(rd_base + PW'(DW));
          quarter <= (quarter == QW'(QN - 1)) ? '0 : quarter + 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
        end
      end
      count <= count + (PW+1)'(in_fire) - ((out_fire && last_bit) ? (PW+1)'(DW) : '0);
    end
  end

  // the ring never overflows or underflows
  assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH));

endmodule
