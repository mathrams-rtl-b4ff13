// mathram: one MathRAM, a block RAM with a 1-bit processing element under
// every bitline pair.
//
// Storage is a 128 x 128 dual-port cell array (16 Kbit). In memory mode the
// block behaves as a true dual-port block RAM of configurable width (16K x 1
// up to 512 x 32). In hybrid mode it is a 512 x 32 RAM in which a port-A
// write to address 0x1ff is an instruction: row src1 is sensed on port 1 and
// row src2 on port 2 across all 128 columns, the 128 PEs compute in
// parallel, and the result is written to row dst through the port named by
// the instruction, column by column under the chosen predicate. Data for
// computation is stored transposed: bit m of an element sits in row base+m
// of that element's column, so an N-bit add takes N instructions plus one to
// store the final carry.
//
// Interface: two ports (en, we, 14-bit address, 32-bit write data, 32-bit
// read data). Reads are registered: data appear the cycle after the request
// and hold until the next read on that port. An instruction completes in one
// clock cycle, and the next instruction already sees its result, so one
// instruction can be issued per cycle. chain_* carry the TR outputs of the
// edge PEs to the MathRAMs above and below in the same column, so shifts
// continue across blocks: column 0's right neighbour is chain_lo_in and
// column 127's left neighbour is chain_hi_in.
//
// Follows the source: array geometry, modes, reserved address, instruction
// fields, PE structure, neighbour links. This design's choices: the order of
// the row fields in the instruction, mux encodings, address mapping, read
// latency of one cycle and the chain port naming.
module mathram
  import mathram_pkg::*;
#(
  parameter int unsigned ROWS = 128,
  parameter int unsigned COLS = 128,
  localparam int unsigned RW  = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  mode_e             mode,
  input  width_e            width_cfg,
  // port A
  input  logic              a_en,
  input  logic              a_we,
  input  logic [MEM_AW-1:0] a_addr,
  input  logic [HYB_W-1:0]  a_wdata,
  output logic [HYB_W-1:0]  a_rdata,
  // port B
  input  logic              b_en,
  input  logic              b_we,
  input  logic [MEM_AW-1:0] b_addr,
  input  logic [HYB_W-1:0]  b_wdata,
  output logic [HYB_W-1:0]  b_rdata,
  // neighbour MathRAM links
  input  logic              chain_lo_in,
  input  logic              chain_hi_in,
  output logic              chain_lo_out,
  output logic              chain_hi_out,
  // status
  output logic              instr_exec
);

  // control
  width_e              width;
  logic [MEM_AW-1:0]   a_addr_eff, b_addr_eff;
  logic [RW-1:0]       dec_row_a, dec_row_b;
  logic [RW-1:0]       rd_row1, rd_row2, wr_row1, wr_row2;
  logic                is_instr, mem_we_a, mem_we_b, rd_en_a, rd_en_b;
  logic [3:0]          truth_table;
  wsel_e               write_sel;
  pred_e               pred_sel;
  logic                port, c_en, m_en, wps1, wps2;

  // datapath
  logic [COLS-1:0]     rd_data1, rd_data2;
  logic [COLS-1:0]     din_a, din_b, mask_a, mask_b;
  logic [COLS-1:0]     tr, wd1, wd2, we1, we2;
  logic [COLS-1:0]     wr_en1, wr_en2;
  logic [HYB_W-1:0]    rword_a, rword_b;

  mathram_ctrl #(.ROWS(ROWS)) u_ctrl (
    .mode, .width_cfg,
    .a_en, .a_we, .a_addr, .a_wdata,
    .b_en, .b_we, .b_addr,
    .dec_row_a, .dec_row_b,
    .width, .a_addr_eff, .b_addr_eff,
    .rd_row1, .rd_row2, .wr_row1, .wr_row2,
    .is_instr, .mem_we_a, .mem_we_b, .rd_en_a, .rd_en_b,
    .truth_table, .write_sel, .pred_sel, .port, .c_en, .m_en, .wps1, .wps2
  );

  mathram_port_decoder #(.ROWS(ROWS), .COLS(COLS), .DW(HYB_W)) u_dec_a (
    .width, .addr(a_addr_eff), .wr_word(a_wdata), .rd_row_data(rd_data1),
    .row(dec_row_a), .wr_row_data(din_a), .wr_mask(mask_a), .rd_word(rword_a)
  );

  mathram_port_decoder #(.ROWS(ROWS), .COLS(COLS), .DW(HYB_W)) u_dec_b (
    .width, .addr(b_addr_eff), .wr_word(b_wdata), .rd_row_data(rd_data2),
    .row(dec_row_b), .wr_row_data(din_b), .wr_mask(mask_b), .rd_word(rword_b)
  );

  for (genvar c = 0; c < COLS; c++) begin : g_pe
    logic from_left, from_right;
    assign from_right = (c == 0)        ? chain_lo_in : tr[(c == 0) ? 0 : c - 1];
    assign from_left  = (c == COLS - 1) ? chain_hi_in : tr[(c == COLS - 1) ? c : c + 1];

    mathram_pe u_pe (
      .clk, .rst_n,
      .a(rd_data1[c]), .b(rd_data2[c]),
      .d_in1(din_a[c]), .d_in2(din_b[c]),
      .from_left, .from_right,
      .truth_table, .write_sel, .pred_sel, .port, .c_en, .m_en, .wps1, .wps2,
      .tr(tr[c]), .wd1(wd1[c]), .wd2(wd2[c]), .we1(we1[c]), .we2(we2[c]),
      .carry(), .mask()
    );
  end

  assign chain_lo_out = tr[0];
  assign chain_hi_out = tr[COLS-1];
  assign instr_exec   = is_instr;

  always_comb begin
    wr_en1 = is_instr ? we1 : (mem_we_a ? mask_a : '0);
    wr_en2 = is_instr ? we2 : (mem_we_b ? mask_b : '0);
  end

  mathram_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk,
    .rd_row1, .rd_data1, .wr_row1, .wr_data1(wd1), .wr_en1,
    .rd_row2, .rd_data2, .wr_row2, .wr_data2(wd2), .wr_en2
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rdata <= '0;
      b_rdata <= '0;
    end else begin
      if (rd_en_a) a_rdata <= rword_a;
      if (rd_en_b) b_rdata <= rword_b;
    end
  end

  // an instruction owns both ports for its cycle
  property p_instr_blocks_b;
    @(posedge clk) disable iff (!rst_n) is_instr |-> !mem_we_b;
  endproperty
  assert property (p_instr_blocks_b);

endmodule
