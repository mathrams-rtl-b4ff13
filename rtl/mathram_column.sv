// mathram_column: a column of MathRAMs in the FPGA fabric, each fed by its
// own swizzle (transposer) unit, with direct neighbour links between the
// blocks so that shifts run across the whole column.
//
// MathRAM k's column 127 neighbours MathRAM k+1's column 0, so for shift
// instructions the N_BLOCKS blocks behave like one row of 128*N_BLOCKS PEs
// (block 0 holds the lowest columns). col_lo_in/col_hi_in enter at the two
// ends and col_lo_out/col_hi_out leave there.
//
// Port A of each block is shared by the fabric (the a_* ports) and the
// block's swizzle unit. The fabric has priority: whenever a_en is high the
// swizzle's write waits (its element input then back-pressures through
// elem_ready once its ring is full). Port B belongs to the fabric alone.
// Mode (memory/hybrid) and memory-mode width are per-block configuration
// inputs, meant to be static after reset; the swizzle output is only
// meaningful in hybrid mode, where port A is 512 x 32.
//
// swz_write and swz_wait report, per block, a swizzle word written and a
// swizzle word held back by fabric traffic.
// Timing is that of mathram: one cycle per instruction, reads returned one
// cycle after the request. The number of blocks per column and the port-A
// arbitration are this design's choices.
module mathram_column
  import mathram_pkg::*;
#(
  parameter int unsigned N_BLOCKS = 4,
  parameter int unsigned ELEM_W   = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // per-block configuration
  input  logic [N_BLOCKS-1:0]               cfg_hybrid,
  input  logic [N_BLOCKS-1:0][2:0]          cfg_width,
  input  logic [N_BLOCKS-1:0][ROW_W-1:0]    swz_base_row,
  // per-block element streams into the swizzle units
  input  logic [N_BLOCKS-1:0]               elem_valid,
  output logic [N_BLOCKS-1:0]               elem_ready,
  input  logic [N_BLOCKS-1:0][ELEM_W-1:0]   elem_data,
  // per-block port A (fabric side)
  input  logic [N_BLOCKS-1:0]               a_en,
  input  logic [N_BLOCKS-1:0]               a_we,
  input  logic [N_BLOCKS-1:0][MEM_AW-1:0]   a_addr,
  input  logic [N_BLOCKS-1:0][HYB_W-1:0]    a_wdata,
  output logic [N_BLOCKS-1:0][HYB_W-1:0]    a_rdata,
  // per-block port B
  input  logic [N_BLOCKS-1:0]               b_en,
  input  logic [N_BLOCKS-1:0]               b_we,
  input  logic [N_BLOCKS-1:0][MEM_AW-1:0]   b_addr,
  input  logic [N_BLOCKS-1:0][HYB_W-1:0]    b_wdata,
  output logic [N_BLOCKS-1:0][HYB_W-1:0]    b_rdata,
  // column ends of the neighbour chain
  input  logic                              col_lo_in,
  input  logic                              col_hi_in,
  output logic                              col_lo_out,
  output logic                              col_hi_out,
  // status
  output logic [N_BLOCKS-1:0]               instr_exec,
  output logic [N_BLOCKS-1:0]               swz_write,
  output logic [N_BLOCKS-1:0]               swz_wait
);

  logic [N_BLOCKS-1:0] lo_out, hi_out;

  for (genvar k = 0; k < N_BLOCKS; k++) begin : g_blk
    logic              sw_valid, sw_ready;
    logic [HYB_AW-1:0] sw_addr;
    logic [HYB_W-1:0]  sw_data;
    logic              pa_en, pa_we;
    logic [MEM_AW-1:0] pa_addr;
    logic [HYB_W-1:0]  pa_wdata;
    logic              lo_in, hi_in;

    mathram_swizzle #(
      .ELEM_W(ELEM_W), .DW(HYB_W), .COLS(ARRAY_COLS), .ROWS(ARRAY_ROWS)
    ) u_swz (
      .clk, .rst_n,
      .base_row (swz_base_row[k]),
      .in_valid (elem_valid[k]),
      .in_ready (elem_ready[k]),
      .in_data  (elem_data[k]),
      .out_valid(sw_valid),
      .out_ready(sw_ready),
      .out_addr (sw_addr),
      .out_data (sw_data)
    );

    // fabric first, swizzle when port A is idle
    always_comb begin
      sw_ready = !a_en[k];
      if (a_en[k]) begin
        pa_en = 1'b1;  pa_we = a_we[k];  pa_addr = a_addr[k];  pa_wdata = a_wdata[k];
      end else begin
        pa_en = sw_valid;  pa_we = 1'b1;  pa_addr = MEM_AW'(sw_addr);  pa_wdata = sw_data;
      end
    end
    assign swz_write[k] = sw_valid && sw_ready;
    assign swz_wait[k]  = sw_valid && !sw_ready;

    assign lo_in = (k == 0)            ? col_lo_in : hi_out[(k == 0) ? 0 : k - 1];
    assign hi_in = (k == N_BLOCKS - 1) ? col_hi_in : lo_out[(k == N_BLOCKS - 1) ? k : k + 1];

    mathram #(.ROWS(ARRAY_ROWS), .COLS(ARRAY_COLS)) u_mathram (
      .clk, .rst_n,
      .mode     (cfg_hybrid[k] ? MODE_HYBRID : MODE_MEMORY),
      .width_cfg(width_e'(cfg_width[k])),
      .a_en     (pa_en),
      .a_we     (pa_we),
      .a_addr   (pa_addr),
      .a_wdata  (pa_wdata),
      .a_rdata  (a_rdata[k]),
      .b_en     (b_en[k]),
      .b_we     (b_we[k]),
      .b_addr   (b_addr[k]),
      .b_wdata  (b_wdata[k]),
      .b_rdata  (b_rdata[k]),
      .chain_lo_in (lo_in),
      .chain_hi_in (hi_in),
      .chain_lo_out(lo_out[k]),
      .chain_hi_out(hi_out[k]),
      .instr_exec  (instr_exec[k])
    );
  end

  assign col_lo_out = lo_out[0];
  assign col_hi_out = hi_out[N_BLOCKS-1];

endmodule
