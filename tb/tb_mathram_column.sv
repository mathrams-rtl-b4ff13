// tb_mathram_column: end-to-end test of a MathRAM column at its default
// size (4 MathRAMs of 128 x 128, 16-bit swizzle units).
//
// Blocks 0..2 run in hybrid mode, block 3 in memory mode (x8).
//  1. 128 random 16-bit elements are streamed into blocks 0 and 1 through
//     their swizzle units while the fabric keeps reading block 0 on port A,
//     so block 0's swizzle has to wait (port-A arbitration stall) and its
//     element input is back-pressured.
//  2. A second operand is written transposed through port A of block 0, and
//     a 16-bit addition (17 instructions) runs in block 0; a predicated copy
//     (mask = bit 0 of the operand) runs in block 1.
//  3. One shift instruction is issued to blocks 0..2 in the same cycle, so
//     bits cross from block 0 to block 1 and from block 1 to block 2 over the
//     neighbour links; the column ends are driven from outside.
//  4. Block 3 is used as a plain x8 RAM on both ports.
// Every result is compared with integer arithmetic done here. Each
// mechanism is counted, and one that never happened counts as a failure.
module tb_mathram_column;
  import mathram_pkg::*;

  localparam int NB = 4, EW = 16, COLS = 128;
  localparam logic [6:0] ZROW = 7'd126;

  logic                      clk = 0, rst_n = 0;
  logic [NB-1:0]             cfg_hybrid;
  logic [NB-1:0][2:0]        cfg_width;
  logic [NB-1:0][6:0]        swz_base_row;
  logic [NB-1:0]             elem_valid, elem_ready;
  logic [NB-1:0][EW-1:0]     elem_data;
  logic [NB-1:0]             a_en, a_we, b_en, b_we;
  logic [NB-1:0][13:0]       a_addr, b_addr;
  logic [NB-1:0][31:0]       a_wdata, b_wdata, a_rdata, b_rdata;
  logic                      col_lo_in, col_hi_in, col_lo_out, col_hi_out;
  logic [NB-1:0]             instr_exec, swz_write, swz_wait;

  int checks = 0, failures = 0;
  int n_instr = 0, n_swz_write = 0, n_swz_stall = 0, n_backpressure = 0;
  int n_cross_shift = 0, n_pred_mask = 0, n_mem_mode = 0, n_hyb_read = 0;

  mathram_column dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NB; k++) begin
      if (instr_exec[k]) n_instr++;
      if (swz_write[k]) n_swz_write++;
      if (elem_valid[k] && !elem_ready[k]) n_backpressure++;
    end
    if (swz_wait[0]) n_swz_stall++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  typedef logic [31:0] vec_t [COLS];

  task automatic port_a(int k, logic we, logic [13:0] addr, logic [31:0] data);
    @(negedge clk);
    a_en[k] = 1; a_we[k] = we; a_addr[k] = addr; a_wdata[k] = data;
    @(posedge clk);
    #1 a_en[k] = 0; a_we[k] = 0;
  endtask

  task automatic put_elems(int k, logic [6:0] base, int nbits, vec_t v);
    logic [31:0] w;
    for (int m = 0; m < nbits; m++)
      for (int q = 0; q < 4; q++) begin
        for (int b = 0; b < 32; b++) w[b] = v[q*32+b][m];
        port_a(k, 1, 14'((int'(base) + m) * 4 + q), w);
      end
  endtask

  task automatic get_elems(int k, logic [6:0] base, int nbits, output vec_t v);
    for (int e = 0; e < COLS; e++) v[e] = '0;
    for (int m = 0; m < nbits; m++)
      for (int q = 0; q < 4; q++) begin
        port_a(k, 0, 14'((int'(base) + m) * 4 + q), '0);
        n_hyb_read++;
        for (int b = 0; b < 32; b++) v[q*32+b][m] = a_rdata[k][b];
      end
  endtask

  task automatic check_elems(string what, vec_t got, vec_t exp);
    int bad = 0;
    for (int e = 0; e < COLS; e++) if (got[e] !== exp[e]) begin
      if (bad < 4) $display("  %s column %0d: got %0d expected %0d", what, e, got[e], exp[e]);
      bad++;
    end
    check(what, 32'(bad), 32'd0);
  endtask

  task automatic stream(int k, vec_t v);
    int e = 0;
    while (e < COLS) begin
      @(negedge clk);
      elem_valid[k] = 1; elem_data[k] = EW'(v[e]);
      @(posedge clk);
      if (elem_ready[k]) e++;
    end
    @(negedge clk);
    elem_valid[k] = 0;
  endtask

  // issue one instruction word to several blocks in the same cycle
  task automatic issue(logic [NB-1:0] blocks, instr_t i);
    @(negedge clk);
    for (int k = 0; k < NB; k++) if (blocks[k]) begin
      a_en[k] = 1; a_we[k] = 1; a_addr[k] = 14'(INSTR_ADDR); a_wdata[k] = 32'(i);
    end
  endtask

  task automatic issue_end();
    @(posedge clk);
    #1 a_en = '0; a_we = '0;
  endtask

  initial begin
    vec_t x0, x1, y, r, e;
    logic [7:0] mem3 [16384/8];
    bit stream_done;
    cfg_hybrid = 4'b0111;
    cfg_width  = '{3'(WIDTH_8), 3'(WIDTH_32), 3'(WIDTH_32), 3'(WIDTH_32)};
    swz_base_row = '0;
    elem_valid = '0; elem_data = '0;
    a_en = '0; a_we = '0; a_addr = '0; a_wdata = '0;
    b_en = '0; b_we = '0; b_addr = '0; b_wdata = '0;
    col_lo_in = 0; col_hi_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // zero rows of the hybrid blocks
    for (int k = 0; k < 3; k++)
      for (int q = 0; q < 4; q++) port_a(k, 1, 14'(int'(ZROW) * 4 + q), '0);

    // 1. swizzle streams, with fabric reads of block 0 in parallel
    for (int c = 0; c < COLS; c++) begin x0[c] = 32'(EW'($urandom)); x1[c] = 32'(EW'($urandom)); end
    stream_done = 0;
    fork
      begin
        fork
          stream(0, x0);
          stream(1, x1);
        join
        stream_done = 1;
      end
      begin
        while (!stream_done) begin
          repeat (6) port_a(0, 0, 14'(ZROW) * 4, '0);
          @(posedge clk);
        end
      end
    join
    repeat (40) @(posedge clk);
    get_elems(0, 7'd0, EW, r);
    check_elems("block 0 swizzled elements", r, x0);
    get_elems(1, 7'd0, EW, r);
    check_elems("block 1 swizzled elements", r, x1);

    // 2a. 16-bit addition in block 0: rows 0..15 + rows 20..35 -> rows 40..56
    for (int c = 0; c < COLS; c++) y[c] = 32'(EW'($urandom));
    put_elems(0, 7'd20, EW, y);
    for (int m = 0; m < EW; m++)
      issue(4'b0001, make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR,
                                7'(40+m), 7'(m), 7'(20+m)));
    issue(4'b0001, make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(40+EW), ZROW, ZROW));
    issue_end();
    get_elems(0, 7'd40, EW + 1, r);
    for (int c = 0; c < COLS; c++) e[c] = x0[c] + y[c];
    check_elems("block 0 16-bit addition", r, e);

    // 2b. predicated copy in block 1: mask = bit 0 of x1, copy row 1 -> 60
    issue(4'b0010, make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_ZERO, 7'd60, ZROW, ZROW));
    issue(4'b0010, make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b1, TT_A, 7'd61, 7'd0, ZROW));
    issue(4'b0010, make_instr(PRED_MASK, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_A, 7'd60, 7'd1, ZROW));
    issue_end();
    n_pred_mask++;
    get_elems(1, 7'd60, 1, r);
    for (int c = 0; c < COLS; c++) e[c] = 32'(x1[c][0] & x1[c][1]);
    check_elems("block 1 predicated copy", r, e);

    // 3. one shift towards higher columns across blocks 0..2 (row 0 -> row 70)
    col_lo_in = 1;
    issue(4'b0111, make_instr(PRED_ALWAYS, WSEL_NEIGH, 1'b0, 1'b0, 1'b0, TT_A, 7'd70, 7'd0, ZROW));
    #1 check("column low end out", 32'(col_lo_out), 32'(x0[0][0]));
    issue_end();
    get_elems(1, 7'd70, 1, r);
    check("block 1 column 0 took block 0 column 127", 32'(r[0]), 32'(x0[COLS-1][0]));
    for (int c = 1; c < COLS; c++) e[c] = 32'(x1[c-1][0]);
    e[0] = r[0];
    check_elems("block 1 shifted row", r, e);
    if (r[0] == 32'(x0[COLS-1][0])) n_cross_shift++;
    get_elems(2, 7'd70, 1, r);
    check("block 2 column 0 took block 1 column 127", 32'(r[0]), 32'(x1[COLS-1][0]));
    if (r[0] == 32'(x1[COLS-1][0])) n_cross_shift++;
    get_elems(0, 7'd70, 1, r);
    check("block 0 column 0 took the column input", 32'(r[0]), 32'd1);

    // 4. block 3 as an x8 RAM on both ports
    for (int i = 0; i < 64; i++) begin
      mem3[i] = 8'($urandom);
      port_a(3, 1, 14'(i * 37), 32'(mem3[i]));
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      b_en[3] = 1; b_we[3] = 0; b_addr[3] = 14'(i * 37);
      @(posedge clk);
      #1 b_en[3] = 0;
      check("block 3 x8 read on port B", b_rdata[3], 32'(mem3[i]));
      n_mem_mode++;
    end

    // every mechanism must have happened
    check("instructions executed", 32'(n_instr > 0), 1);
    check("swizzle writes", 32'(n_swz_write == 2 * EW * COLS / 32), 1);
    check("swizzle waited for fabric port A", 32'(n_swz_stall > 0), 1);
    check("element stream back-pressured", 32'(n_backpressure > 0), 1);
    check("shift crossed block boundaries", 32'(n_cross_shift), 2);
    check("mask predication used", 32'(n_pred_mask > 0), 1);
    check("memory-mode accesses", 32'(n_mem_mode > 0), 1);
    check("hybrid-mode reads", 32'(n_hyb_read > 0), 1);
    $display("mechanisms: instr=%0d swz_write=%0d swz_stall=%0d backpressure=%0d cross_shift=%0d mem=%0d",
             n_instr, n_swz_write, n_swz_stall, n_backpressure, n_cross_shift, n_mem_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
