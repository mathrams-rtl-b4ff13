// tb_workload_moving_average: a 16-bit moving-average filter on a full-size
// MathRAM column (4 blocks, 512 lanes), with 128 and then 256 taps.
//
// 512 random 16-bit samples x[g] are streamed in through the four swizzle
// units, so lane g (block g/128, column g%128) holds sample g. Each lane then
// computes the window sum y[g] = x[g] + x[g-1] + ... + x[g-T+1] (samples
// before lane 0 count as 0) with this instruction program, issued to all
// four blocks in the same cycle:
//   acc = 0;  s = x;
//   repeat T: acc += s (24-bit, 24 + 1 cycles);  s = s shifted one lane up
//             (16 cycles, crossing block boundaries over the neighbour links)
// The average is acc >> log2(T), i.e. rows 7.. (or 8..) of the accumulator.
// Every lane's 24-bit sum is read back and compared with integer
// arithmetic, and the instruction count is checked against
// 40 + T * 41 cycles. The mapping of the filter onto lanes is this test's own.
module tb_workload_moving_average;
  import mathram_pkg::*;

  localparam int NB = 4, EW = 16, COLS = 128, LANES = NB * COLS;
  localparam int AW = 24;                   // accumulator bits
  localparam logic [6:0] XR = 7'd0, SR = 7'd16, AR = 7'd32, TMP = 7'd100, ZROW = 7'd126;

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

  int checks = 0, failures = 0, n_instr = 0;

  mathram_column dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (instr_exec[0]) n_instr++;

  initial begin
    repeat (60000) @(posedge clk);
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

  task automatic issue_all(instr_t i);
    @(negedge clk);
    for (int k = 0; k < NB; k++) begin
      a_en[k] = 1; a_we[k] = 1; a_addr[k] = 14'(INSTR_ADDR); a_wdata[k] = 32'(i);
    end
  endtask

  task automatic issue_end();
    @(posedge clk);
    #1 a_en = '0; a_we = '0;
  endtask

  task automatic port_a(int k, logic we, logic [13:0] addr, logic [31:0] data);
    @(negedge clk);
    a_en[k] = 1; a_we[k] = we; a_addr[k] = addr; a_wdata[k] = data;
    @(posedge clk);
    #1 a_en[k] = 0; a_we[k] = 0;
  endtask

  logic [EW-1:0] x [LANES];

  task automatic run_filter(int taps);
    logic [31:0] y, got;
    int start;
    start = n_instr;
    for (int m = 0; m < AW; m++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(AR + m), ZROW, ZROW));
    for (int m = 0; m < EW; m++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_A, 7'(SR + m), 7'(XR + m), ZROW));
    for (int t = 0; t < taps; t++) begin
      for (int m = 0; m < AW; m++)
        issue_all(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(AR + m),
                             7'(AR + m), (m < EW) ? 7'(SR + m) : ZROW));
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, TMP, ZROW, ZROW));
      for (int m = 0; m < EW; m++)
        issue_all(make_instr(PRED_ALWAYS, WSEL_NEIGH, 1'b0, 1'b0, 1'b0, TT_A, 7'(SR + m), 7'(SR + m), ZROW));
    end
    issue_end();
    $display("moving average, %0d taps: %0d MathRAM cycles", taps, n_instr - start);
    check($sformatf("%0d taps: cycle count 40 + T*41", taps), 32'(n_instr - start), 32'(40 + taps * 41));
    // read back every lane's sum
    begin
      int bad = 0;
      logic [AW-1:0] acc [LANES];
      for (int g = 0; g < LANES; g++) acc[g] = '0;
      for (int k = 0; k < NB; k++)
        for (int m = 0; m < AW; m++)
          for (int q = 0; q < 4; q++) begin
            port_a(k, 0, 14'((int'(AR) + m) * 4 + q), '0);
            for (int b = 0; b < 32; b++) acc[k*COLS + q*32 + b][m] = a_rdata[k][b];
          end
      for (int g = 0; g < LANES; g++) begin
        y = 0;
        for (int t = 0; t < taps; t++) if (g - t >= 0) y += 32'(x[g - t]);
        if (32'(acc[g]) !== y) begin
          if (bad < 4) $display("  lane %0d: got %0d expected %0d", g, acc[g], y);
          bad++;
        end
      end
      check($sformatf("%0d taps: window sums of all 512 lanes", taps), 32'(bad), 0);
      check($sformatf("%0d taps: average of lane 511", taps),
            32'(acc[LANES-1] >> $clog2(taps)), 32'(y >> $clog2(taps)));
    end
  endtask

  initial begin
    cfg_hybrid = '1; cfg_width = '0; swz_base_row = '0;
    elem_valid = '0; elem_data = '0;
    a_en = '0; a_we = '0; a_addr = '0; a_wdata = '0;
    b_en = '0; b_we = '0; b_addr = '0; b_wdata = '0;
    col_lo_in = 0; col_hi_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NB; k++)
      for (int q = 0; q < 4; q++) port_a(k, 1, 14'(int'(ZROW) * 4 + q), '0);

    // samples in through the swizzle units, all four blocks at once
    for (int g = 0; g < LANES; g++) x[g] = EW'($urandom);
    for (int e = 0; e < COLS; e++) begin
      @(negedge clk);
      for (int k = 0; k < NB; k++) begin elem_valid[k] = 1; elem_data[k] = x[k*COLS + e]; end
      @(posedge clk);
      check("swizzle accepts one sample per cycle", 32'(elem_ready), 32'(4'hf));
    end
    @(negedge clk);
    elem_valid = '0;
    repeat (3 * EW) @(posedge clk);

    run_filter(128);
    run_filter(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
