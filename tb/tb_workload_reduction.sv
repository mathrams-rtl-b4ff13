// tb_workload_reduction: in-memory reduction (sum of all lanes) on a
// full-size MathRAM column (4 blocks, 512 lanes), using only adds and
// neighbour shifts, with the shifts running across the block boundaries.
//
// Every lane g holds a random 8-bit value x[g] in a 17-bit sum field S
// (enough for 512 x 255). The program, issued to all four blocks at once, is
// a log-step tree over distances d = 1, 2, 4, ..., 256:
//   T = S                      17 cycles
//   repeat d: T = T shifted one lane down (lane g takes lane g+1's bit),
//             17 cycles per step, zeros entering at the top of the column
//   S += T                     17 + 1 cycles
// After the last step lane g holds x[g] + x[g+1] + ... + x[511], so lane 0
// holds the sum of all 512 lanes. Every lane's suffix sum is read back and
// compared, and the cycle count is checked: 9 * (17 + 18) + 511 * 17 = 9002.
// The tree order and the row allocation are this test's own.
module tb_workload_reduction;
  import mathram_pkg::*;

  localparam int NB = 4, EW = 16, COLS = 128, LANES = NB * COLS;
  localparam int XW = 8, SW = 17, STEPS = 9;
  localparam logic [6:0] SR = 7'd0, TR = 7'd32, TMP = 7'd100, ZROW = 7'd126;

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
    repeat (40000) @(posedge clk);
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

  logic [XW-1:0] x [LANES];

  initial begin
    int start;
    logic [31:0] word;
    cfg_hybrid = '1; cfg_width = '0; swz_base_row = '0;
    elem_valid = '0; elem_data = '0;
    a_en = '0; a_we = '0; a_addr = '0; a_wdata = '0;
    b_en = '0; b_we = '0; b_addr = '0; b_wdata = '0;
    col_lo_in = 0; col_hi_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int g = 0; g < LANES; g++) x[g] = XW'($urandom);
    for (int b = 0; b < NB; b++) begin
      for (int q = 0; q < 4; q++) port_a(b, 1, 14'(int'(ZROW) * 4 + q), '0);
      for (int m = 0; m < SW; m++)
        for (int q = 0; q < 4; q++) begin
          for (int i = 0; i < 32; i++) word[i] = (m < XW) ? x[b*COLS + q*32 + i][m] : 1'b0;
          port_a(b, 1, 14'((int'(SR) + m) * 4 + q), word);
        end
    end

    start = n_instr;
    for (int s = 0; s < STEPS; s++) begin
      for (int m = 0; m < SW; m++)
        issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_A, 7'(TR + m), 7'(SR + m), ZROW));
      for (int d = 0; d < (1 << s); d++)
        for (int m = 0; m < SW; m++)
          issue_all(make_instr(PRED_ALWAYS, WSEL_NEIGH, 1'b1, 1'b0, 1'b0, TT_A, 7'(TR + m), 7'(TR + m), ZROW));
      for (int m = 0; m < SW; m++)
        issue_all(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(SR + m), 7'(SR + m), 7'(TR + m)));
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, TMP, ZROW, ZROW));
    end
    issue_end();
    $display("reduction of 512 lanes: %0d MathRAM cycles", n_instr - start);
    check("cycle count", 32'(n_instr - start), 32'(STEPS * (2 * SW + 1) + (LANES - 1) * SW));

    begin
      int bad = 0;
      logic [31:0] y;
      logic [SW-1:0] acc [LANES];
      for (int g = 0; g < LANES; g++) acc[g] = '0;
      for (int b = 0; b < NB; b++)
        for (int m = 0; m < SW; m++)
          for (int q = 0; q < 4; q++) begin
            port_a(b, 0, 14'((int'(SR) + m) * 4 + q), '0);
            for (int i = 0; i < 32; i++) acc[b*COLS + q*32 + i][m] = a_rdata[b][i];
          end
      y = 0;
      for (int g = LANES - 1; g >= 0; g--) begin
        y += 32'(x[g]);
        if (32'(acc[g]) !== y) begin
          if (bad < 4) $display("  lane %0d: got %0d expected %0d", g, acc[g], y);
          bad++;
        end
      end
      check("suffix sums of all 512 lanes", 32'(bad), 0);
      check("total in lane 0", 32'(acc[0]), y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
