// tb_workload_raid_search: RAID parity and equivalence search on a
// full-size MathRAM column (4 blocks, 512 lanes). Both workloads use only
// the truth-table mux and the mask; the sizes are this test's own.
//
// RAID: four 16-row "disks" D0..D3 are held in every block. Parity
// P = D0 ^ D1 ^ D2 ^ D3 takes 3 XOR instructions per row; then D1 is
// "lost" (overwritten) and rebuilt as P ^ D0 ^ D2 ^ D3. Parity and the
// rebuilt disk are read back and compared.
// Equivalence search: every lane holds a 16-bit word; a 16-bit key is
// broadcast. The match row starts at all ones; for each bit the mask is
// loaded with word XOR key and the match bit is cleared where the mask is
// set, so the search takes 1 + 2 * 16 cycles. Lanes that match are checked
// against a comparison done here (some lanes are forced to match).
module tb_workload_raid_search;
  import mathram_pkg::*;

  localparam int NB = 4, EW = 16, COLS = 128, LANES = NB * COLS;
  localparam int DR = 16;                                  // rows per disk
  localparam logic [6:0] D0 = 7'd0, PR = 7'd64, SW = 7'd80, KR = 7'd96, MR = 7'd112,
                         TMP = 7'd113, ZROW = 7'd126;

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

  // disk[b][d][row][quarter]
  logic [31:0] disk [NB][4][DR][4];
  logic [EW-1:0] words [LANES];
  logic [EW-1:0] key;

  initial begin
    int start, bad;
    logic [31:0] word, exp;
    cfg_hybrid = '1; cfg_width = '0; swz_base_row = '0;
    elem_valid = '0; elem_data = '0;
    a_en = '0; a_we = '0; a_addr = '0; a_wdata = '0;
    b_en = '0; b_we = '0; b_addr = '0; b_wdata = '0;
    col_lo_in = 0; col_hi_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    key = EW'($urandom);
    for (int g = 0; g < LANES; g++) words[g] = ($urandom_range(0, 3) == 0) ? key : EW'($urandom);
    for (int b = 0; b < NB; b++) begin
      for (int q = 0; q < 4; q++) port_a(b, 1, 14'(int'(ZROW) * 4 + q), '0);
      for (int d = 0; d < 4; d++)
        for (int r = 0; r < DR; r++)
          for (int q = 0; q < 4; q++) begin
            disk[b][d][r][q] = $urandom;
            port_a(b, 1, 14'((int'(D0) + d*DR + r) * 4 + q), disk[b][d][r][q]);
          end
      for (int m = 0; m < EW; m++)
        for (int q = 0; q < 4; q++) begin
          for (int i = 0; i < 32; i++) word[i] = words[b*COLS + q*32 + i][m];
          port_a(b, 1, 14'((int'(SW) + m) * 4 + q), word);
          port_a(b, 1, 14'((int'(KR) + m) * 4 + q), {32{key[m]}});
        end
    end

    // ---- RAID parity ----
    start = n_instr;
    for (int r = 0; r < DR; r++) begin
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_XOR, 7'(PR + r), 7'(D0 + r), 7'(D0 + DR + r)));
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_XOR, 7'(PR + r), 7'(PR + r), 7'(D0 + 2*DR + r)));
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_XOR, 7'(PR + r), 7'(PR + r), 7'(D0 + 3*DR + r)));
    end
    issue_end();
    check("parity cycles = 3 per row", 32'(n_instr - start), 32'(3 * DR));
    // lose disk 1, then rebuild it
    for (int r = 0; r < DR; r++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_ZERO, 7'(D0 + DR + r), ZROW, ZROW));
    for (int r = 0; r < DR; r++) begin
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_XOR, 7'(D0 + DR + r), 7'(PR + r), 7'(D0 + r)));
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_XOR, 7'(D0 + DR + r), 7'(D0 + DR + r), 7'(D0 + 2*DR + r)));
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_XOR, 7'(D0 + DR + r), 7'(D0 + DR + r), 7'(D0 + 3*DR + r)));
    end
    issue_end();
    bad = 0;
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < DR; r++)
        for (int q = 0; q < 4; q++) begin
          exp = disk[b][0][r][q] ^ disk[b][1][r][q] ^ disk[b][2][r][q] ^ disk[b][3][r][q];
          port_a(b, 0, 14'((int'(PR) + r) * 4 + q), '0);
          if (a_rdata[b] !== exp) bad++;
          port_a(b, 0, 14'((int'(D0) + DR + r) * 4 + q), '0);
          if (a_rdata[b] !== disk[b][1][r][q]) bad++;
        end
    check("parity and rebuilt disk", 32'(bad), 0);

    // ---- equivalence search ----
    start = n_instr;
    issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, 4'b1111, MR, ZROW, ZROW));
    for (int m = 0; m < EW; m++) begin
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b1, TT_XOR, TMP, 7'(SW + m), 7'(KR + m)));
      issue_all(make_instr(PRED_MASK, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_ZERO, MR, ZROW, ZROW));
    end
    issue_end();
    check("search cycles = 1 + 2 * bits", 32'(n_instr - start), 32'(1 + 2 * EW));
    bad = 0;
    begin
      int n_match = 0;
      for (int b = 0; b < NB; b++)
        for (int q = 0; q < 4; q++) begin
          port_a(b, 0, 14'(int'(MR) * 4 + q), '0);
          for (int i = 0; i < 32; i++) begin
            if (a_rdata[b][i] !== (words[b*COLS + q*32 + i] == key)) bad++;
            if (a_rdata[b][i]) n_match++;
          end
        end
      check("match flags of all 512 lanes", 32'(bad), 0);
      check("some lanes matched", 32'(n_match > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
