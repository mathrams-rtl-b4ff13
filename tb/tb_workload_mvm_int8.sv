// tb_workload_mvm_int8: int8 matrix-vector multiplication on a full-size
// MathRAM column (4 blocks, 512 lanes), as in the LSTM gate computations.
//
// Lane g holds row g of a 512 x K matrix W (unsigned 8-bit, K = 4 here) and
// computes y[g] = sum_k W[g][k] * x[k]. The vector element x[k] is written
// to every lane (a row of all-ones or all-zeros per bit). Per k the program,
// issued to all four blocks at once, is:
//   P = W_k * x_k      8 x 8 multiply, N*N + 3N - 2 = 86 cycles
//   acc += P           18-bit accumulate, 18 + 1 cycles
// so the check on the cycle count is 18 + K * (86 + 19). All 512 results
// are read back and compared with integer arithmetic. The row allocation
// and the unsigned interpretation of int8 are this test's own.
module tb_workload_mvm_int8;
  import mathram_pkg::*;

  localparam int NB = 4, EW = 16, COLS = 128, LANES = NB * COLS;
  localparam int K = 4, N = 8, AW = 18;
  localparam logic [6:0] WR = 7'd0, XR = 7'd32, PR = 7'd64, AR = 7'd80,
                         TMP = 7'd100, ZROW = 7'd126;

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

  logic [7:0] w [LANES][K];
  logic [7:0] x [K];

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

    for (int g = 0; g < LANES; g++) for (int k = 0; k < K; k++) w[g][k] = 8'($urandom);
    for (int k = 0; k < K; k++) x[k] = 8'($urandom);

    // load W transposed, x broadcast, and the zero row
    for (int b = 0; b < NB; b++) begin
      for (int q = 0; q < 4; q++) port_a(b, 1, 14'(int'(ZROW) * 4 + q), '0);
      for (int k = 0; k < K; k++)
        for (int m = 0; m < N; m++)
          for (int q = 0; q < 4; q++) begin
            for (int i = 0; i < 32; i++) word[i] = w[b*COLS + q*32 + i][k][m];
            port_a(b, 1, 14'((int'(WR) + k*N + m) * 4 + q), word);
            port_a(b, 1, 14'((int'(XR) + k*N + m) * 4 + q), {32{x[k][m]}});
          end
    end

    start = n_instr;
    for (int m = 0; m < AW; m++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(AR + m), ZROW, ZROW));
    for (int k = 0; k < K; k++) begin
      // P = W_k * x_k
      for (int m = 0; m < N; m++)
        issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_AND, 7'(PR + m),
                             7'(WR + k*N + m), 7'(XR + k*N)));
      for (int m = N; m < 2*N; m++)
        issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(PR + m), ZROW, ZROW));
      for (int j = 1; j < N; j++) begin
        issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b1, TT_A, TMP, 7'(XR + k*N + j), ZROW));
        for (int m = 0; m < N; m++)
          issue_all(make_instr(PRED_MASK, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(PR + j + m),
                               7'(WR + k*N + m), 7'(PR + j + m)));
        issue_all(make_instr(PRED_MASK, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(PR + j + N), ZROW, ZROW));
      end
      // acc += P
      for (int m = 0; m < AW; m++)
        issue_all(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(AR + m),
                             7'(AR + m), (m < 2*N) ? 7'(PR + m) : ZROW));
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, TMP, ZROW, ZROW));
    end
    issue_end();
    $display("int8 MVM, 512 x %0d: %0d MathRAM cycles", K, n_instr - start);
    check("cycle count AW + K*(N*N+3N-2 + AW+1)", 32'(n_instr - start),
          32'(AW + K * (N*N + 3*N - 2 + AW + 1)));

    begin
      int bad = 0;
      logic [31:0] y;
      logic [AW-1:0] acc [LANES];
      for (int g = 0; g < LANES; g++) acc[g] = '0;
      for (int b = 0; b < NB; b++)
        for (int m = 0; m < AW; m++)
          for (int q = 0; q < 4; q++) begin
            port_a(b, 0, 14'((int'(AR) + m) * 4 + q), '0);
            for (int i = 0; i < 32; i++) acc[b*COLS + q*32 + i][m] = a_rdata[b][i];
          end
      for (int g = 0; g < LANES; g++) begin
        y = 0;
        for (int k = 0; k < K; k++) y += 32'(w[g][k]) * 32'(x[k]);
        if (32'(acc[g]) !== y) begin
          if (bad < 4) $display("  lane %0d: got %0d expected %0d", g, acc[g], y);
          bad++;
        end
      end
      check("dot products of all 512 lanes", 32'(bad), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
