// tb_mathram: self-checking test of one MathRAM in both modes.
//
// Hybrid mode, with 128 random elements per operand stored transposed:
//   - 4-bit AND, one instruction per bit;
//   - 8-bit addition: N add instructions plus one that stores the carry
//     (and clears it), N+1 back-to-back cycles in all;
//   - 4-bit x 4-bit multiplication by predicated shift-and-add, which takes
//     N*N + 3*N - 2 instructions;
//   - carry and inverted-carry predication after an unfinished addition;
//   - shifts by one column in both directions, including the values that
//     enter from the chain inputs and leave on the chain outputs;
//   - port B reads while idle, a port-B write to 0x1ff that must be dropped.
// Memory mode, after a new reset: random writes and reads on both ports at
// every width, checked against a 16 Kbit shadow memory, including address
// 0x1ff, which is ordinary storage there.
// Results are read back through port A and compared with values computed
// here with integer arithmetic.
module tb_mathram;
  import mathram_pkg::*;

  localparam int COLS = 128;
  localparam logic [6:0] ZROW = 7'd126;   // all-zero row kept for clearing

  logic        clk = 0, rst_n = 0;
  mode_e       mode;
  width_e      width_cfg;
  logic        a_en, a_we, b_en, b_we;
  logic [13:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic        chain_lo_in, chain_hi_in, chain_lo_out, chain_hi_out, instr_exec;

  int checks = 0, failures = 0;
  int n_instr_cycles = 0;

  mathram dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (instr_exec) n_instr_cycles++;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------- port helpers ----------------
  task automatic idle();
    a_en = 0; a_we = 0; b_en = 0; b_we = 0;
  endtask

  task automatic write_a(logic [13:0] addr, logic [31:0] data);
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = addr; a_wdata = data;
    @(posedge clk);
    #1 idle();
  endtask

  task automatic read_a(logic [13:0] addr, output logic [31:0] data);
    @(negedge clk);
    a_en = 1; a_we = 0; a_addr = addr;
    @(posedge clk);
    #1 idle();
    data = a_rdata;
  endtask

  task automatic issue(instr_t i);
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = 14'(INSTR_ADDR); a_wdata = 32'(i);
  endtask

  task automatic issue_end();
    @(posedge clk);
    #1 idle();
  endtask

  // ---------------- transposed element helpers ----------------
  typedef logic [15:0] vec_t [COLS];

  task automatic put_elems(logic [6:0] base, int nbits, vec_t v);
    logic [31:0] w;
    for (int m = 0; m < nbits; m++)
      for (int q = 0; q < 4; q++) begin
        for (int b = 0; b < 32; b++) w[b] = v[q*32+b][m];
        write_a(14'((int'(base) + m) * 4 + q), w);
      end
  endtask

  task automatic get_elems(logic [6:0] base, int nbits, output vec_t v);
    logic [31:0] w;
    for (int e = 0; e < COLS; e++) v[e] = '0;
    for (int m = 0; m < nbits; m++)
      for (int q = 0; q < 4; q++) begin
        read_a(14'((int'(base) + m) * 4 + q), w);
        for (int b = 0; b < 32; b++) v[q*32+b][m] = w[b];
      end
  endtask

  task automatic rand_elems(int nbits, output vec_t v);
    for (int e = 0; e < COLS; e++) v[e] = 16'($urandom) & 16'((1 << nbits) - 1);
  endtask

  task automatic check_elems(string what, vec_t got, vec_t exp);
    int bad = 0;
    for (int e = 0; e < COLS; e++) if (got[e] !== exp[e]) begin
      if (bad < 4) $display("  %s column %0d: got %0d expected %0d", what, e, got[e], exp[e]);
      bad++;
    end
    check(what, 32'(bad), 32'd0);
  endtask

  // ---------------- memory-mode shadow ----------------
  logic [16383:0] shadow;

  task automatic mem_phase(width_e wc);
    int w, depth, addr_a, addr_b;
    logic [31:0] da, db, mask;
    w = 1 << int'(wc);
    depth = 16384 / w;
    mask = (w == 32) ? 32'hffff_ffff : 32'((1 << w) - 1);
    @(negedge clk);
    width_cfg = wc;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      addr_a = (n % 7 == 0) ? (9'h1ff * 32 / w) % depth : $urandom_range(0, depth - 1);
      addr_b = $urandom_range(0, depth - 1);
      if (addr_b == addr_a) addr_b = (addr_b + 1) % depth;
      da = $urandom & mask; db = $urandom & mask;
      a_en = 1; a_we = ($urandom_range(0, 1) == 1); a_addr = 14'(addr_a); a_wdata = da;
      b_en = 1; b_we = ($urandom_range(0, 1) == 1); b_addr = 14'(addr_b); b_wdata = db;
      @(posedge clk);
      #1;
      if (!a_we) check($sformatf("mem x%0d port A read", w), a_rdata, 32'(shadow[addr_a*w +: 32]) & mask);
      if (!b_we) check($sformatf("mem x%0d port B read", w), b_rdata, 32'(shadow[addr_b*w +: 32]) & mask);
      for (int i = 0; i < w; i++) begin
        if (a_we) shadow[addr_a*w + i] = da[i];
        if (b_we) shadow[addr_b*w + i] = db[i];
      end
      idle();
    end
  endtask

  initial begin
    vec_t x, y, z, r, e;
    int start, n;
    logic [31:0] w;
    idle();
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    chain_lo_in = 0; chain_hi_in = 0;
    mode = MODE_HYBRID; width_cfg = WIDTH_1;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // zero row
    for (int q = 0; q < 4; q++) write_a(14'(int'(ZROW) * 4 + q), '0);

    // ---- 4-bit AND (rows i=0, j=8, k=16) ----
    rand_elems(4, x); rand_elems(4, y);
    put_elems(7'd0, 4, x); put_elems(7'd8, 4, y);
    for (int m = 0; m < 4; m++) begin
      issue(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_AND, 7'(16+m), 7'(0+m), 7'(8+m)));
      issue_end();
    end
    get_elems(7'd16, 4, r);
    for (int c = 0; c < COLS; c++) e[c] = x[c] & y[c];
    check_elems("4-bit AND", r, e);

    // ---- 8-bit addition: rows 20.., 30.., result 40..48 ----
    rand_elems(8, x); rand_elems(8, y);
    put_elems(7'd20, 8, x); put_elems(7'd30, 8, y);
    start = n_instr_cycles;
    n = 0;
    for (int m = 0; m < 8; m++) begin
      issue(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(40+m), 7'(20+m), 7'(30+m)));
      n++;
    end
    issue(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b1, 1'b1, 1'b0, TT_ZERO, 7'd48, ZROW, ZROW));
    issue_end();
    check("addition cycles = N+1", 32'(n_instr_cycles - start), 32'd9);
    get_elems(7'd40, 9, r);
    for (int c = 0; c < COLS; c++) e[c] = x[c] + y[c];
    check_elems("8-bit addition", r, e);

    // ---- 4x4 multiplication: M rows 50.., Q rows 55.., P rows 60..67, scratch 70 ----
    rand_elems(4, x); rand_elems(4, y);
    put_elems(7'd50, 4, x); put_elems(7'd55, 4, y);
    start = n_instr_cycles;
    for (int m = 0; m < 4; m++)
      issue(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_AND, 7'(60+m), 7'(50+m), 7'd55));
    for (int m = 4; m < 8; m++)
      issue(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(60+m), ZROW, ZROW));
    for (int k = 1; k < 4; k++) begin
      issue(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b1, TT_A, 7'd70, 7'(55+k), ZROW));
      for (int m = 0; m < 4; m++)
        issue(make_instr(PRED_MASK, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(60+k+m), 7'(50+m), 7'(60+k+m)));
      issue(make_instr(PRED_MASK, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(60+k+4), ZROW, ZROW));
    end
    issue_end();
    check("multiplication cycles = N*N+3N-2", 32'(n_instr_cycles - start), 32'(4*4 + 3*4 - 2));
    get_elems(7'd60, 8, r);
    for (int c = 0; c < COLS; c++) e[c] = x[c] * y[c];
    check_elems("4x4 multiplication", r, e);

    // ---- carry / inverted-carry predication: carry-out of 6-bit x+y ----
    rand_elems(6, x); rand_elems(6, y);
    put_elems(7'd80, 6, x); put_elems(7'd88, 6, y);
    for (int m = 0; m < 6; m++)
      issue(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'd96, 7'(80+m), 7'(88+m)));
    issue(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_ZERO, 7'd97, ZROW, ZROW));  // clear rows
    issue(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_ZERO, 7'd98, ZROW, ZROW));
    issue(make_instr(PRED_CARRY,  WSEL_TR, 1'b0, 1'b0, 1'b0, 4'b1111, 7'd97, ZROW, ZROW));
    issue(make_instr(PRED_NCARRY, WSEL_TR, 1'b1, 1'b0, 1'b0, 4'b1111, 7'd98, ZROW, ZROW));
    issue(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'd99, ZROW, ZROW));  // clear carry
    issue_end();
    get_elems(7'd97, 1, r);
    for (int c = 0; c < COLS; c++) e[c] = 16'((x[c] + y[c]) >> 6);
    check_elems("carry predication", r, e);
    get_elems(7'd98, 1, r);
    for (int c = 0; c < COLS; c++) e[c] = 16'(((x[c] + y[c]) >> 6) ^ 1);
    check_elems("inverted-carry predication", r, e);

    // ---- shifts, row 100 -> 101 (towards higher columns), 102 (lower) ----
    rand_elems(1, x);
    put_elems(7'd100, 1, x);
    chain_lo_in = 1; chain_hi_in = 0;
    issue(make_instr(PRED_ALWAYS, WSEL_NEIGH, 1'b0, 1'b0, 1'b0, TT_A, 7'd101, 7'd100, ZROW));
    #1 check("chain_lo_out", 32'(chain_lo_out), 32'(x[0]));
    check("chain_hi_out", 32'(chain_hi_out), 32'(x[COLS-1]));
    issue_end();
    chain_lo_in = 0; chain_hi_in = 1;
    issue(make_instr(PRED_ALWAYS, WSEL_NEIGH, 1'b1, 1'b0, 1'b0, TT_A, 7'd102, 7'd100, ZROW));
    issue_end();
    get_elems(7'd101, 1, r);
    for (int c = 0; c < COLS; c++) e[c] = (c == 0) ? 16'd1 : x[c-1];
    check_elems("shift towards higher columns", r, e);
    get_elems(7'd102, 1, r);
    for (int c = 0; c < COLS; c++) e[c] = (c == COLS-1) ? 16'd1 : x[c+1];
    check_elems("shift towards lower columns", r, e);

    // ---- port B in hybrid mode ----
    @(negedge clk);
    b_en = 1; b_we = 0; b_addr = 14'(16*4 + 1);
    @(posedge clk); #1 idle();
    get_elems(7'd16, 4, r);
    for (int b = 0; b < 32; b++) w[b] = r[32 + b][0];
    check("port B hybrid read", b_rdata, w);
    read_a(14'h1ff, w);
    @(negedge clk);
    b_en = 1; b_we = 1; b_addr = 14'h1ff; b_wdata = ~w;
    @(posedge clk); #1 idle();
    begin
      logic [31:0] w2;
      read_a(14'h1ff, w2);
      check("port B write to 0x1ff dropped", w2, w);
    end

    // ---- memory mode (configuration changes under reset) ----
    @(negedge clk);
    rst_n = 0; mode = MODE_MEMORY; width_cfg = WIDTH_32;
    @(negedge clk);
    rst_n = 1;
    start = n_instr_cycles;
    for (int i = 0; i < 16384 / 32; i++) begin
      w = $urandom;
      write_a(14'(i), w);
      shadow[i*32 +: 32] = w;
    end
    check("0x1ff is storage in memory mode", 32'(n_instr_cycles - start), 32'd0);
    mem_phase(WIDTH_32);
    mem_phase(WIDTH_16);
    mem_phase(WIDTH_8);
    mem_phase(WIDTH_4);
    mem_phase(WIDTH_2);
    mem_phase(WIDTH_1);
    mem_phase(WIDTH_32);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
