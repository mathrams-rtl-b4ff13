// tb_workload_hfp8_mul: 8-bit floating-point multiplication on a full-size
// MathRAM column (4 blocks, 512 lanes), built from the bit-serial integer
// instructions plus mask predication.
//
// Format: 1 sign bit, 4 exponent bits (bias 7) and 3 mantissa bits with a
// hidden leading one (the 1-4-3 "hybrid FP8" forward format). Every lane
// multiplies its own pair of normal numbers; exponents are drawn so that the
// result stays normal, and the mantissa is truncated (round toward zero).
// The program, issued to all four blocks at once:
//   hidden bits    set bit 3 of both significands to 1       2 cycles
//   sign           S = Sa xor Sb                              1
//   exponent       E = Ea + Eb (5 bits), then E += -7         5 + 6
//   significand    P = (1.ma) * (1.mb), 4 x 4 -> 8 bits       N*N + 3N - 2 = 26
//   normalise      mask = P[7]; M = P[5:3]; where mask: M = P[6:4]
//                  and E += 1                                 1 + 3 + 3 + 6
// 53 cycles in all, checked. Each lane's result is compared bit for bit with
// an integer model and, independently, with the real-valued product (the
// result must lie within one unit in the last place below it). The format
// choice, the rounding and the row allocation are this test's own.
module tb_workload_hfp8_mul;
  import mathram_pkg::*;

  localparam int NB = 4, EW = 16, COLS = 128, LANES = NB * COLS;
  localparam int N = 4, BIAS = 7;
  localparam logic [6:0] AX = 7'd0, AE = 7'd4, AS = 7'd8,
                         BX = 7'd10, BE = 7'd14, BS = 7'd18,
                         PR = 7'd20, RE = 7'd30, RM = 7'd36, RS = 7'd40,
                         TMP = 7'd100, ONE = 7'd125, ZROW = 7'd126;
  localparam logic [4:0] NEG_BIAS = 5'(-BIAS);

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

  logic [7:0] fa [LANES];
  logic [7:0] fb [LANES];

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    for (int i = 0; i < e; i++) r = r * 2.0;
    for (int i = 0; i > e; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real hfp8_value(logic [7:0] f);
    real v;
    v = (1.0 + real'(f[2:0]) / 8.0) * pow2(int'(f[6:3]) - BIAS);
    return f[7] ? -v : v;
  endfunction

  function automatic logic [7:0] rand_hfp8();
    logic [3:0] e = 4'($urandom_range(4, 10));
    return {1'($urandom), e, 3'($urandom)};
  endfunction

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

    for (int g = 0; g < LANES; g++) begin fa[g] = rand_hfp8(); fb[g] = rand_hfp8(); end
    fa[0] = 8'h38; fb[0] = 8'h38;                 // 1.0 * 1.0
    fa[1] = 8'h3f; fb[1] = 8'hbf;                 // 1.875 * -1.875
    // operands, transposed: mantissa bits m, exponent bits e, sign
    for (int b = 0; b < NB; b++) begin
      for (int q = 0; q < 4; q++) port_a(b, 1, 14'(int'(ZROW) * 4 + q), '0);
      for (int bit_i = 0; bit_i < 8; bit_i++) begin
        logic [6:0] ra, rb;
        if (bit_i < 3)      begin ra = 7'(AX + bit_i);     rb = 7'(BX + bit_i);     end
        else if (bit_i < 7) begin ra = 7'(AE + bit_i - 3); rb = 7'(BE + bit_i - 3); end
        else                begin ra = AS;                 rb = BS;                 end
        for (int q = 0; q < 4; q++) begin
          for (int i = 0; i < 32; i++) word[i] = fa[b*COLS + q*32 + i][bit_i];
          port_a(b, 1, 14'(int'(ra) * 4 + q), word);
          for (int i = 0; i < 32; i++) word[i] = fb[b*COLS + q*32 + i][bit_i];
          port_a(b, 1, 14'(int'(rb) * 4 + q), word);
        end
      end
    end
    issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, 4'b1111, ONE, ZROW, ZROW));
    issue_end();

    start = n_instr;
    // hidden bits
    issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, 4'b1111, 7'(AX + 3), ZROW, ZROW));
    issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, 4'b1111, 7'(BX + 3), ZROW, ZROW));
    // sign
    issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_XOR, RS, AS, BS));
    // exponent sum, then the bias
    for (int m = 0; m < 4; m++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(RE + m), 7'(AE + m), 7'(BE + m)));
    issue_all(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(RE + 4), ZROW, ZROW));
    for (int m = 0; m < 5; m++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(RE + m), 7'(RE + m),
                           NEG_BIAS[m] ? ONE : ZROW));
    issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, TMP, ZROW, ZROW));
    // significand product
    for (int m = 0; m < N; m++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_AND, 7'(PR + m), 7'(AX + m), BX));
    for (int m = N; m < 2*N; m++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(PR + m), ZROW, ZROW));
    for (int j = 1; j < N; j++) begin
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b1, TT_A, TMP, 7'(BX + j), ZROW));
      for (int m = 0; m < N; m++)
        issue_all(make_instr(PRED_MASK, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(PR + j + m),
                             7'(AX + m), 7'(PR + j + m)));
      issue_all(make_instr(PRED_MASK, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_ZERO, 7'(PR + j + N), ZROW, ZROW));
    end
    // normalise: mask = top product bit
    issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b1, TT_A, TMP, 7'(PR + 2*N - 1), ZROW));
    for (int m = 0; m < 3; m++)
      issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_A, 7'(RM + m), 7'(PR + 3 + m), ZROW));
    for (int m = 0; m < 3; m++)
      issue_all(make_instr(PRED_MASK, WSEL_TR, 1'b0, 1'b0, 1'b0, TT_A, 7'(RM + m), 7'(PR + 4 + m), ZROW));
    for (int m = 0; m < 5; m++)
      issue_all(make_instr(PRED_MASK, WSEL_SUM, 1'b0, 1'b1, 1'b0, TT_XOR, 7'(RE + m), 7'(RE + m),
                           (m == 0) ? ONE : ZROW));
    issue_all(make_instr(PRED_ALWAYS, WSEL_TR, 1'b0, 1'b1, 1'b0, TT_ZERO, TMP, ZROW, ZROW));
    issue_end();
    $display("hfp8 multiply of 512 lanes: %0d MathRAM cycles", n_instr - start);
    check("cycle count", 32'(n_instr - start), 32'(2 + 1 + 5 + 6 + (N*N + 3*N - 2) + 1 + 6 + 6));

    begin
      int bad_bits, bad_real;
      logic [7:0] res [LANES];
      logic [7:0] p, exp_f;
      int e;
      real exact, got, ulp;
      bad_bits = 0; bad_real = 0;
      for (int g = 0; g < LANES; g++) res[g] = '0;
      for (int b = 0; b < NB; b++)
        for (int bit_i = 0; bit_i < 8; bit_i++) begin
          logic [6:0] r;
          if (bit_i < 3)      r = 7'(RM + bit_i);
          else if (bit_i < 7) r = 7'(RE + bit_i - 3);
          else                r = RS;
          for (int q = 0; q < 4; q++) begin
            port_a(b, 0, 14'(int'(r) * 4 + q), '0);
            for (int i = 0; i < 32; i++) res[b*COLS + q*32 + i][bit_i] = a_rdata[b][i];
          end
        end
      for (int g = 0; g < LANES; g++) begin
        // integer model
        p = {1'b1, fa[g][2:0]} * {1'b1, fb[g][2:0]};
        e = int'(fa[g][6:3]) + int'(fb[g][6:3]) - BIAS;
        if (p[7]) exp_f = {fa[g][7] ^ fb[g][7], 4'(e + 1), p[6:4]};
        else      exp_f = {fa[g][7] ^ fb[g][7], 4'(e),     p[5:3]};
        if (res[g] !== exp_f) begin
          if (bad_bits < 4) $display("  lane %0d: %h * %h gave %h, expected %h", g, fa[g], fb[g], res[g], exp_f);
          bad_bits++;
        end
        // real-valued bound: |exact| - ulp < |got| <= |exact|, same sign
        exact = hfp8_value(fa[g]) * hfp8_value(fb[g]);
        got   = hfp8_value(res[g]);
        ulp   = pow2(int'(res[g][6:3]) - BIAS - 3);
        if ((exact < 0.0) != (got < 0.0)) bad_real++;
        else if ((exact < 0.0 ? -got : got) > (exact < 0.0 ? -exact : exact)) bad_real++;
        else if ((exact < 0.0 ? -exact : exact) - (exact < 0.0 ? -got : got) >= ulp) bad_real++;
      end
      check("results of all 512 lanes, bit for bit", 32'(bad_bits), 0);
      check("results of all 512 lanes, against the real product", 32'(bad_real), 0);
      check("1.0 * 1.0", 32'(res[0]), 32'h38);
      check("1.875 * -1.875 = -3.5 truncated", 32'(res[1]), 32'hc6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
