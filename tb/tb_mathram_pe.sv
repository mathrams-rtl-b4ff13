// tb_mathram_pe: self-checking test of one processing element.
//
// Drives random operand bits, truth tables, write-back and predicate
// selections, port choice and latch enables for many cycles, and compares
// every output against a reference model of the PE kept in the testbench
// (own carry and mask state). Also runs a bit-serial 8-bit addition through
// the PE (TR = XOR, sum write-back, carry latch) and checks the result.
module tb_mathram_pe;
  import mathram_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       a, b, d_in1, d_in2, from_left, from_right;
  logic [3:0] tt;
  wsel_e      wsel;
  pred_e      psel;
  logic       port, c_en, m_en, wps1, wps2;
  logic       tr, wd1, wd2, we1, we2, carry, mask;

  int checks = 0, failures = 0;

  mathram_pe dut (
    .clk, .rst_n, .a, .b, .d_in1, .d_in2, .from_left, .from_right,
    .truth_table(tt), .write_sel(wsel), .pred_sel(psel), .port, .c_en, .m_en,
    .wps1, .wps2, .tr, .wd1, .wd2, .we1, .we2, .carry, .mask
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  logic m_carry, m_mask;

  initial begin
    logic e_tr, e_sum, e_pred, e_wd1, e_wd2;
    logic [7:0] x, y;
    logic [8:0] s;
    {a, b, d_in1, d_in2, from_left, from_right, port, c_en, m_en, wps1, wps2} = '0;
    tt = '0; wsel = WSEL_DIN; psel = PRED_ALWAYS;
    m_carry = 0; m_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset carry", carry, 1'b0);
    check("reset mask", mask, 1'b0);

    // random stimulus against the reference model
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      {a, b, d_in1, d_in2, from_left, from_right} = 6'($urandom);
      tt   = 4'($urandom);
      wsel = wsel_e'($urandom_range(0, 3));
      psel = pred_e'($urandom_range(0, 3));
      {port, c_en, m_en, wps1, wps2} = 5'($urandom);
      #1;
      e_tr  = tt[{a, b}];
      e_sum = e_tr ^ m_carry;
      case (psel)
        PRED_ALWAYS: e_pred = 1;
        PRED_MASK:   e_pred = m_mask;
        PRED_CARRY:  e_pred = m_carry;
        default:     e_pred = !m_carry;
      endcase
      case (wsel)
        WSEL_DIN:   begin e_wd1 = d_in1;      e_wd2 = d_in2;     end
        WSEL_TR:    begin e_wd1 = e_tr;       e_wd2 = e_tr;      end
        WSEL_SUM:   begin e_wd1 = e_sum;      e_wd2 = e_sum;     end
        default:    begin e_wd1 = from_right; e_wd2 = from_left; end
      endcase
      check("tr", tr, e_tr);
      check("wd1", wd1, e_wd1);
      check("wd2", wd2, e_wd2);
      check("we1", we1, wps1 && e_pred && !port);
      check("we2", we2, wps2 && e_pred && port);
      check("carry", carry, m_carry);
      check("mask", mask, m_mask);
      @(posedge clk);
      if (c_en) m_carry = (a & b) | (a & m_carry) | (b & m_carry);
      if (m_en) m_mask = e_tr;
    end

    // bit-serial addition of two 8-bit numbers, carry cleared first
    x = 8'd201; y = 8'd187; s = '0;
    @(negedge clk);
    a = 0; b = 0; c_en = 1; m_en = 0; tt = TT_ZERO;  // maj(0,0,c) = 0
    @(negedge clk);
    tt = TT_XOR; wsel = WSEL_SUM; psel = PRED_ALWAYS; port = 0; wps1 = 1; wps2 = 1;
    for (int m = 0; m < 8; m++) begin
      a = x[m]; b = y[m]; c_en = 1;
      #1 s[m] = wd1;
      check("add write enable", we1, 1'b1);
      @(negedge clk);
    end
    a = 0; b = 0; tt = TT_ZERO;
    #1 s[8] = wd1;
    check("8-bit bit-serial sum", 1'(s == 9'(x) + 9'(y)), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
