// tb_mathram_ctrl: self-checking test of instruction detection, row
// steering and cycle sequencing.
//
// Random port requests are applied in both modes, with address 0x1ff
// forced often. A reference written here decides whether the cycle is an
// instruction (hybrid mode, port-A write to 0x1ff), which rows each port
// senses and writes, which ordinary accesses proceed and what the PEs are
// told; every output is compared with it.
module tb_mathram_ctrl;
  import mathram_pkg::*;

  mode_e        mode;
  width_e       width_cfg, width;
  logic         a_en, a_we, b_en, b_we;
  logic [13:0]  a_addr, b_addr, a_addr_eff, b_addr_eff;
  logic [31:0]  a_wdata;
  logic [6:0]   dec_row_a, dec_row_b, rd_row1, rd_row2, wr_row1, wr_row2;
  logic         is_instr, mem_we_a, mem_we_b, rd_en_a, rd_en_b;
  logic [3:0]   truth_table;
  wsel_e        write_sel;
  pred_e        pred_sel;
  logic         port, c_en, m_en, wps1, wps2;

  int checks = 0, failures = 0;
  int n_instr = 0;

  mathram_ctrl dut (.*);

  initial begin
    #1000000;
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

  initial begin
    logic hyb, e_instr;
    for (int n = 0; n < 4000; n++) begin
      mode      = mode_e'($urandom_range(0, 1));
      width_cfg = width_e'($urandom_range(0, 5));
      {a_en, a_we, b_en, b_we} = 4'($urandom);
      a_addr = 14'($urandom); b_addr = 14'($urandom);
      if ($urandom_range(0, 1)) a_addr[8:0] = 9'h1ff;
      if ($urandom_range(0, 3) == 0) b_addr[8:0] = 9'h1ff;
      a_wdata = $urandom;
      dec_row_a = 7'($urandom); dec_row_b = 7'($urandom);
      #1;
      hyb = (mode == MODE_HYBRID);
      e_instr = hyb && a_en && a_we && a_addr[8:0] == 9'h1ff;
      if (e_instr) n_instr++;
      check("is_instr", 32'(is_instr), 32'(e_instr));
      check("width", 32'(width), hyb ? 32'(WIDTH_32) : 32'(width_cfg));
      check("a_addr_eff", 32'(a_addr_eff), hyb ? 32'(a_addr[8:0]) : 32'(a_addr));
      check("b_addr_eff", 32'(b_addr_eff), hyb ? 32'(b_addr[8:0]) : 32'(b_addr));
      check("rd_row1", 32'(rd_row1), e_instr ? 32'(a_wdata[6:0])   : 32'(dec_row_a));
      check("rd_row2", 32'(rd_row2), e_instr ? 32'(a_wdata[13:7])  : 32'(dec_row_b));
      check("wr_row1", 32'(wr_row1), e_instr ? 32'(a_wdata[20:14]) : 32'(dec_row_a));
      check("wr_row2", 32'(wr_row2), e_instr ? 32'(a_wdata[20:14]) : 32'(dec_row_b));
      check("mem_we_a", 32'(mem_we_a), 32'(!e_instr && a_en && a_we));
      check("mem_we_b", 32'(mem_we_b),
            32'(!e_instr && b_en && b_we && !(hyb && b_addr[8:0] == 9'h1ff)));
      check("rd_en_a", 32'(rd_en_a), 32'(!e_instr && a_en && !a_we));
      check("rd_en_b", 32'(rd_en_b), 32'(!e_instr && b_en && !b_we));
      check("truth_table", 32'(truth_table), e_instr ? 32'(a_wdata[24:21]) : 32'd0);
      check("m_en", 32'(m_en), e_instr ? 32'(a_wdata[25]) : 32'd0);
      check("c_en", 32'(c_en), e_instr ? 32'(a_wdata[26]) : 32'd0);
      check("port", 32'(port), e_instr ? 32'(a_wdata[27]) : 32'd0);
      check("write_sel", 32'(write_sel), e_instr ? 32'(a_wdata[29:28]) : 32'd0);
      check("pred_sel", 32'(pred_sel), e_instr ? 32'(a_wdata[31:30]) : 32'd0);
      check("wps", 32'({wps1, wps2}), e_instr ? 32'd3 : 32'd0);
    end
    check("instructions seen", 32'(n_instr > 100), 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
