// tb_mathram_port_decoder: self-checking test of the width-configurable
// column decoder.
//
// For every width (1, 2, 4, 8, 16, 32 bits) and many random addresses it
// checks the physical row, the bit write mask, the aligned write data and the
// read word extracted from a random sensed row, against the mapping
// "bit address = address * width; row = bit address / 128;
// first column = bit address mod 128" computed here independently.
module tb_mathram_port_decoder;
  import mathram_pkg::*;

  width_e       width;
  logic [13:0]  addr;
  logic [31:0]  wr_word, rd_word;
  logic [127:0] rd_row_data, wr_row_data, wr_mask;
  logic [6:0]   row;

  int checks = 0, failures = 0;

  mathram_port_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (width code %0d addr %0d): got %h expected %h",
               what, width, addr, got, exp);
    end
  endtask

  initial begin
    int w, bitaddr, col;
    logic [127:0] emask, edata;
    logic [31:0]  eword;
    for (int wc = 0; wc <= 5; wc++) begin
      w = 1 << wc;
      for (int n = 0; n < 500; n++) begin
        width = width_e'(wc);
        addr  = 14'($urandom_range(0, 16384 / w - 1));
        if (n == 0) addr = '0;
        if (n == 1) addr = 14'(16384 / w - 1);
        wr_word = $urandom;
        rd_row_data = {$urandom, $urandom, $urandom, $urandom};
        #1;
        bitaddr = int'(addr) * w;
        col = bitaddr % 128;
        emask = '0; edata = '0; eword = '0;
        for (int i = 0; i < w; i++) begin
          emask[col + i] = 1'b1;
          edata[col + i] = wr_word[i];
          eword[i]       = rd_row_data[col + i];
        end
        check("row", 128'(row), 128'(bitaddr / 128));
        check("write mask", wr_mask, emask);
        check("write data", wr_row_data, edata);
        check("read word", 128'(rd_word), 128'(eword));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
