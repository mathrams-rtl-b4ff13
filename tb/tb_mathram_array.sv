// tb_mathram_array: self-checking test of the dual-port cell array.
//
// First fills every row through port 1 and reads it back through both
// ports. Then issues random bit-masked writes on both ports (sometimes to
// the same row, where port 2 must win) together with random reads, checking
// each read against a shadow copy kept in the testbench. Reads are
// combinational and must return the contents before the clock edge.
module tb_mathram_array;
  localparam int ROWS = 128, COLS = 128;

  logic clk = 0;
  logic [6:0]      rd_row1, rd_row2, wr_row1, wr_row2;
  logic [COLS-1:0] rd_data1, rd_data2, wr_data1, wr_data2, wr_en1, wr_en2;
  logic [COLS-1:0] shadow [ROWS];

  int checks = 0, failures = 0;

  mathram_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COLS-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check(string what, logic [COLS-1:0] got, logic [COLS-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    wr_en1 = '0; wr_en2 = '0; rd_row1 = '0; rd_row2 = '0;
    wr_row1 = '0; wr_row2 = '0; wr_data1 = '0; wr_data2 = '0;
    // fill
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wr_row1 = 7'(r); wr_data1 = rnd(); wr_en1 = '1;
      shadow[r] = wr_data1;
    end
    @(negedge clk);
    wr_en1 = '0;
    for (int r = 0; r < ROWS; r++) begin
      rd_row1 = 7'(r); rd_row2 = 7'(ROWS - 1 - r);
      #1;
      check("fill read p1", rd_data1, shadow[r]);
      check("fill read p2", rd_data2, shadow[ROWS-1-r]);
    end
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_row1 = 7'($urandom); wr_row2 = ($urandom_range(0, 3) == 0) ? wr_row1 : 7'($urandom);
      wr_data1 = rnd(); wr_data2 = rnd(); wr_en1 = rnd(); wr_en2 = rnd();
      rd_row1 = 7'($urandom); rd_row2 = 7'($urandom);
      #1;
      check("read p1 before edge", rd_data1, shadow[rd_row1]);
      check("read p2 before edge", rd_data2, shadow[rd_row2]);
      for (int c = 0; c < COLS; c++) begin
        if (wr_en1[c]) shadow[wr_row1][c] = wr_data1[c];
        if (wr_en2[c]) shadow[wr_row2][c] = wr_data2[c];
      end
    end
    @(negedge clk);
    wr_en1 = '0; wr_en2 = '0;
    for (int r = 0; r < ROWS; r++) begin
      rd_row1 = 7'(r);
      #1 check("final read", rd_data1, shadow[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
