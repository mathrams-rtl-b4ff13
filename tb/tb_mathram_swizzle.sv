// tb_mathram_swizzle: self-checking test of the transposer.
//
// Phase 1 streams 128 random 16-bit elements with both sides always ready
// and checks that no input cycle is lost (128 elements in 128 cycles).
// Phase 2 streams two more batches with random valid/ready gaps and a
// long output stall, which must fill the ring (64 elements) and
// back-pressure the input. Every output word is scattered into a model of
// the MathRAM's rows; after each batch, bit m of element e must sit in row
// base_row + m, column e.
module tb_mathram_swizzle;
  localparam int ELEM_W = 16, COLS = 128;

  logic              clk = 0, rst_n = 0;
  logic [6:0]        base_row;
  logic              in_valid, in_ready, out_valid, out_ready;
  logic [ELEM_W-1:0] in_data;
  logic [8:0]        out_addr;
  logic [31:0]       out_data;

  logic [COLS-1:0]   rows [128];
  logic [ELEM_W-1:0] elems [COLS];

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_backpressure = 0;

  mathram_swizzle #(.ELEM_W(ELEM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // output side: scatter into the row model
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int b = 0; b < 32; b++)
        rows[out_addr / 4][(out_addr % 4) * 32 + b] = out_data[b];
      n_out++;
    end
    if (rst_n && in_valid && !in_ready) n_backpressure++;
  end

  task automatic check_batch();
    for (int e = 0; e < COLS; e++)
      for (int m = 0; m < ELEM_W; m++)
        check($sformatf("element %0d bit %0d", e, m), 32'(rows[base_row + m][e]),
              32'(elems[e][m]));
  endtask

  task automatic send_batch(bit gaps, bit stall);
    int e = 0, t = 0;
    while (e < COLS) begin
      @(negedge clk);
      in_valid  = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_data   = elems[e];
      out_ready = stall ? (t > 150 || t < 10) : (gaps ? ($urandom_range(0, 4) != 0) : 1'b1);
      @(posedge clk);
      if (in_valid && in_ready) begin e++; n_in++; end
      t++;
    end
    @(negedge clk);
    in_valid = 0;
    out_ready = 1;
    repeat (3 * ELEM_W + 8) @(posedge clk);
  endtask

  initial begin
    int t0;
    in_valid = 0; out_ready = 1; in_data = '0; base_row = 7'd10;
    for (int r = 0; r < 128; r++) rows[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // phase 1: full rate
    for (int e = 0; e < COLS; e++) elems[e] = ELEM_W'($urandom);
    t0 = $time;
    send_batch(0, 0);
    check("no input stall at full rate", 32'(n_backpressure), 32'd0);
    check("words written", 32'(n_out), 32'(ELEM_W * COLS / 32));
    check_batch();

    // phase 2: gaps and a long output stall, new base row
    base_row = 7'd60;
    for (int e = 0; e < COLS; e++) elems[e] = ELEM_W'($urandom);
    send_batch(1, 1);
    check_batch();
    check("ring filled and back-pressured", 32'(n_backpressure > 0), 32'd1);
    for (int e = 0; e < COLS; e++) elems[e] = ELEM_W'($urandom);
    send_batch(1, 0);
    check_batch();
    check("elements accepted", 32'(n_in), 32'(3 * COLS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
