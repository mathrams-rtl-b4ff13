// mathram_pe: the 1-bit processing element that sits under one bitline pair
// of a MathRAM.
//
// Each clock cycle the PE sees bit A (sensed on port 1) and bit B (sensed on
// port 2) of one column. A 4:1 truth-table mux (TR) indexed by {A,B} gives
// any Boolean function of the two bits. An XOR of the TR output with the
// carry latch gives the full-adder sum when TR is programmed as XOR. Carry
// generation is the majority of A, B and the carry latch; the carry latch
// loads it when c_en is set, the mask latch loads the TR output when m_en is
// set. The predication mux S picks "always", the mask, the carry or the
// inverted carry. Two write-back muxes (W1, W2) pick what each port's write
// driver gets: the external data bit, the TR output, the sum, or the
// neighbour PE's TR output (right neighbour on port 1, left neighbour on
// port 2), which is how shifts are done. The port bit chooses which port
// writes, and the write strobes wps1/wps2 from the sequencing logic gate it.
//
// Timing: everything up to we1/we2 and wd1/wd2 is combinational within the
// one long read-compute-write cycle; the carry and mask latches are modelled
// as flip-flops that capture at the end of that cycle, so the sum written in
// a cycle uses the carry produced by the previous cycle. Both reset to 0.
//
// From the published PE diagram: the TR mux, XOR, carry generation, carry
// and mask latches, S mux with an inverted-carry input, W1/W2 muxes with
// neighbour inputs, and the port/write-strobe gating. This design's choices:
// the TR index order {A,B}, the order of the S and W mux inputs, the
// neighbour value being the neighbour's TR output, and flip-flop latches.
module mathram_pe
  import mathram_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // sensed bits of this column
  input  logic       a,           // SA1, port 1
  input  logic       b,           // SA2, port 2
  // external write data of this column
  input  logic       d_in1,
  input  logic       d_in2,
  // neighbour TR outputs
  input  logic       from_left,
  input  logic       from_right,
  // decoded instruction fields (shared by all PEs)
  input  logic [3:0] truth_table,
  input  wsel_e      write_sel,
  input  pred_e      pred_sel,
  input  logic       port,
  input  logic       c_en,
  input  logic       m_en,
  // write strobes from the sequencing logic
  input  logic       wps1,
  input  logic       wps2,
  // results
  output logic       tr,          // TR mux output, also sent to both neighbours
  output logic       wd1,         // write-driver data, port 1
  output logic       wd2,         // write-driver data, port 2
  output logic       we1,         // write enable, port 1
  output logic       we2,         // write enable, port 2
  output logic       carry,       // carry latch
  output logic       mask         // mask latch
);

  logic sum, cout, pred;

  always_comb begin
    tr   = truth_table[{a, b}];
    sum  = tr ^ carry;
    cout = (a & b) | (a & carry) | (b & carry);

    unique case (pred_sel)
      PRED_ALWAYS: pred = 1'b1;
      PRED_MASK:   pred = mask;
      PRED_CARRY:  pred = carry;
      PRED_NCARRY: pred = ~carry;
      default:     pred = 1'b1;
    endcase

    unique case (write_sel)
      WSEL_DIN:   begin wd1 = d_in1;      wd2 = d_in2;     end
      WSEL_TR:    begin wd1 = tr;         wd2 = tr;        end
      WSEL_SUM:   begin wd1 = sum;        wd2 = sum;       end
      WSEL_NEIGH: begin wd1 = from_right; wd2 = from_left; end
      default:    begin wd1 = d_in1;      wd2 = d_in2;     end
    endcase

    we1 = wps1 & pred & ~port;
    we2 = wps2 & pred &  port;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry <= 1'b0;
      mask  <= 1'b0;
    end else begin
      if (c_en) carry <= cout;
      if (m_en) mask  <= tr;
    end
  end

endmodule
