// sa_cell: shift-add cell of a LUT multiplier. It forms the full product of
// an 8-bit sample and a coefficient from the two table words read for the
// sample's nibbles: its right input (the high-nibble word) is shifted left
// by four bit positions and added to the other (the low-nibble word), so
// prod = word_hi * 16 + word_lo. The shift is wiring in front of the adder,
// so the cell is one adder.
//
// With PIPE = 1 the sum is held in a pipeline register (one cycle of
// latency, as in the memory-based filter); with PIPE = 0 the cell is
// combinational (used inside the LUT-based filter's multipliers, a choice of
// this design); clk and rst are then unused, which lint reports. The
// register clears on the synchronous, active-high rst.
module sa_cell #(
  parameter int unsigned WORD_W = fir_pkg::word_width(fir_pkg::H_W),  // table word width
  parameter bit          PIPE   = 1'b1                                 // register the sum
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic [WORD_W-1:0]                 word_lo,  // other input: low-nibble multiple
  input  logic [WORD_W-1:0]                 word_hi,  // right input: high-nibble multiple, shifted
  output logic [WORD_W+fir_pkg::NIB_W-1:0]  prod
);
  localparam int unsigned P_W = WORD_W + fir_pkg::NIB_W;
  logic [P_W-1:0] sum;

  always_comb sum = {word_hi, {fir_pkg::NIB_W{1'b0}}} + P_W'(word_lo);

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (rst) prod <= '0;
      else     prod <= sum;
    end
  end else begin : g_comb
    always_comb prod = sum;
  end
endmodule
