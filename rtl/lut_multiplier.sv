// lut_multiplier: multiplies an unsigned 8-bit sample by a fixed coefficient
// magnitude MAG using only a 16-word table and one adder. The sample is
// split into x[7:4] and x[3:0]; both address the table of multiples
// k * MAG (multiple_lut), and the shift-add cell (sa_cell) returns
// word(x[7:4]) * 16 + word(x[3:0]) = x * MAG.
//
// Purely combinational: prod is valid in the same cycle as x. clk and rst
// only reach the shift-add cell, whose pipeline register is not used here.
module lut_multiplier #(
  parameter int unsigned H_W = fir_pkg::H_W,   // coefficient magnitude width
  parameter int unsigned MAG = 1               // coefficient magnitude |h|
) (
  input  logic                                       clk,
  input  logic                                       rst,
  input  logic [fir_pkg::X_W-1:0]                    x,
  output logic [fir_pkg::prod_width(H_W)-1:0]        prod
);
  localparam int unsigned WORD_W = fir_pkg::word_width(H_W);
  logic [WORD_W-1:0] word_lo, word_hi;

  multiple_lut #(.H_W(H_W), .MAG(MAG)) u_lut (
    .addr_lo (x[fir_pkg::NIB_W-1:0]),
    .addr_hi (x[fir_pkg::X_W-1:fir_pkg::NIB_W]),
    .word_lo (word_lo),
    .word_hi (word_hi)
  );

  sa_cell #(.WORD_W(WORD_W), .PIPE(1'b0)) u_sa (
    .clk     (clk),
    .rst     (rst),
    .word_lo (word_lo),
    .word_hi (word_hi),
    .prod    (prod)
  );
endmodule
