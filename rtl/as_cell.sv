// as_cell: add/subtract cell of a transposed-form FIR filter. Each tap has
// one: it takes the partial sum coming from the next tap (s_in), adds or
// subtracts this tap's product |h_k| * x, and registers the result, which
// is the delay element between taps. SUB is fixed by the sign of the tap's
// coefficient, so the cell is either an adder or a subtractor, never both.
//
// The product is unsigned, the partial sums are two's complement. One cycle
// from s_in/prod to s_out; synchronous active-high reset to zero.
module as_cell #(
  parameter int unsigned P_W   = fir_pkg::prod_width(fir_pkg::H_W),               // product width
  parameter int unsigned ACC_W = fir_pkg::acc_width(fir_pkg::H_W, fir_pkg::N_TAPS), // partial-sum width
  parameter bit          SUB   = 1'b0                                              // 1: subtract (negative coefficient)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [P_W-1:0]          prod,
  input  logic signed [ACC_W-1:0] s_in,
  output logic signed [ACC_W-1:0] s_out
);
  logic signed [ACC_W-1:0] p_ext;
  assign p_ext = ACC_W'(prod);   // zero-extended, non-negative

  always_ff @(posedge clk) begin
    if (rst)      s_out <= '0;
    else if (SUB) s_out <= s_in - p_ext;
    else          s_out <= s_in + p_ext;
  end

  initial assert (ACC_W > P_W)
    else $error("as_cell: partial sum (%0d bits) must be wider than the product (%0d bits)", ACC_W, P_W);
endmodule
