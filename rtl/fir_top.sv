// fir_top: the two FIR filter realisations side by side, the LUT-based one
// (lut_fir: a separate table per tap, combinational multipliers, one cycle
// of latency) and the memory-based one (mem_fir: one segmented memory core,
// pipelined shift-add cells, three cycles of latency). Both compute the same
// N-tap filter with the same coefficients; each has its own sample input and
// output so that they can be driven and observed independently. They share
// the clock and the synchronous, active-high reset.
module fir_top #(
  parameter int unsigned N    = fir_pkg::N_TAPS,        // number of taps
  parameter int unsigned H_W  = fir_pkg::H_W,           // coefficient magnitude width
  parameter int          COEF [N] = fir_pkg::DEFAULT_COEF,
  localparam int unsigned ACC_W = fir_pkg::acc_width(H_W, N)
) (
  input  logic                    clk,
  input  logic                    rst,
  // LUT-based filter
  input  logic [fir_pkg::X_W-1:0] lut_x,
  output logic signed [ACC_W-1:0] lut_y,
  output logic                    lut_y_valid,
  // memory-based filter
  input  logic [fir_pkg::X_W-1:0] mem_x,
  output logic signed [ACC_W-1:0] mem_y,
  output logic                    mem_y_valid
);
  lut_fir #(.N(N), .H_W(H_W), .COEF(COEF)) u_lut_fir (
    .clk     (clk),
    .rst     (rst),
    .x       (lut_x),
    .y       (lut_y),
    .y_valid (lut_y_valid)
  );

  mem_fir #(.N(N), .H_W(H_W), .COEF(COEF)) u_mem_fir (
    .clk     (clk),
    .rst     (rst),
    .x       (mem_x),
    .y       (mem_y),
    .y_valid (mem_y_valid)
  );
endmodule
