// lut_fir: LUT-based transposed-form FIR filter,
//   y(n) = sum_{k=0}^{N-1} h(k) * x(n-k).
// Every tap has its own LUT multiplier (a 16-word table of multiples of
// |h(k)| with its own address decoding, plus a shift-add), and the current
// 8-bit sample goes to all N multipliers at once as a pair of 4-bit
// addresses. The products feed a chain of add/subtract cells: cell k adds
// (h(k) >= 0) or subtracts (h(k) < 0) its product to the registered partial
// sum of cell k+1; the register in each cell is the transposed form's
// delay. The output is the registered sum of cell 0.
//
// Interface: one unsigned sample x per clock, one signed output y per clock.
// Timing: y holds the output for the sample taken one clock edge earlier
// (the table reads and shift-adds are combinational in this filter, a
// choice of this design). After reset the registers are zero, so the first
// N-1 outputs lack the older samples; y_valid rises with the first output
// that contains all N taps, N edges after reset is released.
// Reset: synchronous, active high.
module lut_fir #(
  parameter int unsigned N    = fir_pkg::N_TAPS,        // number of taps
  parameter int unsigned H_W  = fir_pkg::H_W,           // coefficient magnitude width
  parameter int          COEF [N] = fir_pkg::DEFAULT_COEF,
  localparam int unsigned ACC_W = fir_pkg::acc_width(H_W, N)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [fir_pkg::X_W-1:0] x,
  output logic signed [ACC_W-1:0] y,
  output logic                    y_valid
);
  localparam int unsigned P_W     = fir_pkg::prod_width(H_W);
  localparam int unsigned LATENCY = 1;
  localparam int unsigned FILL    = N + LATENCY - 1;   // edges until the first complete output

  logic [P_W-1:0]          prod [N];
  logic signed [ACC_W-1:0] s    [N+1];   // s[k]: partial sum leaving cell k; s[N] = 0

  assign s[N] = '0;

  for (genvar k = 0; k < int'(N); k++) begin : g_tap
    lut_multiplier #(.H_W(H_W), .MAG(fir_pkg::coef_mag(COEF[k]))) u_mult (
      .clk  (clk),
      .rst  (rst),
      .x    (x),
      .prod (prod[k])
    );
    as_cell #(.P_W(P_W), .ACC_W(ACC_W), .SUB(COEF[k] < 0)) u_as (
      .clk   (clk),
      .rst   (rst),
      .prod  (prod[k]),
      .s_in  (s[k+1]),
      .s_out (s[k])
    );
  end

  assign y = s[0];

  // Fill counter: counts clock edges since reset up to FILL.
  logic [$clog2(FILL+1)-1:0] fill_cnt;
  always_ff @(posedge clk) begin
    if (rst)                      fill_cnt <= '0;
    else if (fill_cnt != FILL[$bits(fill_cnt)-1:0]) fill_cnt <= fill_cnt + 1'b1;
  end
  assign y_valid = (fill_cnt == FILL[$bits(fill_cnt)-1:0]);

  // Once the pipeline is full it stays full until the next reset.
  a_valid_holds: assert property (@(posedge clk) disable iff (rst) y_valid |=> y_valid);
endmodule
