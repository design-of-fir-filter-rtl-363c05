// mem_fir: memory-based transposed-form FIR filter,
//   y(n) = sum_{k=0}^{N-1} h(k) * x(n-k).
// The multiples 0..15 of every coefficient magnitude sit in one segmented
// memory core with two read ports. Each clock the current 8-bit sample's
// two nibbles address the core; the N word pairs read out go to N shift-add
// cells (word_hi * 16 + word_lo = |h(k)| * x), each with a pipeline
// register, and the N products enter the add/subtract cell chain in
// parallel. Cell k adds or subtracts (by the sign of h(k)) its product to
// the registered partial sum of cell k+1; the output is cell 0's register.
//
// Interface: one unsigned sample x per clock, one signed output y per clock.
// Timing: three cycles of latency (memory read register, shift-add
// register, add/subtract register), so the output for the sample taken at
// edge t appears after edge t+2. The first outputs after reset lack older
// samples; y_valid rises with the first complete output, N+2 edges after
// reset is released. Reset: synchronous, active high.
module mem_fir #(
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
  localparam int unsigned WORD_W  = fir_pkg::word_width(H_W);
  localparam int unsigned P_W     = fir_pkg::prod_width(H_W);
  localparam int unsigned LATENCY = 3;
  localparam int unsigned FILL    = N + LATENCY - 1;   // edges until the first complete output

  logic [N-1:0][WORD_W-1:0] rd_lo, rd_hi;
  logic [P_W-1:0]           prod [N];
  logic signed [ACC_W-1:0]  s    [N+1];   // s[k]: partial sum leaving cell k; s[N] = 0

  segmented_memory #(.N(N), .H_W(H_W), .COEF(COEF)) u_mem (
    .clk     (clk),
    .rst     (rst),
    .addr_lo (x[fir_pkg::NIB_W-1:0]),
    .addr_hi (x[fir_pkg::X_W-1:fir_pkg::NIB_W]),
    .rd_lo   (rd_lo),
    .rd_hi   (rd_hi)
  );

  assign s[N] = '0;

  for (genvar k = 0; k < int'(N); k++) begin : g_tap
    sa_cell #(.WORD_W(WORD_W), .PIPE(1'b1)) u_sa (
      .clk     (clk),
      .rst     (rst),
      .word_lo (rd_lo[k]),
      .word_hi (rd_hi[k]),
      .prod    (prod[k])
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
