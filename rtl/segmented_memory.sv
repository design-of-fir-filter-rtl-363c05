// segmented_memory: one memory core holding the multiple tables of all N
// taps of the memory-based FIR filter. Row k of the core is the
// concatenation of word k (= k * |h(j)|) of every tap's segment j, so a
// single address decoder per read port selects word k of all segments at
// once, instead of one decoder per tap's table.
//
// The core has two read ports, one addressed by each 4-bit half of the
// input sample. Reads are synchronous: the rows addressed at a clock edge
// appear on rd_lo/rd_hi after that edge (one cycle of latency), and the
// read registers clear on the synchronous, active-high reset. The contents
// are fixed by the COEF parameter (a ROM); the core has no write port.
module segmented_memory #(
  parameter int unsigned N    = fir_pkg::N_TAPS,        // segments = taps
  parameter int unsigned H_W  = fir_pkg::H_W,           // coefficient magnitude width
  parameter int          COEF [N] = fir_pkg::DEFAULT_COEF,
  localparam int unsigned WORD_W = fir_pkg::word_width(H_W)
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [fir_pkg::NIB_W-1:0]           addr_lo,
  input  logic [fir_pkg::NIB_W-1:0]           addr_hi,
  output logic [N-1:0][WORD_W-1:0]            rd_lo,   // rd_lo[j] = addr_lo * |h(j)|
  output logic [N-1:0][WORD_W-1:0]            rd_hi    // rd_hi[j] = addr_hi * |h(j)|
);
  typedef logic [N-1:0][WORD_W-1:0] row_t;
  typedef logic [fir_pkg::LUT_DEPTH-1:0][N-1:0][WORD_W-1:0] core_t;

  function automatic core_t build_core();
    core_t c;
    c = '0;
    for (int k = 0; k < int'(fir_pkg::LUT_DEPTH); k++)
      for (int j = 0; j < int'(N); j++)
        c[k][j] = WORD_W'(k * ((COEF[j] < 0) ? -COEF[j] : COEF[j]));
    return c;
  endfunction

  localparam core_t CORE = build_core();

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_lo <= '0;
      rd_hi <= '0;
    end else begin
      rd_lo <= CORE[addr_lo];
      rd_hi <= CORE[addr_hi];
    end
  end

  for (genvar j = 0; j < int'(N); j++) begin : g_chk
    initial assert (fir_pkg::coef_mag(COEF[j]) < (1 << H_W))
      else $error("segmented_memory: coefficient %0d does not fit in %0d bits", COEF[j], H_W);
  end
endmodule
