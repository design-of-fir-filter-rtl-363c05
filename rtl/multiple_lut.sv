// multiple_lut: the table of one LUT multiplier. It holds the 16 multiples
// k * MAG (k = 0..15) of a fixed coefficient magnitude and reads two of them
// at once, one for each 4-bit half of the input sample (two read ports, so
// both halves are looked up in the same cycle).
//
// Word k is k * MAG, computed at elaboration from the MAG parameter; there
// is no write port because the coefficients are fixed. Reads are
// combinational: addr_lo/addr_hi in, word_lo/word_hi out in the same cycle.
// In the memory-based filter the tables of all taps are instead merged into
// one registered core (segmented_memory).
module multiple_lut #(
  parameter int unsigned H_W = fir_pkg::H_W,   // coefficient magnitude width
  parameter int unsigned MAG = 1               // coefficient magnitude |h|
) (
  input  logic [fir_pkg::NIB_W-1:0]          addr_lo,  // x[3:0]
  input  logic [fir_pkg::NIB_W-1:0]          addr_hi,  // x[7:4]
  output logic [H_W+fir_pkg::NIB_W-1:0]      word_lo,  // addr_lo * MAG
  output logic [H_W+fir_pkg::NIB_W-1:0]      word_hi   // addr_hi * MAG
);
  localparam int unsigned WORD_W = fir_pkg::word_width(H_W);
  typedef logic [WORD_W-1:0] word_t;
  typedef word_t table_t [fir_pkg::LUT_DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int k = 0; k < int'(fir_pkg::LUT_DEPTH); k++)
      t[k] = word_t'(k * MAG);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb begin
    word_lo = TABLE[addr_lo];
    word_hi = TABLE[addr_hi];
  end

  initial assert (MAG < (1 << H_W))
    else $error("multiple_lut: coefficient magnitude %0d does not fit in %0d bits", MAG, H_W);
endmodule
