// tb_fir_top: runs both filters of fir_top at their default size (16 taps,
// default coefficients) end to end and checks every output against a
// convolution sum computed in the testbench.
//
// Phase 1 feeds both filters the same stream (unit impulse, full-scale
// impulse, full-scale step, random samples); besides matching the reference,
// the memory-based output must equal the LUT-based output of two clocks
// earlier. Phase 2 resets both filters in mid-stream and feeds them
// different random streams through their own ports.
//
// Each mechanism of the design is counted and must occur: subtractor taps
// contributing (negative coefficients with a nonzero sample), lookups with
// both nibbles of the sample nonzero (shift-add of the high word), the
// pipeline filling (y_valid rising after N and N+2 edges), a reset flushing
// a running filter, and a complete impulse response read out (the output
// sequence equals the coefficient list).
module tb_fir_top;
  localparam int unsigned N     = fir_pkg::N_TAPS;
  localparam int COEF [N]       = fir_pkg::DEFAULT_COEF;
  localparam int unsigned ACC_W = fir_pkg::acc_width(fir_pkg::H_W, N);
  localparam int unsigned LAT_LUT = 1, LAT_MEM = 3;

  int checks = 0, failures = 0;
  int n_sub = 0, n_both_nib = 0, n_fill_lut = 0, n_fill_mem = 0, n_flush = 0;
  int n_imp_lut = 0, n_imp_mem = 0;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] lut_x, mem_x;
  logic signed [ACC_W-1:0] lut_y, mem_y;
  logic lut_v, mem_v, lut_v_q, mem_v_q;

  always #5 clk = ~clk;

  fir_top dut (
    .clk(clk), .rst(rst),
    .lut_x(lut_x), .lut_y(lut_y), .lut_y_valid(lut_v),
    .mem_x(mem_x), .mem_y(mem_y), .mem_y_valid(mem_v));

  int hl [$], hm [$];    // samples applied to each filter since its last reset
  int edges;
  int lut_y_hist [$];    // LUT-based outputs, for the cross-check

  function automatic int ref_y(int k, const ref int xs [$]);
    int acc = 0;
    if (k < 0) return 0;
    for (int j = 0; j < int'(N); j++)
      if (k - j >= 0) acc += COEF[j] * xs[k - j];
    return acc;
  endfunction

  task automatic check_outputs(bit same_stream);
    int el, em;
    el = ref_y(edges - int'(LAT_LUT), hl);
    em = ref_y(edges - int'(LAT_MEM), hm);
    checks += 4;
    if (int'(lut_y) != el) begin failures++; $display("FAIL lut edge %0d exp %0d got %0d", edges, el, lut_y); end
    if (int'(mem_y) != em) begin failures++; $display("FAIL mem edge %0d exp %0d got %0d", edges, em, mem_y); end
    if (lut_v != (edges >= int'(N + LAT_LUT - 1))) begin failures++; $display("FAIL lut valid edge %0d", edges); end
    if (mem_v != (edges >= int'(N + LAT_MEM - 1))) begin failures++; $display("FAIL mem valid edge %0d", edges); end
    if (lut_v && !lut_v_q) n_fill_lut++;
    if (mem_v && !mem_v_q) n_fill_mem++;
    lut_v_q = lut_v;
    mem_v_q = mem_v;
    lut_y_hist.push_back(int'(lut_y));
    if (same_stream && edges >= 2) begin
      checks++;
      if (int'(mem_y) != lut_y_hist[edges - 2]) begin
        failures++; $display("FAIL cross-check edge %0d", edges);
      end
    end
  endtask

  task automatic start_after_reset();
    hl.delete(); hm.delete(); lut_y_hist.delete();
    edges = 0;
    lut_v_q = 1'b0; mem_v_q = 1'b0;
  endtask

  task automatic apply(int vl, int vm, bit same_stream);
    lut_x = 8'(vl);
    mem_x = 8'(vm);
    hl.push_back(vl);
    hm.push_back(vm);
    // count mechanisms exercised by this sample
    if ((vl & 15) != 0 && (vl >> 4) != 0) n_both_nib++;
    for (int j = 0; j < int'(N); j++)
      if (COEF[j] < 0 && vl != 0) n_sub++;
    @(negedge clk);
    edges++;
    check_outputs(same_stream);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    lut_x = '0; mem_x = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    start_after_reset();
    check_outputs(1'b1);

    // phase 1: same stream into both filters
    for (int i = 0; i < int'(N) + 4; i++) begin
      apply((i == 0) ? 1 : 0, (i == 0) ? 1 : 0, 1'b1);  // unit impulse
      // outputs after the impulse are h(0), h(1), ...
      if (edges - int'(LAT_LUT) < int'(N) && int'(lut_y) == COEF[edges - int'(LAT_LUT)]) n_imp_lut++;
      if (edges >= int'(LAT_MEM) && edges - int'(LAT_MEM) < int'(N)
          && int'(mem_y) == COEF[edges - int'(LAT_MEM)]) n_imp_mem++;
    end
    apply(255, 255, 1'b1);                              // full-scale impulse
    for (int i = 0; i < int'(N); i++) apply(0, 0, 1'b1);
    for (int i = 0; i < 2 * int'(N); i++) apply(255, 255, 1'b1);   // step
    for (int i = 0; i < 400; i++) begin
      v = int'($urandom_range(0, 255));
      apply(v, v, 1'b1);
    end

    // phase 2: reset in mid-stream, then independent streams
    if (lut_y != 0 || mem_y != 0) n_flush++;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (lut_y != 0 || mem_y != 0 || lut_v || mem_v) begin failures++; $display("FAIL flush"); end
    start_after_reset();
    check_outputs(1'b0);
    for (int i = 0; i < 400; i++)
      apply(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)), 1'b0);

    // every mechanism must have occurred
    checks += 7;
    if (n_sub == 0)      begin failures++; $display("FAIL no subtractor contribution"); end
    if (n_both_nib == 0) begin failures++; $display("FAIL no sample with both nibbles set"); end
    if (n_fill_lut != 2) begin failures++; $display("FAIL lut fill seen %0d times", n_fill_lut); end
    if (n_fill_mem != 2) begin failures++; $display("FAIL mem fill seen %0d times", n_fill_mem); end
    if (n_flush == 0)    begin failures++; $display("FAIL no reset of a running filter"); end
    if (n_imp_lut != int'(N)) begin failures++; $display("FAIL lut impulse response %0d of %0d", n_imp_lut, N); end
    if (n_imp_mem != int'(N)) begin failures++; $display("FAIL mem impulse response %0d of %0d", n_imp_mem, N); end
    $display("mechanisms: subtract=%0d both_nibbles=%0d fill_lut=%0d fill_mem=%0d flush=%0d impulse_lut=%0d impulse_mem=%0d",
             n_sub, n_both_nib, n_fill_lut, n_fill_mem, n_flush, n_imp_lut, n_imp_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
