// tb_mem_fir: end-to-end check of the memory-based FIR filter. Two instances
// run the same sample stream: the default 16-tap filter and a 5-tap filter
// with extreme coefficients (255, -255, 1, -128, 0). The stream holds an
// impulse, a full-scale step and random samples, and a reset in the middle.
// Every output is compared with the convolution sum computed here from the
// applied samples (samples before reset count as zero), delayed by the
// filter's latency of three clocks; y_valid must rise exactly N+2 edges after
// reset is released.
module tb_mem_fir;
  localparam int unsigned LAT = 3;
  localparam int unsigned NA = fir_pkg::N_TAPS;
  localparam int unsigned NB = 5;
  localparam int COEF_A [NA] = fir_pkg::DEFAULT_COEF;
  localparam int COEF_B [NB] = '{255, -255, 1, -128, 0};
  localparam int unsigned WA = fir_pkg::acc_width(8, NA);
  localparam int unsigned WB = fir_pkg::acc_width(8, NB);
  localparam int unsigned NSAMP = 600;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] x;
  logic signed [WA-1:0] ya;
  logic signed [WB-1:0] yb;
  logic va, vb;

  always #5 clk = ~clk;

  mem_fir dut_a (.clk(clk), .rst(rst), .x(x), .y(ya), .y_valid(va));
  mem_fir #(.N(NB), .H_W(8), .COEF(COEF_B)) dut_b (.clk(clk), .rst(rst), .x(x), .y(yb), .y_valid(vb));

  int hist [$];       // samples applied since the last reset, oldest first
  int edges;          // clock edges since the last reset

  function automatic int ref_y(int n, int k, const ref int h [$], const ref int xs [$]);
    int acc = 0;
    for (int j = 0; j < n; j++)
      if (k - j >= 0) acc += h[j] * xs[k - j];
    return acc;
  endfunction

  int ha [$], hb [$];

  task automatic check_outputs();
    int k, ea, eb;
    k = edges - int'(LAT);
    ea = (k >= 0) ? ref_y(NA, k, ha, hist) : 0;
    eb = (k >= 0) ? ref_y(NB, k, hb, hist) : 0;
    checks += 4;
    if (int'(ya) != ea) begin failures++; $display("FAIL A edge %0d exp %0d got %0d", edges, ea, ya); end
    if (int'(yb) != eb) begin failures++; $display("FAIL B edge %0d exp %0d got %0d", edges, eb, yb); end
    if (va != (edges >= int'(NA + LAT - 1))) begin failures++; $display("FAIL A valid at edge %0d", edges); end
    if (vb != (edges >= int'(NB + LAT - 1))) begin failures++; $display("FAIL B valid at edge %0d", edges); end
  endtask

  function automatic int stim(int i);
    if (i == 0) return 1;                    // unit impulse
    if (i < 20) return 0;
    if (i == 20) return 255;                 // full-scale impulse
    if (i < 40) return 0;
    if (i < 70) return 255;                  // full-scale step
    return int'($urandom_range(0, 255));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (COEF_A[j]) ha.push_back(COEF_A[j]);
    foreach (COEF_B[j]) hb.push_back(COEF_B[j]);
    x = 8'd0;
    repeat (3) @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
      hist.delete();
      edges = 0;
      check_outputs();
      for (int i = 0; i < int'(NSAMP) / (pass + 1); i++) begin
        int v;
        v = (pass == 0) ? stim(i) : int'($urandom_range(0, 255));
        x = 8'(v);
        hist.push_back(v);
        @(negedge clk);
        edges++;
        check_outputs();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
