// tb_segmented_memory: a 4-segment core with coefficients -3, 102, 255, 0.
// Random address pairs are applied every clock; one clock later every
// segment's word on each read port must be address * |h(segment)|. Reset
// must clear the read registers.
module tb_segmented_memory;
  localparam int unsigned N = 4, H_W = 8, WORD_W = 12;
  localparam int COEF [N] = '{-3, 102, 255, 0};
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] addr_lo, addr_hi;
  logic [N-1:0][WORD_W-1:0] rd_lo, rd_hi;

  always #5 clk = ~clk;

  segmented_memory #(.N(N), .H_W(H_W), .COEF(COEF)) dut (
    .clk(clk), .rst(rst), .addr_lo(addr_lo), .addr_hi(addr_hi), .rd_lo(rd_lo), .rd_hi(rd_hi));

  function automatic int mag(int h);
    return h < 0 ? -h : h;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_lo = 4'hf; addr_hi = 4'hf;
    repeat (2) @(negedge clk);
    checks++;
    if (rd_lo != '0 || rd_hi != '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      int a, b, pa, pb;
      pa = int'(addr_lo);
      pb = int'(addr_hi);
      a = int'($urandom_range(0, 15));
      b = int'($urandom_range(0, 15));
      addr_lo = 4'(a);
      addr_hi = 4'(b);
      #1;
      // synchronous read: before the clock edge the ports still show the
      // words of the previous addresses
      if (i > 0) begin
        checks++;
        if (int'(rd_lo[1]) != pa * 102 || int'(rd_hi[2]) != pb * 255) begin
          failures++; $display("FAIL read changed before the clock edge");
        end
      end
      @(negedge clk);
      for (int j = 0; j < int'(N); j++) begin
        checks += 2;
        if (int'(rd_lo[j]) != a * mag(COEF[j])) begin
          failures++; $display("FAIL seg %0d lo addr %0d got %0d", j, a, rd_lo[j]);
        end
        if (int'(rd_hi[j]) != b * mag(COEF[j])) begin
          failures++; $display("FAIL seg %0d hi addr %0d got %0d", j, b, rd_hi[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
