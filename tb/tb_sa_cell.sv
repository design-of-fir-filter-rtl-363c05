// tb_sa_cell: checks the shift-add cell, prod = word_hi * 16 + word_lo, with
// random 12-bit words, both in its pipelined form (result one clock later)
// and in its combinational form (result in the same cycle).
module tb_sa_cell;
  localparam int unsigned WORD_W = 12;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst = 1'b1;
  logic [WORD_W-1:0]   lo, hi;
  logic [WORD_W+3:0]   prod_p, prod_c;

  always #5 clk = ~clk;

  sa_cell #(.WORD_W(WORD_W), .PIPE(1'b1)) dut_p (
    .clk(clk), .rst(rst), .word_lo(lo), .word_hi(hi), .prod(prod_p));
  sa_cell #(.WORD_W(WORD_W), .PIPE(1'b0)) dut_c (
    .clk(clk), .rst(rst), .word_lo(lo), .word_hi(hi), .prod(prod_c));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_prev, mag;
    lo = '0; hi = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (prod_p != '0) begin failures++; $display("FAIL reset value %0d", prod_p); end
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      // table words are multiples k * |h| with k < 16 and |h| < 256
      mag = (i % 7 == 0) ? 255 : int'($urandom_range(0, 255));
      lo = WORD_W'(mag * ((i % 7 == 0) ? 15 : int'($urandom_range(0, 15))));
      hi = WORD_W'(mag * ((i % 7 == 0) ? 15 : int'($urandom_range(0, 15))));
      #1;
      checks++;
      if (int'(prod_c) != int'(hi) * 16 + int'(lo)) begin
        failures++; $display("FAIL comb hi=%0d lo=%0d got %0d", hi, lo, prod_c);
      end
      exp_prev = int'(hi) * 16 + int'(lo);
      @(negedge clk);
      checks++;
      if (int'(prod_p) != exp_prev) begin
        failures++; $display("FAIL pipe expected %0d got %0d", exp_prev, prod_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
