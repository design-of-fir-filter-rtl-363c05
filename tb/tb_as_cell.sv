// tb_as_cell: checks the add/subtract cell in both forms (adder for a
// positive coefficient, subtractor for a negative one) with random products
// and partial sums; the result must appear one clock after its inputs, and
// reset must clear it.
module tb_as_cell;
  localparam int unsigned P_W = 16, ACC_W = 21;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst = 1'b1;
  logic [P_W-1:0]          prod;
  logic signed [ACC_W-1:0] s_in, s_add, s_sub;

  always #5 clk = ~clk;

  as_cell #(.P_W(P_W), .ACC_W(ACC_W), .SUB(1'b0)) dut_add (
    .clk(clk), .rst(rst), .prod(prod), .s_in(s_in), .s_out(s_add));
  as_cell #(.P_W(P_W), .ACC_W(ACC_W), .SUB(1'b1)) dut_sub (
    .clk(clk), .rst(rst), .prod(prod), .s_in(s_in), .s_out(s_sub));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_add, e_sub;
    prod = '0; s_in = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (s_add != 0 || s_sub != 0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      prod = P_W'($urandom);
      // partial sums kept in a range where the 21-bit result cannot wrap
      s_in = ACC_W'(int'($urandom_range(0, 1 << 19)) - (1 << 18));
      e_add = int'(s_in) + int'(prod);
      e_sub = int'(s_in) - int'(prod);
      @(negedge clk);
      checks += 2;
      if (int'(s_add) != e_add) begin failures++; $display("FAIL add exp %0d got %0d", e_add, s_add); end
      if (int'(s_sub) != e_sub) begin failures++; $display("FAIL sub exp %0d got %0d", e_sub, s_sub); end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++;
    if (s_add != 0 || s_sub != 0) begin failures++; $display("FAIL reset after run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
