// tb_lut_multiplier: multiplies every 8-bit sample by four coefficient
// magnitudes (0, 1, 87, 255) through the LUT multiplier and compares each
// product with an ordinary multiplication.
module tb_lut_multiplier;
  localparam int unsigned H_W = 8;
  localparam int unsigned MAGS [4] = '{0, 1, 87, 255};
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst = 1'b0;
  logic [7:0]  x;
  logic [15:0] prod [4];

  for (genvar i = 0; i < 4; i++) begin : g_dut
    lut_multiplier #(.H_W(H_W), .MAG(MAGS[i])) dut (
      .clk(clk), .rst(rst), .x(x), .prod(prod[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(prod[i]) != v * int'(MAGS[i])) begin
          failures++;
          $display("FAIL x=%0d mag=%0d got %0d", v, MAGS[i], prod[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
