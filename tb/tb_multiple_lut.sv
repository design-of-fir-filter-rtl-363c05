// tb_multiple_lut: checks the 16-word multiple table of a LUT multiplier.
// Three instances (|h| = 1, 102, 255) are read at every pair of addresses;
// each word must equal address * |h|, computed here with a plain multiply.
module tb_multiple_lut;
  localparam int unsigned H_W = 8;
  localparam int unsigned MAGS [3] = '{1, 102, 255};
  int checks = 0, failures = 0;

  logic [3:0]  addr_lo, addr_hi;
  logic [11:0] lo [3], hi [3];

  for (genvar i = 0; i < 3; i++) begin : g_dut
    multiple_lut #(.H_W(H_W), .MAG(MAGS[i])) dut (
      .addr_lo(addr_lo), .addr_hi(addr_hi), .word_lo(lo[i]), .word_hi(hi[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        addr_lo = 4'(a);
        addr_hi = 4'(b);
        #1;
        for (int i = 0; i < 3; i++) begin
          checks += 2;
          if (int'(lo[i]) != a * int'(MAGS[i])) begin
            failures++;
            $display("FAIL mag=%0d lo addr=%0d got %0d", MAGS[i], a, lo[i]);
          end
          if (int'(hi[i]) != b * int'(MAGS[i])) begin
            failures++;
            $display("FAIL mag=%0d hi addr=%0d got %0d", MAGS[i], b, hi[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
