// Test of bilinear_interp against the rounded fixed-point weighted mean of
// the four pixels, over random pixels and all fractional positions.
module tb_bilinear_interp;
  logic [7:0] p00, p01, p10, p11, pix;
  logic [4:0] fx, fy;
  int checks = 0, failures = 0;

  bilinear_interp #(.FRAC(5)) dut (.*);

  initial begin
    for (int n = 0; n < 300; n++) begin
      p00 = 8'($urandom);  p01 = 8'($urandom);  p10 = 8'($urandom);  p11 = 8'($urandom);
      if (n == 0) begin p00 = 255; p01 = 255; p10 = 255; p11 = 255; end
      for (int x = 0; x < 32; x += 3)
        for (int y = 0; y < 32; y += 5) begin
          int e;
          fx = 5'(x);  fy = 5'(y);
          #1;
          e = (int'(p00) * (32 - x) * (32 - y) + int'(p01) * x * (32 - y)
             + int'(p10) * (32 - x) * y + int'(p11) * x * y + 512) / 1024;
          checks++;
          if (int'(pix) != e) begin
            failures++;  if (failures < 10) $display("pix %0d expected %0d", pix, e);
          end
        end
    end
    // integer position returns the pixel itself
    p00 = 8'd77;  fx = 0;  fy = 0;
    #1;
    checks++;
    if (pix != 8'd77) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
