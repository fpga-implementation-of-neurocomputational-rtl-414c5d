// sigmoid_lut_tb: sweeps every 16-bit potential (8.8 fixed point, -128..128)
// and compares the table-plus-interpolation sigmoid with the exact one.
//   * default table (3 integer, 2 fractional index bits): absolute error at
//     most 8e-4 inside [-8, 8) (interpolation error about 7.5e-4 at the
//     steepest segments) and at most 3.4e-4 outside (saturation);
//   * the 3/3 table: maximum error over [-10, 10] within 3.5e-4, the value
//     listed for that size (3.353e-4, set by the saturation at +-8);
//   * output never decreases as h grows.
module sigmoid_lut_tb;
  logic signed [15:0] h;
  logic [15:0] y, y33;
  sigmoid_lut dut (.h(h), .y(y));
  sigmoid_lut #(.NA(3), .NB(3)) dut33 (.h(h), .y(y33));
  int checks = 0, failures = 0;
  initial begin
    real xr, ref_y, err, maxin, maxout, max33;
    logic [15:0] prev;
    maxin = 0; maxout = 0; max33 = 0; prev = 0;
    for (int v = -32768; v < 32768; v++) begin
      h = 16'(v); #1;
      xr = real'(v) / 256.0;
      ref_y = 1.0 / (1.0 + $exp(-xr));
      err = real'(y) / 65535.0 - ref_y; if (err < 0) err = -err;
      if (xr >= -8.0 && xr < 8.0) begin if (err > maxin) maxin = err; end
      else if (err > maxout) maxout = err;
      if (xr >= -10.0 && xr <= 10.0) begin
        err = real'(y33) / 65535.0 - ref_y; if (err < 0) err = -err;
        if (err > max33) max33 = err;
      end
      checks++;
      if (v > -32768 && y < prev) begin failures++; $display("FAIL: decreasing at %0d", v); end
      prev = y;
    end
    $display("max error: in range %e, saturated %e, 3/3 table %e", maxin, maxout, max33);
    checks++; if (maxin > 8.0e-4)  begin failures++; $display("FAIL: interpolation error %e", maxin); end
    checks++; if (maxout > 3.4e-4) begin failures++; $display("FAIL: saturation error %e", maxout); end
    checks++; if (max33 > 3.5e-4)  begin failures++; $display("FAIL: 3/3 table error %e", max33); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
