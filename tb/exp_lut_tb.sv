// exp_lut_tb: sweeps x over [0, 16) in steps of 1/256 and compares the
// table-plus-interpolation exp(-x) with the exact value. The maximum errors
// must stay within the values listed for the table sizes (3/3: 1.833e-3,
// 4/4: 4.704e-4), with 2e-5 allowed for 16-bit output rounding; the output
// must never increase with x.
module exp_lut_tb;
  logic [15:0] x, y33, y44;
  exp_lut dut (.x(x), .y(y33));
  exp_lut #(.NA(4), .NB(4)) dut44 (.x(x), .y(y44));
  int checks = 0, failures = 0;
  initial begin
    real ref_y, e33, e44, m33, m44;
    logic [15:0] prev;
    m33 = 0; m44 = 0; prev = 16'hFFFF;
    for (int v = 0; v < 4096; v++) begin
      x = 16'(v); #1;
      ref_y = $exp(-real'(v) / 256.0);
      e33 = real'(y33) / 65535.0 - ref_y; if (e33 < 0) e33 = -e33;
      e44 = real'(y44) / 65535.0 - ref_y; if (e44 < 0) e44 = -e44;
      if (e33 > m33) m33 = e33;
      if (e44 > m44) m44 = e44;
      checks++;
      if (y33 > prev) begin failures++; $display("FAIL: increasing at %0d", v); end
      prev = y33;
    end
    $display("max error: 3/3 %e, 4/4 %e", m33, m44);
    checks++; if (m33 > 1.833e-3 + 2e-5) begin failures++; $display("FAIL: 3/3 error %e", m33); end
    checks++; if (m44 > 4.704e-4 + 2e-5) begin failures++; $display("FAIL: 4/4 error %e", m44); end
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
