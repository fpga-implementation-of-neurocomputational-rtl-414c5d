// bp_out_tb: output neuron. Random potentials and activations; after the
// six-cycle sequence, delta, eta*delta and the squared error must match
// (z - y) y (1 - y), eta*delta and (z - y)^2 within 1e-4, and h must be the
// potential sum rescaled to 8.8 fixed point.
module bp_out_tb;
  import nn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hwr = 0, ywr = 0, ostart = 0, z = 0;
  logic signed [47:0] hsum = 0;
  act_t yin = 0;
  logic [15:0] eta = 16'd16384;
  fix_t h;
  act_t y;
  logic signed [17:0] delta, edelta;
  logic [16:0] err2;
  bp_out dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction
  initial begin
    real yr, er, dr;
    int hv;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      hv = $urandom_range(8000) - 4000;          // potential in 8.8 units
      hsum = 48'(longint'(hv) <<< 16);
      yin = 16'($urandom);
      z = 1'($urandom);
      eta = 16'($urandom);
      @(negedge clk); hwr = 1; ywr = 1;
      @(negedge clk); hwr = 0; ywr = 0; ostart = 1;
      @(negedge clk); ostart = 0;
      repeat (6) @(negedge clk);
      yr = real'(y) / 65536.0;
      er = (z ? 65535.0 / 65536.0 : 0.0) - yr;
      dr = er * yr * (1.0 - yr);
      check(int'(h) == hv, $sformatf("h %0d expected %0d", h, hv));
      check(near(real'(delta) / 65536.0, dr, 1e-4), $sformatf("delta %f expected %f", real'(delta) / 65536.0, dr));
      check(near(real'(edelta) / 65536.0, dr * real'(eta) / 65536.0, 1e-4), "eta*delta wrong");
      check(near(real'(err2) / 65536.0, er * er, 1e-4), $sformatf("err2 %f expected %f", real'(err2) / 65536.0, er * er));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
