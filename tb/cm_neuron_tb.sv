// cm_neuron_tb: drives one thermal perceptron with the operation sequences
// its controller uses and checks the results against real-valued arithmetic.
//   * after wipe, h = 0 and S = 1;
//   * a first learning step with t = 0 at T = T0 (Tfac = 1) makes
//     w = -psi and b = +1, so h = -(sum psi_i^2) - 1 on the next pattern;
//   * Tfac = (T/T0) exp(-|h|/T) for several patterns and temperatures, within
//     3e-3 absolute;
//   * each learning step lowers T/T0 by dtau; CM_TRESET returns it to 1;
//   * a neuron that is not selected does not change;
//   * a t = 1 step at Tfac = 1 undoes the first step (weights and bias 0).
module cm_neuron_tb;
  import nn_pkg::*;
  localparam int NI = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cm_op_t op = CM_NOP;
  logic [2:0] idx = 0;
  fix_t psi;
  logic t = 0, sel = 0;
  fix_t t0 = fix_t'(512);               // T0 = 2.0
  tau_t dtau = tau_t'(65536 / 8);       // Imax = 8
  logic s, div_busy;
  fix_t h;
  logic [15:0] tfac;
  tau_t tau;
  fix_t pv [NI];

  cm_neuron #(.NI(NI)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_op(input cm_op_t o, input int i = 0);
    @(negedge clk); op = o; idx = 3'(i); psi = pv[i];
    @(negedge clk); op = CM_NOP;
  endtask
  // ops back to back (multiplier result is read in the following cycle)
  task automatic forward();
    @(negedge clk); op = CM_CLR;
    for (int i = 0; i < NI; i++) begin
      @(negedge clk); op = CM_MUL; idx = 3'(i); psi = pv[i];
      @(negedge clk); op = CM_ACC;
    end
    @(negedge clk); op = CM_HLATCH;
    @(negedge clk); op = CM_NOP;
  endtask
  task automatic thermal();
    @(negedge clk); op = CM_TMUL;
    @(negedge clk); op = CM_TLATCH;
    @(negedge clk); op = CM_DIV;
    @(negedge clk); op = CM_NOP;
    repeat (26) @(negedge clk);
    op = CM_EMUL;
    @(negedge clk); op = CM_FLATCH;
    @(negedge clk); op = CM_NOP;
  endtask
  task automatic update();
    for (int i = 0; i < NI; i++) begin
      @(negedge clk); op = CM_UMUL; idx = 3'(i); psi = pv[i];
      @(negedge clk); op = CM_UPD;
    end
    @(negedge clk); op = CM_BUPD;
    @(negedge clk); op = CM_NOP;
  endtask

  function automatic real hreal();
    return real'(h) / 256.0;
  endfunction

  initial begin
    real sum2, expect_t, tr, got;
    fix_t h1;
    pv = '{fix_t'(256), fix_t'(128), fix_t'(0), fix_t'(-64), fix_t'(256)};
    repeat (2) @(negedge clk); rst_n = 1;
    do_op(CM_WIPE);
    forward();
    check(h == 0 && s == 1, "after wipe h should be 0 and S 1");
    // selected neuron, target 0, full temperature
    sel = 1; t = 0;
    do_op(CM_TRESET);
    check(tfac == 16'hFFFF && tau == TAU_ONE, "treset did not give Tfac = 1, T = T0");
    update();
    check(tau == TAU_ONE - dtau, "T/T0 did not drop by dtau");
    forward();
    sum2 = 0; for (int i = 0; i < NI; i++) sum2 += (real'(pv[i]) / 256.0) ** 2;
    check((hreal() + sum2 + 1.0) < 0.02 && (hreal() + sum2 + 1.0) > -0.02,
          $sformatf("h after one step %f, expected %f", hreal(), -sum2 - 1.0));
    check(s == 0, "S should be 0 after learning t = 0");
    h1 = h;
    // thermal factor at several temperatures
    for (int r = 0; r < 4; r++) begin
      thermal();
      tr = 2.0 * real'(tau) / 65536.0;
      expect_t = (real'(tau) / 65536.0) * $exp(-((hreal() < 0) ? -hreal() : hreal()) / tr);
      got = real'(tfac) / 65535.0;
      check((got - expect_t) < 3e-3 && (expect_t - got) < 3e-3,
            $sformatf("Tfac %f expected %f (h %f, T/T0 %f)", got, expect_t, hreal(), real'(tau) / 65536.0));
      // lower the temperature by one learning step of an unrelated pattern
      // with update amounts of zero: t == S
      t = s; update(); t = 0;
    end
    check(tau == TAU_ONE - 5 * dtau, "T/T0 did not follow the learning steps");
    // a neuron that is not selected keeps its weights and temperature
    sel = 0; t = 1;
    thermal(); update(); forward();
    check(h == h1, "unselected neuron changed");
    check(tau == TAU_ONE - 5 * dtau, "unselected neuron temperature changed");
    // learning t = 1 moves h up
    sel = 1; t = 1;
    do_op(CM_TRESET); update(); forward();
    check(h > h1, "learning with t = 1 did not raise h");
    // at Tfac = 1 this step undoes the first one exactly: w = 0, b = 0
    check(hreal() < 0.02 && hreal() > -0.02 && s == 1,
          $sformatf("h after the t = 1 step %f, expected 0", hreal()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
