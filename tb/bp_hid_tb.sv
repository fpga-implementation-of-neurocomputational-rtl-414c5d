// bp_hid_tb: drives one second-layer hidden neuron through the operations
// its controller issues and checks every result in real arithmetic.
//   * hwr latches the potential from the summed products (Q8.24 -> Q8.8);
//   * BP_VMUL gives v[k]*y for each next-layer neuron k;
//   * BP_EMAC accumulates v[k]*delta_k; BP_DMUL1..3 give
//     delta = y(1-y)*sum_k v[k]*delta_k and eta*delta (within 2e-4);
//   * BP_VUPD moves v[k] by eta*delta_k*y (within 1.5 LSB);
//   * BP_SAVE / BP_LOAD restore the weights; BP_INIT gives weights in
//     [-0.5, 0.5) that differ between slots.
// Several random activations and delta sets are tried.
module bp_hid_tb;
  import nn_pkg::*;
  localparam int NO = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bp_op_t op = BP_NOP;
  logic [1:0] idx = '0;
  logic [31:0] seed = 32'hC0FFEE11;
  logic hwr = 0, ywr = 0;
  logic signed [47:0] hsum = '0;
  act_t yin = '0;
  logic signed [17:0] dk, edk;
  logic [15:0] eta = 16'd16384;   // 0.25
  fix_t h;
  act_t y;
  logic signed [35:0] prod;
  logic signed [17:0] delta, edelta;
  logic signed [17:0] dks [NO], edks [NO];

  assign dk  = dks[idx];
  assign edk = edks[idx];

  bp_hid #(.NO(NO), .J(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input bp_op_t o, input int k = 0);
    @(negedge clk); op = o; idx = 2'(k);
  endtask

  initial begin
    real yr, vr [NO], dr [NO], sum, g, er;
    fix_t saved [NO];
    bit differ;
    repeat (2) @(negedge clk); rst_n = 1;
    step(BP_INIT); step(BP_NOP);
    differ = 0;
    for (int k = 0; k < NO; k++) begin
      check(dut.v[k] >= -128 && dut.v[k] < 128, $sformatf("start weight %0d out of range", dut.v[k]));
      if (k > 0 && dut.v[k] != dut.v[0]) differ = 1;
    end
    check(differ, "start weights all equal");
    // potential from the adder tree: 1.5 in Q8.24
    @(negedge clk); hwr = 1; hsum = 48'sd25165824; @(negedge clk); hwr = 0;
    check(h == fix_t'(384), $sformatf("h = %0d, expected 384", h));
    for (int trial = 0; trial < 20; trial++) begin
      // activation and next-layer deltas
      @(negedge clk); ywr = 1; yin = act_t'($urandom_range(65535)); @(negedge clk); ywr = 0;
      yr = real'(y) / 65536.0;
      for (int k = 0; k < NO; k++) begin
        dks[k]  = 18'($signed($urandom_range(32768)) - 16384);    // [-0.25, 0.25]
        edks[k] = 18'($signed($urandom_range(16384)) - 8192);
        dr[k]   = real'(dks[k]) / 65536.0;
        vr[k]   = real'(dut.v[k]) / 256.0;
      end
      // forward products
      for (int k = 0; k < NO; k++) begin
        step(BP_VMUL, k); step(BP_NOP);
        er = real'(prod) / 16777216.0 - vr[k] * yr;
        check(er < 1e-6 && er > -1e-6, $sformatf("v*y %f, expected %f", real'(prod) / 16777216.0, vr[k] * yr));
      end
      // back-propagated error, weight update, own delta
      step(BP_CLR);
      for (int k = 0; k < NO; k++) begin step(BP_EMAC, k); step(BP_VUPD, k); end
      step(BP_NOP);
      step(BP_DMUL1); step(BP_DMUL2); step(BP_DMUL3); step(BP_NOP); step(BP_NOP);
      sum = 0.0;
      for (int k = 0; k < NO; k++) sum += vr[k] * dr[k];
      g = yr * (1.0 - yr) * sum;
      er = real'(delta) / 65536.0 - g;
      check(er < 2e-4 && er > -2e-4, $sformatf("delta %f, expected %f", real'(delta) / 65536.0, g));
      er = real'(edelta) / 65536.0 - 0.25 * g;
      check(er < 2e-4 && er > -2e-4, $sformatf("eta*delta %f, expected %f", real'(edelta) / 65536.0, 0.25 * g));
      for (int k = 0; k < NO; k++) begin
        er = real'(dut.v[k]) / 256.0 - (vr[k] + real'(edks[k]) / 65536.0 * yr);
        check(er < 1.5 / 256.0 && er > -1.5 / 256.0,
              $sformatf("v[%0d] %f, expected %f", k, real'(dut.v[k]) / 256.0, vr[k] + real'(edks[k]) / 65536.0 * yr));
      end
      // save before the update of the next trial; restore after it
      if (trial == 10) begin step(BP_SAVE); step(BP_NOP); for (int k = 0; k < NO; k++) saved[k] = dut.v[k]; end
    end
    step(BP_LOAD); step(BP_NOP);
    for (int k = 0; k < NO; k++) check(dut.v[k] == saved[k], "load did not restore the saved weight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
