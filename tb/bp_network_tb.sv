// bp_network_tb: on-line back-propagation on a 5-input problem.
// Inputs x0..x3 are bits (0 or 1.0), x4 is a constant 1.0 that acts as the
// bias; the target is x0 XOR x1 (x2, x3 are distractors). Checks:
//   * output latency 11 + NI + NH + NO and learning latency 10 + 2*NO + NI
//     on every presentation;
//   * the summed squared error falls, and all 16 patterns end up correctly
//     classified;
//   * four single learning steps from the start weights, replayed in real
//     arithmetic from the weights read out of the hidden neurons: output,
//     output weights and input weights agree with the reference;
//   * save / restore: outputs after restore equal those at the time of save.
module bp_network_tb;
  import nn_pkg::*;
  localparam int NI = 5, NH = 50, NO = 1;
  localparam int FWD = 11 + NI + NH + NO;
  localparam int LRN = 10 + 2 * NO + NI;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, save = 0, restore = 0, start = 0, learn = 0;
  logic [31:0] seed = 32'h1234_5678;
  fix_t x [NI];
  logic [NO-1:0] z = '0;
  logic [15:0] eta = 16'd32768;   // 0.5
  logic busy, done;
  act_t y [NO];
  logic [NO-1:0] cls;
  logic [23:0] err2;

  bp_network #(.NI(NI), .NH(NH), .NO(NO)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // weights of every hidden neuron, read for the one-step reference
  fix_t tw [NH][NI];
  fix_t tv [NH][NO];
  for (genvar j = 0; j < NH; j++) begin : g_peek
    always_comb begin
      tw[j] = dut.g_hid[j].u_h.w;
      tv[j] = dut.g_hid[j].u_h.v;
    end
  end

  function automatic real sig(input real a);
    return 1.0 / (1.0 + $exp(-a));
  endfunction

  // One learning step on pattern p, replayed in real arithmetic from the
  // weights before it: output y, new output weights v and new input weights
  // w must agree within the table error and 1.5 weight LSBs.
  task automatic one_step_reference(input int p);
    real xr [NI], yh [NH], w0 [NH][NI], v0 [NH], ho, o, d, dh, er;
    int bad_v, bad_w;
    for (int i = 0; i < 4; i++) xr[i] = p[i] ? 1.0 : 0.0;
    xr[4] = 1.0;
    for (int j = 0; j < NH; j++) begin
      v0[j] = real'(tv[j][0]) / 256.0;
      ho = 0.0;
      for (int i = 0; i < NI; i++) begin
        w0[j][i] = real'(tw[j][i]) / 256.0;
        ho += w0[j][i] * xr[i];
      end
      yh[j] = sig(ho);
    end
    ho = 0.0;
    for (int j = 0; j < NH; j++) ho += v0[j] * yh[j];
    o = sig(ho);
    present(p, 1);
    er = real'(y[0]) / 65535.0 - o;
    check(er < 4e-3 && er > -4e-3, $sformatf("output %f, reference %f", real'(y[0]) / 65535.0, o));
    d = ((z[0] ? 1.0 : 0.0) - o) * o * (1.0 - o);
    bad_v = 0; bad_w = 0;
    for (int j = 0; j < NH; j++) begin
      er = real'(tv[j][0]) / 256.0 - (v0[j] + 0.5 * d * yh[j]);
      if (er > 1.5 / 256.0 || er < -1.5 / 256.0) bad_v++;
      dh = yh[j] * (1.0 - yh[j]) * v0[j] * d;
      for (int i = 0; i < NI; i++) begin
        er = real'(tw[j][i]) / 256.0 - (w0[j][i] + 0.5 * dh * xr[i]);
        if (er > 1.5 / 256.0 || er < -1.5 / 256.0) bad_w++;
      end
    end
    check(bad_v == 0, $sformatf("%0d output weights differ from the reference update", bad_v));
    check(bad_w == 0, $sformatf("%0d input weights differ from the reference update", bad_w));
  endtask
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmd(ref logic c);
    @(negedge clk); c = 1; @(negedge clk); c = 0;
    while (busy) @(negedge clk);
  endtask

  task automatic present(input int p, input bit lrn);
    int c0;
    for (int i = 0; i < 4; i++) x[i] = p[i] ? fix_t'(256) : fix_t'(0);
    x[4] = fix_t'(256);
    z[0] = p[0] ^ p[1]; learn = lrn;
    @(negedge clk); start = 1; @(posedge clk); c0 = cyc; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    check(cyc - c0 == (lrn ? FWD + LRN : FWD),
          $sformatf("latency %0d, expected %0d", cyc - c0, lrn ? FWD + LRN : FWD));
    @(negedge clk);
  endtask

  task automatic epoch_error(output int e, output int wrong);
    e = 0; wrong = 0;
    for (int p = 0; p < 16; p++) begin
      present(p, 0);
      e += int'(err2);
      if (cls[0] != z[0]) wrong++;
    end
  endtask

  initial begin
    int e0, e1, w0, w1, ep, order [16], r, tmp;
    act_t ysave [16];
    bit same;
    for (int i = 0; i < NI; i++) x[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    cmd(init);
    for (int p = 0; p < 4; p++) one_step_reference(p);
    cmd(init);
    epoch_error(e0, w0);
    $display("start: error %0d, %0d wrong", e0, w0);
    ep = 0;
    do begin
      for (int i = 0; i < 16; i++) order[i] = i;
      for (int i = 15; i > 0; i--) begin r = $urandom_range(i); tmp = order[i]; order[i] = order[r]; order[r] = tmp; end
      for (int i = 0; i < 16; i++) present(order[i], 1);
      ep++;
      epoch_error(e1, w1);
    end while (w1 != 0 && ep < 300);
    $display("after %0d epochs: error %0d, %0d wrong", ep, e1, w1);
    check(e1 < e0, "squared error did not fall");
    check(w1 == 0, $sformatf("%0d patterns still wrong", w1));

    // save, disturb by more learning with wrong targets (eta large), restore
    for (int p = 0; p < 16; p++) begin present(p, 0); ysave[p] = y[0]; end
    cmd(save);
    for (int p = 0; p < 16; p++) begin
      for (int i = 0; i < 4; i++) x[i] = p[i] ? fix_t'(256) : fix_t'(0);
      z[0] = ~(p[0] ^ p[1]); learn = 1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
    end
    same = 1;
    for (int p = 0; p < 16; p++) begin present(p, 0); if (y[0] != ysave[p]) same = 0; end
    check(!same, "learning with inverted targets changed nothing");
    cmd(restore);
    same = 1;
    for (int p = 0; p < 16; p++) begin present(p, 0); if (y[0] != ysave[p]) same = 0; end
    check(same, "restore did not bring back the saved weights");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
