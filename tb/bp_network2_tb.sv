// bp_network2_tb: back-propagation with two hidden layers on a 5-input
// problem (x0..x3 bits, x4 = 1.0 as bias input, target x0 XOR x1).
// Checks:
//   * output latency 13 + NI + NH + NH2 + NO and learning latency
//     11 + 2*NO + 2*NH2 + NI on every presentation;
//   * four single learning steps from the start weights, replayed in real
//     arithmetic from the weights read out of both hidden layers: the output
//     and every updated weight (first-layer input and outgoing weights,
//     second-layer outgoing weights) agree with the reference;
//   * the summed squared error falls and all 16 patterns end up correct.
module bp_network2_tb;
  import nn_pkg::*;
  localparam int NI = 5, NH = 12, NH2 = 6, NO = 1;
  localparam int FWD = 13 + NI + NH + NH2 + NO;
  localparam int LRN = 11 + 2 * NO + 2 * NH2 + NI;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, save = 0, restore = 0, start = 0, learn = 0;
  logic [31:0] seed = 32'h0BADCAFE;
  fix_t x [NI];
  logic [NO-1:0] z = '0;
  logic [15:0] eta = 16'd65535;   // 1.0
  logic busy, done;
  act_t y [NO];
  logic [NO-1:0] cls;
  logic [23:0] err2;

  bp_network2 #(.NI(NI), .NH(NH), .NH2(NH2), .NO(NO)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // weights of both hidden layers, for the reference
  fix_t tw [NH][NI];
  fix_t tv1 [NH][NH2];
  fix_t tv2 [NH2][NO];
  for (genvar j = 0; j < NH; j++) begin : g_p1
    always_comb begin
      tw[j]  = dut.g_h1[j].u_h.w;
      tv1[j] = dut.g_h1[j].u_h.v;
    end
  end
  for (genvar k = 0; k < NH2; k++) begin : g_p2
    always_comb tv2[k] = dut.g_h2[k].u_h.v;
  end

  function automatic real sig(input real a);
    return 1.0 / (1.0 + $exp(-a));
  endfunction

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

  function automatic bit near(input real a, input real b);
    return (a - b) < 1.5 / 256.0 && (b - a) < 1.5 / 256.0;
  endfunction

  task automatic one_step_reference(input int p);
    real xr [NI], y1 [NH], y2 [NH2], w [NH][NI], v1 [NH][NH2], v2 [NH2];
    real a, o, d, d2 [NH2], d1, er;
    int bad;
    for (int i = 0; i < 4; i++) xr[i] = p[i] ? 1.0 : 0.0;
    xr[4] = 1.0;
    for (int j = 0; j < NH; j++) begin
      a = 0.0;
      for (int i = 0; i < NI; i++) begin w[j][i] = real'(tw[j][i]) / 256.0; a += w[j][i] * xr[i]; end
      for (int k = 0; k < NH2; k++) v1[j][k] = real'(tv1[j][k]) / 256.0;
      y1[j] = sig(a);
    end
    for (int k = 0; k < NH2; k++) begin
      a = 0.0;
      for (int j = 0; j < NH; j++) a += v1[j][k] * y1[j];
      y2[k] = sig(a);
      v2[k] = real'(tv2[k][0]) / 256.0;
    end
    a = 0.0;
    for (int k = 0; k < NH2; k++) a += v2[k] * y2[k];
    o = sig(a);
    present(p, 1);
    er = real'(y[0]) / 65535.0 - o;
    check(er < 4e-3 && er > -4e-3, $sformatf("output %f, reference %f", real'(y[0]) / 65535.0, o));
    d = ((z[0] ? 1.0 : 0.0) - o) * o * (1.0 - o);
    bad = 0;
    for (int k = 0; k < NH2; k++) begin
      d2[k] = y2[k] * (1.0 - y2[k]) * v2[k] * d;
      if (!near(real'(tv2[k][0]) / 256.0, v2[k] + 1.0 * d * y2[k])) bad++;
    end
    check(bad == 0, $sformatf("%0d second-layer weights differ from the reference", bad));
    bad = 0;
    for (int j = 0; j < NH; j++) begin
      a = 0.0;
      for (int k = 0; k < NH2; k++) begin
        a += v1[j][k] * d2[k];
        if (!near(real'(tv1[j][k]) / 256.0, v1[j][k] + 1.0 * d2[k] * y1[j])) bad++;
      end
      d1 = y1[j] * (1.0 - y1[j]) * a;
      for (int i = 0; i < NI; i++)
        if (!near(real'(tw[j][i]) / 256.0, w[j][i] + 1.0 * d1 * xr[i])) bad++;
    end
    check(bad == 0, $sformatf("%0d first-layer weights differ from the reference", bad));
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
    for (int i = 0; i < NI; i++) x[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    while (busy) @(negedge clk);
    for (int p = 0; p < 4; p++) one_step_reference(p);
    epoch_error(e0, w0);
    $display("start: error %0d, %0d wrong", e0, w0);
    ep = 0;
    do begin
      for (int i = 0; i < 16; i++) order[i] = i;
      for (int i = 15; i > 0; i--) begin r = $urandom_range(i); tmp = order[i]; order[i] = order[r]; order[r] = tmp; end
      for (int i = 0; i < 16; i++) present(order[i], 1);
      ep++;
      epoch_error(e1, w1);
    end while (w1 != 0 && ep < 1500);
    $display("after %0d epochs: error %0d, %0d wrong", ep, e1, w1);
    check(e1 < e0, "squared error did not fall");
    check(w1 == 0, $sformatf("%0d patterns still wrong", w1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
