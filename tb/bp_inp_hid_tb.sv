// bp_inp_hid_tb: input + hidden neuron, driven with its controller's
// operation sequences.
//   * forward: h for unit input vectors reads back each input weight; h for
//     a random input vector equals sum_i w_i x_i (to rounding);
//   * v*y products are linear in y;
//   * back-propagation step with given delta_k, eta*delta_k: v changes by
//     eta*delta_k*y, and every input weight by
//     eta * y(1-y) * v_old*delta_k * x_i (real-valued reference, 2 LSB);
//   * save / load restore the weights; init with another seed changes them.
module bp_inp_hid_tb;
  import nn_pkg::*;
  localparam int NI = 5, NO = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bp_op_t op = BP_NOP;
  logic [2:0] idx = 0;
  fix_t x = 0;
  logic [31:0] seed = 32'd7;
  logic ysel = 0;
  act_t yin = 0;
  logic signed [17:0] dk = 0, edk = 0;
  logic [15:0] eta = 16'd32768;
  fix_t h;
  act_t y;
  logic signed [35:0] prod;
  fix_t xv [NI];

  bp_inp_hid #(.NI(NI), .NO(NO), .J(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic one(input bp_op_t o, input int i = 0);
    @(negedge clk); op = o; idx = 3'(i); x = xv[i];
  endtask
  task automatic forward();
    one(BP_CLR);
    for (int i = 0; i < NI; i++) one(BP_MAC, i);
    one(BP_HLATCH);
    one(BP_NOP);
  endtask
  task automatic read_w(output int w [NI]);
    fix_t keep [NI];
    keep = xv;
    for (int k = 0; k < NI; k++) begin
      for (int i = 0; i < NI; i++) xv[i] = (i == k) ? fix_t'(256) : fix_t'(0);
      forward(); w[k] = int'(h);
    end
    xv = keep;
  endtask
  task automatic read_v(output int v);
    one(BP_VMUL, 0); one(BP_NOP);
    v = int'(prod / 36'sd65535);   // with y = 65535
  endtask

  initial begin
    int w0 [NI], w1 [NI], w2 [NI], v0, v1, acc;
    real yr, gp, dr, expect_dw;
    longint p1, p2;
    repeat (2) @(negedge clk); rst_n = 1;
    one(BP_INIT); one(BP_NOP);
    read_w(w0);
    for (int i = 0; i < NI; i++)
      check(w0[i] >= -128 && w0[i] < 128, $sformatf("start weight %0d out of [-0.5,0.5)", w0[i]));
    // linearity of the forward pass
    for (int n = 0; n < 20; n++) begin
      acc = 0;
      for (int i = 0; i < NI; i++) begin
        xv[i] = fix_t'($urandom_range(1024) - 512); acc += w0[i] * int'(xv[i]);
      end
      forward();
      check(int'(h) - acc / 256 <= 1 && acc / 256 - int'(h) <= 1,
            $sformatf("h %0d expected %0d", h, acc / 256));
    end
    // v*y linear in y
    @(negedge clk); op = BP_YWR; ysel = 1; yin = 16'd65535;
    @(negedge clk); op = BP_NOP; ysel = 0;
    read_v(v0);
    one(BP_YWR); ysel = 1; yin = 16'd16384;
    @(negedge clk); op = BP_VMUL; ysel = 0; idx = 0;
    @(negedge clk); op = BP_NOP; p1 = longint'(prod);
    check(p1 == longint'(v0) * 16384, "v*y not linear in y");
    // back-propagation step
    yin = 16'd40000;
    @(negedge clk); op = BP_YWR; ysel = 1;
    @(negedge clk); op = BP_NOP; ysel = 0;
    for (int i = 0; i < NI; i++) xv[i] = fix_t'($urandom_range(512) - 256);
    forward();
    one(BP_SAVE);
    dk = 18'sd20000; edk = 18'sd10000;
    one(BP_EMAC, 0); one(BP_VUPD, 0); one(BP_NOP);
    one(BP_DMUL1); one(BP_DMUL2); one(BP_DMUL3); one(BP_NOP);
    for (int i = 0; i < NI; i++) one(BP_WUPD, i);
    one(BP_NOP); one(BP_NOP);
    yr = 40000.0 / 65536.0;
    // v update: eta*delta_k * y  (read back with y = 1)
    @(negedge clk); op = BP_YWR; ysel = 1; yin = 16'd65535;
    @(negedge clk); op = BP_NOP; ysel = 0;
    read_v(v1);
    check(v1 - v0 - int'(10000.0 / 65536.0 * yr * 256.0 + 0.5) <= 1 &&
          v1 - v0 - int'(10000.0 / 65536.0 * yr * 256.0 + 0.5) >= -1,
          $sformatf("v moved by %0d", v1 - v0));
    read_w(w1);
    gp = yr * (1.0 - yr);
    dr = gp * (real'(v0) / 256.0) * (20000.0 / 65536.0);
    for (int i = 0; i < NI; i++) begin
      expect_dw = 0.5 * dr * (real'(xv[i]) / 256.0) * 256.0;
      check(real'(w1[i] - w0[i]) - expect_dw < 2.0 && expect_dw - real'(w1[i] - w0[i]) < 2.0,
            $sformatf("w[%0d] moved by %0d, expected %f", i, w1[i] - w0[i], expect_dw));
    end
    // restore
    one(BP_LOAD); one(BP_NOP);
    read_w(w2);
    check(w2 == w0, "load did not restore the saved weights");
    seed = 32'd8; one(BP_INIT); one(BP_NOP);
    read_w(w2);
    check(w2 != w0, "another seed gave the same start weights");
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
