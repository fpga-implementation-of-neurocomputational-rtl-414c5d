// benchmark_size_tb: both learning machines at the size of the largest
// benchmark of the published comparison (8 inputs, 768 patterns), on
// synthetic data, since the benchmark files themselves are not part of this
// design.
//
// Data: input i of pattern p is a pseudo-random value in [0, 1) (an integer
// hash of p and i, 8 fractional bits); the label is 1 when
// 3x0 - 2x1 + x2 + 2x3 - x4 + x5 - 3x6 + 2x7 > 1.5, and every 25th label is
// flipped (4% label noise).
//   * C-Mantec (8 inputs, up to 50 neurons, noise filter phi = 2): the run
//     ends, the network stays within its neurons, the noise filter deletes
//     patterns, and at least 90% of the patterns are classified as the
//     noise-free rule says.
//   * Back-propagation with 5 hidden neurons, the size used for every
//     benchmark: 576 training and 192 validation patterns, 30 epochs; the
//     best weights are stored at least once, at least 90% of the patterns
//     agree with the noise-free rule, and the run takes at least the cycle
//     budget of its presentations (45 cycles per training pattern and 25 per
//     validation pattern at this size).
module benchmark_size_tb;
  import nn_pkg::*;
  localparam int NI = 8, NPAT = 1024, PW = $clog2(NPAT);
  localparam int NP = 768, NTR = 576, NVA = 192;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fix_t xval(input int p, input int i);
    logic [31:0] r;
    r = 32'(p) * 32'h9E3779B9 ^ 32'(i) * 32'h85EBCA6B ^ 32'h2545F491;
    r = r ^ (r >> 15); r = r * 32'h2C1B3C6D;
    r = r ^ (r >> 12); r = r * 32'h297A2D39;
    r = r ^ (r >> 15);
    return fix_t'({8'd0, r[7:0]});
  endfunction
  function automatic bit rule(input int p);
    int c [NI] = '{3, -2, 1, 2, -1, 1, -3, 2};
    int s = 0;
    for (int i = 0; i < NI; i++) s += c[i] * int'(xval(p, i));
    return s > 384;                    // 1.5 in units of 1/256
  endfunction
  function automatic bit label(input int p);
    return rule(p) ^ (p % 25 == 24);
  endfunction

  // ---- C-Mantec machine
  logic c_wr_en = 0, c_wr_t = 0, c_run = 0, c_q_start = 0;
  logic [PW-1:0] c_wr_addr = '0;
  fix_t c_wr_psi [NI], c_q_psi [NI];
  logic c_busy, c_done, c_conv, c_full, c_q_done, c_q_y;
  logic [15:0] c_passes, c_n_fix;
  logic [5:0] c_n_act;
  logic [PW:0] c_n_del;
  cm_trainer #(.NI(NI), .NH(50), .NPAT(NPAT)) u_cm (
    .clk(clk), .rst_n(rst_n), .wr_en(c_wr_en), .wr_addr(c_wr_addr), .wr_psi(c_wr_psi),
    .wr_t(c_wr_t), .n_pat((PW + 1)'(NP)), .t0(fix_t'(256)), .dtau(tau_t'(65536 / 100)),
    .gfac(16'd3277), .phi(fix_t'(512)), .max_pass(16'd40), .run(c_run), .busy(c_busy),
    .done(c_done), .converged(c_conv), .passes(c_passes), .n_act(c_n_act),
    .n_deleted(c_n_del), .full(c_full), .n_fix(c_n_fix),
    .q_start(c_q_start), .q_psi(c_q_psi), .q_done(c_q_done), .q_y(c_q_y));

  // ---- back-propagation machine, 5 hidden neurons
  logic b_wr_en = 0, b_run = 0, b_q_start = 0;
  logic [PW-1:0] b_wr_addr = '0;
  fix_t b_wr_x [NI], b_q_x [NI];
  logic [0:0] b_wr_z = '0, b_q_cls;
  logic b_busy, b_done, b_q_done;
  logic [15:0] b_epochs, b_best_epoch, b_n_saves;
  logic [31:0] b_best_err;
  act_t b_q_y [1];
  bp_trainer #(.NI(NI), .NH(5), .NO(1), .NPAT(NPAT)) u_bp (
    .clk(clk), .rst_n(rst_n), .wr_en(b_wr_en), .wr_addr(b_wr_addr), .wr_x(b_wr_x),
    .wr_z(b_wr_z), .n_train((PW + 1)'(NTR)), .n_val((PW + 1)'(NVA)), .eta(16'd16384),
    .seed(32'h5EED_0001), .max_epochs(16'd30), .run(b_run), .busy(b_busy), .done(b_done),
    .epochs(b_epochs), .best_epoch(b_best_epoch), .best_err(b_best_err), .n_saves(b_n_saves),
    .q_start(b_q_start), .q_x(b_q_x), .q_done(b_q_done), .q_y(b_q_y), .q_cls(b_q_cls));

  initial begin
    int agree;
    longint c0, cm_cycles, bp_cycles;
    for (int i = 0; i < NI; i++) begin
      c_wr_psi[i] = '0; c_q_psi[i] = '0; b_wr_x[i] = '0; b_q_x[i] = '0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    // load both pattern memories
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      c_wr_en = 1; c_wr_addr = PW'(p); c_wr_t = label(p);
      b_wr_en = 1; b_wr_addr = PW'(p); b_wr_z = label(p);
      for (int i = 0; i < NI; i++) begin c_wr_psi[i] = xval(p, i); b_wr_x[i] = xval(p, i); end
    end
    @(negedge clk); c_wr_en = 0; b_wr_en = 0;

    // C-Mantec
    @(negedge clk); c_run = 1; c0 = cyc; @(negedge clk); c_run = 0;
    while (!c_done) @(negedge clk);
    cm_cycles = cyc - c0;
    agree = 0;
    for (int p = 0; p < NP; p++) begin
      for (int i = 0; i < NI; i++) c_q_psi[i] = xval(p, i);
      @(negedge clk); c_q_start = 1; @(negedge clk); c_q_start = 0;
      while (!c_q_done) @(negedge clk);
      if (c_q_y == rule(p)) agree++;
    end
    $display("C-Mantec: %0d passes, converged %0d, %0d neurons, %0d deleted, %0d of %0d agree, %0d cycles",
             c_passes, c_conv, c_n_act, c_n_del, agree, NP, cm_cycles);
    check(!c_full, "C-Mantec ran out of neurons");
    check(c_n_del > 0, "noise filter deleted nothing");
    check(agree * 10 >= NP * 9, $sformatf("C-Mantec: only %0d of %0d agree with the rule", agree, NP));

    // back-propagation
    @(negedge clk); b_run = 1; c0 = cyc; @(negedge clk); b_run = 0;
    while (!b_done) @(negedge clk);
    bp_cycles = cyc - c0;
    agree = 0;
    for (int p = 0; p < NP; p++) begin
      for (int i = 0; i < NI; i++) b_q_x[i] = xval(p, i);
      @(negedge clk); b_q_start = 1; @(negedge clk); b_q_start = 0;
      while (!b_q_done) @(negedge clk);
      if (b_q_cls[0] == rule(p)) agree++;
    end
    $display("BP: %0d epochs, best epoch %0d, %0d saves, %0d of %0d agree, %0d cycles",
             b_epochs, b_best_epoch, b_n_saves, agree, NP, bp_cycles);
    check(b_epochs == 30, "BP did not run 30 epochs");
    check(b_n_saves > 0, "BP never stored its best weights");
    check(agree * 10 >= NP * 9, $sformatf("BP: only %0d of %0d agree with the rule", agree, NP));
    check(bp_cycles >= 30 * (NTR * 45 + NVA * 25),
          $sformatf("BP run of %0d cycles is shorter than its presentations", bp_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
