// nn_fpga_top_tb: end-to-end test of both learning machines at the default
// sizes (5 inputs, 50 hidden neurons, 1 output, 1024-pattern memories),
// running at the same time.
//   C-Mantec machine: (a) x0 XOR x1 over the 32 5-bit patterns, noise filter
//   off: must converge by growing the network; (b) a linearly separable set
//   (x0): must converge, with learning steps taken by existing neurons
//   (competition won, no growth); (c) x0 plus wrongly labelled copies: the noise
//   filter must delete patterns; (d) a pass limit of 1 on XOR must stop the
//   run unconverged.
//   Back-propagation machine: x0 XOR x1 (x4 = 1.0 as bias input) with a
//   validation set: best weights stored, restored at the end, all patterns
//   classified correctly.
// Every mechanism (growth, learning without growth, deletion, convergence,
// pass limit, best-weight store, restore of earlier best weights) is counted
// and must occur at least once.
module nn_fpga_top_tb;
  import nn_pkg::*;
  localparam int NI = 5, NO = 1, PW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cm_wr_en = 0, cm_wr_t = 0, cm_run = 0, cm_q_start = 0;
  logic [PW-1:0] cm_wr_addr = 0;
  fix_t cm_wr_psi [NI], cm_q_psi [NI];
  logic [PW:0] cm_n_pat = 0;
  fix_t cm_t0 = fix_t'(256);
  tau_t cm_dtau = tau_t'(65536 / 100);
  logic [15:0] cm_gfac = 16'd3277;
  fix_t cm_phi = fix_t'(127 * 256);
  logic [15:0] cm_max_pass = 16'd200;
  logic cm_busy, cm_done, cm_converged, cm_full, cm_q_done, cm_q_y;
  logic [15:0] cm_passes, cm_n_fix;
  logic [5:0] cm_n_act;
  logic [PW:0] cm_n_deleted;

  logic bp_wr_en = 0, bp_run = 0, bp_q_start = 0;
  logic [PW-1:0] bp_wr_addr = 0;
  fix_t bp_wr_x [NI], bp_q_x [NI];
  logic [NO-1:0] bp_wr_z = 0, bp_q_cls;
  logic [PW:0] bp_n_train = 0, bp_n_val = 0;
  logic [15:0] bp_eta = 16'd32768;
  logic [31:0] bp_seed = 32'h0BAD_F00D;
  logic [15:0] bp_max_epochs = 16'd300;
  logic bp_busy, bp_done, bp_q_done;
  logic [15:0] bp_epochs, bp_best_epoch, bp_n_saves;
  logic [31:0] bp_best_err;
  act_t bp_q_y [NO];

  nn_fpga_top dut (.*);

  int checks = 0, failures = 0;
  bit cm_finished = 0, bp_finished = 0;
  int n_grow = 0, n_nogrow = 0, n_delete = 0, n_conv = 0, n_limit = 0, n_save = 0, n_restore = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic bit fxor(input int p); return bit'(p[0] ^ p[1]); endfunction

  task automatic cm_load(input int addr, input int p, input bit t);
    @(negedge clk); cm_wr_en = 1; cm_wr_addr = PW'(addr); cm_wr_t = t;
    for (int i = 0; i < NI; i++) cm_wr_psi[i] = p[i] ? fix_t'(256) : fix_t'(0);
    @(negedge clk); cm_wr_en = 0;
  endtask
  task automatic cm_train();
    @(negedge clk); cm_run = 1; @(negedge clk); cm_run = 0;
    while (!cm_done) @(negedge clk);
  endtask
  task automatic cm_wrong(input int f, output int wrong);
    wrong = 0;
    for (int p = 0; p < 32; p++) begin
      for (int i = 0; i < NI; i++) cm_q_psi[i] = p[i] ? fix_t'(256) : fix_t'(0);
      @(negedge clk); cm_q_start = 1; @(negedge clk); cm_q_start = 0;
      while (!cm_q_done) @(negedge clk);
      if (cm_q_y != ((f == 0) ? bit'(p[0]) : fxor(p))) wrong++;
    end
  endtask

  // ---------------- C-Mantec machine
  initial begin : cm_side
    int wrong;
    for (int i = 0; i < NI; i++) begin cm_wr_psi[i] = '0; cm_q_psi[i] = '0; end
    wait (rst_n);
    // (a) XOR: growth
    for (int p = 0; p < 32; p++) cm_load(p, p, fxor(p));
    cm_n_pat = 32;
    cm_train();
    cm_wrong(1, wrong);
    $display("CM XOR: converged=%0d passes=%0d neurons=%0d", cm_converged, cm_passes, cm_n_act);
    check(cm_converged && wrong == 0, $sformatf("CM XOR: %0d wrong", wrong));
    if (cm_n_act > 1) n_grow++;
    if (cm_converged) n_conv++;
    // (b) x0: no growth
    for (int p = 0; p < 32; p++) cm_load(p, p, bit'(p[0]));
    cm_train();
    cm_wrong(0, wrong);
    $display("CM x0: converged=%0d passes=%0d neurons=%0d learning steps=%0d", cm_converged, cm_passes, cm_n_act, cm_n_fix);
    check(cm_converged && wrong == 0, "CM x0 not learned");
    if (cm_n_fix > 0) n_nogrow++;
    // (c) x0 with noise
    for (int k = 0; k < 4; k++) cm_load(32 + k, 3 + 8 * k, 1'b0);   // x0 = 1, labelled 0
    cm_n_pat = 36; cm_phi = fix_t'(512);
    cm_train();
    cm_wrong(0, wrong);
    $display("CM x0+noise: converged=%0d neurons=%0d deleted=%0d wrong=%0d", cm_converged, cm_n_act, cm_n_deleted, wrong);
    check(cm_n_deleted > 0 && cm_converged && wrong <= 4, "CM noise filter");
    if (cm_n_deleted > 0) n_delete++;
    // (d) pass limit
    for (int p = 0; p < 32; p++) cm_load(p, p, fxor(p));
    cm_n_pat = 32; cm_phi = fix_t'(127 * 256); cm_max_pass = 1;
    cm_train();
    check(!cm_converged && cm_passes == 1, "CM pass limit not honoured");
    if (!cm_converged && cm_passes == 1) n_limit++;
    cm_finished = 1;
  end

  // ---------------- back-propagation machine
  task automatic bp_setx(ref fix_t v [NI], input int p);
    for (int i = 0; i < 4; i++) v[i] = p[i] ? fix_t'(256) : fix_t'(0);
    v[4] = fix_t'(256);
  endtask
  initial begin : bp_side
    int wrong;
    for (int i = 0; i < NI; i++) begin bp_wr_x[i] = '0; bp_q_x[i] = '0; end
    wait (rst_n);
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); bp_wr_en = 1; bp_wr_addr = PW'(a); bp_setx(bp_wr_x, a % 16);
      bp_wr_z = fxor(a % 16);
      @(negedge clk); bp_wr_en = 0;
    end
    bp_n_train = 16; bp_n_val = 16;
    @(negedge clk); bp_run = 1; @(negedge clk); bp_run = 0;
    while (!bp_done) @(negedge clk);
    $display("BP: epochs=%0d best_epoch=%0d best_err=%0d saves=%0d", bp_epochs, bp_best_epoch, bp_best_err, bp_n_saves);
    if (bp_n_saves > 0) n_save++;
    if (bp_best_epoch != 0) n_restore++;
    wrong = 0;
    for (int p = 0; p < 16; p++) begin
      bp_setx(bp_q_x, p);
      @(negedge clk); bp_q_start = 1; @(negedge clk); bp_q_start = 0;
      while (!bp_q_done) @(negedge clk);
      if (bp_q_cls[0] != fxor(p)) wrong++;
    end
    check(bp_epochs == bp_max_epochs && wrong == 0, $sformatf("BP: %0d wrong", wrong));
    bp_finished = 1;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (cm_finished && bp_finished);
    $display("mechanisms: grow=%0d learn-only=%0d delete=%0d converge=%0d pass-limit=%0d save=%0d restore=%0d",
             n_grow, n_nogrow, n_delete, n_conv, n_limit, n_save, n_restore);
    check(n_grow > 0,    "network growth never happened");
    check(n_nogrow > 0,  "learning without growth never happened");
    check(n_delete > 0,  "noise deletion never happened");
    check(n_conv > 0,    "convergence never happened");
    check(n_limit > 0,   "pass limit never happened");
    check(n_save > 0,    "best-weight store never happened");
    check(n_restore > 0, "best-weight restore never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
