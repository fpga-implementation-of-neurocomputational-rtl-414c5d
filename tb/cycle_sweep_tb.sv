// cycle_sweep_tb: cost of one pattern against the size of the hidden layer,
// for both learning machines.
//
// One C-Mantec network and one back-propagation network (5 inputs, 1 output)
// are built for each hidden-layer size in SIZES, which spans the range of
// the published timing sweep (1 to 60 neurons). For every size the test
// presents one pattern with and without learning and counts the clock
// cycles from start to done. The counts must be:
//   C-Mantec          output 8 + 2*NI, learning 38 + ceil(NH/16) + 2*NI
//   back-propagation  output 11 + NI + NH + NO, learning 10 + 2*NO + NI
// It also checks the shape of the published comparison: with learning, a
// pattern costs fewer cycles in back-propagation than in C-Mantec up to
// 30 hidden neurons and more from 45 neurons on (the curves cross near 40).
// The C-Mantec pattern is the first one a fresh network sees: its single
// neuron outputs 1, the target is 0, so the learning phase runs.
module cycle_sweep_tb;
  import nn_pkg::*;
  localparam int NI = 5, NO = 1, NP = 6;
  localparam int SIZES [NP] = '{1, 5, 15, 30, 45, 60};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int cm_total [NP], bp_total [NP];
  bit fin [NP];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < NP; g++) begin : g_pt
    localparam int NH = SIZES[g];
    localparam int CM_F = 8 + 2 * NI;
    localparam int CM_L = 38 + (NH + 15) / 16 + 2 * NI;
    localparam int BP_F = 11 + NI + NH + NO;
    localparam int BP_L = 10 + 2 * NO + NI;

    // C-Mantec network
    logic c_clear = 0, c_start = 0, c_learn = 0, c_target = 0;
    fix_t c_psi [NI];
    logic c_busy, c_done, c_y, c_learned, c_grew, c_full;
    logic [$clog2(NH + 1)-1:0] c_n_act;
    cm_network #(.NI(NI), .NH(NH)) u_cm (
      .clk(clk), .rst_n(rst_n), .clear(c_clear), .start(c_start), .learn(c_learn),
      .psi(c_psi), .target(c_target), .t0(fix_t'(256)), .dtau(tau_t'(65536 / 200)),
      .gfac(16'd3277), .busy(c_busy), .done(c_done), .y(c_y), .learned(c_learned),
      .grew(c_grew), .full(c_full), .n_act(c_n_act));

    // back-propagation network
    logic b_init = 0, b_save = 0, b_restore = 0, b_start = 0, b_learn = 0;
    fix_t b_x [NI];
    logic [NO-1:0] b_z = '0;
    logic b_busy, b_done;
    act_t b_y [NO];
    logic [NO-1:0] b_cls;
    logic [23:0] b_err2;
    bp_network #(.NI(NI), .NH(NH), .NO(NO)) u_bp (
      .clk(clk), .rst_n(rst_n), .init(b_init), .seed(32'(g) + 32'd77), .save(b_save),
      .restore(b_restore), .start(b_start), .learn(b_learn), .x(b_x), .z(b_z),
      .eta(16'd16384), .busy(b_busy), .done(b_done), .y(b_y), .cls(b_cls), .err2(b_err2));

    initial begin
      int c0, cf, cl, bf, bl;
      for (int i = 0; i < NI; i++) begin
        c_psi[i] = fix_t'(64 * (i + 1));
        b_x[i]   = fix_t'(64 * (i + 1));
      end
      wait (rst_n);
      // C-Mantec: learning presentation, then output only
      @(negedge clk); c_learn = 1; c_target = 0; c_start = 1;
      @(posedge clk); c0 = cyc; @(negedge clk); c_start = 0;
      while (!c_done) @(negedge clk);
      cl = cyc - c0;
      check(c_learned || c_grew, $sformatf("NH=%0d: C-Mantec did not learn", NH));
      @(negedge clk); c_learn = 0; c_start = 1;
      @(posedge clk); c0 = cyc; @(negedge clk); c_start = 0;
      while (!c_done) @(negedge clk);
      cf = cyc - c0;
      check(cf == CM_F, $sformatf("NH=%0d: C-Mantec output %0d cycles, expected %0d", NH, cf, CM_F));
      check(cl == CM_F + CM_L,
            $sformatf("NH=%0d: C-Mantec learning %0d cycles, expected %0d", NH, cl, CM_F + CM_L));
      // back-propagation: start weights, output only, then with learning
      @(negedge clk); b_init = 1; @(negedge clk); b_init = 0;
      while (b_busy) @(negedge clk);
      @(negedge clk); b_learn = 0; b_start = 1;
      @(posedge clk); c0 = cyc; @(negedge clk); b_start = 0;
      while (!b_done) @(negedge clk);
      bf = cyc - c0;
      @(negedge clk); b_learn = 1; b_start = 1;
      @(posedge clk); c0 = cyc; @(negedge clk); b_start = 0;
      while (!b_done) @(negedge clk);
      bl = cyc - c0;
      check(bf == BP_F, $sformatf("NH=%0d: BP output %0d cycles, expected %0d", NH, bf, BP_F));
      check(bl == BP_F + BP_L,
            $sformatf("NH=%0d: BP learning %0d cycles, expected %0d", NH, bl, BP_F + BP_L));
      $display("NH=%2d  C-Mantec output %0d, with learning %0d | BP output %0d, with learning %0d",
               NH, cf, cl, bf, bl);
      cm_total[g] = cl;
      bp_total[g] = bl;
      fin[g] = 1;
    end
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int g = 0; g < NP; g++) if (!fin[g]) all = 0;
    end while (!all);
    for (int g = 0; g < NP; g++) begin
      if (SIZES[g] <= 30)
        check(bp_total[g] < cm_total[g],
              $sformatf("NH=%0d: BP should be cheaper than C-Mantec", SIZES[g]));
      if (SIZES[g] >= 45)
        check(bp_total[g] > cm_total[g],
              $sformatf("NH=%0d: BP should be dearer than C-Mantec", SIZES[g]));
    end
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
