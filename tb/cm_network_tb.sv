// cm_network_tb: trains a C-Mantec network on 5-input Boolean functions and
// checks it.
//   * the output phase takes 8 + 2*NI cycles and a learning step
//     38 + ceil(NH/16) + 2*NI cycles (checked on every presentation);
//   * a linearly separable function (x0 AND x1) is learned with one neuron;
//   * x0 XOR x1, which one threshold neuron cannot represent, makes the
//     network grow and is then learned exactly;
//   * clear brings the network back to one neuron.
// Patterns are presented in a pseudo-random order until one full pass
// produces no error.
module cm_network_tb;
  import nn_pkg::*;
  localparam int NI = 5;
  localparam int NH = 50;
  localparam int FWD = 8 + 2 * NI;
  localparam int LRN = 38 + (NH + 15) / 16 + 2 * NI;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, start = 0, learn = 0, target = 0;
  fix_t psi [NI];
  fix_t t0 = fix_t'(256);              // T0 = 1.0
  tau_t dtau = tau_t'(65536 / 200);    // Imax = 200
  logic [15:0] gfac = 16'd3277;        // 0.05
  logic busy, done, y, learned, grew, full;
  logic [$clog2(NH+1)-1:0] n_act;

  cm_network #(.NI(NI), .NH(NH)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit fn(input int f, input int p);
    return (f == 0) ? bit'(p[0] & p[1]) : bit'(p[0] ^ p[1]);
  endfunction

  // present pattern p of function f; returns the network output before learning
  task automatic present(input int f, input int p, input bit lrn, output bit out);
    int c0;
    for (int i = 0; i < NI; i++) psi[i] = p[i] ? fix_t'(256) : fix_t'(0);
    target = fn(f, p); learn = lrn;
    @(negedge clk); start = 1;
    @(posedge clk); c0 = cyc; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    out = y;
    if (lrn && (y != target))
      check(cyc - c0 == FWD + LRN, $sformatf("learning latency %0d, expected %0d", cyc - c0, FWD + LRN));
    else
      check(cyc - c0 == FWD, $sformatf("output latency %0d, expected %0d", cyc - c0, FWD));
    @(negedge clk);
  endtask

  task automatic train(input int f, output int passes);
    bit out; int errs; int order [32]; int r, tmp;
    passes = 0;
    do begin
      for (int i = 0; i < 32; i++) order[i] = i;
      for (int i = 31; i > 0; i--) begin r = $urandom_range(i); tmp = order[i]; order[i] = order[r]; order[r] = tmp; end
      errs = 0;
      for (int i = 0; i < 32; i++) begin
        present(f, order[i], 1, out);
        if (out != fn(f, order[i])) errs++;
      end
      passes++;
    end while (errs != 0 && passes < 200);
  endtask

  int passes, grow_cnt, learn_cnt;
  always @(posedge clk) if (done) begin
    if (grew) grow_cnt++;
    if (learned) learn_cnt++;
  end

  initial begin
    bit out; int wrong;
    grow_cnt = 0; learn_cnt = 0;
    for (int i = 0; i < NI; i++) psi[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; repeat (2) @(negedge clk);

    // AND: linearly separable
    train(0, passes);
    wrong = 0;
    for (int p = 0; p < 32; p++) begin present(0, p, 0, out); if (out != fn(0, p)) wrong++; end
    check(wrong == 0, $sformatf("AND: %0d patterns wrong after %0d passes", wrong, passes));
    check(n_act == 1, $sformatf("AND needed %0d neurons", n_act));
    check(learn_cnt > 0, "no existing neuron ever learned");
    $display("AND learned in %0d passes with %0d neuron(s)", passes, n_act);

    // clear, then XOR: needs growth
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; repeat (2) @(negedge clk);
    check(n_act == 1, "clear did not return to one neuron");
    train(1, passes);
    wrong = 0;
    for (int p = 0; p < 32; p++) begin present(1, p, 0, out); if (out != fn(1, p)) wrong++; end
    check(wrong == 0, $sformatf("XOR: %0d patterns wrong after %0d passes", wrong, passes));
    check(n_act > 1, "XOR was learned without adding a neuron");
    check(grow_cnt == int'(n_act) - 1, "grew pulses disagree with the neuron count");
    $display("XOR learned in %0d passes with %0d neurons", passes, n_act);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
