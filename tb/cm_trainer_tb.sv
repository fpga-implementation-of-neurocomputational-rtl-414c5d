// cm_trainer_tb: loads training sets into the C-Mantec trainer, runs it and
// classifies every pattern afterwards through the query port.
//   1. x0 XOR x1 over all 32 5-bit patterns: must converge, with more than
//      one neuron, and classify all 32 patterns correctly.
//   2. the function x0 with NOISY extra copies of patterns carrying the wrong
//      label: the noise filter must delete patterns, the run must converge,
//      and at most NOISY clean patterns (the twins of the noisy ones) may
//      end up misclassified.
module cm_trainer_tb;
  import nn_pkg::*;
  localparam int NI = 5, NH = 50, NPAT = 64;
  localparam int PW = $clog2(NPAT);
  localparam int NOISY = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_t = 0, run = 0, q_start = 0;
  logic [PW-1:0] wr_addr = 0;
  fix_t wr_psi [NI], q_psi [NI];
  logic [PW:0] n_pat = 0;
  fix_t t0 = fix_t'(256);
  tau_t dtau = tau_t'(65536 / 100);
  logic [15:0] gfac = 16'd3277;
  fix_t phi = fix_t'(127 * 256);       // filter off for the clean set
  logic [15:0] max_pass = 16'd200;
  logic busy, done, converged, full, q_done, q_y;
  logic [15:0] passes, n_fix;
  logic [5:0] n_act;
  logic [PW:0] n_deleted;

  cm_trainer #(.NI(NI), .NH(NH), .NPAT(NPAT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic bit fn(input int f, input int p);
    return (f == 0) ? bit'(p[0]) : bit'(p[0] ^ p[1]);
  endfunction
  task automatic load(input int addr, input int p, input bit t);
    @(negedge clk); wr_en = 1; wr_addr = PW'(addr); wr_t = t;
    for (int i = 0; i < NI; i++) wr_psi[i] = p[i] ? fix_t'(256) : fix_t'(0);
    @(negedge clk); wr_en = 0;
  endtask
  task automatic query(input int p, output bit yq);
    for (int i = 0; i < NI; i++) q_psi[i] = p[i] ? fix_t'(256) : fix_t'(0);
    @(negedge clk); q_start = 1; @(negedge clk); q_start = 0;
    while (!q_done) @(negedge clk);
    yq = q_y;
  endtask
  task automatic train();
    @(negedge clk); run = 1; @(negedge clk); run = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int wrong; bit yq;
    for (int i = 0; i < NI; i++) begin wr_psi[i] = '0; q_psi[i] = '0; end
    repeat (3) @(negedge clk); rst_n = 1;
    // 1. XOR
    for (int p = 0; p < 32; p++) load(p, p, fn(1, p));
    n_pat = 32;
    train();
    $display("XOR: converged=%0d passes=%0d neurons=%0d deleted=%0d", converged, passes, n_act, n_deleted);
    check(converged, "XOR did not converge");
    check(n_act > 1, "XOR needs more than one neuron");
    wrong = 0;
    for (int p = 0; p < 32; p++) begin query(p, yq); if (yq != fn(1, p)) wrong++; end
    check(wrong == 0, $sformatf("XOR: %0d patterns wrong", wrong));
    // 2. x0 with wrongly labelled copies
    for (int p = 0; p < 32; p++) load(p, p, fn(0, p));
    for (int k = 0; k < NOISY; k++) load(32 + k, 3 + 8 * k, ~fn(0, 3 + 8 * k));
    n_pat = (PW + 1)'(32 + NOISY);
    phi = fix_t'(512);                 // phi = 2
    train();
    $display("x0+noise: converged=%0d passes=%0d neurons=%0d deleted=%0d", converged, passes, n_act, n_deleted);
    check(n_deleted > 0, "noise filter deleted nothing");
    check(converged, "x0 with noise did not converge");
    wrong = 0;
    for (int p = 0; p < 32; p++) begin query(p, yq); if (yq != fn(0, p)) wrong++; end
    $display("x0+noise: %0d of 32 clean patterns wrong", wrong);
    check(wrong <= NOISY, $sformatf("x0+noise: %0d clean patterns wrong", wrong));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
