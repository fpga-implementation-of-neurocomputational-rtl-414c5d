// bp_trainer_tb: back-propagation training with validation.
// Training set: the 16 patterns (x0..x3 bits, x4 = 1.0 as bias input) of
// x0 XOR x1; validation set: the same 16 patterns stored again. Checks:
//   * the run performs max_epochs epochs;
//   * the best-weights store is written at least once, and the best
//     validation error is lower than that of the start weights;
//   * after the run (best weights restored) every pattern is classified
//     correctly through the query port.
module bp_trainer_tb;
  import nn_pkg::*;
  localparam int NI = 5, NH = 50, NO = 1, NPAT = 64;
  localparam int PW = $clog2(NPAT);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, run = 0, q_start = 0;
  logic [PW-1:0] wr_addr = 0;
  fix_t wr_x [NI], q_x [NI];
  logic [NO-1:0] wr_z = 0, q_cls;
  logic [PW:0] n_train = 16, n_val = 16;
  logic [15:0] eta = 16'd32768;
  logic [31:0] seed = 32'h1234_5678;
  logic [15:0] max_epochs = 16'd250;
  logic busy, done, q_done;
  logic [15:0] epochs, best_epoch, n_saves;
  logic [31:0] best_err;
  act_t q_y [NO];

  bp_trainer #(.NI(NI), .NH(NH), .NO(NO), .NPAT(NPAT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic setx(ref fix_t v [NI], input int p);
    for (int i = 0; i < 4; i++) v[i] = p[i] ? fix_t'(256) : fix_t'(0);
    v[4] = fix_t'(256);
  endtask

  initial begin
    int wrong, e0;
    for (int i = 0; i < NI; i++) begin wr_x[i] = '0; q_x[i] = '0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = PW'(a); setx(wr_x, a % 16); wr_z = 1'((a % 16) & 1 ^ ((a % 16) >> 1) & 1);
      @(negedge clk); wr_en = 0;
    end
    // error of the start weights: one epoch with eta = 0
    eta = 0; max_epochs = 1;
    @(negedge clk); run = 1; @(negedge clk); run = 0;
    while (!done) @(negedge clk);
    e0 = int'(best_err);
    eta = 16'd32768; max_epochs = 16'd250;
    @(negedge clk); run = 1; @(negedge clk); run = 0;
    while (!done) @(negedge clk);
    $display("epochs=%0d best_epoch=%0d best_err=%0d (start %0d) saves=%0d", epochs, best_epoch, best_err, e0, n_saves);
    check(epochs == max_epochs, "wrong number of epochs");
    check(n_saves > 0, "best weights never stored");
    check(best_err < 32'(e0), "validation error did not fall");
    wrong = 0;
    for (int p = 0; p < 16; p++) begin
      setx(q_x, p);
      @(negedge clk); q_start = 1; @(negedge clk); q_start = 0;
      while (!q_done) @(negedge clk);
      if (q_cls[0] != 1'(p & 1 ^ (p >> 1) & 1)) wrong++;
    end
    check(wrong == 0, $sformatf("%0d patterns wrong after training", wrong));
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
