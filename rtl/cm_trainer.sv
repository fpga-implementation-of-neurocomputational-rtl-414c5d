// cm_trainer: runs the C-Mantec learning procedure on a stored training set.
//
// Patterns (NI inputs and a target bit each) are written into the pattern
// memory through the load port. run then:
//   1. clears the network to one neuron and forgets earlier deletions;
//   2. makes passes over the training set, each in a fresh pseudo-random
//      order (Fisher-Yates shuffle driven by an LFSR), presenting every
//      pattern not deleted to cm_network with learning on; a pattern that
//      is misclassified adds one to its count N_LT;
//   3. whenever the network adds a neuron (the end of a learning cycle),
//      runs the noise filter: with mu and sigma the mean and standard
//      deviation of N_LT over the patterns still in use, a pattern is
//      deleted when N_LT >= mu + phi*sigma; all N_LT then return to 0;
//   4. stops when a whole pass makes no error (converged) or after
//      max_pass passes.
// The filter is evaluated without a square root: with n patterns,
// S1 = sum N_LT and S2 = sum N_LT^2, a pattern goes when
// d = n*N_LT - S1 > 0 and d^2 >= phi^2 * (n*S2 - S1^2). While idle, q_start
// classifies q_psi with the trained network (q_done, q_y).
// The procedure (presentation until every pattern is learned, growth, the
// deletion rule) is the reference algorithm; passes in shuffled order, the
// strict d > 0 (so that a set of equal counts deletes nothing), counts
// saturating at 255 and the interface are this design's.
module cm_trainer
  import nn_pkg::*;
#(
  parameter int NI   = 5,
  parameter int NH   = 50,
  parameter int NPAT = 1024,
  localparam int PW  = $clog2(NPAT),
  localparam int CW  = $clog2(NH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // pattern memory load port
  input  logic          wr_en,
  input  logic [PW-1:0] wr_addr,
  input  fix_t          wr_psi [NI],
  input  logic          wr_t,
  // configuration
  input  logic [PW:0]   n_pat,      // patterns in use, 1..NPAT
  input  fix_t          t0,         // T0, Q8.8
  input  tau_t          dtau,       // 1/Imax, Q1.16
  input  logic [15:0]   gfac,       // growing factor, Q0.16
  input  fix_t          phi,        // noise threshold phi, Q8.8 (>= 0)
  input  logic [15:0]   max_pass,
  // control and status
  input  logic          run,
  output logic          busy,
  output logic          done,       // pulse at the end of a run
  output logic          converged,
  output logic [15:0]   passes,
  output logic [CW-1:0] n_act,
  output logic [PW:0]   n_deleted,
  output logic          full,       // growth was refused for lack of neurons
  output logic [15:0]   n_fix,      // learning steps taken by existing neurons
  // query port
  input  logic          q_start,
  input  fix_t          q_psi [NI],
  output logic          q_done,
  output logic          q_y
);
  typedef enum logic [3:0] {
    T_IDLE, T_CLEAR, T_INIT, T_SHUF, T_PICK, T_WAIT, T_F1, T_FV, T_F2,
    T_ENDPASS, T_FIN, T_QWAIT
  } tstate_t;

  fix_t              pat [NPAT][NI];
  logic              tgt [NPAT];
  logic              del [NPAT];
  logic [7:0]        nlt [NPAT];
  logic [PW-1:0]     ord [NPAT];

  tstate_t           st;
  logic [15:0]       rnd;
  logic [PW:0]       i;
  logic [PW-1:0]     p, rj;
  logic [PW:0]       errs;
  logic [PW:0]       nf;          // patterns in use during the filter
  logic [31:0]       s1;
  logic [47:0]       s2;
  logic signed [63:0] thr;        // phi^2 * (n*S2 - S1^2)

  // network
  logic              n_start, n_learn, n_busy, n_done, n_y, n_learned, n_grew, n_full, n_clear;
  fix_t              n_psi [NI];
  logic              n_t;

  cm_network #(.NI(NI), .NH(NH)) u_net (
    .clk(clk), .rst_n(rst_n), .clear(n_clear), .start(n_start), .learn(n_learn),
    .psi(n_psi), .target(n_t), .t0(t0), .dtau(dtau), .gfac(gfac),
    .busy(n_busy), .done(n_done), .y(n_y), .learned(n_learned), .grew(n_grew),
    .full(n_full), .n_act(n_act));

  assign p       = ord[i[PW-1:0]];
  assign n_clear = (st == T_CLEAR);
  assign n_start = (st == T_PICK && !del[p]) || (st == T_IDLE && q_start && !run);
  assign n_learn = (st == T_PICK);
  assign n_psi   = (st == T_IDLE) ? q_psi : pat[p];
  assign n_t     = (st == T_IDLE) ? 1'b0 : tgt[p];
  assign busy    = (st != T_IDLE) && (st != T_QWAIT);
  assign rj      = PW'(scale16(rnd, 16'(i) + 16'd1));

  // filter arithmetic for pattern p
  logic signed [63:0] dpat, dsq;
  assign dpat = $signed(64'(nf) * 64'(nlt[p])) - $signed(64'(s1));
  assign dsq  = dpat * dpat;

  always_ff @(posedge clk) begin
    if (wr_en && st == T_IDLE) begin
      pat[wr_addr] <= wr_psi;
      tgt[wr_addr] <= wr_t;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; rnd <= 16'hACE1; i <= '0; errs <= '0; nf <= '0;
      s1 <= '0; s2 <= '0; thr <= '0; done <= 1'b0; converged <= 1'b0;
      passes <= '0; n_deleted <= '0; full <= 1'b0; q_done <= 1'b0; q_y <= 1'b0;
      n_fix <= '0;
    end else begin
      done   <= 1'b0;
      q_done <= 1'b0;
      rnd    <= lfsr16(rnd);
      unique case (st)
        T_IDLE: begin
          if (run) begin
            st <= T_CLEAR; converged <= 1'b0; passes <= '0; n_deleted <= '0; full <= 1'b0;
            n_fix <= '0;
          end else if (q_start) st <= T_QWAIT;
        end
        T_QWAIT: if (n_done) begin q_y <= n_y; q_done <= 1'b1; st <= T_IDLE; end
        T_CLEAR: begin i <= '0; st <= T_INIT; end
        // forget deletions and counts, identity order
        T_INIT: begin
          del[i[PW-1:0]] <= 1'b0; nlt[i[PW-1:0]] <= '0; ord[i[PW-1:0]] <= i[PW-1:0];
          if (i == n_pat - 1'b1) begin i <= n_pat - 1'b1; st <= T_SHUF; end
          else i <= i + 1'b1;
        end
        // Fisher-Yates: swap ord[i] with ord[rj], rj uniform in 0..i
        T_SHUF: begin
          if (i == 0) begin errs <= '0; st <= T_PICK; end
          else begin
            ord[i[PW-1:0]] <= ord[rj];
            ord[rj]        <= ord[i[PW-1:0]];
            i <= i - 1'b1;
          end
        end
        T_PICK: begin
          if (del[p]) begin
            if (i == n_pat - 1'b1) st <= T_ENDPASS; else i <= i + 1'b1;
          end else st <= T_WAIT;
        end
        T_WAIT: if (n_done) begin
          if (n_full) full <= 1'b1;
          if (n_learned && n_fix != 16'hFFFF) n_fix <= n_fix + 1'b1;
          if (n_y != tgt[p]) begin
            errs <= errs + 1'b1;
            if (nlt[p] != 8'hFF) nlt[p] <= nlt[p] + 1'b1;
          end
          if (n_grew) begin
            // end of a learning cycle: noise filter, then carry on
            s1 <= '0; s2 <= '0; nf <= '0; st <= T_F1;
          end else if (i == n_pat - 1'b1) st <= T_ENDPASS;
          else begin i <= i + 1'b1; st <= T_PICK; end
        end
        // filter pass 1: statistics; ord is a permutation, so walking
        // ord[0..n-1] visits every pattern once.
        T_F1: begin
          if (!del[p]) begin
            s1 <= s1 + 32'(nlt[p]);
            s2 <= s2 + 48'(nlt[p]) * 48'(nlt[p]);
            nf <= nf + 1'b1;
          end
          if (i == n_pat - 1'b1) begin i <= '0; st <= T_FV; end
          else i <= i + 1'b1;
        end
        T_FV: begin
          thr <= $signed(64'(phi) * 64'(phi)) *
                 ($signed(64'(nf) * 64'(s2)) - $signed(64'(s1) * 64'(s1)));
          st <= T_F2;
        end
        // filter pass 2: delete, clear the counts
        T_F2: begin
          if (!del[p] && dpat > 0 && (dsq <<< 16) >= thr) begin
            del[p] <= 1'b1;
            n_deleted <= n_deleted + 1'b1;
          end
          nlt[p] <= '0;
          if (i == n_pat - 1'b1) begin
            // restart the pass after a growth
            i <= n_pat - 1'b1; st <= T_SHUF;
          end else i <= i + 1'b1;
        end
        T_ENDPASS: begin
          passes <= passes + 1'b1;
          if (errs == 0) begin converged <= 1'b1; st <= T_FIN; end
          else if (passes + 1'b1 >= max_pass) st <= T_FIN;
          else begin i <= n_pat - 1'b1; st <= T_SHUF; end
        end
        T_FIN: begin done <= 1'b1; st <= T_IDLE; end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
