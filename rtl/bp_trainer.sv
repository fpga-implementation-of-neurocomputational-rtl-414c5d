// bp_trainer: runs on-line back-propagation training with validation on a
// stored data set.
//
// Patterns (NI inputs, NO target bits) are written through the load port;
// entries 0..n_train-1 form the training set and the next n_val entries the
// validation set. run then loads pseudo-random start weights and performs
// max_epochs epochs. In each epoch the training patterns are presented once,
// in a fresh pseudo-random order (Fisher-Yates shuffle driven by an LFSR),
// each followed by a weight update; then the validation set is presented
// without learning and its summed squared error is formed. Whenever that
// error is the lowest so far, the network's weights are copied to its
// best-weights store. At the end the stored weights are put back, so the
// network holds the weights of the lowest validation error (best_err,
// best_epoch). With n_val = 0 the last weights are kept. While idle,
// q_start classifies q_x with the network (q_done, q_y, q_cls).
// With NH2 > 0 the network has a second hidden layer of NH2 neurons
// (bp_network2); the default 0 gives the single hidden layer of the
// evaluated configuration. The epoch structure, random order, on-line updates and best-weight keeping
// are the reference procedure; the fixed epoch count as stop rule and the
// interface are this design's.
module bp_trainer
  import nn_pkg::*;
#(
  parameter int NI   = 5,
  parameter int NH   = 50,
  parameter int NO   = 1,
  parameter int NPAT = 1024,
  parameter int NH2  = 0,      // second hidden layer; 0 = none
  localparam int PW  = $clog2(NPAT)
) (
  input  logic          clk,
  input  logic          rst_n,
  // pattern memory load port
  input  logic          wr_en,
  input  logic [PW-1:0] wr_addr,
  input  fix_t          wr_x [NI],
  input  logic [NO-1:0] wr_z,
  // configuration
  input  logic [PW:0]   n_train,    // >= 1
  input  logic [PW:0]   n_val,      // n_train + n_val <= NPAT
  input  logic [15:0]   eta,        // learning rate, Q0.16
  input  logic [31:0]   seed,
  input  logic [15:0]   max_epochs, // >= 1
  // control and status
  input  logic          run,
  output logic          busy,
  output logic          done,
  output logic [15:0]   epochs,
  output logic [15:0]   best_epoch,
  output logic [31:0]   best_err,   // validation squared error, Q.16
  output logic [15:0]   n_saves,    // times the best weights were stored
  // query port
  input  logic          q_start,
  input  fix_t          q_x [NI],
  output logic          q_done,
  output act_t          q_y [NO],
  output logic [NO-1:0] q_cls
);
  typedef enum logic [3:0] {
    B_IDLE, B_INIT, B_ORD, B_SHUF, B_TRAIN, B_TWAIT, B_VAL, B_VWAIT, B_EPEND,
    B_SAVE, B_LOAD, B_FIN, B_QWAIT
  } bstate_t;

  fix_t              pat [NPAT][NI];
  logic [NO-1:0]     tgt [NPAT];
  logic [PW-1:0]     ord [NPAT];

  bstate_t           st;
  logic [15:0]       rnd;
  logic [PW:0]       i;
  logic [PW-1:0]     p, rj;
  logic [31:0]       verr;

  logic              n_init, n_save, n_restore, n_start, n_learn, n_busy, n_done;
  fix_t              n_x [NI];
  logic [NO-1:0]     n_z, n_cls;
  act_t              n_y [NO];
  logic [23:0]       n_err2;

  if (NH2 == 0) begin : g_one
    bp_network #(.NI(NI), .NH(NH), .NO(NO)) u_net (
      .clk(clk), .rst_n(rst_n), .init(n_init), .seed(seed), .save(n_save),
      .restore(n_restore), .start(n_start), .learn(n_learn), .x(n_x), .z(n_z),
      .eta(eta), .busy(n_busy), .done(n_done), .y(n_y), .cls(n_cls), .err2(n_err2));
  end else begin : g_two
    bp_network2 #(.NI(NI), .NH(NH), .NH2(NH2), .NO(NO)) u_net (
      .clk(clk), .rst_n(rst_n), .init(n_init), .seed(seed), .save(n_save),
      .restore(n_restore), .start(n_start), .learn(n_learn), .x(n_x), .z(n_z),
      .eta(eta), .busy(n_busy), .done(n_done), .y(n_y), .cls(n_cls), .err2(n_err2));
  end

  assign p         = (st == B_VAL || st == B_VWAIT) ? PW'(i) : ord[i[PW-1:0]];
  assign n_init    = (st == B_INIT);
  assign n_save    = (st == B_SAVE);
  assign n_restore = (st == B_LOAD);
  assign n_start   = (st == B_TRAIN) || (st == B_VAL) || (st == B_IDLE && q_start && !run);
  assign n_learn   = (st == B_TRAIN);
  assign n_x       = (st == B_IDLE) ? q_x : pat[p];
  assign n_z       = tgt[p];
  assign busy      = (st != B_IDLE) && (st != B_QWAIT);
  assign rj        = PW'(scale16(rnd, 16'(i) + 16'd1));

  always_ff @(posedge clk) begin
    if (wr_en && st == B_IDLE) begin
      pat[wr_addr] <= wr_x;
      tgt[wr_addr] <= wr_z;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; rnd <= 16'hBEEF; i <= '0; verr <= '0; done <= 1'b0;
      epochs <= '0; best_epoch <= '0; best_err <= '1; n_saves <= '0;
      q_done <= 1'b0; q_cls <= '0;
      for (int k = 0; k < NO; k++) q_y[k] <= '0;
    end else begin
      done   <= 1'b0;
      q_done <= 1'b0;
      rnd    <= lfsr16(rnd);
      unique case (st)
        B_IDLE: begin
          if (run) begin
            epochs <= '0; best_epoch <= '0; best_err <= '1; n_saves <= '0;
            st <= B_INIT;
          end else if (q_start) st <= B_QWAIT;
        end
        B_QWAIT: if (n_done) begin q_y <= n_y; q_cls <= n_cls; q_done <= 1'b1; st <= B_IDLE; end
        B_INIT: begin i <= '0; st <= B_ORD; end
        // identity order over the training set
        B_ORD: begin
          ord[i[PW-1:0]] <= i[PW-1:0];
          if (i == n_train - 1'b1) st <= B_SHUF; else i <= i + 1'b1;
        end
        B_SHUF: begin
          if (i == 0) st <= B_TRAIN;
          else begin
            ord[i[PW-1:0]] <= ord[rj];
            ord[rj]        <= ord[i[PW-1:0]];
            i <= i - 1'b1;
          end
        end
        B_TRAIN: st <= B_TWAIT;
        B_TWAIT: if (n_done) begin
          if (i == n_train - 1'b1) begin
            i <= n_train; verr <= '0;
            st <= (n_val == 0) ? B_EPEND : B_VAL;
          end else begin i <= i + 1'b1; st <= B_TRAIN; end
        end
        B_VAL: st <= B_VWAIT;
        B_VWAIT: if (n_done) begin
          verr <= verr + 32'(n_err2);
          if (i == n_train + n_val - 1'b1) st <= B_EPEND;
          else begin i <= i + 1'b1; st <= B_VAL; end
        end
        B_EPEND: begin
          epochs <= epochs + 1'b1;
          if (n_val != 0 && verr < best_err) begin
            best_err <= verr; best_epoch <= epochs + 1'b1; n_saves <= n_saves + 1'b1;
            st <= B_SAVE;
          end else if (epochs + 1'b1 >= max_epochs) st <= (n_val != 0) ? B_LOAD : B_FIN;
          else begin i <= n_train - 1'b1; st <= B_SHUF; end
        end
        B_SAVE: if (!n_busy) begin
          if (epochs >= max_epochs) st <= B_LOAD;
          else begin i <= n_train - 1'b1; st <= B_SHUF; end
        end
        B_LOAD: if (!n_busy) st <= B_FIN;
        B_FIN:  begin done <= 1'b1; st <= B_IDLE; end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
