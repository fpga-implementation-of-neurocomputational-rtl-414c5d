// nn_fpga_top: the two on-chip learning machines side by side.
//
// The C-Mantec machine (cm_trainer: a constructive network of thermal
// perceptrons with a majority output, its pattern memory and training loop)
// and the back-propagation machine (bp_trainer: an NI-NH-NO sigmoid network,
// its pattern memory and an epoch loop with validation) are independent;
// each has its own pattern load port, configuration, run/done handshake and
// query port, brought out with a cm_ or bp_ prefix. They share only the clock
// and the active-low asynchronous reset. Default sizes: 5 inputs, 50 hidden
// neurons (the held maximum for C-Mantec, the fixed layer for
// back-propagation), 1 output, 1024 stored patterns, weights in 8.8 fixed
// point. NH2 > 0 adds a second hidden layer of that size to the
// back-propagation network; the default 0 is the single hidden layer of the
// evaluated configuration. A host (not part of this design) writes the
// patterns and reads the results.
module nn_fpga_top
  import nn_pkg::*;
#(
  parameter int NI   = 5,
  parameter int NH   = 50,
  parameter int NO   = 1,
  parameter int NPAT = 1024,
  parameter int NH2  = 0,      // back-propagation second hidden layer, 0 = none
  localparam int PW  = $clog2(NPAT),
  localparam int CW  = $clog2(NH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // ---- C-Mantec machine
  input  logic          cm_wr_en,
  input  logic [PW-1:0] cm_wr_addr,
  input  fix_t          cm_wr_psi [NI],
  input  logic          cm_wr_t,
  input  logic [PW:0]   cm_n_pat,
  input  fix_t          cm_t0,
  input  tau_t          cm_dtau,
  input  logic [15:0]   cm_gfac,
  input  fix_t          cm_phi,
  input  logic [15:0]   cm_max_pass,
  input  logic          cm_run,
  output logic          cm_busy,
  output logic          cm_done,
  output logic          cm_converged,
  output logic [15:0]   cm_passes,
  output logic [CW-1:0] cm_n_act,
  output logic [PW:0]   cm_n_deleted,
  output logic          cm_full,
  output logic [15:0]   cm_n_fix,
  input  logic          cm_q_start,
  input  fix_t          cm_q_psi [NI],
  output logic          cm_q_done,
  output logic          cm_q_y,
  // ---- back-propagation machine
  input  logic          bp_wr_en,
  input  logic [PW-1:0] bp_wr_addr,
  input  fix_t          bp_wr_x [NI],
  input  logic [NO-1:0] bp_wr_z,
  input  logic [PW:0]   bp_n_train,
  input  logic [PW:0]   bp_n_val,
  input  logic [15:0]   bp_eta,
  input  logic [31:0]   bp_seed,
  input  logic [15:0]   bp_max_epochs,
  input  logic          bp_run,
  output logic          bp_busy,
  output logic          bp_done,
  output logic [15:0]   bp_epochs,
  output logic [15:0]   bp_best_epoch,
  output logic [31:0]   bp_best_err,
  output logic [15:0]   bp_n_saves,
  input  logic          bp_q_start,
  input  fix_t          bp_q_x [NI],
  output logic          bp_q_done,
  output act_t          bp_q_y [NO],
  output logic [NO-1:0] bp_q_cls
);
  cm_trainer #(.NI(NI), .NH(NH), .NPAT(NPAT)) u_cm (
    .clk(clk), .rst_n(rst_n),
    .wr_en(cm_wr_en), .wr_addr(cm_wr_addr), .wr_psi(cm_wr_psi), .wr_t(cm_wr_t),
    .n_pat(cm_n_pat), .t0(cm_t0), .dtau(cm_dtau), .gfac(cm_gfac), .phi(cm_phi),
    .max_pass(cm_max_pass), .run(cm_run), .busy(cm_busy), .done(cm_done),
    .converged(cm_converged), .passes(cm_passes), .n_act(cm_n_act),
    .n_deleted(cm_n_deleted), .full(cm_full), .n_fix(cm_n_fix),
    .q_start(cm_q_start), .q_psi(cm_q_psi), .q_done(cm_q_done), .q_y(cm_q_y));

  bp_trainer #(.NI(NI), .NH(NH), .NO(NO), .NPAT(NPAT), .NH2(NH2)) u_bp (
    .clk(clk), .rst_n(rst_n),
    .wr_en(bp_wr_en), .wr_addr(bp_wr_addr), .wr_x(bp_wr_x), .wr_z(bp_wr_z),
    .n_train(bp_n_train), .n_val(bp_n_val), .eta(bp_eta), .seed(bp_seed),
    .max_epochs(bp_max_epochs), .run(bp_run), .busy(bp_busy), .done(bp_done),
    .epochs(bp_epochs), .best_epoch(bp_best_epoch), .best_err(bp_best_err),
    .n_saves(bp_n_saves),
    .q_start(bp_q_start), .q_x(bp_q_x), .q_done(bp_q_done), .q_y(bp_q_y), .q_cls(bp_q_cls));
endmodule
