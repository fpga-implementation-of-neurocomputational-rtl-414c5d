// cm_network: a C-Mantec network that builds its own single hidden layer.
//
// NH thermal-perceptron neurons (cm_neuron) are instantiated; n_act of them
// are in use, starting with one. A majority unit (majority) forms the network
// output. A pattern (psi, t) is presented with start:
//   1. Output, 8 + 2*NI cycles: every neuron computes h and S in parallel,
//      one multiply and one accumulate per input; the majority of the neurons
//      in use gives y.
//   2. Learning, only when learn = 1 and y != t, 38 + ceil(NH/16) + 2*NI
//      cycles: every neuron forms its thermal factor Tfac in parallel; a
//      comparison stage scans the neurons 16 per cycle for the largest Tfac
//      among the neurons in use whose S differs from t. If that Tfac exceeds
//      gfac, that neuron learns the pattern. Otherwise a new neuron is taken
//      into use, all temperatures return to T0 (a new learning cycle) and the
//      new neuron learns the pattern; grew reports this so that a trainer can
//      run its noise filter. With no neuron left, full is raised instead.
// done pulses for one cycle at the end; y, learned, grew and full are valid
// with it and hold until the next start. clear forgets everything and goes
// back to one neuron. The algorithm and both cycle counts are the reference
// design's; the state sequence that realises those counts, the 16-wide
// comparison stage and the interface are this design's.
module cm_network
  import nn_pkg::*;
#(
  parameter int NI = 5,    // inputs
  parameter int NH = 50,   // neurons the hardware holds
  localparam int IW = (NI > 1) ? $clog2(NI) : 1,
  localparam int CW = $clog2(NH + 1),
  localparam int HW = (NH > 1) ? $clog2(NH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,      // forget the network (idle only)
  input  logic          start,      // present a pattern (idle only)
  input  logic          learn,      // learn it if misclassified
  input  fix_t          psi [NI],
  input  logic          target,
  input  fix_t          t0,         // T0, Q8.8
  input  tau_t          dtau,       // 1/Imax, Q1.16
  input  logic [15:0]   gfac,       // growing factor, Q0.16
  output logic          busy,
  output logic          done,
  output logic          y,
  output logic          learned,    // an existing neuron learned the pattern
  output logic          grew,       // a neuron was added
  output logic          full,       // a neuron was needed but none was left
  output logic [CW-1:0] n_act
);
  localparam int NG      = (NH + 15) / 16;  // comparison groups
  localparam int F_PAD   = 4;               // output phase padding
  localparam int L_PAD   = 5;               // learning phase padding
  localparam int DIV_CYC = 24;

  typedef enum logic [4:0] {
    S_IDLE, S_WIPE, S_CLR, S_MUL, S_ACC, S_HL, S_MAJ, S_FPAD,
    S_TMUL, S_TLATCH, S_DIV, S_DWAIT, S_EMUL, S_FLATCH, S_SRCH, S_DEC,
    S_TRESET, S_UMUL, S_UPD, S_BUPD, S_LPAD, S_DONE
  } state_t;

  state_t            st;
  cm_op_t            op;
  logic [IW-1:0]     idx;
  logic [7:0]        cnt;
  fix_t              psi_r [NI];
  logic              t_r, learn_r;
  logic [NH-1:0]     s_v, sel_v, busy_v;
  logic [15:0]       tfac_v [NH];
  fix_t              h_v [NH];
  tau_t              tau_v [NH];
  logic [CW-1:0]     maj_sum;
  logic              maj_y;
  logic [HW-1:0]     sel_idx, best_idx, g_idx;
  logic              sel_ok, best_ok, g_ok;
  logic [15:0]       best_v, g_v;
  logic [$clog2(NG+1)-1:0] grp;

  for (genvar j = 0; j < NH; j++) begin : g_neu
    cm_neuron #(.NI(NI)) u_n (
      .clk(clk), .rst_n(rst_n), .op(op), .idx(idx), .psi(psi_r[idx]),
      .t(t_r), .sel(sel_v[j]), .t0(t0), .dtau(dtau),
      .s(s_v[j]), .h(h_v[j]), .tfac(tfac_v[j]), .tau(tau_v[j]),
      .div_busy(busy_v[j]));
    assign sel_v[j] = sel_ok && (sel_idx == HW'(j));
  end

  majority #(.NH(NH)) u_maj (.s(s_v), .n_h(n_act), .sum(maj_sum), .y(maj_y));

  // one comparison group: best candidate among neurons 16*grp .. 16*grp+15
  always_comb begin
    g_ok = best_ok; g_v = best_v; g_idx = best_idx;
    for (int k = 0; k < 16; k++) begin
      int j;
      j = int'(grp) * 16 + k;
      if (j < NH && CW'(j) < n_act && s_v[j] != t_r)
        if (!g_ok || tfac_v[j] > g_v) begin
          g_ok = 1'b1; g_v = tfac_v[j]; g_idx = HW'(j);
        end
    end
  end

  // broadcast operation
  always_comb begin
    unique case (st)
      S_WIPE:   op = CM_WIPE;
      S_CLR:    op = CM_CLR;
      S_MUL:    op = CM_MUL;
      S_ACC:    op = CM_ACC;
      S_HL:     op = CM_HLATCH;
      S_TMUL:   op = CM_TMUL;
      S_TLATCH: op = CM_TLATCH;
      S_DIV:    op = CM_DIV;
      S_EMUL:   op = CM_EMUL;
      S_FLATCH: op = CM_FLATCH;
      S_TRESET: op = grew ? CM_TRESET : CM_NOP;
      S_UMUL:   op = CM_UMUL;
      S_UPD:    op = CM_UPD;
      S_BUPD:   op = CM_BUPD;
      default:  op = CM_NOP;
    endcase
  end

  assign busy = (st != S_IDLE);
  assign done = (st == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; cnt <= '0; t_r <= 1'b0; learn_r <= 1'b0;
      for (int i = 0; i < NI; i++) psi_r[i] <= '0;
      y <= 1'b0; learned <= 1'b0; grew <= 1'b0; full <= 1'b0;
      n_act <= CW'(1); sel_idx <= '0; sel_ok <= 1'b0;
      best_ok <= 1'b0; best_v <= '0; best_idx <= '0; grp <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (clear) begin
            st <= S_WIPE;
          end else if (start) begin
            psi_r <= psi; t_r <= target; learn_r <= learn;
            learned <= 1'b0; grew <= 1'b0; full <= 1'b0; sel_ok <= 1'b0;
            idx <= '0; st <= S_CLR;
          end
        end
        S_WIPE: begin n_act <= CW'(1); y <= 1'b0; st <= S_IDLE; end
        S_CLR:  st <= S_MUL;
        S_MUL:  st <= S_ACC;
        S_ACC:  if (idx == IW'(NI - 1)) begin idx <= '0; st <= S_HL; end
                else begin idx <= idx + 1'b1; st <= S_MUL; end
        S_HL:   st <= S_MAJ;
        S_MAJ:  begin y <= maj_y; cnt <= '0; st <= S_FPAD; end
        S_FPAD: if (cnt == 8'(F_PAD - 1)) begin
                  cnt <= '0;
                  st <= (learn_r && (y != t_r)) ? S_TMUL : S_DONE;
                end else cnt <= cnt + 1'b1;
        S_TMUL:   st <= S_TLATCH;
        S_TLATCH: st <= S_DIV;
        S_DIV:    begin cnt <= '0; st <= S_DWAIT; end
        S_DWAIT:  if (cnt >= 8'(DIV_CYC - 1) && !busy_v[0]) begin
                    cnt <= '0; st <= S_EMUL;
                  end else cnt <= cnt + 1'b1;
        S_EMUL:   st <= S_FLATCH;
        S_FLATCH: begin best_ok <= 1'b0; best_v <= '0; best_idx <= '0; grp <= '0; st <= S_SRCH; end
        S_SRCH: begin
          best_ok <= g_ok; best_v <= g_v; best_idx <= g_idx;
          if (int'(grp) == NG - 1) st <= S_DEC;
          else grp <= grp + 1'b1;
        end
        S_DEC: begin
          if (best_ok && best_v > gfac) begin
            sel_idx <= best_idx; sel_ok <= 1'b1; learned <= 1'b1;
          end else if (n_act < CW'(NH)) begin
            sel_idx <= HW'(n_act); sel_ok <= 1'b1; grew <= 1'b1;
            n_act <= n_act + 1'b1;
          end else begin
            full <= 1'b1;
          end
          st <= S_TRESET;
        end
        S_TRESET: begin idx <= '0; st <= S_UMUL; end
        S_UMUL:   st <= S_UPD;
        S_UPD:    if (idx == IW'(NI - 1)) begin idx <= '0; st <= S_BUPD; end
                  else begin idx <= idx + 1'b1; st <= S_UMUL; end
        S_BUPD:   begin cnt <= '0; st <= S_LPAD; end
        S_LPAD:   if (cnt == 8'(L_PAD - 1)) begin cnt <= '0; st <= S_DONE; end
                  else cnt <= cnt + 1'b1;
        S_DONE:   begin sel_ok <= 1'b0; st <= S_IDLE; end
        default:  st <= S_IDLE;
      endcase
    end
  end

  // at most one neuron learns a pattern
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel_v));

  logic unused;
  assign unused = ^{maj_sum, busy_v[NH-1:1]};
endmodule
