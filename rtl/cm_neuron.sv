// cm_neuron: one hidden neuron of a C-Mantec network, a thermal perceptron
// with its own time-shared multiplier.
//
// It holds NI weights w[i], a bias b and its temperature as the ratio T/T0.
// The controller drives it with one cm_op_t per cycle (nn_pkg) and broadcasts
// the current input psi, its index idx and the target t to all neurons:
//   output:   h = sum_i w[i]*psi_i - b, S = (h >= 0)           (2 cycles/input)
//   Tfac:     T = T0*(T/T0); x = |h|/T (24-cycle divider);
//             Tfac = (T/T0) * exp(-x)   (exp by exp_lut)
//   learning: if sel, w[i] += (t - S)*psi_i*Tfac  (2 cycles/input),
//             b -= (t - S)*Tfac, and T/T0 drops by dtau = 1/Imax,
//             so T = T0*(1 - I/Imax) after I learning steps.
//   CM_TRESET puts T back to T0; a selected neuron then also takes Tfac = 1
//   (a freshly added neuron learns its pattern at full temperature).
// The equations are the thermal perceptron rule; the operation sequence, the
// use of |h| in the exponent, the bias update, the formats (weights Q8.8,
// T/T0 and Tfac Q0.16) and the reset values (weights 0, T = T0) are this
// design's choices. The multiplier result is read one cycle after issue.
module cm_neuron
  import nn_pkg::*;
#(
  parameter int NI = 5,
  localparam int IW = (NI > 1) ? $clog2(NI) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cm_op_t         op,
  input  logic [IW-1:0]  idx,     // input index for CM_MUL / CM_UMUL / CM_UPD
  input  fix_t           psi,     // input value psi[idx]
  input  logic           t,       // target
  input  logic           sel,     // this neuron learns
  input  fix_t           t0,      // initial temperature T0 (Q8.8, > 0)
  input  tau_t           dtau,    // 1/Imax as Q1.16
  output logic           s,       // activation S
  output fix_t           h,       // synaptic potential
  output logic [15:0]    tfac,    // thermal factor, Q0.16
  output tau_t           tau,     // T/T0
  output logic           div_busy
);
  fix_t                 w [NI];
  fix_t                 b;
  logic signed [39:0]   acc;
  fix_t                 tabs;     // temperature T, Q8.8
  logic signed [17:0]   ma, mb;
  logic signed [35:0]   mc;
  logic [23:0]          q;
  logic                 div_start, div_done;
  logic [15:0]          hmag, xarg, e;
  logic signed [35:0]   dw;
  logic [16:0]          bstep;

  tdm_mult #(.NX(18), .NY(18)) u_mul (.clk(clk), .a(ma), .b(mb), .c(mc));

  assign hmag = h[WW-1] ? 16'(-h) : 16'(h);
  assign div_start = (op == CM_DIV);
  seq_div #(.NW(24), .DW(16)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .num({hmag, 8'h00}),
    .den(16'(tabs)), .q(q), .busy(div_busy), .done(div_done));

  // x = |h|/T with 8 fractional bits, saturated
  assign xarg = (q[23:16] != 0) ? 16'hFFFF : q[15:0];
  exp_lut #(.XW(16), .FB(8)) u_exp (.x(xarg), .y(e));

  // operand selection for the shared multiplier
  always_comb begin
    ma = '0; mb = '0;
    unique case (op)
      CM_MUL:  begin ma = 18'(w[idx]);  mb = 18'(psi); end
      CM_TMUL: begin ma = 18'(t0);      mb = 18'(tau); end
      CM_EMUL: begin ma = 18'(tau);     mb = 18'({2'b00, e}); end
      CM_UMUL: begin ma = 18'(psi);     mb = 18'({2'b00, tfac}); end
      default: ;
    endcase
  end

  // weight change (t - S) * psi * Tfac, rounded to Q8.8
  assign dw = (mc + 36'sd32768) >>> 16;
  // bias change Tfac in Q8.8, rounded
  assign bstep = ({1'b0, tfac} + 17'd128) >> 8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) w[i] <= '0;
      b <= '0; acc <= '0; h <= '0; s <= 1'b1; tabs <= '0;
      tfac <= '0; tau <= TAU_ONE;
    end else begin
      unique case (op)
        CM_WIPE: begin
          for (int i = 0; i < NI; i++) w[i] <= '0;
          b <= '0; tau <= TAU_ONE; tfac <= '0;
        end
        CM_CLR:    acc <= -(40'(b) <<< N2);
        CM_ACC:    acc <= acc + 40'(mc);
        CM_HLATCH: begin
          h <= sat_fix(64'(acc >>> N2));
          s <= (acc >= 0);
        end
        CM_TLATCH: tabs <= sat_fix(64'(mc >>> 16));
        CM_FLATCH: tfac <= 16'(mc >>> 16);
        CM_TRESET: begin
          tau <= TAU_ONE;
          if (sel) tfac <= 16'hFFFF;
        end
        CM_UPD: if (sel && (t != s)) begin
          if (t) w[idx] <= sat_fix(64'(w[idx]) + 64'(dw));
          else   w[idx] <= sat_fix(64'(w[idx]) - 64'(dw));
        end
        CM_BUPD: if (sel) begin
          if (t != s) begin
            if (t) b <= sat_fix(64'(b) - 64'(bstep));
            else   b <= sat_fix(64'(b) + 64'(bstep));
          end
          tau <= (tau > dtau) ? tau - dtau : '0;
        end
        default: ;
      endcase
    end
  end

  logic unused;
  assign unused = ^{div_done, q[23:16]};
endmodule
