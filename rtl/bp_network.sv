// bp_network: a fully connected NI-NH-NO perceptron with sigmoid units that
// learns on line by back-propagation.
//
// NH bp_inp_hid neurons (input layer folded into the hidden layer, each owning
// its input and output weights) and NO bp_out neurons. One sigmoid table
// serves the hidden layer, one the output layer. A pattern (x, z) is
// presented with start:
//   Output, 11 + NI + NH + NO cycles: the hidden neurons multiply-accumulate
//   one input per cycle in parallel; the shared table turns their potentials
//   into activations one neuron per cycle; then, per output k, every hidden
//   neuron forms v[k][j]*y_j, an adder tree sums them into output k's
//   potential and the output table gives y_k; finally each output neuron
//   forms its error, squared error and delta.
//   Learning (learn = 1), 10 + 2*NO + NI cycles: for every output k the hidden
//   neurons accumulate v[k][j]*delta_k and update v[k][j] (two cycles per
//   output), then form their own delta = y(1-y)*err and update their input
//   weights one input per cycle.
// Weights change after every pattern (on-line learning). init loads
// pseudo-random start weights (seeded), save copies all weights to a shadow
// store and restore copies them back; a trainer uses these to keep the
// weights of the lowest validation error. The network topology, the on-line
// rule and both cycle counts are the reference design's; the schedule that
// realises the counts and the interface are this design's. The reference
// figure also shows further hidden layers; this network has one.
module bp_network
  import nn_pkg::*;
#(
  parameter int NI = 5,
  parameter int NH = 50,
  parameter int NO = 1,
  localparam int XW = (NI > NO) ? NI : NO,
  localparam int IW = (XW > 1) ? $clog2(XW) : 1,
  localparam int HW = (NH > 1) ? $clog2(NH) : 1,
  localparam int OW = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,       // load start weights (idle only)
  input  logic [31:0]   seed,
  input  logic          save,       // weights -> best-weights store (idle only)
  input  logic          restore,    // best-weights store -> weights (idle only)
  input  logic          start,      // present a pattern (idle only)
  input  logic          learn,      // and learn it
  input  fix_t          x [NI],
  input  logic [NO-1:0] z,          // targets
  input  logic [15:0]   eta,        // learning rate, Q0.16
  output logic          busy,
  output logic          done,
  output act_t          y [NO],     // outputs, Q0.16
  output logic [NO-1:0] cls,        // outputs thresholded at 0.5
  output logic [23:0]   err2        // sum over outputs of (z - y)^2, Q0.16
);
  localparam int L_PAD = 4;   // idle cycles that bring learning to 10 + 2*NO + NI

  typedef enum logic [4:0] {
    S_IDLE, S_INIT, S_SAVE, S_LOAD,
    S_CLR, S_MAC, S_HL, S_YWR, S_VMUL, S_OPIPE, S_OSEQ,
    S_EMAC, S_VUPD, S_LDRAIN, S_D1, S_D2, S_D3, S_GAP, S_WUPD, S_WDRAIN,
    S_LPAD, S_DONE
  } state_t;

  state_t            st;
  bp_op_t            op;
  logic [IW-1:0]     idx;
  logic [HW-1:0]     hidx;
  logic [7:0]        cnt;
  fix_t              x_r [NI];
  logic [NO-1:0]     z_r;
  logic              learn_r;

  fix_t              h_v [NH];
  act_t              y_v [NH];
  logic signed [35:0] prod_v [NH];
  logic signed [47:0] hsum;
  act_t              ysig_h, ysig_o;
  fix_t              oh_v [NO];
  logic signed [17:0] od_v [NO], oed_v [NO];
  logic [16:0]       oe2_v [NO];

  // output pipeline: VMUL(k) -> hwr(k) -> ywr(k)
  logic              p1_v, p2_v;
  logic [OW-1:0]     p1_k, p2_k;
  logic              ostart;

  for (genvar j = 0; j < NH; j++) begin : g_hid
    bp_inp_hid #(.NI(NI), .NO(NO), .J(j)) u_h (
      .clk(clk), .rst_n(rst_n), .op(op), .idx(idx), .x(x_r[idx]), .seed(seed),
      .ysel(hidx == HW'(j)), .yin(ysig_h),
      .dk(od_v[OW'(idx)]), .edk(oed_v[OW'(idx)]), .eta(eta),
      .h(h_v[j]), .y(y_v[j]), .prod(prod_v[j]));
  end

  sigmoid_lut u_sig_h (.h(h_v[hidx]), .y(ysig_h));
  sigmoid_lut u_sig_o (.h(oh_v[p2_k]), .y(ysig_o));

  always_comb begin
    hsum = '0;
    for (int j = 0; j < NH; j++) hsum += 48'(prod_v[j]);
  end

  for (genvar k = 0; k < NO; k++) begin : g_out
    bp_out u_o (
      .clk(clk), .rst_n(rst_n),
      .hwr(p1_v && p1_k == OW'(k)), .hsum(hsum),
      .ywr(p2_v && p2_k == OW'(k)), .yin(ysig_o),
      .ostart(ostart), .z(z_r[k]), .eta(eta),
      .h(oh_v[k]), .y(y[k]), .delta(od_v[k]), .edelta(oed_v[k]), .err2(oe2_v[k]));
    assign cls[k] = y[k][15];
  end

  always_comb begin
    err2 = '0;
    for (int k = 0; k < NO; k++) err2 += 24'(oe2_v[k]);
  end

  always_comb begin
    unique case (st)
      S_INIT:  op = BP_INIT;
      S_SAVE:  op = BP_SAVE;
      S_LOAD:  op = BP_LOAD;
      S_CLR:   op = BP_CLR;
      S_MAC:   op = BP_MAC;
      S_HL:    op = BP_HLATCH;
      S_YWR:   op = BP_YWR;
      S_VMUL:  op = BP_VMUL;
      S_EMAC:  op = BP_EMAC;
      S_VUPD:  op = BP_VUPD;
      S_D1:    op = BP_DMUL1;
      S_D2:    op = BP_DMUL2;
      S_D3:    op = BP_DMUL3;
      S_WUPD:  op = BP_WUPD;
      default: op = BP_NOP;
    endcase
  end

  assign busy   = (st != S_IDLE);
  assign done   = (st == S_DONE);
  assign ostart = (st == S_OSEQ) && (cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; hidx <= '0; cnt <= '0; learn_r <= 1'b0; z_r <= '0;
      for (int i = 0; i < NI; i++) x_r[i] <= '0;
      p1_v <= 1'b0; p2_v <= 1'b0; p1_k <= '0; p2_k <= '0;
    end else begin
      p1_v <= (st == S_VMUL); p1_k <= OW'(idx);
      p2_v <= p1_v;           p2_k <= p1_k;
      unique case (st)
        S_IDLE: begin
          idx <= '0; hidx <= '0; cnt <= '0;
          if (init)         st <= S_INIT;
          else if (save)    st <= S_SAVE;
          else if (restore) st <= S_LOAD;
          else if (start) begin
            x_r <= x; z_r <= z; learn_r <= learn; st <= S_CLR;
          end
        end
        S_INIT, S_SAVE, S_LOAD: st <= S_IDLE;
        S_CLR:    st <= S_MAC;
        S_MAC:    if (idx == IW'(NI - 1)) begin idx <= '0; st <= S_HL; end
                  else idx <= idx + 1'b1;
        S_HL:     begin hidx <= '0; st <= S_YWR; end
        S_YWR:    if (hidx == HW'(NH - 1)) begin hidx <= '0; idx <= '0; st <= S_VMUL; end
                  else hidx <= hidx + 1'b1;
        S_VMUL:   if (idx == IW'(NO - 1)) begin idx <= '0; cnt <= '0; st <= S_OPIPE; end
                  else idx <= idx + 1'b1;
        S_OPIPE:  if (cnt == 8'd1) begin cnt <= '0; st <= S_OSEQ; end
                  else cnt <= cnt + 1'b1;
        S_OSEQ:   if (cnt == 8'd5) begin
                    cnt <= '0; idx <= '0;
                    st <= learn_r ? S_EMAC : S_DONE;
                  end else cnt <= cnt + 1'b1;
        S_EMAC:   st <= S_VUPD;
        S_VUPD:   if (idx == IW'(NO - 1)) begin idx <= '0; st <= S_LDRAIN; end
                  else begin idx <= idx + 1'b1; st <= S_EMAC; end
        S_LDRAIN: st <= S_D1;
        S_D1:     st <= S_D2;
        S_D2:     st <= S_D3;
        S_D3:     st <= S_GAP;
        S_GAP:    begin idx <= '0; st <= S_WUPD; end
        S_WUPD:   if (idx == IW'(NI - 1)) begin idx <= '0; st <= S_WDRAIN; end
                  else idx <= idx + 1'b1;
        S_WDRAIN: begin cnt <= '0; st <= S_LPAD; end
        S_LPAD:   if (cnt == 8'(L_PAD - 1)) begin cnt <= '0; st <= S_DONE; end
                  else cnt <= cnt + 1'b1;
        S_DONE:   st <= S_IDLE;
        default:  st <= S_IDLE;
      endcase
    end
  end

  // the output pipeline has drained before back-propagation starts
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st == S_EMAC) |-> !p1_v && !p2_v);

  logic unused;
  assign unused = ^{y_v[0], h_v[0]};
endmodule
