// bp_network2: back-propagation network with two hidden layers,
// NI-NH-NH2-NO, the three-block arrangement of the reference architecture:
// input-hidden neurons (bp_inp_hid), hidden neurons (bp_hid) and output
// neurons (bp_out).
//
// Each neuron owns the weights that leave it: a first-layer neuron holds
// its input weights and its weights to every second-layer neuron, a
// second-layer neuron holds its weights to every output. One sigmoid table
// serves each layer. A pattern (x, z) is presented with start:
//   Output, 13 + NI + NH + NH2 + NO cycles: the first layer
//   multiply-accumulates one input per cycle; its table turns the potentials
//   into activations one neuron per cycle; then, per second-layer neuron k,
//   every first-layer neuron forms v[k]*y, an adder tree sums the products
//   into k's potential and the second-layer table gives its activation (a
//   pipeline, one k per cycle); the outputs are formed the same way from the
//   second layer; finally each output neuron forms error and delta.
//   Learning (learn = 1), 11 + 2*NO + 2*NH2 + NI cycles: the second layer
//   accumulates v*delta and updates its weights per output (two cycles per
//   output) and forms its deltas; the first layer does the same per
//   second-layer neuron, forms its own deltas and updates its input weights,
//   one input per cycle.
// init, save and restore act on all weights as in bp_network. The neuron
// types and their weight ownership follow the reference architecture; the
// reference gives no size or cycle count for a second hidden layer, so the
// default NH2 and the schedule are this design's.
module bp_network2
  import nn_pkg::*;
#(
  parameter int NI  = 5,
  parameter int NH  = 50,
  parameter int NH2 = 10,
  parameter int NO  = 1,
  localparam int XW  = (NI > NH2) ? ((NI > NO) ? NI : NO) : ((NH2 > NO) ? NH2 : NO),
  localparam int IW  = (XW > 1) ? $clog2(XW) : 1,
  localparam int X1W = (NI > NH2) ? NI : NH2,
  localparam int I1W = (X1W > 1) ? $clog2(X1W) : 1,
  localparam int HW  = (NH > 1) ? $clog2(NH) : 1,
  localparam int H2W = (NH2 > 1) ? $clog2(NH2) : 1,
  localparam int OW  = (NO > 1) ? $clog2(NO) : 1
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
  typedef enum logic [4:0] {
    S_IDLE, S_INIT, S_SAVE, S_LOAD,
    S_CLR, S_MAC, S_HL, S_YWR, S_VMUL1, S_PIPE1, S_VMUL2, S_OPIPE, S_OSEQ,
    S_EMAC2, S_VUPD2, S_DR2, S_D1B, S_D2B, S_D3B, S_GAPB,
    S_EMAC1, S_VUPD1, S_DR1, S_D1A, S_D2A, S_D3A, S_GAPA,
    S_WUPD, S_WDRAIN, S_DONE
  } state_t;

  state_t             st;
  bp_op_t             op1, op2;
  logic [IW-1:0]      idx;
  logic [HW-1:0]      hidx;
  logic [7:0]         cnt;
  fix_t               x_r [NI];
  logic [NO-1:0]      z_r;
  logic               learn_r;

  fix_t               h1_v [NH];
  act_t               y1_v [NH];
  logic signed [35:0] prod1_v [NH];
  fix_t               h2_v [NH2];
  act_t               y2_v [NH2];
  logic signed [35:0] prod2_v [NH2];
  logic signed [17:0] d2_v [NH2], ed2_v [NH2];
  logic signed [47:0] hsum1, hsum2;
  act_t               ysig1, ysig2, ysig_o;
  fix_t               oh_v [NO];
  logic signed [17:0] od_v [NO], oed_v [NO];
  logic [16:0]        oe2_v [NO];

  // second-layer pipeline: VMUL1(k) -> hwr(k) -> ywr(k); same for the outputs
  logic               q1_v, q2_v, p1_v, p2_v;
  logic [H2W-1:0]     q1_k, q2_k;
  logic [OW-1:0]      p1_k, p2_k;
  logic               ostart;
  fix_t               xsel;

  assign xsel = (int'(idx) < NI) ? x_r[idx] : '0;

  for (genvar j = 0; j < NH; j++) begin : g_h1
    bp_inp_hid #(.NI(NI), .NO(NH2), .J(j)) u_h (
      .clk(clk), .rst_n(rst_n), .op(op1), .idx(I1W'(idx)), .x(xsel), .seed(seed),
      .ysel(hidx == HW'(j)), .yin(ysig1),
      .dk(d2_v[H2W'(idx)]), .edk(ed2_v[H2W'(idx)]), .eta(eta),
      .h(h1_v[j]), .y(y1_v[j]), .prod(prod1_v[j]));
  end

  for (genvar k = 0; k < NH2; k++) begin : g_h2
    bp_hid #(.NO(NO), .J(k)) u_h (
      .clk(clk), .rst_n(rst_n), .op(op2), .idx(OW'(idx)), .seed(seed),
      .hwr(q1_v && q1_k == H2W'(k)), .hsum(hsum1),
      .ywr(q2_v && q2_k == H2W'(k)), .yin(ysig2),
      .dk(od_v[OW'(idx)]), .edk(oed_v[OW'(idx)]), .eta(eta),
      .h(h2_v[k]), .y(y2_v[k]), .prod(prod2_v[k]), .delta(d2_v[k]), .edelta(ed2_v[k]));
  end

  sigmoid_lut u_sig_1 (.h(h1_v[hidx]), .y(ysig1));
  sigmoid_lut u_sig_2 (.h(h2_v[q2_k]), .y(ysig2));
  sigmoid_lut u_sig_o (.h(oh_v[p2_k]), .y(ysig_o));

  always_comb begin
    hsum1 = '0;
    for (int j = 0; j < NH; j++) hsum1 += 48'(prod1_v[j]);
    hsum2 = '0;
    for (int k = 0; k < NH2; k++) hsum2 += 48'(prod2_v[k]);
  end

  for (genvar k = 0; k < NO; k++) begin : g_out
    bp_out u_o (
      .clk(clk), .rst_n(rst_n),
      .hwr(p1_v && p1_k == OW'(k)), .hsum(hsum2),
      .ywr(p2_v && p2_k == OW'(k)), .yin(ysig_o),
      .ostart(ostart), .z(z_r[k]), .eta(eta),
      .h(oh_v[k]), .y(y[k]), .delta(od_v[k]), .edelta(oed_v[k]), .err2(oe2_v[k]));
    assign cls[k] = y[k][15];
  end

  always_comb begin
    err2 = '0;
    for (int k = 0; k < NO; k++) err2 += 24'(oe2_v[k]);
  end

  // operations of the two hidden layers
  always_comb begin
    op1 = BP_NOP;
    op2 = BP_NOP;
    unique case (st)
      S_INIT:  begin op1 = BP_INIT; op2 = BP_INIT; end
      S_SAVE:  begin op1 = BP_SAVE; op2 = BP_SAVE; end
      S_LOAD:  begin op1 = BP_LOAD; op2 = BP_LOAD; end
      S_CLR:   begin op1 = BP_CLR;  op2 = BP_CLR;  end
      S_MAC:   op1 = BP_MAC;
      S_HL:    op1 = BP_HLATCH;
      S_YWR:   op1 = BP_YWR;
      S_VMUL1: op1 = BP_VMUL;
      S_VMUL2: op2 = BP_VMUL;
      S_EMAC2: op2 = BP_EMAC;
      S_VUPD2: op2 = BP_VUPD;
      S_D1B:   op2 = BP_DMUL1;
      S_D2B:   op2 = BP_DMUL2;
      S_D3B:   op2 = BP_DMUL3;
      S_EMAC1: op1 = BP_EMAC;
      S_VUPD1: op1 = BP_VUPD;
      S_D1A:   op1 = BP_DMUL1;
      S_D2A:   op1 = BP_DMUL2;
      S_D3A:   op1 = BP_DMUL3;
      S_WUPD:  op1 = BP_WUPD;
      default: ;
    endcase
  end

  assign busy   = (st != S_IDLE);
  assign done   = (st == S_DONE);
  assign ostart = (st == S_OSEQ) && (cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; idx <= '0; hidx <= '0; cnt <= '0; learn_r <= 1'b0; z_r <= '0;
      for (int i = 0; i < NI; i++) x_r[i] <= '0;
      q1_v <= 1'b0; q2_v <= 1'b0; q1_k <= '0; q2_k <= '0;
      p1_v <= 1'b0; p2_v <= 1'b0; p1_k <= '0; p2_k <= '0;
    end else begin
      q1_v <= (st == S_VMUL1); q1_k <= H2W'(idx);
      q2_v <= q1_v;            q2_k <= q1_k;
      p1_v <= (st == S_VMUL2); p1_k <= OW'(idx);
      p2_v <= p1_v;            p2_k <= p1_k;
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
        S_YWR:    if (hidx == HW'(NH - 1)) begin hidx <= '0; idx <= '0; st <= S_VMUL1; end
                  else hidx <= hidx + 1'b1;
        S_VMUL1:  if (idx == IW'(NH2 - 1)) begin idx <= '0; cnt <= '0; st <= S_PIPE1; end
                  else idx <= idx + 1'b1;
        S_PIPE1:  if (cnt == 8'd1) begin cnt <= '0; st <= S_VMUL2; end
                  else cnt <= cnt + 1'b1;
        S_VMUL2:  if (idx == IW'(NO - 1)) begin idx <= '0; cnt <= '0; st <= S_OPIPE; end
                  else idx <= idx + 1'b1;
        S_OPIPE:  if (cnt == 8'd1) begin cnt <= '0; st <= S_OSEQ; end
                  else cnt <= cnt + 1'b1;
        S_OSEQ:   if (cnt == 8'd5) begin
                    cnt <= '0; idx <= '0;
                    st <= learn_r ? S_EMAC2 : S_DONE;
                  end else cnt <= cnt + 1'b1;
        // second layer: error from the outputs, output weights, own deltas
        S_EMAC2:  st <= S_VUPD2;
        S_VUPD2:  if (idx == IW'(NO - 1)) begin idx <= '0; st <= S_DR2; end
                  else begin idx <= idx + 1'b1; st <= S_EMAC2; end
        S_DR2:    st <= S_D1B;
        S_D1B:    st <= S_D2B;
        S_D2B:    st <= S_D3B;
        S_D3B:    st <= S_GAPB;
        S_GAPB:   begin idx <= '0; st <= S_EMAC1; end
        // first layer: error from the second layer, its weights, own deltas
        S_EMAC1:  st <= S_VUPD1;
        S_VUPD1:  if (idx == IW'(NH2 - 1)) begin idx <= '0; st <= S_DR1; end
                  else begin idx <= idx + 1'b1; st <= S_EMAC1; end
        S_DR1:    st <= S_D1A;
        S_D1A:    st <= S_D2A;
        S_D2A:    st <= S_D3A;
        S_D3A:    st <= S_GAPA;
        S_GAPA:   begin idx <= '0; st <= S_WUPD; end
        S_WUPD:   if (idx == IW'(NI - 1)) begin idx <= '0; st <= S_WDRAIN; end
                  else idx <= idx + 1'b1;
        S_WDRAIN: st <= S_DONE;
        S_DONE:   st <= S_IDLE;
        default:  st <= S_IDLE;
      endcase
    end
  end

  // both pipelines have drained before back-propagation starts
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st == S_EMAC2) |-> !q1_v && !q2_v && !p1_v && !p2_v);

  logic unused;
  assign unused = ^{y1_v[0], y2_v[0], h1_v[0]};
endmodule
