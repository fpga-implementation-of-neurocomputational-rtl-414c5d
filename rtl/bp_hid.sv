// bp_hid: neuron of a second hidden layer of the back-propagation network.
//
// Like bp_inp_hid it owns the weights that leave it, v[k] towards every
// neuron k of the next layer, but it does not see the network inputs: its
// synaptic potential arrives as the sum, over the previous layer, of the
// products that those neurons form with their own outgoing weights (hwr,
// hsum, the same adder-tree path that feeds an output neuron), and its
// activation comes from a sigmoid table shared by the layer (ywr, yin).
// All multiplications go through one tdm_mult, one per cycle; a product
// issued in cycle n is consumed in cycle n+1 by the operation that issued it:
//   BP_VMUL  prod = v[k]*y                    (summed over this layer for k)
//   BP_EMAC  err += v[k]*delta_k             (error from the next layer)
//   BP_VUPD  v[k] += eta*delta_k*y
//   BP_DMUL1..3  g' = y(1-y), delta = g'*err, eta*delta
//   BP_CLR   err = 0
//   BP_INIT / BP_SAVE / BP_LOAD  start weights, best-weights store.
// delta and eta*delta are outputs: the previous layer uses them exactly as
// a single-hidden-layer network uses the output deltas. Formats as in
// bp_inp_hid: v, h Q8.8; y Q0.16; deltas signed Q1.16; hsum Q8.24.
// The neuron type and its place between the input-hidden neurons and the
// output neurons follow the reference architecture; the operation set,
// formats and start weights are this design's.
module bp_hid
  import nn_pkg::*;
#(
  parameter int NO = 1,     // neurons of the next layer
  parameter int J  = 0,     // neuron number, decorrelates start weights
  localparam int OW = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bp_op_t             op,
  input  logic [OW-1:0]      idx,      // next-layer neuron k
  input  logic [31:0]        seed,     // for BP_INIT
  input  logic               hwr,      // latch h from hsum
  input  logic signed [47:0] hsum,     // sum over the previous layer, Q8.24
  input  logic               ywr,      // latch y from yin
  input  act_t               yin,
  input  logic signed [17:0] dk,       // delta of next-layer neuron idx
  input  logic signed [17:0] edk,      // eta * delta of next-layer neuron idx
  input  logic [15:0]        eta,
  output fix_t               h,
  output act_t               y,
  output logic signed [35:0] prod,     // v[k]*y after BP_VMUL (Q8.24)
  output logic signed [17:0] delta,    // own delta, Q1.16
  output logic signed [17:0] edelta    // eta * own delta, Q1.16
);
  fix_t                 v [NO], vb [NO];
  logic signed [39:0]   err;
  logic signed [17:0]   ma, mb;
  logic signed [35:0]   mc;
  bp_op_t               op_d;
  logic [OW-1:0]        idx_d;

  tdm_mult #(.NX(18), .NY(18)) u_mul (.clk(clk), .a(ma), .b(mb), .c(mc));
  assign prod = mc;

  function automatic logic signed [17:0] sat18(input logic signed [63:0] a);
    if (a > 64'sd131071)  return 18'sd131071;
    if (a < -64'sd131072) return -18'sd131072;
    return 18'(a);
  endfunction

  // start weight in [-0.5, 0.5): an integer hash of seed, neuron and slot
  function automatic fix_t rnd(input logic [31:0] sd, input int slot);
    logic [31:0] r;
    r = sd ^ (32'(J + 4096) * 32'h9E3779B9) ^ (32'(slot) * 32'h85EBCA6B);
    r = r ^ (r >> 16); r = r * 32'h7FEB352D;
    r = r ^ (r >> 15); r = r * 32'h846CA68B;
    r = r ^ (r >> 16);
    return fix_t'($signed(r[7:0]));
  endfunction

  always_comb begin
    ma = '0; mb = '0;
    unique case (op)
      BP_VMUL:  begin ma = 18'(v[idx]); mb = 18'({2'b00, y}); end
      BP_EMAC:  begin ma = 18'(v[idx]); mb = dk; end
      BP_VUPD:  begin ma = edk;          mb = 18'({2'b00, y}); end
      BP_DMUL1: begin ma = 18'({2'b00, y}); mb = 18'(18'sd65536 - 18'({2'b00, y})); end
      BP_DMUL2: begin ma = 18'(mc >>> 16); mb = sat18(64'(err >>> 8)); end
      BP_DMUL3: begin ma = 18'({2'b00, eta}); mb = sat18(64'(mc >>> 16)); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NO; k++) begin v[k] <= '0; vb[k] <= '0; end
      err <= '0; h <= '0; y <= '0; delta <= '0; edelta <= '0;
      op_d <= BP_NOP; idx_d <= '0;
    end else begin
      op_d  <= op;
      idx_d <= idx;
      if (hwr) h <= sat_fix(64'(hsum >>> 16));
      if (ywr) y <= yin;
      unique case (op_d)
        BP_EMAC:  err <= err + 40'(mc);
        BP_VUPD:  v[idx_d] <= sat_fix(64'(v[idx_d]) + ((64'(mc) + 64'sd8388608) >>> 24));
        BP_DMUL2: delta <= sat18(64'(mc >>> 16));
        BP_DMUL3: edelta <= sat18(64'(mc >>> 16));
        default: ;
      endcase
      unique case (op)
        BP_INIT: for (int k = 0; k < NO; k++) v[k] <= rnd(seed, k);
        BP_SAVE: vb <= v;
        BP_LOAD: v <= vb;
        BP_CLR:  err <= '0;
        default: ;
      endcase
    end
  end
endmodule
