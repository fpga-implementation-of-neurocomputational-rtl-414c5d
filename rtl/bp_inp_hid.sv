// bp_inp_hid: input + hidden neuron of the back-propagation network.
//
// The input layer does no processing, so it is folded into the hidden
// neurons: neuron j holds the weights w[i] from every input i to itself and
// also the weights v[k] from itself to every output neuron k, and therefore
// updates both sets when the network learns. All multiplications of the
// neuron go through one tdm_mult, one per cycle. The controller broadcasts
// one bp_op_t per cycle (nn_pkg) with an index; a product issued in cycle n is
// consumed in cycle n+1 according to the operation that issued it:
//   BP_MAC   acc += w[i]*x_i                  (forward, one input per cycle)
//   BP_YWR   y = sigmoid(h), value from the shared table (ysel marks j)
//   BP_VMUL  prod = v[k]*y                    (summed over j for output k)
//   BP_EMAC  err += v[k]*delta_k             (back-propagated error)
//   BP_VUPD  v[k] += eta*delta_k*y
//   BP_DMUL1..3  g' = y(1-y), delta = g'*err, eta*delta
//   BP_WUPD  w[i] += eta*delta*x_i
//   BP_INIT / BP_SAVE / BP_LOAD  pseudo-random start weights, copy to and
//   from the best-weights store kept for validation.
// Formats: w, v, x, h Q8.8; y, g' Q0.16; delta and eta*delta signed Q1.16;
// eta Q0.16. The weight ownership follows the reference design; the
// operation set, formats, rounding and start-weight generator are this
// design's.
module bp_inp_hid
  import nn_pkg::*;
#(
  parameter int NI = 5,
  parameter int NO = 1,
  parameter int J  = 0,     // neuron number, decorrelates start weights
  localparam int XW = (NI > NO) ? NI : NO,
  localparam int IW = (XW > 1) ? $clog2(XW) : 1,
  localparam int OW = (NO > 1) ? $clog2(NO) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bp_op_t             op,
  input  logic [IW-1:0]      idx,
  input  fix_t               x,        // x[idx]
  input  logic [31:0]        seed,     // for BP_INIT
  input  logic               ysel,     // BP_YWR targets this neuron
  input  act_t               yin,      // sigmoid value for BP_YWR
  input  logic signed [17:0] dk,       // delta of output idx
  input  logic signed [17:0] edk,      // eta * delta of output idx
  input  logic [15:0]        eta,
  output fix_t               h,
  output act_t               y,
  output logic signed [35:0] prod      // v[k]*y after BP_VMUL (Q8.24)
);
  fix_t                 w [NI], wb [NI];
  fix_t                 v [NO], vb [NO];
  logic signed [39:0]   acc, err;
  logic signed [17:0]   edelta;
  logic signed [17:0]   ma, mb;
  logic signed [35:0]   mc;
  bp_op_t               op_d;
  logic [IW-1:0]        idx_d;
  logic [OW-1:0]        kx, kx_d;     // idx as an output number

  assign kx   = OW'(idx);
  assign kx_d = OW'(idx_d);

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
    r = sd ^ (32'(J) * 32'h9E3779B9) ^ (32'(slot) * 32'h85EBCA6B);
    r = r ^ (r >> 16); r = r * 32'h7FEB352D;
    r = r ^ (r >> 15); r = r * 32'h846CA68B;
    r = r ^ (r >> 16);
    return fix_t'($signed(r[7:0]));
  endfunction

  // operand selection for the shared multiplier
  always_comb begin
    ma = '0; mb = '0;
    unique case (op)
      BP_MAC:   begin ma = 18'(w[idx]);  mb = 18'(x); end
      BP_VMUL:  begin ma = 18'(v[kx]);  mb = 18'({2'b00, y}); end
      BP_EMAC:  begin ma = 18'(v[kx]);  mb = dk; end
      BP_VUPD:  begin ma = edk;          mb = 18'({2'b00, y}); end
      BP_DMUL1: begin ma = 18'({2'b00, y}); mb = 18'(18'sd65536 - 18'({2'b00, y})); end
      BP_DMUL2: begin ma = 18'(mc >>> 16); mb = sat18(64'(err >>> 8)); end
      BP_DMUL3: begin ma = 18'({2'b00, eta}); mb = sat18(64'(mc >>> 16)); end
      BP_WUPD:  begin ma = edelta;       mb = 18'(x); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) begin w[i] <= '0; wb[i] <= '0; end
      for (int k = 0; k < NO; k++) begin v[k] <= '0; vb[k] <= '0; end
      acc <= '0; err <= '0; h <= '0; y <= '0; edelta <= '0;
      op_d <= BP_NOP; idx_d <= '0;
    end else begin
      op_d  <= op;
      idx_d <= idx;
      // results of the product issued last cycle
      unique case (op_d)
        BP_MAC:   acc <= acc + 40'(mc);
        BP_EMAC:  err <= err + 40'(mc);
        BP_VUPD:  v[kx_d] <= sat_fix(64'(v[kx_d]) + ((64'(mc) + 64'sd8388608) >>> 24));
        BP_DMUL3: edelta <= sat18(64'(mc >>> 16));
        BP_WUPD:  w[idx_d] <= sat_fix(64'(w[idx_d]) + ((64'(mc) + 64'sd32768) >>> 16));
        default: ;
      endcase
      // this cycle's operation
      unique case (op)
        BP_INIT: begin
          for (int i = 0; i < NI; i++) w[i] <= rnd(seed, i);
          for (int k = 0; k < NO; k++) v[k] <= rnd(seed, NI + k);
        end
        BP_SAVE: begin wb <= w; vb <= v; end
        BP_LOAD: begin w <= wb; v <= vb; end
        BP_CLR:    begin acc <= '0; err <= '0; end
        // the last input's product is still in flight: add it here
        BP_HLATCH: h <= sat_fix(64'(acc + ((op_d == BP_MAC) ? 40'(mc) : 40'sd0)) >>> N2);
        BP_YWR:    if (ysel) y <= yin;
        default: ;
      endcase
    end
  end
endmodule
