// nn_pkg: fixed-point formats and small helpers shared by the back-propagation
// and C-Mantec learning machines.
//
// Weights, inputs and synaptic potentials are signed fixed-point words with
// N1 integer bits (sign included) and N2 fractional bits. The default 8.8
// split is the first row of the resource table of the reference design
// (8 integer and 8 fractional bits). The other rows it lists (8.12, 8.16,
// 12.12, 12.16, 16.16) need more than a new N1/N2: the 18-bit multipliers,
// the table input formats (FB) and the update shifts are sized for 8.8,
// which is the only format tested. Activations produced by
// the sigmoid and exp(-x) tables are unsigned Q0.16 fractions (65535 ~ 1.0),
// matching the 16-bit table word length. Saturation on narrowing is this
// design's choice.
package nn_pkg;

  localparam int N1 = 8;           // integer bits of a weight (incl. sign)
  localparam int N2 = 8;           // fractional bits of a weight
  localparam int WW = N1 + N2;     // weight word width
  localparam int AW = 16;          // activation / table word width (Q0.16)

  typedef logic signed [WW-1:0] fix_t;   // Q(N1).(N2)
  typedef logic        [AW-1:0] act_t;   // unsigned Q0.16

  // Saturate a wide signed value to WW bits.
  function automatic fix_t sat_fix(input logic signed [63:0] v);
    if (v > 64'sd0 + ((64'sd1 <<< (WW-1)) - 1)) return fix_t'((64'sd1 <<< (WW-1)) - 1);
    if (v < -(64'sd1 <<< (WW-1)))               return fix_t'(-(64'sd1 <<< (WW-1)));
    return fix_t'(v);
  endfunction

  // 16-bit maximal-length Galois LFSR (x^16 + x^14 + x^13 + x^11 + 1), used
  // by the trainers for random presentation orders.
  function automatic logic [15:0] lfsr16(input logic [15:0] r);
    return r[0] ? ((r >> 1) ^ 16'hB400) : (r >> 1);
  endfunction

  // Random index in 0..n-1 from a 16-bit random word: (r * n) >> 16.
  function automatic logic [15:0] scale16(input logic [15:0] r, input logic [15:0] n);
    return 16'((32'(r) * 32'(n)) >> 16);
  endfunction

  // Thermal-perceptron temperature ratio T/T0 as unsigned Q1.16
  // (65536 = 1.0, so the reset value T = T0 is exact).
  localparam int TW = 17;
  typedef logic [TW-1:0] tau_t;
  localparam tau_t TAU_ONE = tau_t'(1 << 16);

  // Per-cycle operations the C-Mantec controller broadcasts to its neurons.
  typedef enum logic [3:0] {
    CM_NOP,     // hold
    CM_WIPE,    // forget: weights and bias 0, T = T0
    CM_CLR,     // accumulator = -bias
    CM_MUL,     // multiplier <= w[idx] * psi
    CM_ACC,     // accumulator += product
    CM_HLATCH,  // h = accumulator, S = (h >= 0)
    CM_TMUL,    // multiplier <= T0 * (T/T0)
    CM_TLATCH,  // T = product
    CM_DIV,     // start |h| / T
    CM_EMUL,    // multiplier <= (T/T0) * exp(-|h|/T)
    CM_FLATCH,  // Tfac = product
    CM_TRESET,  // T = T0 (new learning cycle); the selected neuron gets Tfac = 1
    CM_UMUL,    // multiplier <= psi * Tfac
    CM_UPD,     // selected neuron: w[idx] += (t - S) * product
    CM_BUPD     // selected neuron: bias -= (t - S) * Tfac, T -= T0/Imax
  } cm_op_t;

  // Per-cycle operations the back-propagation controller broadcasts.
  typedef enum logic [3:0] {
    BP_NOP,
    BP_INIT,    // load pseudo-random initial weights
    BP_SAVE,    // copy weights to the best-weights store
    BP_LOAD,    // copy the best-weights store back to the weights
    BP_CLR,     // clear the accumulator
    BP_MAC,     // accumulator += w[idx] * x   (pipelined, product lands next cycle)
    BP_HLATCH,  // h = accumulator
    BP_YWR,     // y = sigmoid(h) (hidden neuron selected by idx)
    BP_VMUL,    // multiplier <= v[idx] * y      (forward, output idx)
    BP_EMAC,    // err += v[idx] * delta_out; multiplier busy
    BP_VUPD,    // v[idx] += eta*delta_out * y
    BP_DMUL1,   // g' = y * (1 - y)
    BP_DMUL2,   // delta = g' * err
    BP_DMUL3,   // eta_delta = eta * delta
    BP_WUPD     // w[idx] += eta_delta * x (pipelined)
  } bp_op_t;

endpackage
