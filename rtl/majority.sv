// majority: output neuron of a C-Mantec network. It counts the active hidden
// neurons and compares the count with half the number of neurons in use.
//
// An adder tree sums the activations s[j] of the neurons that are in use
// (j < n_h); a comparator raises y when sum >= n_h/2. n_h/2 is formed with a
// right shift as in the reference scheme, but of n_h+1, so that the test is
// the exact "half or more" (2*sum >= n_h) for odd n_h as well; a plain
// floor(n_h/2) would, for instance, turn a one-neuron network's output
// permanently on. Combinational; the count is also brought out.
module majority #(
  parameter int NH = 50,                  // neurons the hardware holds
  localparam int CW = $clog2(NH + 1)
) (
  input  logic [NH-1:0] s,      // hidden neuron activations
  input  logic [CW-1:0] n_h,    // neurons in use (active ones are 0..n_h-1)
  output logic [CW-1:0] sum,    // number of active, ON neurons
  output logic          y       // network output
);
  logic [CW-1:0] half;
  always_comb begin
    sum = '0;
    for (int j = 0; j < NH; j++)
      if (CW'(j) < n_h) sum += CW'(s[j]);
    half = CW'(({1'b0, n_h} + 1'b1) >> 1);
    y    = (sum >= half);
  end
endmodule
