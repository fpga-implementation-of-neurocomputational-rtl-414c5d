// tdm_mult: the single multiplier that each neuron owns and shares in time
// among all of its multiplications (weight x input, temperature products,
// weight updates, derivative products).
//
// One signed NX x NY product per cycle, registered: operands presented in
// cycle n give c = a*b in cycle n+1 (one cycle latency, one issue per cycle).
// The neuron's sequencer time-multiplexes the operands onto a and b. The
// operand widths and the c = a*b port naming follow the reference scheme
// (a: Nx bits, b: Ny bits, c: Nx+Ny bits); the output register and the
// 18-bit default operand width (wide enough for a 16-bit weight and a 17-bit
// unsigned Q0.16 fraction) are this design's choices. The product is written
// with the '*' operator; whether it maps to LUT logic or to a DSP block is left
// to synthesis.
module tdm_mult #(
  parameter int NX = 18,
  parameter int NY = 18
) (
  input  logic                       clk,
  input  logic signed [NX-1:0]       a,
  input  logic signed [NY-1:0]       b,
  output logic signed [NX+NY-1:0]    c
);
  always_ff @(posedge clk) c <= a * b;
endmodule
