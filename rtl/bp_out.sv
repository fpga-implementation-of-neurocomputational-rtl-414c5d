// bp_out: output neuron of the back-propagation network.
//
// It receives its synaptic potential as the sum, over the hidden neurons, of
// the products v[k][j]*y_j (the hidden neurons own those weights), and its
// activation from the shared sigmoid table. When told to (ostart) it runs a
// fixed six-cycle sequence on its own time-shared multiplier:
//   cycle 0  e = z - y
//   cycle 1  issue y*(1-y)
//   cycle 2  issue e*g'                    (g' = y(1-y))
//   cycle 3  delta = e*g', issue eta*delta
//   cycle 4  eta*delta ready, issue e*e
//   cycle 5  err2 = e^2                    (squared error, for validation)
// delta and eta*delta are then broadcast to the hidden neurons. This is the
// output-layer rule delta = (z - y) g'(h); the sequence and formats (y and
// err2 Q0.16, e and deltas signed Q1.16, hsum Q8.24) are this design's.
module bp_out
  import nn_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hwr,      // latch h from hsum
  input  logic signed [47:0] hsum,     // sum_j v[k][j]*y_j, Q8.24
  input  logic               ywr,      // latch y from yin
  input  act_t               yin,
  input  logic               ostart,
  input  logic               z,        // target (0 or 1)
  input  logic [15:0]        eta,
  output fix_t               h,
  output act_t               y,
  output logic signed [17:0] delta,
  output logic signed [17:0] edelta,
  output logic [16:0]        err2
);
  logic signed [17:0] e, ma, mb;
  logic signed [35:0] mc;
  logic [2:0]         ph;

  tdm_mult #(.NX(18), .NY(18)) u_mul (.clk(clk), .a(ma), .b(mb), .c(mc));

  always_comb begin
    ma = '0; mb = '0;
    unique case (ph)
      3'd1: begin ma = 18'({2'b00, y}); mb = 18'(18'sd65536 - 18'({2'b00, y})); end
      3'd2: begin ma = e;               mb = 18'(mc >>> 16); end
      3'd3: begin ma = 18'({2'b00, eta}); mb = 18'(mc >>> 16); end  // eta*delta
      3'd4: begin ma = e;               mb = e; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0; y <= '0; e <= '0; delta <= '0; edelta <= '0; err2 <= '0; ph <= '0;
    end else begin
      if (hwr) h <= sat_fix(64'(hsum >>> 16));
      if (ywr) y <= yin;
      unique case (ph)
        3'd0: if (ostart) begin
                e  <= (z ? 18'sd65535 : 18'sd0) - 18'({2'b00, y});
                ph <= 3'd1;
              end
        3'd1: ph <= 3'd2;
        3'd2: ph <= 3'd3;
        3'd3: begin delta <= 18'(mc >>> 16); ph <= 3'd4; end
        3'd4: begin edelta <= 18'(mc >>> 16); ph <= 3'd5; end
        3'd5: begin err2 <= 17'(mc >>> 16); ph <= 3'd0; end
        default: ph <= 3'd0;
      endcase
    end
  end
endmodule
