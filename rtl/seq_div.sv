// seq_div: unsigned restoring divider, one quotient bit per cycle.
//
// A start pulse loads num and den; NW cycles later done pulses and q holds
// floor(num/den). Division by zero returns all ones. Used by the C-Mantec
// neuron to form |h|/T for its thermal factor; the document gives no divider,
// the restoring algorithm is this design's choice.
module seq_div #(
  parameter int NW = 24,   // dividend and quotient width
  parameter int DW = 16    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic [NW-1:0] q,
  output logic          busy,
  output logic          done
);
  logic [DW-1:0]        rem;
  logic [DW-1:0]        dreg;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]          trial;

  assign trial = {rem[DW-1:0], q[NW-1]} - {1'b0, dreg};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; dreg <= '0; q <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= '0;
        dreg <= den;
        q    <= num;
        cnt  <= ($clog2(NW+1))'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[DW]) begin
          rem <= trial[DW-1:0];
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= {rem[DW-2:0], q[NW-1]};
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
