// tdm_mult_tb: random signed operands, including the extremes; the product
// must appear exactly one cycle after the operands.
module tdm_mult_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [17:0] a, b;
  logic signed [35:0] c;
  tdm_mult #(.NX(18), .NY(18)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    longint exp_p;
    a = 0; b = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      case (n)
        0: begin a = -18'sd131072; b = -18'sd131072; end
        1: begin a = 18'sd131071;  b = -18'sd131072; end
        2: begin a = 18'sd131071;  b = 18'sd131071; end
        default: begin a = 18'($urandom); b = 18'($urandom); end
      endcase
      exp_p = longint'(a) * longint'(b);
      @(negedge clk);
      checks++;
      if (longint'(c) != exp_p) begin
        failures++; $display("FAIL %0d * %0d = %0d, got %0d", a, b, exp_p, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
