// majority_tb: random activation vectors and neuron counts; the output must
// be 1 exactly when twice the number of ON neurons in use is at least the
// number in use, and the count must ignore neurons not in use.
module majority_tb;
  localparam int NH = 50;
  logic [NH-1:0] s;
  logic [5:0] n_h, sum;
  logic y;
  majority #(.NH(NH)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    int cnt;
    for (int n = 0; n < 5000; n++) begin
      s = NH'({$urandom, $urandom});
      n_h = 6'(1 + $urandom_range(NH - 1));
      if (n % 3 == 0) s = s & {NH{1'b1}} >> ($urandom_range(NH));
      #1;
      cnt = 0;
      for (int j = 0; j < int'(n_h); j++) cnt += int'(s[j]);
      checks++;
      if (int'(sum) != cnt || y != (2 * cnt >= int'(n_h))) begin
        failures++; $display("FAIL n_h=%0d count=%0d sum=%0d y=%0d", n_h, cnt, sum, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
