// tb_ref_ladder_model: checks the resistor-string model. End taps are exactly
// 0 and Vref, inner taps are within TAP_ERR of n/8 Vref and not all exact, and
// over the eight calibration steps the V1 taps of odd and even steps cancel
// while the V2 taps differ by exactly Vref.
module tb_ref_ladder_model;
  localparam real TAP_ERR = 0.002;
  logic [3:0] c1 = 0, c2 = 0;
  real v1, v2;
  logic clk = 0;
  int checks = 0, failures = 0;

  ref_ladder_model #(.VREF(1.0), .TAP_ERR(TAP_ERR)) dut (.v1_code(c1), .v2_code(c2), .v1, .v2);

  always #5 clk = ~clk;

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real s1, s2;
    int  n_off;
    n_off = 0;
    for (int n = 0; n <= 8; n++) begin
      c1 = 4'(n); c2 = 4'(8 - n);
      #1;
      check(fabs(v1 - n / 8.0) <= TAP_ERR + 1e-12, $sformatf("tap %0d = %f", n, v1));
      check(fabs(v2 - (8 - n) / 8.0) <= TAP_ERR + 1e-12, $sformatf("tap %0d = %f", 8 - n, v2));
      if (n == 0 || n == 8) check(v1 == n / 8.0, "end tap exact");
      else if (fabs(v1 - n / 8.0) > 1e-6) n_off++;
      @(posedge clk);
    end
    check(n_off >= 4, "inner taps carry errors");
    s1 = 0.0; s2 = 0.0;
    for (int i = 1; i <= 8; i++) begin
      c1 = 4'((i % 2 == 1) ? 8 - i : 9 - i);
      c2 = 4'((i % 2 == 1) ? 9 - i : 8 - i);
      #1;
      s1 += ((i % 2) ? -1.0 : 1.0) * v1;
      s2 += ((i % 2) ? -1.0 : 1.0) * v2;
      @(posedge clk);
    end
    check(fabs(s1) < 1e-12, "V1 taps cancel");
    check(fabs(s2 + 1.0) < 1e-12, "V2 taps leave exactly -Vref");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
