// tb_mdac_stage_model: checks the stage model against the stage equations.
// Normal mode: comparator decisions around -Vref/4 and +Vref/4 and
//   vres = g((1 + Cs/Cf) vin - (Cs/Cf) k Vref), g = 1/(1 + (1 + Cs/Cf)/A).
// Calibration mode, eight steps with vin = 0: the alternating sum of the
// residues, sum (-1)^i vres_i, must equal g (Cs/Cf) Vref even though V1 and
// V2 are given 1 % errors.
module tb_mdac_stage_model;
  localparam real CS = 1.003, CE = 0.996, A = 1000.0;
  real  vin = 0.0, v1 = 0.0, v2 = 0.0, vres;
  logic cal_en = 0, d0, d1;
  logic clk = 0;
  int checks = 0, failures = 0;

  mdac_stage_model #(.CS_CF(CS), .CE_CF(CE), .A_GAIN(A)) dut (
    .vin, .cal_en, .v1, .v2, .d0, .d1, .vres);

  always #5 clk = ~clk;

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real g, acc;
    g = 1.0 / (1.0 + (1.0 + CS) / A);
    for (int n = 0; n < 200; n++) begin
      real e;
      int  k;
      vin = -0.995 + 1.99 * real'(n) / 199.0;
      #1;
      k = (vin > 0.25) ? 1 : (vin > -0.25 ? 0 : -1);
      e = g * ((1.0 + CS) * vin - CS * real'(k));
      check(int'(d0) + int'(d1) - 1 == k, $sformatf("decision at %f", vin));
      check(fabs(vres - e) < 1e-9, $sformatf("residue at %f: %f vs %f", vin, vres, e));
      @(posedge clk);
    end
    cal_en = 1;
    vin = 0.0;
    acc = 0.0;
    for (int i = 1; i <= 8; i++) begin
      real t1, t2;
      t1 = (i % 2 == 1) ? (8 - i) / 8.0 : (9 - i) / 8.0;
      t2 = (i % 2 == 1) ? (9 - i) / 8.0 : (8 - i) / 8.0;
      // ladder errors: 1 % of each tap except the end taps
      v1 = t1 * ((t1 > 0.0 && t1 < 1.0) ? 1.01 : 1.0);
      v2 = t2 * ((t2 > 0.0 && t2 < 1.0) ? 0.99 : 1.0);
      #1;
      check(fabs(vres - g * (v1 - CS * v2)) < 1e-9, $sformatf("calibration step %0d", i));
      acc += ((i % 2) ? -1.0 : 1.0) * vres;
      @(posedge clk);
    end
    $display("alternating sum %f, g*Cs/Cf %f", acc, g * CS);
    check(fabs(acc - g * CS) < 1e-9, "alternating sum equals g*Cs/Cf*Vref");
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
