// tb_rcf_estimator: alternating-sum averaging test.
// Three measurements of 8 * N_REP samples (N_REP = 100) with random m and
// the (-1)^i pattern of the eight steps; the result must be the alternating
// sum divided by N_REP, rounded half away from zero, and done must rise
// ACC_W + 1 clocks after the edge that takes the last sample. A fourth
// measurement uses m = g_ri of an ideal stage (r = 1.01) to show the
// alternating sum returns r * Vref.
module tb_rcf_estimator;
  localparam int D_W = 20, N_REP = 100;
  localparam int ACC_W = D_W + $clog2(8 * N_REP) + 1;
  logic clk = 0, rst_n = 0;
  logic sample_en = 0, first = 0, last = 0, negate = 0;
  logic signed [D_W-1:0] m = 0, coef;
  logic busy, done;
  int checks = 0, failures = 0;

  rcf_estimator #(.D_W(D_W), .N_REP(N_REP)) dut (
    .clk, .rst_n, .sample_en, .first, .last, .negate, .m, .busy, .done, .coef);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // runs one measurement; mode 0: random m; mode 1: m = g_ri of a stage
  task automatic measure(input int mode);
    longint sum = 0, mag, q;
    int lat;
    for (int rep = 0; rep < N_REP; rep++)
      for (int st = 0; st < 8; st++) begin
        int i;
        i = st + 1;
        @(negedge clk);
        sample_en = 1;
        first  = (rep == 0 && st == 0);
        last   = (rep == N_REP - 1 && st == 7);
        negate = (i % 2 == 1);
        if (mode == 0) m = D_W'(int'($urandom_range(0, 140000)) - 70000);
        else begin
          // g_ri in 1/64 LSB, Vref = 32768, r = 1.01: (V1 - r V2)
          real v1, v2;
          v1 = (i % 2 == 1) ? (8 - i) / 8.0 : (9 - i) / 8.0;
          v2 = (i % 2 == 1) ? (9 - i) / 8.0 : (8 - i) / 8.0;
          m = D_W'($rtoi(32768.0 * (v1 - 1.01 * v2)));
        end
        sum += negate ? -longint'(m) : longint'(m);
      end
    @(negedge clk);
    sample_en = 0; first = 0; last = 0;
    mag = sum < 0 ? -sum : sum;
    q = (mag + N_REP / 2) / N_REP;
    if (sum < 0) q = -q;
    lat = 0;
    while (!done) begin @(posedge clk); #1; lat++; end
    check(longint'(coef) == q, $sformatf("result %0d, expected %0d", coef, q));
    check(lat == ACC_W + 1, $sformatf("done after %0d clocks, expected %0d", lat, ACC_W + 1));
    if (mode == 1) check(coef > 33090 && coef < 33100, $sformatf("alternating sum gives r*Vref = 33096.7, got %0d", coef));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) measure(0);
    measure(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
