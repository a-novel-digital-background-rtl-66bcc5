// tb_split_adc_cal_core: the digital calibration core against a channel model
// written in the testbench, with large errors so the effect is plain.
//
// Each channel has two 1.5-bit stages, residue = G*x - T*k, and in calibration
// mode (V1 - T*V2) added, followed by an ideal 10-bit quantizer. Stage gains
// G and reference factors T differ between stages and channels by up to 0.6 %,
// six times the errors of the full ADC model.
// The input is a 0.8 Vref sine. With N_LMS = 2048 and
// N_REP = 100 the test checks, after the second full calibration cycle (the
// first one learns the channel mismatch on channels that are still non-linear):
//   - the four references against T2*2^15 (last stage) and G2*T1*2^15
//     (first stage), in 1/64 LSB, within half an LSB;
//   - ch_mis against the ratio of the channel gains, minus one, within 40
//     steps of 2^-16;
//   - that channel A and corrected channel B now agree within 2 LSB on every
//     sample, where they differed by more than 5 LSB before;
//   - that the output is their mean and is 3 clocks behind the sample.
module tb_split_adc_cal_core;
  import cal_pkg::*;
  localparam int NCAL = 2;

  localparam real GA [2] = '{1.99, 2.006};
  localparam real TA [2] = '{0.994, 1.004};
  localparam real GB [2] = '{2.004, 1.996};
  localparam real TB [2] = '{1.005, 0.996};

  logic clk = 0, rst_n = 0;
  real  x = 0.0;
  logic signed [9:0] be_a, be_b;
  logic [1:0] d0_a, d1_a, d0_b, d1_b, cal_en_a, cal_en_b;
  logic [3:0] v1_code, v2_code;
  logic signed [11:0] dout;
  logic dout_valid, cal_done;
  logic signed [19:0] ch_mis;
  logic signed [19:0] coef_a [NCAL], coef_b [NCAL];
  int checks = 0, failures = 0;

  split_adc_cal_core #(.N_LMS(2048), .N_REP(100)) dut (
    .clk, .rst_n, .cal_enable(1'b1),
    .be_a, .d0_a, .d1_a, .be_b, .d0_b, .d1_b,
    .cal_en_a, .cal_en_b, .v1_code, .v2_code,
    .dout, .dout_valid, .cal_done, .ch_mis, .coef_a, .coef_b);

  always #5 clk = ~clk;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // one channel: returns backend code and comparator outputs
  task automatic channel(input real xin, input real g [2], input real t [2], input logic [1:0] cal,
                         output logic signed [9:0] be, output logic [1:0] d0, output logic [1:0] d1);
    real v, c;
    v = xin;
    for (int s = 0; s < 2; s++) begin
      int k;
      d0[s] = v > -0.25;
      d1[s] = v > 0.25;
      k = int'(d0[s]) + int'(d1[s]) - 1;
      v = g[s] * v - t[s] * real'(k);
      if (cal[s]) v = v + real'(v1_code) / 8.0 - t[s] * real'(v2_code) / 8.0;
    end
    c = $floor(v * 512.0);
    if (c > 511.0) c = 511.0;
    if (c < -512.0) c = -512.0;
    be = 10'($rtoi(c));
  endtask

  always_comb begin
    channel(x, GA, TA, cal_en_a, be_a, d0_a, d1_a);
    channel(x, GB, TB, cal_en_b, be_b, d0_b, d1_b);
  end

  // 0.8 Vref sine, 733 cycles in 8192 samples (not near a multiple of fs/8,
  // so the input does not follow the pattern of the eight steps)
  longint n_x = 0;
  always @(negedge clk) begin
    n_x <= n_x + 1;
    x = 0.8 * $sin(2.0 * 3.14159265358979 * 733.0 * real'(n_x) / 8192.0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real max_before = 0.0, max_after = 0.0;
  int  n_done = 0;
  always @(posedge clk) if (rst_n && dut.est_done) n_done <= n_done + 1;

  initial begin
    real e, ch_exp;
    real hist [4];
    int lat;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    lat = 0;
    @(posedge clk); #1;
    while (!dout_valid) begin @(posedge clk); #1; lat++; end
    check(lat == 3, $sformatf("latency %0d", lat));
    // channel agreement before calibration (ideal references)
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #1;
      e = fabs(real'(dut.da2) - real'(dut.dbc2)) / 64.0;
      if (e > max_before) max_before = e;
    end
    // the first pass runs its LMS on channels that are not yet linear; the
    // second pass starts from calibrated channels and is the one checked
    wait (n_done == 8);
    repeat (10) @(posedge clk);
    e = 0.0;
    $display("coef A %0d %0d exp %0.1f %0.1f | B %0d %0d exp %0.1f %0.1f",
             coef_a[0], coef_a[1], GA[1] * TA[0] * 32768.0, TA[1] * 32768.0,
             coef_b[0], coef_b[1], GB[1] * TB[0] * 32768.0, TB[1] * 32768.0);
    check(fabs(real'(coef_a[1]) - TA[1] * 32768.0) < 32.0, "A last-stage reference");
    check(fabs(real'(coef_a[0]) - GA[1] * TA[0] * 32768.0) < 32.0, "A first-stage reference");
    check(fabs(real'(coef_b[1]) - TB[1] * 32768.0) < 32.0, "B last-stage reference");
    check(fabs(real'(coef_b[0]) - GB[1] * TB[0] * 32768.0) < 32.0, "B first-stage reference");
    ch_exp = (GA[0] * GA[1]) / (GB[0] * GB[1]) - 1.0;
    $display("ch_mis %0d, expected %0.1f", ch_mis, ch_exp * 65536.0);
    check(fabs(real'(ch_mis) - ch_exp * 65536.0) < 40.0, "channel mismatch factor");
    // agreement and output after calibration (LMS phase: both channels used)
    for (int n = 0; n < 1000; n++) begin
      real mean;
      @(posedge clk); #1;
      e = fabs(real'(dut.da2) - real'(dut.dbc2)) / 64.0;
      if (e > max_after) max_after = e;
      mean = (real'(dut.da2) + real'(dut.dbc2)) / 128.0;
      @(posedge clk); #1;
      check(fabs(real'(dout) - mean) <= 0.5, "output is the mean of the channels");
    end
    $display("max channel difference before %0.2f LSB, after %0.2f LSB", max_before, max_after);
    check(max_before > 5.0, "channels differ before calibration");
    check(max_after < 2.0, "channels agree after calibration");
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
