// tb_split_pipelined_adc: end-to-end test of the split pipelined ADC with its
// default parameters (12 bits, 60 dB amplifiers, 0.1 % capacitor errors,
// 16384 LMS samples, 100 repetitions of the eight calibration steps).
//
// Two copies of the ADC convert the same 0.8 Vref sine: one with background
// calibration enabled, one without. After the calibrated copy has measured
// every stage once, 8192 consecutive output samples of each copy are fitted
// with a sine of the known (coherent) frequency and the SNDR is computed from
// the fit residual. Checks:
//   - latency from the first sampling edge to the first valid output (3 clocks);
//   - every measured digital reference against the value computed from the
//     model's capacitor ratios and amplifier gain;
//   - SNDR after calibration is above 68 dB and 3 dB above the uncalibrated copy;
//   - the first pass takes exactly 16384 LMS samples and 8 x 100 samples per
//     measurement;
//   - every mechanism happened: LMS updates, calibration samples of each stage
//     and channel, single-channel output, estimator results, the background
//     cycle restarting with a new LMS phase.
module tb_split_pipelined_adc;
  import cal_pkg::*;

  localparam int    NCAL   = 2;
  localparam int    NS     = 8192;       // samples per SNDR measurement
  localparam int    FBIN   = 733;        // input cycles per NS samples
  localparam real   AMP    = 0.8;
  localparam real   PI     = 3.14159265358979;
  localparam int    LAT    = 3;
  localparam int    WATCHDOG = 80000;

  // model parameters, repeated to compute the expected references
  localparam real A_GAIN = 1000.0;
  localparam real CSA [NCAL] = '{1.0010, 0.9990};
  localparam real CSB [NCAL] = '{0.9991, 1.0006};

  logic clk = 0, rst_n = 0;
  real  vin = 0.0;
  logic signed [11:0] dout_c, dout_r;
  logic               val_c, val_r, done_c, done_r;
  logic signed [19:0] ch_c, ch_r;
  logic signed [19:0] ca [NCAL], cb [NCAL], ra [NCAL], rb [NCAL];

  split_pipelined_adc u_cal (.clk, .rst_n, .cal_enable(1'b1), .vin,
    .dout(dout_c), .dout_valid(val_c), .cal_done(done_c), .ch_mis(ch_c), .coef_a(ca), .coef_b(cb));
  split_pipelined_adc u_raw (.clk, .rst_n, .cal_enable(1'b0), .vin,
    .dout(dout_r), .dout_valid(val_r), .cal_done(done_r), .ch_mis(ch_r), .coef_a(ra), .coef_b(rb));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // input: new value after every rising edge
  int n_in = 0;
  real hist [0:15];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    hist[n_in % 16] <= vin;
  end
  always @(negedge clk) begin
    n_in <= n_in + 1;
    vin  <= AMP * $sin(2.0 * PI * real'(FBIN) * real'(n_in + 1) / real'(NS));
  end

  // mechanism counters
  int n_lms_upd = 0, n_est = 0, n_single = 0, n_lms_restart = 0, n_wait = 0;
  int n_cal [2][NCAL];
  int n_lms_first = 0;              // LMS samples before the first cal_done
  int n_cal_first [2][NCAL];        // calibration samples before it
  longint done_cycle = 0;
  logic signed [19:0] ch_prev;
  logic lms_prev;
  initial foreach (n_cal[c, s]) begin n_cal[c][s] = 0; n_cal_first[c][s] = 0; end
  always @(posedge clk) if (rst_n) begin
    tag_t t;
    t = u_cal.u_core.tag2;
    ch_prev  <= ch_c;
    if (ch_c != ch_prev) n_lms_upd++;
    if (t.cal) begin
      n_cal[t.ch][t.stage]++;
      if (!done_c) n_cal_first[t.ch][t.stage]++;
      n_single++;
    end
    if (t.lms && !done_c) n_lms_first++;
    if (done_c && done_cycle == 0) done_cycle = cyc;
    if (u_cal.u_core.est_done) n_est++;
    if (u_cal.u_core.u_seq.state == 2'd3) n_wait++;
    lms_prev <= u_cal.u_core.seq_tag.lms;
    if (done_c && u_cal.u_core.seq_tag.lms && !lms_prev) n_lms_restart++;
  end

  // SNDR of NS consecutive samples by a coherent sine fit
  function automatic real sndr_db(input real y [NS]);
    real sa = 0, sb = 0, sc = 0, a, b, c, e, pe = 0;
    for (int n = 0; n < NS; n++) begin
      real ph = 2.0 * PI * real'(FBIN) * real'(n) / real'(NS);
      sa += y[n] * $sin(ph); sb += y[n] * $cos(ph); sc += y[n];
    end
    a = 2.0 * sa / NS; b = 2.0 * sb / NS; c = sc / NS;
    for (int n = 0; n < NS; n++) begin
      real ph = 2.0 * PI * real'(FBIN) * real'(n) / real'(NS);
      e = y[n] - (a * $sin(ph) + b * $cos(ph) + c);
      pe += e * e;
    end
    pe = pe / NS;
    return 10.0 * $log10((a * a + b * b) / 2.0 / pe);
  endfunction

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic real gfb(input real r);
    return 1.0 / (1.0 + (1.0 + r) / A_GAIN);
  endfunction

  real yc [NS], yr [NS];
  real s_cal, s_raw;

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency: first sampling edge to first valid output
    lat = 0;
    @(posedge clk);
    #1;
    while (!val_c) begin @(posedge clk); #1; lat++; end
    check(lat == LAT, $sformatf("latency %0d, expected %0d", lat, LAT));

    wait (done_c);
    repeat (20) @(posedge clk);
    // expected references (in 1/64 LSB) from the model:
    //   last stage: g2*r2*512*64 ; first stage: (1+r2)*g2 * g1*r1*512*64
    begin
      real ea1, ea0, eb1, eb0;
      ea1 = gfb(CSA[1]) * CSA[1] * 32768.0;
      ea0 = gfb(CSA[1]) * (1.0 + CSA[1]) * gfb(CSA[0]) * CSA[0] * 32768.0;
      eb1 = gfb(CSB[1]) * CSB[1] * 32768.0;
      eb0 = gfb(CSB[1]) * (1.0 + CSB[1]) * gfb(CSB[0]) * CSB[0] * 32768.0;
      $display("coef A: %0d %0d (exp %0.1f %0.1f)  B: %0d %0d (exp %0.1f %0.1f)  ch_mis %0d",
               ca[0], ca[1], ea0, ea1, cb[0], cb[1], eb0, eb1, ch_c);
      check(fabs(real'(ca[1]) - ea1) < 32.0, "channel A last-stage reference");
      check(fabs(real'(ca[0]) - ea0) < 32.0, "channel A first-stage reference");
      check(fabs(real'(cb[1]) - eb1) < 32.0, "channel B last-stage reference");
      check(fabs(real'(cb[0]) - eb0) < 32.0, "channel B first-stage reference");
      check(ra[0] == 20'sd65536 && ra[1] == 20'sd32768, "uncalibrated copy keeps ideal references");
    end
    // collect NS aligned samples of both copies (LMS phase: both channels averaged)
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      @(posedge clk);
      #1;
      yc[n] = real'(dout_c);
      yr[n] = real'(dout_r);
    end
    s_cal = sndr_db(yc);
    s_raw = sndr_db(yr);
    $display("SNDR without calibration %0.1f dB, with calibration %0.1f dB", s_raw, s_cal);
    check(s_cal > 68.0, "SNDR after calibration above 68 dB");
    check(s_cal > s_raw + 3.0, "calibration improves SNDR by more than 3 dB");

    // run into the next background cycle
    wait (u_cal.u_core.tag2.cal);
    repeat (10) @(posedge clk);

    $display("mechanisms: lms_updates=%0d estimates=%0d single_channel_out=%0d wait_cycles=%0d lms_restarts=%0d",
             n_lms_upd, n_est, n_single, n_wait, n_lms_restart);
    $display("cal samples: A1=%0d A2=%0d B1=%0d B2=%0d", n_cal[0][0], n_cal[0][1], n_cal[1][0], n_cal[1][1]);
    check(n_lms_upd > 0, "LMS updated the mismatch factor");
    check(n_est >= 4, "four reference measurements finished");
    check(n_single > 0, "single-channel output during calibration");
    check(n_wait > 0, "sequencer waited for the estimator");
    check(n_lms_restart > 0, "background cycle restarted");
    $display("first pass: %0d LMS samples, cal_done after %0d clocks", n_lms_first, done_cycle);
    check(n_lms_first == 16384, "16384 LMS samples before the first measurement");
    foreach (n_cal_first[c, s]) check(n_cal_first[c][s] == 800, $sformatf("8 x 100 samples for channel %0d stage %0d", c, s + 1));
    foreach (n_cal[c, s]) check(n_cal[c][s] >= 800, $sformatf("calibration samples of channel %0d stage %0d", c, s + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
