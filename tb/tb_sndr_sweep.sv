// tb_sndr_sweep: SNDR and SFDR versus input frequency, with and without
// calibration, at the default parameters.
//
// Two copies of the ADC run side by side. The calibrated copy first completes
// one full calibration pass with a 0.8 Vref sine at 367/4096 of the sample
// rate; then its calibration is switched off, which freezes its references and
// channel mismatch factor. The input is then swept over nine frequencies from
// near DC to near Nyquist (about 0, 1/16, ..., 8/16 of the sample rate, as
// coherent bins of a 4096-point record). For each, SNDR comes from a coherent
// sine fit and SFDR from the largest of harmonics 2..9 (folded into the first
// Nyquist zone). Checks at every frequency: SNDR with calibration above 68 dB
// and at least 3 dB above the uncalibrated copy; SFDR with calibration above
// 72 dB and at least 3 dB above the uncalibrated copy.
// The stage models have no memory, so every coherent record holds the same
// set of input phases and the results are the same at every frequency.
module tb_sndr_sweep;
  localparam int  NS = 4096;
  localparam int  NF = 9;
  localparam int  BINS [NF] = '{31, 251, 509, 769, 1021, 1279, 1531, 1789, 2039};
  localparam int  CAL_BIN = 367;
  localparam real AMP = 0.8;
  localparam real PI  = 3.14159265358979;

  logic clk = 0, rst_n = 0, cal_en = 1;
  real  vin = 0.0;
  int   bin = CAL_BIN;
  logic signed [11:0] dout_c, dout_r;
  logic val_c, val_r, done_c, done_r;
  logic signed [19:0] ch_c, ch_r;
  logic signed [19:0] ca [2], cb [2], ra [2], rb [2];
  int checks = 0, failures = 0;

  split_pipelined_adc u_cal (.clk, .rst_n, .cal_enable(cal_en), .vin,
    .dout(dout_c), .dout_valid(val_c), .cal_done(done_c), .ch_mis(ch_c), .coef_a(ca), .coef_b(cb));
  split_pipelined_adc u_raw (.clk, .rst_n, .cal_enable(1'b0), .vin,
    .dout(dout_r), .dout_valid(val_r), .cal_done(done_r), .ch_mis(ch_r), .coef_a(ra), .coef_b(rb));

  always #5 clk = ~clk;

  longint n_in = 0;
  always @(negedge clk) begin
    n_in <= n_in + 1;
    vin  <= AMP * $sin(2.0 * PI * real'(bin) * real'(n_in + 1) / real'(NS));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // power of DFT bin b (one-sided amplitude squared)
  function automatic real bin_pow(input real y [NS], input int b);
    real re = 0, im = 0;
    for (int n = 0; n < NS; n++) begin
      real ph;
      ph = 2.0 * PI * real'(b) * real'(n) / real'(NS);
      re += y[n] * $cos(ph);
      im += y[n] * $sin(ph);
    end
    return (re * re + im * im) * 4.0 / (real'(NS) * real'(NS));
  endfunction

  task automatic measure(input real y [NS], input int b, output real sndr, output real sfdr);
    real sa = 0, sb = 0, sc = 0, a, bb, c, pe = 0, ps, hmax = 1e-30;
    for (int n = 0; n < NS; n++) begin
      real ph;
      ph = 2.0 * PI * real'(b) * real'(n) / real'(NS);
      sa += y[n] * $sin(ph); sb += y[n] * $cos(ph); sc += y[n];
    end
    a = 2.0 * sa / NS; bb = 2.0 * sb / NS; c = sc / NS;
    for (int n = 0; n < NS; n++) begin
      real ph, e;
      ph = 2.0 * PI * real'(b) * real'(n) / real'(NS);
      e = y[n] - (a * $sin(ph) + bb * $cos(ph) + c);
      pe += e * e;
    end
    ps = (a * a + bb * bb);
    sndr = 10.0 * $log10(ps / 2.0 / (pe / NS));
    for (int h = 2; h <= 9; h++) begin
      int hb;
      real p;
      hb = (h * b) % NS;
      if (hb > NS / 2) hb = NS - hb;
      if (hb != 0 && hb != b) begin
        p = bin_pow(y, hb);
        if (p > hmax) hmax = p;
      end
    end
    sfdr = 10.0 * $log10(ps / hmax);
  endtask

  real yc [NS], yr [NS];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done_c);
    @(negedge clk) cal_en = 0;     // freeze the calibration
    for (int f = 0; f < NF; f++) begin
      real s_c, s_r, f_c, f_r;
      @(negedge clk) bin = BINS[f];
      repeat (8) @(posedge clk);
      for (int n = 0; n < NS; n++) begin
        @(posedge clk); #1;
        yc[n] = real'(dout_c);
        yr[n] = real'(dout_r);
      end
      measure(yc, BINS[f], s_c, f_c);
      measure(yr, BINS[f], s_r, f_r);
      $display("f/fs=%0.4f  SNDR %0.1f -> %0.1f dB  SFDR %0.1f -> %0.1f dB",
               real'(BINS[f]) / NS, s_r, s_c, f_r, f_c);
      check(s_c > 68.0, "SNDR with calibration above 68 dB");
      check(s_c > s_r + 3.0, "calibration improves SNDR by 3 dB");
      check(f_c > 72.0 && f_c > f_r + 3.0, "SFDR with calibration above 72 dB and 3 dB better");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
