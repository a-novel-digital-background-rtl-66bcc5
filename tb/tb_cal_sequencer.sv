// tb_cal_sequencer: checks the calibration schedule with N_LMS = 10 and
// N_REP = 3. The testbench plays the estimator: 5 clocks after the sample
// flagged last it pulses est_done. Expected, sample by sample:
//   LMS phase of N_LMS samples, then for (stage 2, A), (stage 2, B),
//   (stage 1, A), (stage 1, B): N_REP passes of the eight steps with
//   V1 = 7,7,5,5,3,3,1,1 and V2 = 8,6,6,4,4,2,2,0 eighths of Vref, only that
//   stage's cal_en set, first/last on the first/last sample; then waiting with
//   no calibration signal until est_done. After the fourth result cal_done
//   rises and a new LMS phase starts. Lowering enable returns to idle.
module tb_cal_sequencer;
  import cal_pkg::*;
  localparam int NCAL = 2, N_LMS = 10, N_REP = 3;
  localparam logic [3:0] V1_EXP [8] = '{4'd7, 4'd7, 4'd5, 4'd5, 4'd3, 4'd3, 4'd1, 4'd1};
  localparam logic [3:0] V2_EXP [8] = '{4'd8, 4'd6, 4'd6, 4'd4, 4'd4, 4'd2, 4'd2, 4'd0};

  logic clk = 0, rst_n = 0, enable = 0, est_done = 0;
  tag_t tag;
  logic [NCAL-1:0] cal_en_a, cal_en_b;
  logic [3:0] v1_code, v2_code;
  chan_e cur_ch;
  logic [1:0] cur_stage;
  logic cal_done;
  int checks = 0, failures = 0;

  cal_sequencer #(.NCAL(NCAL), .N_LMS(N_LMS), .N_REP(N_REP)) dut (
    .clk, .rst_n, .enable, .est_done, .tag, .cal_en_a, .cal_en_b, .v1_code, .v2_code,
    .cur_ch, .cur_stage, .cal_done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // advance one sample: sample the outputs just before the edge
  task automatic tick;
    @(posedge clk); #1;
  endtask

  initial begin
    int ph_stage [4] = '{1, 1, 0, 0};
    chan_e ph_ch [4] = '{CH_A, CH_B, CH_A, CH_B};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    enable = 1;
    tick();   // idle -> LMS
    for (int cycle = 0; cycle < 2; cycle++) begin
      for (int n = 0; n < N_LMS; n++) begin
        check(tag.lms && !tag.cal && cal_en_a == 0 && cal_en_b == 0,
              $sformatf("LMS sample %0d", n));
        tick();
      end
      for (int p = 0; p < 4; p++) begin
        for (int rep = 0; rep < N_REP; rep++)
          for (int st = 0; st < 8; st++) begin
            logic [NCAL-1:0] en_exp;
            en_exp = NCAL'(1) << ph_stage[p];
            check(tag.cal && !tag.lms && tag.ch == ph_ch[p] && tag.stage == 2'(ph_stage[p]) && tag.step == 3'(st),
                  $sformatf("phase %0d rep %0d step %0d tag", p, rep, st));
            check(v1_code == V1_EXP[st] && v2_code == V2_EXP[st],
                  $sformatf("step %0d: V1 %0d V2 %0d", st + 1, v1_code, v2_code));
            check((ph_ch[p] == CH_A ? cal_en_a : cal_en_b) == en_exp &&
                  (ph_ch[p] == CH_A ? cal_en_b : cal_en_a) == 0, "cal_en");
            check(tag.first == (rep == 0 && st == 0) && tag.last == (rep == N_REP - 1 && st == 7), "first/last");
            tick();
          end
        // waiting for the estimator
        for (int w = 0; w < 5; w++) begin
          check(!tag.cal && !tag.lms && cal_en_a == 0 && cal_en_b == 0 && v1_code == 0, "wait state");
          tick();
        end
        est_done = 1;
        check(cal_done == (cycle > 0), "cal_done before the last result");
        tick();
        est_done = 0;
      end
      check(cal_done, "cal_done after four results");
    end
    // disabling returns to idle: no LMS, no calibration
    enable = 0;
    tick(); tick();
    check(!tag.lms && !tag.cal, "idle when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
