// split_adc_cal_core: digital background calibration of a two-channel split
// 1.5 bit/stage pipelined ADC.
//
// Both channels convert the same input. Per channel the core receives the
// comparator outputs of the NCAL calibrated front-end stages and the code of
// the backend ADC that digitizes the last calibrated stage's residue. It
//   - reconstructs each channel with a digital reference per stage and
//     channel (channel_reconstruct);
//   - scales channel B by (1 + ch_mis), the channel mismatch factor learned by
//     a sign-sign LMS while no calibration signal is applied (ch_mismatch_lms);
//   - measures each stage's digital reference by putting that stage in
//     calibration mode for the eight (V1, V2) steps, repeated N_REP times, and
//     taking the alternating sum of the difference between the two channels
//     (cal_sequencer, rcf_estimator). Because the other channel converts the
//     same input without the calibration signal, the input cancels out of the
//     difference, which is what makes the calibration run in the background;
//   - outputs the mean of the two channels, or the other channel alone while
//     one carries the calibration signal (split_output).
// The measured reference replaces the stage's value when the estimator is done.
//
// For the channel under calibration the difference is taken in that channel's
// own scale: m = D_A - (1+ch_mis) D_B when A is measured, and
// m = D_B - (1-ch_mis) D_A when B is measured (first order in ch_mis), so the
// reference of channel B stays in the scale of its raw code. One multiplier
// serves both cases.
//
// Timing: the analog calibration controls (cal_en_*, v*_code) are valid during
// the clock before the edge at which the sample is captured; the captured
// sample is tagged with them. Latency from capture to dout is 3 clocks; one
// sample per clock.
//
// All flops reset asynchronously on rst_n. The assertion at the end (no
// calibration sample may reach a busy estimator) is disabled during reset; a
// lint tool that sees rst_n both as an async reset and in that clocked
// property may flag it as used synchronously, which is expected and harmless.
module split_adc_cal_core
  import cal_pkg::*;
#(
  parameter int NCAL     = 2,      // calibrated front-end stages
  parameter int BE_BITS  = 10,     // backend resolution
  parameter int FRAC     = 6,      // fractional bits of the D domain
  parameter int D_W      = 20,     // width of D-domain values
  parameter int OUT_BITS = 12,     // output resolution
  parameter int CH_W     = 20,     // width of the channel mismatch factor
  parameter int CH_FRAC  = 16,     // its fractional bits (LMS step 2^-16)
  parameter int MU_LSB   = 1,      // LMS step in LSB of ch_mis
  parameter int N_LMS    = 16384,  // samples of each LMS phase
  parameter int N_REP    = 100     // repetitions of the eight steps
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cal_enable,
  // channel A and B front ends
  input  logic signed [BE_BITS-1:0]  be_a,
  input  logic        [NCAL-1:0]     d0_a,
  input  logic        [NCAL-1:0]     d1_a,
  input  logic signed [BE_BITS-1:0]  be_b,
  input  logic        [NCAL-1:0]     d0_b,
  input  logic        [NCAL-1:0]     d1_b,
  // calibration controls for the analog stages and the ladder
  output logic        [NCAL-1:0]     cal_en_a,
  output logic        [NCAL-1:0]     cal_en_b,
  output logic        [3:0]          v1_code,
  output logic        [3:0]          v2_code,
  // results
  output logic signed [OUT_BITS-1:0] dout,
  output logic                       dout_valid,
  output logic                       cal_done,
  output logic signed [CH_W-1:0]     ch_mis,
  output logic signed [D_W-1:0]      coef_a [NCAL],
  output logic signed [D_W-1:0]      coef_b [NCAL]
);

  // ---------------- sequencer ----------------
  tag_t       seq_tag;
  chan_e      cur_ch;
  logic [1:0] cur_stage;
  logic       est_done;
  logic signed [D_W-1:0] est_coef;

  cal_sequencer #(.NCAL(NCAL), .N_LMS(N_LMS), .N_REP(N_REP)) u_seq (
    .clk, .rst_n, .enable(cal_enable), .est_done,
    .tag(seq_tag), .cal_en_a, .cal_en_b, .v1_code, .v2_code,
    .cur_ch, .cur_stage, .cal_done
  );

  // ---------------- stage 0: capture ----------------
  logic                      v0;
  tag_t                      tag0;
  logic signed [BE_BITS-1:0] be_a0, be_b0;
  logic        [NCAL-1:0]    d0_a0, d1_a0, d0_b0, d1_b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; tag0 <= '0;
      be_a0 <= '0; be_b0 <= '0;
      d0_a0 <= '0; d1_a0 <= '0; d0_b0 <= '0; d1_b0 <= '0;
    end else begin
      v0 <= 1'b1; tag0 <= seq_tag;
      be_a0 <= be_a; be_b0 <= be_b;
      d0_a0 <= d0_a; d1_a0 <= d1_a; d0_b0 <= d0_b; d1_b0 <= d1_b;
    end
  end

  // ---------------- stage 1: reconstruction ----------------
  logic signed [D_W-1:0] da_c, db_c;
  logic                  v1;
  tag_t                  tag1;
  logic signed [D_W-1:0] da1, db1;

  channel_reconstruct #(.NCAL(NCAL), .BE_BITS(BE_BITS), .FRAC(FRAC), .D_W(D_W)) u_rec_a (
    .be_code(be_a0), .d0(d0_a0), .d1(d1_a0), .coef(coef_a), .d_out(da_c));
  channel_reconstruct #(.NCAL(NCAL), .BE_BITS(BE_BITS), .FRAC(FRAC), .D_W(D_W)) u_rec_b (
    .be_code(be_b0), .d0(d0_b0), .d1(d1_b0), .coef(coef_b), .d_out(db_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; tag1 <= '0; da1 <= '0; db1 <= '0;
    end else begin
      v1 <= v0; tag1 <= tag0; da1 <= da_c; db1 <= db_c;
    end
  end

  // ---------------- stage 2: channel mismatch correction ----------------
  logic                          cal_b1;
  logic signed [D_W-1:0]         mul_x;
  logic signed [CH_W-1:0]        mul_f;
  logic signed [D_W+CH_W-1:0]    prod;
  logic signed [D_W-1:0]         corr, dbc_c, das_c, m_c;

  always_comb begin
    cal_b1 = tag1.cal && (tag1.ch == CH_B);
    mul_x  = cal_b1 ? da1 : db1;
    mul_f  = cal_b1 ? -ch_mis : ch_mis;
    prod   = (D_W+CH_W)'(mul_x) * (D_W+CH_W)'(mul_f);
    corr   = D_W'(prod >>> CH_FRAC);
    dbc_c  = db1 + corr;    // (1 + ch_mis) D_B, valid unless B is measured
    das_c  = da1 + corr;    // (1 - ch_mis) D_A, valid when B is measured
    m_c    = cal_b1 ? (db1 - das_c) : (da1 - dbc_c);
  end

  logic                  v2;
  tag_t                  tag2;
  logic signed [D_W-1:0] da2, dbc2, m2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; tag2 <= '0; da2 <= '0; dbc2 <= '0; m2 <= '0;
    end else begin
      v2 <= v1; tag2 <= tag1; da2 <= da1; dbc2 <= dbc_c; m2 <= m_c;
    end
  end

  // ---------------- stage 3: LMS, estimator, output ----------------
  ch_mismatch_lms #(.D_W(D_W), .CH_W(CH_W), .MU_LSB(MU_LSB)) u_lms (
    .clk, .rst_n, .update_en(v2 && tag2.lms), .d_a(da2), .d_b_corr(dbc2), .ch_mis);

  logic est_busy;
  rcf_estimator #(.D_W(D_W), .N_REP(N_REP)) u_est (
    .clk, .rst_n, .sample_en(v2 && tag2.cal), .first(tag2.first), .last(tag2.last),
    .negate(!tag2.step[0]),   // step s is i = s+1; (-1)^i < 0 for odd i
    .m(m2), .busy(est_busy), .done(est_done), .coef(est_coef));

  out_sel_e sel2;
  always_comb begin
    if (!tag2.cal)            sel2 = OUT_AVG;
    else if (tag2.ch == CH_A) sel2 = OUT_B_ONLY;
    else                      sel2 = OUT_A_ONLY;
  end

  split_output #(.D_W(D_W), .FRAC(FRAC), .OUT_BITS(OUT_BITS)) u_out (
    .clk, .rst_n, .in_valid(v2), .d_a(da2), .d_b(dbc2), .sel(sel2), .dout, .dout_valid);

  // ---------------- digital references ----------------
  // Reset to the ideal references: stage s weighs 2^(BE_BITS-1+NCAL-1-s).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NCAL; s++) begin
        coef_a[s] <= D_W'(1) <<< (BE_BITS - 1 + FRAC + NCAL - 1 - s);
        coef_b[s] <= D_W'(1) <<< (BE_BITS - 1 + FRAC + NCAL - 1 - s);
      end
    end else if (est_done) begin
      for (int s = 0; s < NCAL; s++) begin
        if (cur_stage == 2'(s) && cur_ch == CH_A) coef_a[s] <= est_coef;
        if (cur_stage == 2'(s) && cur_ch == CH_B) coef_b[s] <= est_coef;
      end
    end
  end

  // A measurement must finish before the next one starts.
  assert property (@(posedge clk) disable iff (!rst_n) (v2 && tag2.cal) |-> !est_busy)
    else $error("calibration sample while the estimator is dividing");

endmodule
