// cal_sequencer: controller of the background calibration.
//
// One sample is converted per clock. The sequencer decides, for the sample
// taken at the next clock edge, what it is used for, and drives the analog
// calibration controls for it:
//   S_LMS  : N_LMS samples with no calibration signal, used by the sign-sign
//            LMS to match the two channels.
//   S_CAL  : one stage of one channel is in calibration mode. The eight
//            (V1, V2) steps are applied one sample each, and the eight steps
//            are repeated N_REP times.
//   S_WAIT : normal conversion while the estimator divides; leaves on est_done.
// The measurements run from the last calibrated stage to the first, channel A
// before channel B of each stage (stage 2 A, stage 2 B, stage 1 A, stage 1 B
// for NCAL = 2). After the last one cal_done is set and the cycle starts again
// with the LMS phase, so calibration keeps tracking in the background.
// With enable low the sequencer idles and injects nothing.
//
// The phase order, the V1/V2 values and the counts follow the technique; one
// sample per step, the wait state, the endless loop and channel A before B
// are this design's choices. NCAL may be 1 to 4 (the tag holds 2 stage bits).
//
// Outputs are registered state decoded combinationally; tag, cal_en_*,
// v1_code and v2_code all describe the same sample.
module cal_sequencer
  import cal_pkg::*;
#(
  parameter int NCAL  = 2,
  parameter int N_LMS = 16384,  // samples of the LMS phase
  parameter int N_REP = 100     // repetitions of the eight steps
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic            est_done,
  output tag_t            tag,
  output logic [NCAL-1:0] cal_en_a,
  output logic [NCAL-1:0] cal_en_b,
  output logic [3:0]      v1_code,
  output logic [3:0]      v2_code,
  output chan_e           cur_ch,     // phase being measured (held in S_WAIT)
  output logic [1:0]      cur_stage,
  output logic            cal_done
);

  typedef enum logic [1:0] {S_IDLE, S_LMS, S_CAL, S_WAIT} state_e;

  localparam int LMS_W = $clog2(N_LMS + 1);
  localparam int REP_W = $clog2(N_REP + 1);

  if (NCAL < 1 || NCAL > 4) begin : g_ncal_check
    $error("cal_sequencer: NCAL must be 1 to 4");
  end

  state_e            state;
  logic [LMS_W-1:0]  lms_cnt;
  logic [REP_W-1:0]  rep_cnt;
  logic [2:0]        step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      lms_cnt   <= '0;
      rep_cnt   <= '0;
      step      <= '0;
      cur_ch    <= CH_A;
      cur_stage <= 2'(NCAL - 1);
      cal_done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (enable) begin
          state   <= S_LMS;
          lms_cnt <= '0;
        end
        S_LMS: begin
          if (!enable) state <= S_IDLE;
          else if (lms_cnt == LMS_W'(N_LMS - 1)) begin
            state     <= S_CAL;
            cur_ch    <= CH_A;
            cur_stage <= 2'(NCAL - 1);
            rep_cnt   <= '0;
            step      <= '0;
          end else lms_cnt <= lms_cnt + 1'b1;
        end
        S_CAL: begin
          step <= step + 1'b1;
          if (step == 3'd7) begin
            rep_cnt <= rep_cnt + 1'b1;
            if (rep_cnt == REP_W'(N_REP - 1)) state <= S_WAIT;
          end
        end
        S_WAIT: if (est_done) begin
          rep_cnt <= '0;
          step    <= '0;
          if (cur_ch == CH_A) begin
            cur_ch <= CH_B;
            state  <= enable ? S_CAL : S_IDLE;
          end else if (cur_stage != 2'd0) begin
            cur_ch    <= CH_A;
            cur_stage <= cur_stage - 1'b1;
            state     <= enable ? S_CAL : S_IDLE;
          end else begin
            cal_done <= 1'b1;
            state    <= enable ? S_LMS : S_IDLE;
            lms_cnt  <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    tag       = '0;
    tag.lms   = (state == S_LMS);
    tag.cal   = (state == S_CAL);
    tag.ch    = cur_ch;
    tag.stage = cur_stage;
    tag.step  = step;
    tag.first = (state == S_CAL) && (rep_cnt == '0) && (step == 3'd0);
    tag.last  = (state == S_CAL) && (rep_cnt == REP_W'(N_REP - 1)) && (step == 3'd7);
    cal_en_a  = '0;
    cal_en_b  = '0;
    v1_code   = '0;
    v2_code   = '0;
    if (state == S_CAL) begin
      for (int s = 0; s < NCAL; s++) begin
        cal_en_a[s] = (cur_ch == CH_A) && (cur_stage == 2'(s));
        cal_en_b[s] = (cur_ch == CH_B) && (cur_stage == 2'(s));
      end
      v1_code = v1_tap(step);
      v2_code = v2_tap(step);
    end
  end

endmodule
