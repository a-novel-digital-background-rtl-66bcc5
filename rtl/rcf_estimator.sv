// rcf_estimator: measures the digital reference (RCF * Vref) of one stage.
//
// During a measurement the stage under calibration carries V1 and V2 of one
// of eight steps; m is the difference between the channel under calibration
// and the other channel for that sample. The reference is the alternating sum
//     RCF * Vref = sum_{i=1..8} (-1)^i * g_ri
// (V1 and V2 cancel out of it, so the ladder need not be accurate). The eight
// steps are repeated N_REP times and the result averaged: the block adds or
// subtracts (negate) every sample into an accumulator, and after the sample
// flagged last divides the sum by N_REP with rounding to the nearest value.
//
// The alternating sum and the averaging over repetitions follow the technique;
// the divider and its rounding are this design's.
//
// The division is a restoring divider on the magnitude, one quotient bit per
// clock, so done rises ACC_W+1 clocks after the edge that takes the last
// sample. coef holds the result until the next done and saturates to D_W
// bits. Samples offered while it divides are ignored.
module rcf_estimator #(
  parameter int D_W   = 20,
  parameter int N_REP = 100,  // repetitions of the eight steps averaged
  parameter int ACC_W = D_W + $clog2(8 * N_REP) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_en,  // m is a calibration sample
  input  logic                  first,      // clear the sum before this sample
  input  logic                  last,       // start the division after it
  input  logic                  negate,     // (-1)^i = -1 for this sample
  input  logic signed [D_W-1:0] m,
  output logic                  busy,
  output logic                  done,       // one-cycle pulse, coef valid
  output logic signed [D_W-1:0] coef
);

  typedef enum logic [1:0] {S_ACC, S_DIV, S_OUT} state_e;

  localparam logic [ACC_W-1:0] DIVISOR = ACC_W'(N_REP);
  localparam logic [ACC_W-1:0] HALF    = ACC_W'(N_REP / 2);
  localparam int               CNT_W   = $clog2(ACC_W + 1);

  state_e                   state;
  logic signed [ACC_W-1:0]  acc;
  logic                     neg_q;
  logic        [ACC_W-1:0]  quo;     // dividend shifting out, quotient in
  logic        [ACC_W:0]    rem;
  logic        [CNT_W-1:0]  cnt;

  logic signed [ACC_W-1:0]  term, acc_next;
  logic        [ACC_W:0]    rem_sh, rem_sub;

  assign term     = negate ? -ACC_W'(m) : ACC_W'(m);
  assign acc_next = (first ? '0 : acc) + term;
  assign rem_sh   = {rem[ACC_W-1:0], quo[ACC_W-1]};
  assign rem_sub  = rem_sh - {1'b0, DIVISOR};
  assign busy     = (state != S_ACC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ACC;
      acc   <= '0;
      neg_q <= 1'b0;
      quo   <= '0;
      rem   <= '0;
      cnt   <= '0;
      done  <= 1'b0;
      coef  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_ACC: if (sample_en) begin
          acc <= acc_next;
          if (last) begin
            // magnitude plus half the divisor rounds the quotient
            neg_q <= acc_next[ACC_W-1];
            quo   <= (acc_next[ACC_W-1] ? ACC_W'(-acc_next) : ACC_W'(acc_next)) + HALF;
            rem   <= '0;
            cnt   <= CNT_W'(ACC_W);
            state <= S_DIV;
          end
        end
        S_DIV: begin
          if (!rem_sub[ACC_W]) begin
            rem <= rem_sub;
            quo <= {quo[ACC_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[ACC_W-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
          if (cnt == 1) state <= S_OUT;
        end
        S_OUT: begin
          logic [ACC_W-1:0] mag;
          mag = quo;
          if (mag > ACC_W'((1 << (D_W-1)) - 1)) mag = ACC_W'((1 << (D_W-1)) - 1);
          coef  <= neg_q ? -D_W'(mag) : D_W'(mag);
          done  <= 1'b1;
          state <= S_ACC;
        end
        default: state <= S_ACC;
      endcase
    end
  end

endmodule
