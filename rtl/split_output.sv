// split_output: forms the output code of the split ADC.
//
// Normally the output is the mean of the two channel codes, which is what
// makes a split ADC as quiet as one converter of twice the capacitance. While
// one channel carries a calibration signal its code is not used and the other
// channel's code is passed on alone (sel). The D-domain value (FRAC fractional
// bits) is rounded to the nearest integer and saturated to OUT_BITS.
//
// The mean of the channels follows the split-ADC principle; the single-channel
// output during a measurement, rounding and saturation are this design's.
//
// Timing: one registered stage; dout_valid follows in_valid by one clock.
module split_output
  import cal_pkg::*;
#(
  parameter int D_W      = 20,
  parameter int FRAC     = 6,
  parameter int OUT_BITS = 12
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [D_W-1:0]      d_a,
  input  logic signed [D_W-1:0]      d_b,
  input  out_sel_e                   sel,
  output logic signed [OUT_BITS-1:0] dout,
  output logic                       dout_valid
);

  localparam logic signed [D_W:0] OMAX = (D_W+1)'((1 << (OUT_BITS-1)) - 1);
  localparam logic signed [D_W:0] OMIN = -(D_W+1)'(1 << (OUT_BITS-1));

  logic signed [D_W+1:0] twice;   // 2x the chosen value, FRAC fraction bits
  logic signed [D_W+1:0] rounded;
  logic signed [D_W:0]   ival;

  always_comb begin
    unique case (sel)
      OUT_A_ONLY: twice = (D_W+2)'(d_a) <<< 1;
      OUT_B_ONLY: twice = (D_W+2)'(d_b) <<< 1;
      default:    twice = (D_W+2)'(d_a) + (D_W+2)'(d_b);
    endcase
    // value = twice / 2^(FRAC+1), rounded half up
    rounded = twice + (D_W+2)'(1 << FRAC);
    ival    = (D_W+1)'(rounded >>> (FRAC + 1));
    if (ival > OMAX) ival = OMAX;
    if (ival < OMIN) ival = OMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout       <= OUT_BITS'(ival);
      dout_valid <= in_valid;
    end
  end

endmodule
