// ch_mismatch_lms: sign-sign LMS estimate of the gain mismatch of the two
// channels of the split ADC.
//
// Channel B's code is scaled by (1 + ch_mis) before it is compared with
// channel A. For each sample with update_en set, the error is
// eps = d_b_corr - d_a and the factor moves by one step against the sign of
// eps * d_a:
//     ch_mis <= ch_mis - MU_LSB * sign(eps) * sign(d_a)
// ch_mis is a signed fraction; with 16 fractional bits, as used in the core,
// MU_LSB = 1 is a step size of 2^-16. A zero error or zero code leaves the factor alone,
// and the factor saturates at the ends of its range.
//
// The update rule and step size follow the technique; taking the error after
// the correction, holding on a zero sign and saturating are this design's.
//
// Timing: one step per clock with update_en; ch_mis is registered.
module ch_mismatch_lms #(
  parameter int D_W     = 20,
  parameter int CH_W    = 20,  // width of ch_mis
  parameter int MU_LSB  = 1    // step size in LSB of ch_mis
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   update_en,
  input  logic signed [D_W-1:0]  d_a,
  input  logic signed [D_W-1:0]  d_b_corr,
  output logic signed [CH_W-1:0] ch_mis
);

  localparam logic signed [CH_W:0] MAXV = (CH_W+1)'((1 << (CH_W-1)) - 1);
  localparam logic signed [CH_W:0] MINV = -(CH_W+1)'(1 << (CH_W-1));

  logic signed [D_W:0]  eps;
  logic signed [1:0]    s_eps, s_da, s_prod;
  logic signed [CH_W:0] next;

  assign eps = (D_W+1)'(d_b_corr) - (D_W+1)'(d_a);

  always_comb begin
    s_eps  = (eps == 0) ? 2'sd0 : (eps < 0 ? -2'sd1 : 2'sd1);
    s_da   = (d_a == 0) ? 2'sd0 : (d_a < 0 ? -2'sd1 : 2'sd1);
    s_prod = 2'(s_eps * s_da);
    next   = (CH_W+1)'(ch_mis) - (CH_W+1)'(s_prod) * (CH_W+1)'(MU_LSB);
    if (next > MAXV) next = MAXV;
    if (next < MINV) next = MINV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ch_mis <= '0;
    else if (update_en) ch_mis <= CH_W'(next);
  end

endmodule
