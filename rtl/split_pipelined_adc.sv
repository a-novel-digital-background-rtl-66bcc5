// split_pipelined_adc: a two-channel "split" 12-bit pipelined ADC with digital
// background calibration of the reference errors of its first two stages.
//
// Each channel is a chain of NCAL 1.5 bit/stage stages (mdac_stage_model)
// followed by an ideal BE_BITS backend (backend_adc_model): 2 + 10 = 12 bits.
// Both channels convert the same input vin. One resistor string
// (ref_ladder_model) supplies the calibration voltages V1 and V2 to whichever
// stage is in calibration mode. The synthesizable split_adc_cal_core
// reconstructs both channels, learns the channel mismatch, measures every
// stage's digital reference in the background and produces dout.
//
// The analog parts are behavioural models in real arithmetic, so this top is
// for simulation; the core is the synthesizable part. Capacitor ratios,
// amplifier gains and comparator offsets are parameters per channel and
// stage (index 0 = first stage). The defaults give 60 dB amplifiers and
// capacitor ratios about 0.1 % off nominal, with different errors in every
// stage of both channels, and a few comparator offsets inside the
// +/-Vref/4 redundancy.
//
// Timing: vin is sampled at the rising edge of clk (one conversion per clock);
// dout for it appears 3 clocks later with dout_valid. rst_n is the core's
// asynchronous reset (see split_adc_cal_core for the lint note on it).
module split_pipelined_adc #(
  parameter int  NCAL     = 2,
  parameter int  BE_BITS  = 10,
  parameter int  FRAC     = 6,
  parameter int  D_W      = 20,
  parameter int  OUT_BITS = 12,
  parameter int  CH_W     = 20,
  parameter int  CH_FRAC  = 16,
  parameter int  MU_LSB   = 1,
  parameter int  N_LMS    = 16384,
  parameter int  N_REP    = 100,
  parameter real VREF     = 1.0,
  parameter real A_GAIN   = 1000.0,
  parameter real TAP_ERR  = 0.002,
  parameter real CS_CF_A [NCAL] = '{1.0010, 0.9990},
  parameter real CE_CF_A [NCAL] = '{0.9993, 1.0008},
  parameter real CS_CF_B [NCAL] = '{0.9991, 1.0006},
  parameter real CE_CF_B [NCAL] = '{1.0009, 0.9994},
  parameter real OFS_A   [NCAL] = '{0.02, -0.01},
  parameter real OFS_B   [NCAL] = '{-0.015, 0.01}
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cal_enable,
  input  real                        vin,
  output logic signed [OUT_BITS-1:0] dout,
  output logic                       dout_valid,
  output logic                       cal_done,
  output logic signed [CH_W-1:0]     ch_mis,
  output logic signed [D_W-1:0]      coef_a [NCAL],
  output logic signed [D_W-1:0]      coef_b [NCAL]
);

  logic [NCAL-1:0] cal_en_a, cal_en_b;
  logic [NCAL-1:0] d0_a, d1_a, d0_b, d1_b;
  logic [3:0]      v1_code, v2_code;
  real             v1, v2;
  logic signed [BE_BITS-1:0] be_a, be_b;

  ref_ladder_model #(.VREF(VREF), .TAP_ERR(TAP_ERR)) u_ladder (
    .v1_code, .v2_code, .v1, .v2);

  for (genvar s = 0; s < NCAL; s++) begin : g_stage
    real vin_a, vin_b, vres_a, vres_b;
    if (s == 0) begin : g_first
      assign vin_a = vin;
      assign vin_b = vin;
    end else begin : g_next
      assign vin_a = g_stage[s-1].vres_a;
      assign vin_b = g_stage[s-1].vres_b;
    end
    mdac_stage_model #(.CS_CF(CS_CF_A[s]), .CE_CF(CE_CF_A[s]), .A_GAIN(A_GAIN),
                       .VREF(VREF), .OFS0(OFS_A[s]), .OFS1(-OFS_A[s])) u_a (
      .vin(vin_a), .cal_en(cal_en_a[s]), .v1, .v2,
      .d0(d0_a[s]), .d1(d1_a[s]), .vres(vres_a));
    mdac_stage_model #(.CS_CF(CS_CF_B[s]), .CE_CF(CE_CF_B[s]), .A_GAIN(A_GAIN),
                       .VREF(VREF), .OFS0(OFS_B[s]), .OFS1(-OFS_B[s])) u_b (
      .vin(vin_b), .cal_en(cal_en_b[s]), .v1, .v2,
      .d0(d0_b[s]), .d1(d1_b[s]), .vres(vres_b));
  end

  backend_adc_model #(.BITS(BE_BITS), .VREF(VREF)) u_be_a (.vin(g_stage[NCAL-1].vres_a), .code(be_a));
  backend_adc_model #(.BITS(BE_BITS), .VREF(VREF)) u_be_b (.vin(g_stage[NCAL-1].vres_b), .code(be_b));

  split_adc_cal_core #(
    .NCAL(NCAL), .BE_BITS(BE_BITS), .FRAC(FRAC), .D_W(D_W), .OUT_BITS(OUT_BITS),
    .CH_W(CH_W), .CH_FRAC(CH_FRAC), .MU_LSB(MU_LSB), .N_LMS(N_LMS), .N_REP(N_REP)
  ) u_core (
    .clk, .rst_n, .cal_enable,
    .be_a, .d0_a, .d1_a, .be_b, .d0_b, .d1_b,
    .cal_en_a, .cal_en_b, .v1_code, .v2_code,
    .dout, .dout_valid, .cal_done, .ch_mis, .coef_a, .coef_b
  );

endmodule
