// mdac_stage_model: behavioural model (not synthesizable logic) of one
// 1.5 bit/stage pipeline stage with a flip-around MDAC that has an extra
// calibration capacitor C_E.
//
// Sub-ADC: two comparators at -Vref/4 (d0) and +Vref/4 (d1), with optional
// offsets; k = d0 + d1 - 1 selects -Vref, 0 or +Vref as sub-DAC output.
// Normal mode (cal_en low), capacitor flip-around MDAC with an amplifier of
// finite DC gain A:
//     vres = g * ((1 + Cs/Cf) vin - (Cs/Cf) k Vref),  g = 1 / (1 + (1 + Cs/Cf)/A)
// Calibration mode (cal_en high): in the sampling phase C_F samples V1 while
// C_S and C_E sample the input; in the amplifying phase C_S is switched to V2
// and C_E to the sub-DAC voltage:
//     vres = g * (V1 + (Cs/Cf + Ce/Cf) vin - (Cs/Cf) V2 - (Ce/Cf) k Vref)
// The same g is used in both modes, as in the measurement it models. Reading
// C_E as equal to C_S, and the comparator offsets, are this model's choices.
// Combinational in real arithmetic: the surrounding logic samples the
// comparator outputs and the following stages at the conversion clock.
module mdac_stage_model #(
  parameter real CS_CF  = 1.0,     // Cs/Cf, nominally 1
  parameter real CE_CF  = 1.0,     // Ce/Cf, nominally 1
  parameter real A_GAIN = 1000.0,  // amplifier DC gain (60 dB)
  parameter real VREF   = 1.0,
  parameter real OFS0   = 0.0,     // offset of the -Vref/4 comparator
  parameter real OFS1   = 0.0      // offset of the +Vref/4 comparator
) (
  input  real  vin,
  input  logic cal_en,
  input  real  v1,
  input  real  v2,
  output logic d0,
  output logic d1,
  output real  vres
);

  localparam real G = 1.0 / (1.0 + (1.0 + CS_CF) / A_GAIN);

  real k;

  always_comb begin
    d0 = (vin > -VREF / 4.0 + OFS0);
    d1 = (vin >  VREF / 4.0 + OFS1);
    k  = real'(int'(d0) + int'(d1) - 1);
    if (cal_en)
      vres = G * (v1 + (CS_CF + CE_CF) * vin - CS_CF * v2 - CE_CF * k * VREF);
    else
      vres = G * ((1.0 + CS_CF) * vin - CS_CF * k * VREF);
  end

endmodule
