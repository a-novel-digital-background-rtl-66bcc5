// backend_adc_model: behavioural model (not synthesizable logic) of the
// backend ADC that stands for all stages after the calibrated ones.
//
// An ideal BITS-bit quantizer of [-Vref, Vref): code = floor(vin / Vref *
// 2^(BITS-1)), two's complement, clipped at both ends. Combinational.
// An ideal 10-bit backend is what the technique was evaluated with; the
// floor quantizer and the code format are this model's choices.
module backend_adc_model #(
  parameter int  BITS = 10,
  parameter real VREF = 1.0
) (
  input  real                     vin,
  output logic signed [BITS-1:0]  code
);

  localparam int CMAX = (1 << (BITS - 1)) - 1;
  localparam int CMIN = -(1 << (BITS - 1));

  always_comb begin
    real x;
    int  c;
    x = vin / VREF * real'(1 << (BITS - 1));
    if (x >= real'(CMAX))      c = CMAX;
    else if (x < real'(CMIN))  c = CMIN;
    else                       c = $rtoi($floor(x));
    code = BITS'(c);
  end

endmodule
