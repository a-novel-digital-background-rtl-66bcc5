// ref_ladder_model: behavioural model (not synthesizable logic) of the
// resistor string that produces the calibration voltages V1 and V2.
//
// Nine taps divide Vref into eighths: tap n = n/8 Vref plus an error. The end
// taps are the string's ends, ground and Vref, and carry no error; the inner
// taps 1..7 are off by TAP_ERR * Vref times a fixed pattern
// (+1, -1, +0.5, -0.5, +1, -1, +0.5), standing for resistor mismatch. The
// calibration result does not depend on these errors, which this model lets
// a simulation show. Codes above 8 read as tap 8. Combinational.
module ref_ladder_model #(
  parameter real VREF    = 1.0,
  parameter real TAP_ERR = 0.002
) (
  input  logic [3:0] v1_code,
  input  logic [3:0] v2_code,
  output real        v1,
  output real        v2
);

  function automatic real tap(input logic [3:0] code);
    real pattern [8] = '{0.0, 1.0, -1.0, 0.5, -0.5, 1.0, -1.0, 0.5};
    if (code >= 4'd8) return VREF;
    return VREF * real'(code) / 8.0 + TAP_ERR * VREF * pattern[code[2:0]];
  endfunction

  always_comb begin
    v1 = tap(v1_code);
    v2 = tap(v2_code);
  end

endmodule
