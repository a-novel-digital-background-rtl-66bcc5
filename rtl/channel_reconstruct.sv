// channel_reconstruct: digital reconstruction of one pipeline channel.
//
// Each 1.5-bit stage decides k in {-1,0,+1} from its two comparators (k = -1
// below -Vref/4, 0 between, +1 above +Vref/4). What the stage's sub-DAC took
// away, k times its reference, is added back digitally:
//     d_out = be_code * 2^FRAC + sum_s k_s * coef[s]
// coef[s] is the digital equivalent of the stage's actual analog reference,
// i.e. its reference correction factor times Vref, in D-domain units (see
// cal_pkg). This is the digital correction of a 1.5 bit/stage pipeline, with
// the divisions by two of each stage folded into the weight of coef: stage 0
// (the first) is nominally 2^(BE_BITS-1+NCAL-1) and the last calibrated stage
// 2^(BE_BITS-1), times 2^FRAC.
//
// The correction itself is the standard one for 1.5 bit/stage pipelines;
// reading a crossed comparator pair (d0=0, d1=1) as k = 0 and the fixed-point
// format are this design's choices.
//
// Purely combinational; the caller registers the result.
module channel_reconstruct
  import cal_pkg::*;
#(
  parameter int NCAL    = 2,   // calibrated front-end stages
  parameter int BE_BITS = 10,  // backend resolution
  parameter int FRAC    = 6,   // fractional bits of the D domain
  parameter int D_W     = 20   // width of a D-domain value
) (
  input  logic signed [BE_BITS-1:0] be_code,
  input  logic        [NCAL-1:0]    d0,       // comparator at -Vref/4, per stage
  input  logic        [NCAL-1:0]    d1,       // comparator at +Vref/4, per stage
  input  logic signed [D_W-1:0]     coef [NCAL],
  output logic signed [D_W-1:0]     d_out
);

  always_comb begin
    logic signed [D_W-1:0] acc;
    acc = D_W'(be_code) <<< FRAC;
    for (int s = 0; s < NCAL; s++) begin
      unique case (decide_k(d0[s], d1[s]))
        2'sb01:  acc = acc + coef[s];
        2'sb11:  acc = acc - coef[s];
        default: ;
      endcase
    end
    d_out = acc;
  end

endmodule
