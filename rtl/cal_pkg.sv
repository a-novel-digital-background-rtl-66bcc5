// cal_pkg: types and constants shared by the split-ADC calibration logic.
//
// Number format. Every channel code ("D domain") is a signed fixed-point value
// in units of one backend LSB at the residue of the last calibrated stage,
// with FRAC fractional bits. With a 10-bit backend spanning [-Vref, Vref), Vref
// at that node is 512 LSB, so the ideal digital reference of the last
// calibrated stage is 512 and that of the stage before it is 1024 (it is seen
// through one more gain of two). A 12-bit output code is the integer part.
//
// The eight calibration steps follow the measurement of the reference
// correction factor: step i (1..8) sets V1 = (8-i)/8 Vref and V2 = (9-i)/8 Vref
// for odd i, and V1 = (9-i)/8 Vref, V2 = (8-i)/8 Vref for even i. The tap codes
// below are those numerators (tap n = n/8 Vref). Steps are numbered 0..7 in
// the logic, so logic step s is step i = s+1 of that procedure.
package cal_pkg;

  // Which channel a calibration phase works on.
  typedef enum logic {
    CH_A = 1'b0,
    CH_B = 1'b1
  } chan_e;

  // How the output code is formed for one sample.
  typedef enum logic [1:0] {
    OUT_AVG    = 2'd0,  // mean of both channels (normal split operation)
    OUT_A_ONLY = 2'd1,  // channel B carries a calibration signal
    OUT_B_ONLY = 2'd2   // channel A carries a calibration signal
  } out_sel_e;

  // Per-sample tag: what the sample taken at a clock edge is used for. It
  // travels down the pipeline of the core together with the sample.
  typedef struct packed {
    logic       lms;     // LMS phase: update the channel mismatch factor
    logic       cal;     // a stage carries the calibration signal
    chan_e      ch;      // channel under calibration
    logic [1:0] stage;   // stage under calibration, 0 = first stage
    logic [2:0] step;    // calibration step 0..7 (i = step+1)
    logic       first;   // first sample of a measurement
    logic       last;    // last sample of a measurement
  } tag_t;

  // Ladder tap numerators of V1 and V2 for a step 0..7.
  function automatic logic [3:0] v1_tap(input logic [2:0] step);
    // i = step+1; odd i (step even): 8-i = 7-step ; even i: 9-i = 8-step
    return step[0] ? 4'(8 - step) : 4'(7 - step);
  endfunction

  function automatic logic [3:0] v2_tap(input logic [2:0] step);
    // odd i: 9-i = 8-step ; even i: 8-i = 7-step
    return step[0] ? 4'(7 - step) : 4'(8 - step);
  endfunction

  // Stage decision k in {-1,0,+1} from the two comparator outputs:
  // k = d0 + d1 - 1 (a crossed pair 0/1 reads as 0).
  function automatic logic signed [1:0] decide_k(input logic d0, input logic d1);
    return 2'(signed'({1'b0, d0}) + signed'({1'b0, d1}) - 2'sd1);
  endfunction

endpackage
