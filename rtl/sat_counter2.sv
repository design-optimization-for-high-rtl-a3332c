// sat_counter2: next state of one two-bit saturating up/down counter.
//
// Purely combinational. A taken outcome counts the state up, a not-taken one
// counts it down, and the count sticks at 0 and 3. The prediction is the upper
// bit of the current state: states 2 and 3 predict taken.
//
// Interface: ctr_i is the current state, taken_i the resolved outcome,
// ctr_o the state to write back, predict_o the prediction made from ctr_i.
// The counter's up/down saturating behaviour follows the predictor it serves;
// the state encoding comes from bp_pkg.
module sat_counter2
  import bp_pkg::*;
(
  input  ctr_t ctr_i,
  input  logic taken_i,
  output ctr_t ctr_o,
  output logic predict_o
);

  always_comb begin
    unique case (ctr_i)
      CTR_STRONG_NT: ctr_o = taken_i ? CTR_WEAK_NT  : CTR_STRONG_NT;
      CTR_WEAK_NT:   ctr_o = taken_i ? CTR_WEAK_T   : CTR_STRONG_NT;
      CTR_WEAK_T:    ctr_o = taken_i ? CTR_STRONG_T : CTR_WEAK_NT;
      CTR_STRONG_T:  ctr_o = taken_i ? CTR_STRONG_T : CTR_WEAK_T;
      default:       ctr_o = ctr_i;
    endcase
  end

  assign predict_o = ctr_i[1];

endmodule
