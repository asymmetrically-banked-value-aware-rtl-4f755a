// width_verify: width check of one write-back result.
//
// The result's narrowness flags come from width_detect. The destination
// physical register id names its bank and so the width that rename reserved for
// the result (the predicted width, or a wider one when the narrow free list was
// empty). A result wider than its register is a width misprediction and must
// start recovery; a result narrower than its register (over-prediction) is
// treated as correct. Purely combinational. The rule is the published one;
// this block only gives it a place at each write-back port.
module width_verify
  import abvarf_pkg::*;
(
  input  logic [XLEN-1:0] value,
  input  preg_t           preg,
  output width_t          flags,
  output logic            misfit
);
  width_detect u_det (.value(value), .flags(flags));

  always_comb misfit = too_wide(flags, class_of(preg));
endmodule
