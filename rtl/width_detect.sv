// width_detect: narrowness flags N1N0 of a 64-bit result.
//
// A value is a 16-bit narrow value when bits 63..15 are all 0 or all 1 (the
// upper 48 bits equal the 16-bit sign bit), and a 34-bit narrow value when bits
// 63..33 are all 0 or all 1. This is the partial zero / all-ones detection on the
// upper 48 and 30 bits that the design hangs off the functional units' existing
// zero detectors. Output encoding: 00 = 16-bit, 01 = 34-bit,
// 11 = regular. Purely combinational. Encoding and bit ranges follow the
// published scheme.
module width_detect
  import abvarf_pkg::*;
(
  input  logic [XLEN-1:0] value,
  output width_t          flags
);
  logic z48, o48, z30, o30;

  always_comb begin
    z48 = ~|value[XLEN-1:15];
    o48 =  &value[XLEN-1:15];
    z30 = ~|value[XLEN-1:33];
    o30 =  &value[XLEN-1:33];
    if (z48 || o48)      flags = W16;
    else if (z30 || o30) flags = W34;
    else                 flags = W64;
  end
endmodule
