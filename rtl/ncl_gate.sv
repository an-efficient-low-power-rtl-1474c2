// Wave gate: turns stored dual-rail values into NCL DATA/NULL waves.
//
// Registers hold DATA at all times and change from one DATA value to another,
// which threshold gates with hysteresis cannot follow. This gate ANDs every rail
// with the single-rail enable en: with en low the output is NULL, with en high it
// is the stored value. Holding en low while the stored value changes and raising
// it afterwards gives the downstream logic a clean NULL-then-DATA sequence. It is
// this design's sequencing element; the paper does not describe one.
module ncl_gate
  import ncl_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  logic        en,
  input  dr_t [W-1:0] d,
  output dr_t [W-1:0] q
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign q[i] = '{r1: d[i].r1 & en, r0: d[i].r0 & en};
  end

endmodule
