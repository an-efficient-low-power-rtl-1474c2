// Dual-rail ripple adder of the add-compare-select unit (default 3 bits).
//
// Adds the path metric a and the branch metric b, both W dual-rail bits, and
// returns W+1 bits: the sum bits and the carry out as the most significant bit
// (the paper's s3 s2 s1 and cout, which the comparator takes as a 4-bit
// value). Bit 0 is a half adder, the upper bits full adders; the result is a DATA
// wave once both operands are DATA and returns to NULL when both are NULL.
module ncl_adder
  import ncl_pkg::*;
#(
  parameter int unsigned W = 3
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  output dr_t [W:0]   s
);

  dr_t [W:1] c;  // c[i] is the carry into bit i

  ncl_ha u_ha (.x(a[0]), .y(b[0]), .s(s[0]), .c(c[1]));

  for (genvar i = 1; i < W; i++) begin : g_fa
    ncl_fa u_fa (.x(a[i]), .y(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign s[W] = c[W];

endmodule
