// Dual-rail NCL half adder.
//
// The sum is the NCL exclusive-OR of x and y. The carry is DATA1 through a TH22
// gate on the two DATA1 rails and DATA0 through a TH12 gate on the two DATA0 rails.
// The carry alone is not input-complete (DATA0 may appear as soon as one input is
// DATA0), but the sum is, so the pair of outputs is complete only when both inputs
// are. Example: x=0, y=1 gives sum=DATA1, carry=DATA0.
module ncl_ha
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t s,
  output dr_t c
);

  ncl_xor u_sum (.x(x), .y(y), .z(s));

  ncl_th #(.N(2), .M(2)) u_c1 (.a({x.r1, y.r1}), .z(c.r1));
  ncl_th #(.N(2), .M(1)) u_c0 (.a({x.r0, y.r0}), .z(c.r0));

endmodule
