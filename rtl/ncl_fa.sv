// Dual-rail NCL full adder (standard NCL form).
//
// Carry: co.r1 = TH23(x1, y1, ci1) and co.r0 = TH23(x0, y0, ci0), a majority of
// the like rails. Sum: s.r1 = TH34w2(co0, x1, y1, ci1) and s.r0 = TH34w2(co1, x0,
// y0, ci0), where the carry rail of the opposite value has weight 2. The sum
// rails wait for the carry, so the outputs are complete only when all three
// inputs are. This structure is this design's choice; the paper only names the
// adder unit and its ports.
module ncl_fa
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  input  dr_t ci,
  output dr_t s,
  output dr_t co
);

  ncl_th #(.N(3), .M(2)) u_co1 (.a({x.r1, y.r1, ci.r1}), .z(co.r1));
  ncl_th #(.N(3), .M(2)) u_co0 (.a({x.r0, y.r0, ci.r0}), .z(co.r0));

  // Input 0 carries weight 2.
  ncl_th #(.N(4), .M(3), .W0(2)) u_s1 (.a({ci.r1, y.r1, x.r1, co.r0}), .z(s.r1));
  ncl_th #(.N(4), .M(3), .W0(2)) u_s0 (.a({ci.r0, y.r0, x.r0, co.r1}), .z(s.r0));

endmodule
