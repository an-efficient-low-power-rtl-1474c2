// Dual-rail NCL 2:1 multiplexer for one bit.
//
// select DATA1 passes a, select DATA0 passes b. Each output rail is the OR (TH12)
// of two TH22 gates: f.r = TH12(TH22(s1, a.r), TH22(s0, b.r)). The output is DATA
// once the select and the chosen input are DATA, and returns to NULL when they
// are NULL.
module ncl_mux2
  import ncl_pkg::*;
(
  input  dr_t s,
  input  dr_t a,
  input  dr_t b,
  output dr_t f
);

  logic a1, a0, b1, b0;

  ncl_th #(.N(2), .M(2)) u_a1 (.a({s.r1, a.r1}), .z(a1));
  ncl_th #(.N(2), .M(2)) u_a0 (.a({s.r1, a.r0}), .z(a0));
  ncl_th #(.N(2), .M(2)) u_b1 (.a({s.r0, b.r1}), .z(b1));
  ncl_th #(.N(2), .M(2)) u_b0 (.a({s.r0, b.r0}), .z(b0));

  ncl_th #(.N(2), .M(1)) u_f1 (.a({a1, b1}), .z(f.r1));
  ncl_th #(.N(2), .M(1)) u_f0 (.a({a0, b0}), .z(f.r0));

endmodule
