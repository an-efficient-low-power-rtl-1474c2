// Dual-rail NCL exclusive-OR.
//
// Each of the four input combinations has its own TH22 (C-element) gate; the two
// combinations with x != y are ORed by a TH12 gate into z.r1, the other two into
// z.r0. The output therefore becomes DATA only when both inputs are DATA, and
// returns to NULL only when both inputs are NULL. In the branch metric unit a
// rising z.r1 marks one differing bit. The minterm structure is the usual NCL
// form; the paper gives only the gate's ports and function.
module ncl_xor
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t z
);

  logic m00, m01, m10, m11;

  ncl_th #(.N(2), .M(2)) u_m00 (.a({x.r0, y.r0}), .z(m00));
  ncl_th #(.N(2), .M(2)) u_m01 (.a({x.r0, y.r1}), .z(m01));
  ncl_th #(.N(2), .M(2)) u_m10 (.a({x.r1, y.r0}), .z(m10));
  ncl_th #(.N(2), .M(2)) u_m11 (.a({x.r1, y.r1}), .z(m11));

  ncl_th #(.N(2), .M(1)) u_z1 (.a({m01, m10}), .z(z.r1));
  ncl_th #(.N(2), .M(1)) u_z0 (.a({m00, m11}), .z(z.r0));

endmodule
