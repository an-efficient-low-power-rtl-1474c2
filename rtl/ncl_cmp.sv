// Dual-rail NCL magnitude comparator (default 4 bits) with LT, EQ and GT outputs.
//
// Unsigned a and b are compared by a chain of bit slices from the most significant
// bit down; each slice passes a 1-of-3 {GT, EQ, LT} code to the next (see
// ncl_cmp_slice). The final code gives the three dual-rail outputs: lt is DATA1
// when a < b and DATA0 otherwise, and likewise eq and gt. The outputs become DATA
// only after every input bit is DATA and go NULL after all are NULL. The
// paper gives the ports and the function; the slice structure is this design's.
module ncl_cmp
  import ncl_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  output dr_t         lt,
  output dr_t         eq,
  output dr_t         gt
);

  // c[i] is the code after bits W-1 .. i have been compared.
  logic [W:0][2:0] c;
  assign c[W] = 3'b000;

  for (genvar i = W - 1; i >= 0; i--) begin : g_slice
    ncl_cmp_slice #(.FIRST(i == W - 1)) u_slice (
      .cin(c[i+1]), .a(a[i]), .b(b[i]), .cout(c[i]));
  end

  assign gt.r1 = c[0][2];
  assign eq.r1 = c[0][1];
  assign lt.r1 = c[0][0];
  ncl_th #(.N(2), .M(1)) u_gt0 (.a({c[0][1], c[0][0]}), .z(gt.r0));
  ncl_th #(.N(2), .M(1)) u_eq0 (.a({c[0][2], c[0][0]}), .z(eq.r0));
  ncl_th #(.N(2), .M(1)) u_lt0 (.a({c[0][2], c[0][1]}), .z(lt.r0));

endmodule
