// Selector of the add-compare-select unit: W (default four) dual-rail 2:1
// multiplexers sharing one dual-rail select.
//
// select DATA1 passes the a word, DATA0 the b word. In the decoder the select is
// the comparator's LT output, so the smaller of the two sums is passed (a on
// a < b, b otherwise, including a tie).
module ncl_sel
  import ncl_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  dr_t         s,
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  output dr_t [W-1:0] f
);

  for (genvar i = 0; i < W; i++) begin : g_mux
    ncl_mux2 u_mux (.s(s), .a(a[i]), .b(b[i]), .f(f[i]));
  end

endmodule
