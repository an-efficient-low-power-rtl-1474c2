// Add-compare-select unit.
//
// Two ripple adders add each branch's metric to the previous path metric; the
// 4-bit comparator compares the two sums, and its LT output selects the smaller
// through four 2:1 multiplexers. dec is that LT output: DATA1 when branch 0's sum
// is smaller (branch 0 survives), DATA0 otherwise, so a tie goes to branch 1.
// Everything is dual-rail NCL: with all inputs DATA the outputs settle to DATA,
// with all inputs NULL they return to NULL. The structure follows the paper;
// the tie rule comes from selecting on LT.
module ncl_acsu
  import ncl_pkg::*;
#(
  parameter int unsigned BMW = 3,
  localparam int unsigned PMW = BMW + 1  // sum width: BMW bits plus carry
) (
  input  dr_t [BMW-1:0] pm,
  input  dr_t [BMW-1:0] bm0,
  input  dr_t [BMW-1:0] bm1,
  output dr_t [PMW-1:0] pm_new,
  output dr_t           dec,
  output dr_t           eq,
  output dr_t           gt
);

  dr_t [PMW-1:0] sum0, sum1;

  ncl_adder #(.W(BMW)) u_add0 (.a(pm), .b(bm0), .s(sum0));
  ncl_adder #(.W(BMW)) u_add1 (.a(pm), .b(bm1), .s(sum1));

  ncl_cmp #(.W(PMW)) u_cmp (.a(sum0), .b(sum1), .lt(dec), .eq(eq), .gt(gt));

  ncl_sel #(.W(PMW)) u_sel (.s(dec), .a(sum0), .b(sum1), .f(pm_new));

endmodule
