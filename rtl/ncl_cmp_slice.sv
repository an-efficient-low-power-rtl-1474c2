// One bit slice of the dual-rail magnitude comparator.
//
// The result of the more significant bits arrives as a 1-of-3 code on three rails,
// cin = {GT, EQ, LT}, exactly one of which is high in a DATA wave and none in a
// NULL wave. The slice forms one TH33 minterm gate for every combination of that
// code with the two dual-rail bits a and b, and ORs them into the slice's own
// 1-of-3 result: GT stays GT and LT stays LT whatever the bits; EQ becomes GT for
// a=1,b=0, LT for a=0,b=1 and stays EQ otherwise. Because every minterm includes
// a, b and cin, the result waits for all of them. The most significant slice
// (FIRST=1) has no cin and uses TH22 minterms of a and b alone.
module ncl_cmp_slice
  import ncl_pkg::*;
#(
  parameter bit FIRST = 1'b0
) (
  input  logic [2:0] cin,   // {GT, EQ, LT} from the more significant bits
  input  dr_t        a,
  input  dr_t        b,
  output logic [2:0] cout   // {GT, EQ, LT} including this bit
);

  localparam int GT = 2, EQ = 1, LT = 0;

  logic [1:0] ar, br;
  assign ar = {a.r1, a.r0};
  assign br = {b.r1, b.r0};

  if (FIRST) begin : g_first
    logic m00, m01, m10, m11;
    ncl_th #(.N(2), .M(2)) u_m00 (.a({ar[0], br[0]}), .z(m00));
    ncl_th #(.N(2), .M(2)) u_m01 (.a({ar[0], br[1]}), .z(m01));
    ncl_th #(.N(2), .M(2)) u_m10 (.a({ar[1], br[0]}), .z(m10));
    ncl_th #(.N(2), .M(2)) u_m11 (.a({ar[1], br[1]}), .z(m11));
    assign cout[GT] = m10;
    assign cout[LT] = m01;
    ncl_th #(.N(2), .M(1)) u_eq (.a({m00, m11}), .z(cout[EQ]));
    logic unused;
    assign unused = ^cin;
  end else begin : g_rest
    // m[k][x][y]: cin rail k, a = x, b = y
    logic [2:0][1:0][1:0] m;
    for (genvar k = 0; k < 3; k++) begin : g_k
      for (genvar x = 0; x < 2; x++) begin : g_x
        for (genvar y = 0; y < 2; y++) begin : g_y
          ncl_th #(.N(3), .M(3)) u_m (.a({cin[k], ar[x], br[y]}), .z(m[k][x][y]));
        end
      end
    end
    ncl_th #(.N(5), .M(1)) u_gt (
      .a({m[GT][0][0], m[GT][0][1], m[GT][1][0], m[GT][1][1], m[EQ][1][0]}), .z(cout[GT]));
    ncl_th #(.N(5), .M(1)) u_lt (
      .a({m[LT][0][0], m[LT][0][1], m[LT][1][0], m[LT][1][1], m[EQ][0][1]}), .z(cout[LT]));
    ncl_th #(.N(2), .M(1)) u_eq (.a({m[EQ][0][0], m[EQ][1][1]}), .z(cout[EQ]));
  end

endmodule
