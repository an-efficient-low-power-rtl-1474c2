// NCL threshold gate with hysteresis, THmn (optionally with input 0 weighted).
//
// The output is set when the weighted number of high inputs reaches the threshold
// M, and once set it holds until every input is low: Z = set + Z- . hold, with
// hold = OR of all inputs. With the defaults (M=2, N=3) it is the TH23 gate:
// set = AB + AC + BC, hold = A + B + C. M=N gives the C-element (TH22, TH33, ...),
// M=1 an OR gate (TH12, TH13, ...), and W0=2 with M=3, N=4 the weighted TH34w2
// used by the full adder.
//
// The gate is level-sensitive state: it is written as a latch, which is what the
// hysteresis is. For M=1 the set and hold conditions coincide and the gate is a
// plain OR with no state, so lint reports no latch for those instances. It has no reset; it clears when all its inputs are low, so every
// circuit built from it is brought to NULL before its first DATA wave. The weight
// parameter is this design's addition so one module serves all gates.
module ncl_th #(
  parameter int unsigned N  = 3,  // number of inputs
  parameter int unsigned M  = 2,  // threshold
  parameter int unsigned W0 = 1   // weight of input 0
) (
  input  logic [N-1:0] a,
  output logic         z
);

  logic set_c;
  logic hold_c;

  always_comb begin
    int unsigned cnt;
    cnt = a[0] ? W0 : 0;
    for (int i = 1; i < N; i++) cnt += a[i] ? 1 : 0;
    set_c  = (cnt >= M);
    hold_c = |a;
  end

  always_latch begin
    if (set_c)        z = 1'b1;
    else if (!hold_c) z = 1'b0;
  end

endmodule
