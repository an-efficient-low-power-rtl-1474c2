// Asynchronous ripple up-counter of T flip-flops with dual-rail outputs
// (default 3 bits), the counting half of the branch metric unit.
//
// Every flip-flop has its T input tied high, so it toggles on each active edge of
// its own clock. Stage 0 is clocked by the DATA1 rail of the dual-rail input clk:
// in the branch metric unit that is the exclusive-OR output, so every differing
// bit (a DATA1 wave) adds one. Stage i is clocked by the DATA0 rail of stage i-1,
// which rises when stage i-1 falls from 1 to 0, the carry of a binary up-count. The
// count wraps from 111 to 000. clr clears all stages and pre sets them
// asynchronously (clr wins if both are high). The outputs
// are stored values, so they are always DATA (DATA0 on every bit after clr) and
// change from one DATA value to the next; a consumer that needs NULL waves gates
// them. The ripple structure follows the paper; using the complementary rail
// as the next stage's clock is this design's way of writing it.
module ncl_counter
  import ncl_pkg::*;
#(
  parameter int unsigned W = 3
) (
  input  dr_t         clk,
  input  logic        clr,
  input  logic        pre,
  output dr_t [W-1:0] q
);

  // ck[i] clocks stage i: the DATA1 rail of clk for stage 0, the DATA0 rail
  // (complement) of stage i-1 above it.
  logic [W:0] ck;

  // clr and pre share one asynchronous load: ld loads !clr into every stage.
  logic ld;

  assign ck[0] = clk.r1;
  assign ld    = clr | pre;

  for (genvar i = 0; i < W; i++) begin : g_stage
    logic v;  // true value of this stage
    always_ff @(posedge ck[i] or posedge ld) begin
      if (ld) v <= ~clr;
      else    v <= ~v;
    end
    assign ck[i+1] = ~v;
    assign q[i]    = '{r1: v, r0: ~v};
  end

endmodule
