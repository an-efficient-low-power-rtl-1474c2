// Serial-in serial-out shift register of dual-rail values with a dual-rail clock
// (default 4 stages).
//
// When the DATA1 rail of clk rises, the value on d is captured into stage 0 and
// every stage moves one place on; stage LEN-1 is the serial output q. All stages
// are visible on taps, taps[0] being the newest. The dual-rail pair is stored as
// it is, so a stage holds whatever symbol d carried at the edge. rst clears every
// stage to DATA0 asynchronously (the reset is this design's addition).
module ncl_sreg
  import ncl_pkg::*;
#(
  parameter int unsigned LEN = 4
) (
  input  dr_t           clk,
  input  logic          rst,
  input  dr_t           d,
  output dr_t [LEN-1:0] taps,
  output dr_t           q
);

  always_ff @(posedge clk.r1 or posedge rst) begin
    if (rst)           taps <= {LEN{DR_DATA0}};
    else if (LEN == 1) taps[0] <= d;
    else               taps <= {taps[LEN-2:0], d};
  end

  assign q = taps[LEN-1];

endmodule
