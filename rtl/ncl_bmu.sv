// Branch metric unit: Hamming distance between the received and the expected bit
// streams.
//
// The received and expected code bits arrive one at a time as dual-rail waves
// (DATA, then NULL). An NCL exclusive-OR compares each pair; a differing pair
// makes its output DATA1, whose rising DATA1 rail clocks the 3-bit ripple counter.
// After the bits of one code symbol the counter holds the number of differing
// bits, the branch metric. clr, pulsed at the start of each symbol, clears it. The
// output is the counter's stored value (always DATA). The counter's preset is
// not needed here and is held low.
module ncl_bmu
  import ncl_pkg::*;
#(
  parameter int unsigned W = 3
) (
  input  dr_t         rx,
  input  dr_t         ex,
  input  logic        clr,
  output dr_t [W-1:0] bm
);

  dr_t diff;

  ncl_xor u_xor (.x(rx), .y(ex), .z(diff));

  ncl_counter #(.W(W)) u_cnt (.clk(diff), .clr(clr), .pre(1'b0), .q(bm));

endmodule
