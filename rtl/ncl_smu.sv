// Survivor memory unit: ROWS serial-in serial-out shift registers of DEPTH stages
// (default four registers of four stages).
//
// Row r takes bit r of the selected path metric from the add-compare-select unit,
// so on each rising DATA1 rail of the symbol clock the newest path metric enters
// column 0 and the older ones move one column on. mem[k] is the path metric of k
// symbols ago; mem[0] is the survivor's metric, fed back to the adders for the
// next symbol. The four-by-four organisation follows the paper.
module ncl_smu
  import ncl_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned DEPTH = 4
) (
  input  dr_t                        clk,
  input  logic                       rst,
  input  dr_t [ROWS-1:0]             d,
  output dr_t [DEPTH-1:0][ROWS-1:0]  mem
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    dr_t [DEPTH-1:0] taps;
    ncl_sreg #(.LEN(DEPTH)) u_sr (.clk(clk), .rst(rst), .d(d[r]), .taps(taps), .q());
    for (genvar k = 0; k < DEPTH; k++) begin : g_col
      assign mem[k][r] = taps[k];
    end
  end

endmodule
