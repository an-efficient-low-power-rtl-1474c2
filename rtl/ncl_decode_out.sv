// Decoded-output path: per-branch 2-bit symbol registers, a 2:1 selection by the
// decision, and the decoded symbol register.
//
// Each branch's expected code bits enter a SYMW-bit (default 2) serial-in
// serial-out shift register on every rising DATA1 rail of the bit clock bclk, so
// after a symbol's bits each register holds that branch's expected symbol, first
// bit in taps[SYMW-1]. While en is high those stored symbols are released as a
// DATA wave into dual-rail 2:1 multiplexers whose select is the decision wave dec
// from the add-compare-select unit (DATA1 picks branch 0). On the rising DATA1
// rail of the symbol clock sclk the chosen symbol is captured into vd_out, and
// dec into dec_q.
//
// The same registers also give the decoded stream serially: during the next
// symbol's bits each branch register's serial output presents the previous
// symbol's bits in order (one bit per bclk), and vd_ser selects the surviving
// branch's one by dec_q. vd_ser is a stored value (always DATA), valid from
// sclk until the first bclk of the next symbol for the first bit and between
// that bclk and the second for the second bit. A 2:1 multiplexer and a 2-bit
// shift register for the decoded output follow the paper; the parallel
// symbol register and the exact wiring are this design's choices.
module ncl_decode_out
  import ncl_pkg::*;
#(
  parameter int unsigned SYMW = 2
) (
  input  dr_t            bclk,
  input  dr_t            sclk,
  input  logic           rst,
  input  logic           en,
  input  dr_t            e0,
  input  dr_t            e1,
  input  dr_t            dec,
  output dr_t [SYMW-1:0] vd_out,
  output dr_t            dec_q,
  output dr_t            vd_ser
);

  dr_t [SYMW-1:0] sym0, sym1;     // stored expected symbols
  dr_t [SYMW-1:0] w0, w1;         // the same, as a DATA/NULL wave
  dr_t [SYMW-1:0] chosen;
  dr_t            so0, so1;       // serial outputs: the previous symbol's bits

  ncl_sreg #(.LEN(SYMW)) u_sr0 (.clk(bclk), .rst(rst), .d(e0), .taps(sym0), .q(so0));
  ncl_sreg #(.LEN(SYMW)) u_sr1 (.clk(bclk), .rst(rst), .d(e1), .taps(sym1), .q(so1));

  ncl_gate #(.W(SYMW)) u_g0 (.en(en), .d(sym0), .q(w0));
  ncl_gate #(.W(SYMW)) u_g1 (.en(en), .d(sym1), .q(w1));

  ncl_sel #(.W(SYMW)) u_mux (.s(dec), .a(w0), .b(w1), .f(chosen));

  // Both inputs are stored values, so a plain selection suffices here.
  assign vd_ser = dec_q.r1 ? so0 : so1;

  always_ff @(posedge sclk.r1 or posedge rst) begin
    if (rst) begin
      vd_out <= {SYMW{DR_DATA0}};
      dec_q  <= DR_DATA0;
    end else begin
      vd_out <= chosen;
      dec_q  <= dec;
    end
  end

endmodule
