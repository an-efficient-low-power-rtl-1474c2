// Testbench for ncl_decode_out (2-bit symbols): for each symbol two expected bits
// per branch are clocked in with bclk, a random decision wave is applied with en
// high, and sclk captures; vd_out must be the symbol of branch 0 when the
// decision is DATA1 and of branch 1 otherwise, and dec_q the decision. During
// the next symbol vd_ser must present that decoded symbol bit by bit, each bit
// just before its bit clock.
module tb_ncl_decode_out;
  import ncl_pkg::*;
  localparam int SYMW = 2;
  int checks = 0, failures = 0;
  dr_t bclk, sclk, e0, e1, dec, dec_q, vd_ser;
  logic [SYMW-1:0] prev;
  logic rst, en;
  dr_t [SYMW-1:0] vd_out;

  ncl_decode_out dut (.bclk(bclk), .sclk(sclk), .rst(rst), .en(en), .e0(e0), .e1(e1),
                      .dec(dec), .vd_out(vd_out), .dec_q(dec_q), .vd_ser(vd_ser));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bclk = DR_NULL; sclk = DR_NULL; e0 = DR_NULL; e1 = DR_NULL; dec = DR_NULL;
    en = 1'b0; rst = 1'b0;
    #1 rst = 1'b1;
    #1 rst = 1'b0;
    #1;
    prev = '0;
    checks++;
    if (vd_out !== {SYMW{DR_DATA0}}) begin failures++; $display("reset value wrong"); end
    for (int t = 0; t < 200; t++) begin
      logic [SYMW-1:0] s0, s1, exp;
      logic d;
      s0 = SYMW'($urandom); s1 = SYMW'($urandom); d = 1'($urandom);
      for (int i = SYMW - 1; i >= 0; i--) begin
        e0 = dr_enc(s0[i]); e1 = dr_enc(s1[i]);
        #1;
        checks++;
        if (vd_ser !== dr_enc(prev[i])) begin failures++; $display("t=%0d serial bit %0d wrong", t, i); end
        bclk = DR_DATA1;
        #1 bclk = DR_NULL; e0 = DR_NULL; e1 = DR_NULL;
        #1;
      end
      en = 1'b1;
      #1 dec = dr_enc(d);
      #1 sclk = DR_DATA1;
      #1 sclk = DR_NULL; en = 1'b0; dec = DR_NULL;
      #1;
      exp = d ? s0 : s1;
      for (int i = 0; i < SYMW; i++) begin
        checks++;
        if (vd_out[i] !== dr_enc(exp[i])) begin failures++; $display("t=%0d bit %0d wrong", t, i); end
      end
      checks++;
      if (dec_q !== dr_enc(d)) begin failures++; $display("dec_q wrong"); end
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
