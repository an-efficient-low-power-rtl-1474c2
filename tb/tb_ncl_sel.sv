// Testbench for ncl_sel (four dual-rail 2:1 multiplexers): random words and
// selects as DATA waves followed by NULL waves; select DATA1 must pass a and
// DATA0 must pass b.
module tb_ncl_sel;
  import ncl_pkg::*;
  localparam int W = 4;
  int checks = 0, failures = 0;
  dr_t s;
  dr_t [W-1:0] a, b, f;

  ncl_sel dut (.s(s), .a(a), .b(b), .f(f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = DR_NULL; a = '0; b = '0;
    #1;
    for (int t = 0; t < 200; t++) begin
      logic [W-1:0] va, vb, exp;
      logic vs;
      va = W'($urandom); vb = W'($urandom); vs = 1'($urandom);
      for (int i = 0; i < W; i++) begin a[i] = dr_enc(va[i]); b[i] = dr_enc(vb[i]); end
      #1;
      checks++;
      if (f != '0) begin failures++; $display("output before select"); end
      s = dr_enc(vs);
      #1;
      exp = vs ? va : vb;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (f[i] !== dr_enc(exp[i])) begin failures++; $display("s=%0d bit %0d wrong", vs, i); end
      end
      s = DR_NULL; a = '0; b = '0; #1;
      checks++;
      if (f != '0) begin failures++; $display("not NULL"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
