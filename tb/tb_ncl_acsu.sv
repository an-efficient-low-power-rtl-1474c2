// Testbench for ncl_acsu (3-bit metrics): random path metric and branch metrics
// arrive as DATA waves in random order, followed by NULL waves. The selected
// metric must be min(pm+bm0, pm+bm1) and the decision DATA1 exactly when
// pm+bm0 < pm+bm1; eq and gt are checked too. Both decisions and ties must occur.
module tb_ncl_acsu;
  import ncl_pkg::*;
  localparam int BMW = 3, PMW = 4;
  int checks = 0, failures = 0;
  dr_t [BMW-1:0] pm, bm0, bm1;
  dr_t [PMW-1:0] pm_new;
  dr_t dec, eq, gt;
  int n_b0 = 0, n_b1 = 0, n_tie = 0;

  ncl_acsu dut (.pm(pm), .bm0(bm0), .bm1(bm1), .pm_new(pm_new), .dec(dec), .eq(eq), .gt(gt));

  function automatic dr_t [BMW-1:0] enc3(input logic [BMW-1:0] v);
    for (int i = 0; i < BMW; i++) enc3[i] = dr_enc(v[i]);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pm = '0; bm0 = '0; bm1 = '0;
    #1;
    for (int t = 0; t < 300; t++) begin
      logic [BMW-1:0] vp, v0, v1;
      int s0, s1, mn;
      logic [PMW-1:0] got;
      vp = BMW'($urandom); v0 = BMW'($urandom); v1 = ($urandom % 4 == 0) ? v0 : BMW'($urandom);
      case ($urandom % 3)
        0: begin pm = enc3(vp); #1 bm0 = enc3(v0); #1 bm1 = enc3(v1); end
        1: begin bm1 = enc3(v1); #1 pm = enc3(vp); #1 bm0 = enc3(v0); end
        default: begin bm0 = enc3(v0); #1 bm1 = enc3(v1); #1 pm = enc3(vp); end
      endcase
      #1;
      s0 = vp + v0; s1 = vp + v1; mn = (s0 < s1) ? s0 : s1;
      if (s0 < s1) n_b0++; else if (s0 == s1) n_tie++; else n_b1++;
      for (int i = 0; i < PMW; i++) got[i] = pm_new[i].r1;
      checks++;
      if (got != PMW'(mn) || dec !== dr_enc(s0 < s1) || eq !== dr_enc(s0 == s1) || gt !== dr_enc(s0 > s1)) begin
        failures++; $display("pm=%0d bm0=%0d bm1=%0d got=%0d dec=%b", vp, v0, v1, got, dec);
      end
      for (int i = 0; i < PMW; i++) begin
        checks++;
        if (!dr_is_data(pm_new[i])) begin failures++; $display("pm_new[%0d] not DATA", i); end
      end
      pm = '0; bm0 = '0; bm1 = '0; #1;
      checks++;
      if (pm_new != '0 || dec != DR_NULL) begin failures++; $display("not NULL"); end
    end
    checks++;
    if (n_b0 == 0 || n_b1 == 0 || n_tie == 0) begin failures++; $display("a decision case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
