// Testbench for ncl_adder at its default width (3 bits): every pair of operands
// as a DATA wave then a NULL wave, the 4-bit result compared with a+b; the result
// must not be complete while b is still NULL.
module tb_ncl_adder;
  import ncl_pkg::*;
  localparam int W = 3;
  int checks = 0, failures = 0;
  dr_t [W-1:0] a, b;
  dr_t [W:0]   s;

  ncl_adder dut (.a(a), .b(b), .s(s));

  function automatic logic [W:0] val(input dr_t [W:0] d, output logic ok);
    ok = 1'b1;
    for (int i = 0; i <= W; i++) begin
      val[i] = d[i].r1;
      if (!dr_is_data(d[i])) ok = 1'b0;
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    logic [W:0] r;
    a = '0; b = '0;
    #1;
    for (int va = 0; va < 2 ** W; va++) begin
      for (int vb = 0; vb < 2 ** W; vb++) begin
        for (int i = 0; i < W; i++) a[i] = dr_enc(va[i]);
        #1;
        r = val(s, ok);
        checks++;
        if (ok) begin failures++; $display("complete without b"); end
        for (int i = 0; i < W; i++) b[i] = dr_enc(vb[i]);
        #1;
        r = val(s, ok);
        checks++;
        if (!ok || r != (W+1)'(va + vb)) begin
          failures++; $display("%0d+%0d gave %0d ok=%0d", va, vb, r, ok);
        end
        a = '0; b = '0; #1;
        checks++;
        if (s != '0) begin failures++; $display("not NULL"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
