// Testbench for ncl_ha: all four input pairs, each as a DATA wave followed by a
// NULL wave, compared with x+y; also the example x=0, y=1 -> sum 1, carry 0.
module tb_ncl_ha;
  import ncl_pkg::*;
  int checks = 0, failures = 0;
  dr_t x, y, s, c;

  ncl_ha dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = DR_NULL; y = DR_NULL;
    #1;
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 4; v++) begin
        x = dr_enc(v[0]); #1;
        checks++;
        if (!dr_is_null(s)) begin failures++; $display("sum not NULL with y NULL"); end
        y = dr_enc(v[1]); #1;
        checks++;
        if (s !== dr_enc(v[0] ^ v[1]) || c !== dr_enc(v[0] & v[1])) begin
          failures++; $display("x=%0d y=%0d s=%b c=%b", v[0], v[1], s, c);
        end
        x = DR_NULL; y = DR_NULL; #1;
        checks++;
        if (!dr_is_null(s) || !dr_is_null(c)) begin failures++; $display("not NULL"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
