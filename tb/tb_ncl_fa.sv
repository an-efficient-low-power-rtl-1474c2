// Testbench for ncl_fa: all eight input combinations, arriving one input at a
// time, compared with x+y+ci; the sum must stay NULL until all three inputs are
// DATA, and both outputs must return to NULL after the NULL wave.
module tb_ncl_fa;
  import ncl_pkg::*;
  int checks = 0, failures = 0;
  dr_t x, y, ci, s, co;

  ncl_fa dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = DR_NULL; y = DR_NULL; ci = DR_NULL;
    #1;
    for (int r = 0; r < 4; r++) begin
      for (int v = 0; v < 8; v++) begin
        logic [1:0] sum;
        sum = v[0] + v[1] + v[2];
        x = dr_enc(v[0]); #1;
        y = dr_enc(v[1]); #1;
        checks++;
        if (!dr_is_null(s)) begin failures++; $display("sum early v=%0d", v); end
        ci = dr_enc(v[2]); #1;
        checks++;
        if (s !== dr_enc(sum[0]) || co !== dr_enc(sum[1])) begin
          failures++; $display("v=%0d s=%b co=%b", v, s, co);
        end
        x = DR_NULL; y = DR_NULL; ci = DR_NULL; #1;
        checks++;
        if (!dr_is_null(s) || !dr_is_null(co)) begin failures++; $display("not NULL"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
