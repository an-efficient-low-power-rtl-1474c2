// Testbench for ncl_xor: for every input pair checks that the output stays NULL
// while only one input is DATA, becomes the exclusive-OR once both are DATA, and
// returns to NULL only after both inputs are NULL again.
module tb_ncl_xor;
  import ncl_pkg::*;
  int checks = 0, failures = 0;
  dr_t x, y, z;

  ncl_xor dut (.x(x), .y(y), .z(z));

  task automatic chk(input dr_t exp, input string what);
    checks++;
    if (z !== exp) begin failures++; $display("%s: z=%b exp=%b", what, z, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = DR_NULL; y = DR_NULL;
    #1;
    for (int r = 0; r < 40; r++) begin
      logic bx, by;
      bx = 1'($urandom); by = 1'($urandom);
      x = dr_enc(bx); #1; chk(DR_NULL, "x only");
      y = dr_enc(by); #1; chk(dr_enc(bx ^ by), "both data");
      x = DR_NULL;    #1; chk(dr_enc(bx ^ by), "y still data");
      y = DR_NULL;    #1; chk(DR_NULL, "null");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
