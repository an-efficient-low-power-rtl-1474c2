// Testbench for ncl_th: drives random input sequences into a TH23 gate (the
// default) and a TH34w2 gate and compares each output with the set/hold equation
// Z = set + Z- . hold evaluated here, including the hysteresis (an asserted gate
// stays asserted until all inputs are low).
module tb_ncl_th;
  int checks = 0, failures = 0;
  logic [2:0] a3;
  logic [3:0] a4;
  logic z23, z34, m23, m34;

  ncl_th dut23 (.a(a3), .z(z23));
  ncl_th #(.N(4), .M(3), .W0(2)) dut34 (.a(a4), .z(z34));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int holds = 0;
    a3 = '0; a4 = '0; m23 = 1'b0; m34 = 1'b0;
    #1;
    for (int t = 0; t < 2000; t++) begin
      // bias towards small changes so the hold region is exercised
      a3 = ($urandom % 4 == 0) ? 3'b000 : 3'($urandom);
      a4 = ($urandom % 4 == 0) ? 4'b0000 : 4'($urandom);
      #1;
      m23 = ((a3[0] + a3[1] + a3[2]) >= 2) | (m23 & (|a3));
      m34 = ((2 * a4[0] + a4[1] + a4[2] + a4[3]) >= 3) | (m34 & (|a4));
      if (m23 && (a3[0] + a3[1] + a3[2]) < 2) holds++;
      checks += 2;
      if (z23 !== m23) begin failures++; $display("TH23 a=%b z=%b exp=%b", a3, z23, m23); end
      if (z34 !== m34) begin failures++; $display("TH34w2 a=%b z=%b exp=%b", a4, z34, m34); end
    end
    checks++;
    if (holds == 0) begin failures++; $display("hysteresis never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
