// Testbench for ncl_sreg (4 stages): shifts random dual-rail values (DATA0,
// DATA1, and now and then NULL) on DATA1 clock waves, with DATA0 clock waves in
// between that must not shift, and compares taps and the serial output with a
// queue model; also checks the reset to DATA0.
module tb_ncl_sreg;
  import ncl_pkg::*;
  localparam int LEN = 4;
  int checks = 0, failures = 0;
  dr_t clk, d, q;
  logic rst;
  dr_t [LEN-1:0] taps, model;

  ncl_sreg dut (.clk(clk), .rst(rst), .d(d), .taps(taps), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = DR_NULL; d = DR_NULL; rst = 1'b0;
    #1 rst = 1'b1;
    #1 rst = 1'b0;
    model = {LEN{DR_DATA0}};
    #1;
    checks++;
    if (taps !== model) begin failures++; $display("reset value wrong"); end
    for (int t = 0; t < 300; t++) begin
      int r;
      r = $urandom % 8;
      d = (r == 0) ? DR_NULL : dr_enc(1'($urandom));
      #1;
      if ($urandom % 4 == 0) begin
        clk = DR_DATA0; #1 clk = DR_NULL;
      end else begin
        clk = DR_DATA1; #1 clk = DR_NULL;
        model = {model[LEN-2:0], d};
      end
      #1;
      checks++;
      if (taps !== model || q !== model[LEN-1]) begin
        failures++; $display("taps=%b exp=%b", taps, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
