// Testbench for ncl_bmu: streams random received and expected bits as DATA/NULL
// waves (the two inputs arriving in random order) and checks the branch metric
// against the Hamming distance counted here, modulo 8. It also runs the example
// received 11 01 11 against expected 00 10 01 (distance 5) and 11 01 10
// (distance 1) without clearing in between symbols.
module tb_ncl_bmu;
  import ncl_pkg::*;
  localparam int W = 3;
  int checks = 0, failures = 0;
  dr_t rx, ex;
  logic clr;
  dr_t [W-1:0] bm;

  ncl_bmu dut (.rx(rx), .ex(ex), .clr(clr), .bm(bm));

  function automatic int bmval();
    int v = 0;
    for (int i = 0; i < W; i++) v |= int'(bm[i].r1) << i;
    return v;
  endfunction

  task automatic send(input logic r, input logic e);
    if ($urandom % 2) begin rx = dr_enc(r); #1 ex = dr_enc(e); end
    else              begin ex = dr_enc(e); #1 rx = dr_enc(r); end
    #1;
    rx = DR_NULL; #1 ex = DR_NULL; #1;
  endtask

  task automatic run_seq(input logic [5:0] r, input logic [5:0] e, input int exp);
    clr = 1'b1; #1 clr = 1'b0; #1;
    for (int i = 5; i >= 0; i--) send(r[i], e[i]);
    checks++;
    if (bmval() != exp) begin failures++; $display("sequence: bm=%0d exp=%0d", bmval(), exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = DR_NULL; ex = DR_NULL; clr = 1'b0;
    #1;
    run_seq(6'b110111, 6'b001001, 5);
    run_seq(6'b110111, 6'b110110, 1);
    for (int s = 0; s < 100; s++) begin
      int n, d;
      n = 1 + $urandom % 10; d = 0;
      clr = 1'b1; #1 clr = 1'b0; #1;
      for (int i = 0; i < n; i++) begin
        logic r, e;
        r = 1'($urandom); e = 1'($urandom);
        d += int'(r ^ e);
        send(r, e);
        checks++;
        if (bmval() != d % 8) begin failures++; $display("bm=%0d exp=%0d", bmval(), d % 8); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
