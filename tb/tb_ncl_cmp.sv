// Testbench for ncl_cmp at its default width (4 bits): every pair of operands
// as a DATA wave (b's least significant bit last) then a NULL wave. LT, EQ and GT
// are compared with a<b, a==b and a>b, must stay incomplete until the last bit is
// DATA, and must return to NULL. The three examples 1100 vs 0101, 0110 vs 1101
// and 1101 vs 1101 are part of the sweep.
module tb_ncl_cmp;
  import ncl_pkg::*;
  localparam int W = 4;
  int checks = 0, failures = 0;
  dr_t [W-1:0] a, b;
  dr_t lt, eq, gt;

  ncl_cmp dut (.a(a), .b(b), .lt(lt), .eq(eq), .gt(gt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    #1;
    for (int va = 0; va < 2 ** W; va++) begin
      for (int vb = 0; vb < 2 ** W; vb++) begin
        for (int i = 0; i < W; i++) a[i] = dr_enc(va[i]);
        for (int i = 1; i < W; i++) b[i] = dr_enc(vb[i]);
        #1;
        checks++;
        if (dr_is_data(lt) || dr_is_data(eq) || dr_is_data(gt)) begin
          failures++; $display("complete before b[0] (a=%0d b=%0d)", va, vb);
        end
        b[0] = dr_enc(vb[0]);
        #1;
        checks++;
        if (lt !== dr_enc(va < vb) || eq !== dr_enc(va == vb) || gt !== dr_enc(va > vb)) begin
          failures++; $display("a=%0d b=%0d lt=%b eq=%b gt=%b", va, vb, lt, eq, gt);
        end
        a = '0; b = '0; #1;
        checks++;
        if (!dr_is_null(lt) || !dr_is_null(eq) || !dr_is_null(gt)) begin
          failures++; $display("not NULL");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
