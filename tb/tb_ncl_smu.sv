// Testbench for ncl_smu (four rows of four stages): shifts random 4-bit path
// metrics in on symbol-clock waves and checks that mem[k] holds the metric of k
// symbols ago, starting from the DATA0 reset state.
module tb_ncl_smu;
  import ncl_pkg::*;
  localparam int ROWS = 4, DEPTH = 4;
  int checks = 0, failures = 0;
  dr_t clk;
  logic rst;
  dr_t [ROWS-1:0] d;
  dr_t [DEPTH-1:0][ROWS-1:0] mem;
  logic [DEPTH-1:0][ROWS-1:0] hist;

  ncl_smu dut (.clk(clk), .rst(rst), .d(d), .mem(mem));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = DR_NULL; d = '0; rst = 1'b0; hist = '0;
    #1 rst = 1'b1;
    #1 rst = 1'b0;
    for (int t = 0; t < 100; t++) begin
      logic [ROWS-1:0] v;
      v = ROWS'($urandom);
      for (int i = 0; i < ROWS; i++) d[i] = dr_enc(v[i]);
      #1 clk = DR_DATA1;
      #1 clk = DR_NULL; d = '0;
      hist = {hist[DEPTH-2:0], v};
      #1;
      for (int k = 0; k < DEPTH; k++) begin
        for (int i = 0; i < ROWS; i++) begin
          checks++;
          if (mem[k][i] !== dr_enc(hist[k][i])) begin
            failures++; $display("t=%0d mem[%0d][%0d]=%b", t, k, i, mem[k][i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
