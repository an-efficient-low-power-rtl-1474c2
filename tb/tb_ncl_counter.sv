// Testbench for ncl_counter (3 bits): sends random clock waves (DATA1, DATA0 and
// NULL in random order) and random clears, and checks after each that the count
// equals the number of DATA1 waves since the last clear, modulo 8, with dual-rail
// outputs that are always DATA. The wrap from 111 to 000 is checked to occur,
// and random presets must load 111.
module tb_ncl_counter;
  import ncl_pkg::*;
  localparam int W = 3;
  int checks = 0, failures = 0;
  dr_t clk;
  logic clr, pre;
  dr_t [W-1:0] q;
  int model, wraps;

  ncl_counter dut (.clk(clk), .clr(clr), .pre(pre), .q(q));

  task automatic check_q();
    logic [W-1:0] v;
    for (int i = 0; i < W; i++) begin
      v[i] = q[i].r1;
      if (!dr_is_data(q[i])) begin failures++; $display("bit %0d not DATA", i); end
    end
    checks++;
    if (v != W'(model)) begin failures++; $display("count %0d exp %0d", v, W'(model)); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = DR_NULL; clr = 1'b0; pre = 1'b0; model = 0; wraps = 0;
    #1 clr = 1'b1;
    #1 clr = 1'b0;
    #1 check_q();
    for (int t = 0; t < 400; t++) begin
      int r;
      r = $urandom % 20;
      if (r == 0) begin
        clr = 1'b1; #1 clr = 1'b0; model = 0;
      end else if (r == 1) begin
        pre = 1'b1; #1 pre = 1'b0; model = (1 << W) - 1;
      end else if (r < 12) begin
        clk = DR_DATA1; #1; clk = DR_NULL; model++;
        if (model % (1 << W) == 0) wraps++;
      end else begin
        clk = DR_DATA0; #1; clk = DR_NULL;
      end
      #1 check_q();
    end
    checks++;
    if (wraps == 0) begin failures++; $display("wrap never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
