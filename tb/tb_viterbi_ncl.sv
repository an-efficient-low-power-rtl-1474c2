// End-to-end testbench for viterbi_ncl at its default parameters.
//
// Drives the decoder through the symbol protocol (clear, bit waves, evaluate,
// symbol clock, NULL wave) and compares every symbol with a reference computed
// here: branch metrics as Hamming distances, sums with the path metric saturated
// to 3 bits, the smaller sum kept (a tie keeps branch 1), the survivor memory as a
// history of the kept metrics, and the decoded symbol as the surviving branch's
// expected symbol. It first runs the example received 11 01 11 against expected
// 00 10 01 / 11 01 10 (decoded 11 01 10), then a 16-symbol message and random
// streams. It counts how often each mechanism occurred (branch 0 kept, branch 1
// kept, tie, path-metric saturation, full survivor memory turnover) and fails if
// one never did. The serial output vd_ser is checked to carry each decoded
// symbol bit by bit during the following symbol. The NULL-to-DATA and DATA-to-NULL settling of the ACS wave is
// bounded: each must complete within a fixed time.
module tb_viterbi_ncl;
  import ncl_pkg::*;
  localparam int BMW = 3, PMW = 4, DEPTH = 4, SYMW = 2;

  int checks = 0, failures = 0;
  logic rst, clr, eval;
  dr_t bclk, sclk, rx, e0, e1, dec_q, dec, vd_ser;
  logic [SYMW-1:0] prev_sym;  // decoded symbol expected on vd_ser
  dr_t [SYMW-1:0] vd_out;
  logic [PMW-1:0] pm;
  logic [BMW-1:0] bm0, bm1;
  dr_t [DEPTH-1:0][PMW-1:0] smu_mem;
  logic acs_done, acs_null;

  viterbi_ncl dut (
    .rst(rst), .clr(clr), .eval(eval), .bclk(bclk), .sclk(sclk),
    .rx(rx), .e0(e0), .e1(e1), .vd_out(vd_out), .dec_q(dec_q), .vd_ser(vd_ser), .dec(dec),
    .pm(pm), .bm0(bm0), .bm1(bm1), .smu_mem(smu_mem),
    .acs_done(acs_done), .acs_null(acs_null));

  // reference state
  int pm_ref;
  int hist[DEPTH];
  int n_b0 = 0, n_b1 = 0, n_tie = 0, n_sat = 0, n_sym = 0, n_done_waits = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_flag(input bit want_done);
    int t = 0;
    while ((want_done ? acs_done : acs_null) !== 1'b1 && t < 50) begin #1; t++; end
    checks++;
    if (t >= 50) begin failures++; $display("ACS wave did not settle (done=%0d)", want_done); end
    if (t > 0) n_done_waits++;
  endtask

  // One code symbol; returns the decoded symbol the hardware produced.
  task automatic symbol(input logic [SYMW-1:0] r, input logic [SYMW-1:0] x0,
                        input logic [SYMW-1:0] x1, output logic [SYMW-1:0] got);
    int d0, d1, pms, s0, s1, kept;
    logic dref;
    logic [SYMW-1:0] vref;
    // 1. clear counters, load path metric
    #1 clr = 1'b1;
    #1 clr = 1'b0;
    // 2. bit waves, first bit is the most significant
    for (int i = SYMW - 1; i >= 0; i--) begin
      #1 rx = dr_enc(r[i]); e0 = dr_enc(x0[i]); e1 = dr_enc(x1[i]);
      #1;
      checks++;
      if (vd_ser !== dr_enc(prev_sym[i])) begin
        failures++; $display("sym %0d: serial output bit %0d wrong", n_sym, i);
      end
      bclk = DR_DATA1;
      #1 bclk = DR_NULL; rx = DR_NULL; e0 = DR_NULL; e1 = DR_NULL;
    end
    #1;
    // reference
    d0 = $countones(r ^ x0); d1 = $countones(r ^ x1);
    pms = (pm_ref > 7) ? 7 : pm_ref;
    if (pm_ref > 7) n_sat++;
    s0 = pms + d0; s1 = pms + d1;
    dref = (s0 < s1);
    kept = dref ? s0 : s1;
    vref = dref ? x0 : x1;
    if (s0 < s1) n_b0++; else if (s0 == s1) n_tie++; else n_b1++;
    checks++;
    if (int'(bm0) != d0 || int'(bm1) != d1 || int'(pm) != pm_ref) begin
      failures++; $display("sym %0d: bm0=%0d/%0d bm1=%0d/%0d pm=%0d/%0d", n_sym, bm0, d0, bm1, d1, pm, pm_ref);
    end
    // 3. evaluate
    eval = 1'b1;
    wait_flag(1'b1);
    checks++;
    if (dec !== dr_enc(dref)) begin failures++; $display("sym %0d: dec=%b exp %0d", n_sym, dec, dref); end
    // 4. symbol clock
    #1 sclk = DR_DATA1;
    #1 eval = 1'b0;
    #1 sclk = DR_NULL;
    wait_flag(1'b0);
    for (int k = DEPTH - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = kept;
    pm_ref = kept;
    for (int i = 0; i < SYMW; i++) got[i] = vd_out[i].r1;
    checks++;
    if (got !== vref || dec_q !== dr_enc(dref)) begin
      failures++; $display("sym %0d: vd_out=%b exp %b", n_sym, got, vref);
    end
    prev_sym = vref;
    for (int k = 0; k < DEPTH; k++) begin
      logic [PMW-1:0] m;
      for (int i = 0; i < PMW; i++) m[i] = smu_mem[k][i].r1;
      checks++;
      if (int'(m) != hist[k]) begin failures++; $display("sym %0d: smu[%0d]=%0d exp %0d", n_sym, k, m, hist[k]); end
    end
    n_sym++;
  endtask

  task automatic reset_all();
    rst = 1'b0; clr = 1'b0; eval = 1'b0;
    bclk = DR_NULL; sclk = DR_NULL; rx = DR_NULL; e0 = DR_NULL; e1 = DR_NULL;
    #1 rst = 1'b1;
    #2 rst = 1'b0;
    pm_ref = 0;
    prev_sym = '0;
    for (int k = 0; k < DEPTH; k++) hist[k] = 0;
    #1;
  endtask

  initial begin
    logic [SYMW-1:0] got;
    logic [5:0] dec_seq;
    reset_all();

    // Worked example: received 11 01 11, expected 00 10 01 and 11 01 10.
    symbol(2'b11, 2'b00, 2'b11, got); dec_seq[5:4] = got;
    symbol(2'b01, 2'b10, 2'b01, got); dec_seq[3:2] = got;
    symbol(2'b11, 2'b01, 2'b10, got); dec_seq[1:0] = got;
    checks++;
    if (dec_seq != 6'b110110) begin failures++; $display("example decoded %b", dec_seq); end
    else $display("example decoded 11 01 10");

    // A 16-symbol message with a few channel errors, then random streams.
    reset_all();
    for (int t = 0; t < 16; t++) begin
      logic [SYMW-1:0] c0, c1, r;
      c0 = SYMW'($urandom); c1 = ~c0;
      r = ($urandom % 3 == 0) ? (c1 ^ SYMW'(1 << ($urandom % SYMW))) : c1;
      symbol(r, c0, c1, got);
    end
    for (int t = 0; t < 300; t++) begin
      if (t % 60 == 0) reset_all();
      symbol(SYMW'($urandom), SYMW'($urandom), SYMW'($urandom), got);
    end

    $display("symbols=%0d branch0=%0d branch1=%0d ties=%0d saturated=%0d", n_sym, n_b0, n_b1, n_tie, n_sat);
    checks++;
    if (n_b0 == 0 || n_b1 == 0 || n_tie == 0 || n_sat == 0 || n_sym < DEPTH || n_done_waits == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
