// Viterbi decoder in dual-rail Null Convention Logic (top level).
//
// Two branch metric units compare the received bit stream rx with the expected
// bit streams of the two branches leaving the current state (e0, e1) and count the
// differing bits of each code symbol. The add-compare-select unit adds both
// branch metrics to the survivor's path metric, compares the sums and selects the
// smaller; the survivor memory unit shifts the selected path metric in, and the
// decoded-output path captures the expected symbol of the surviving branch.
//
// All arithmetic and comparison is NCL: threshold gates with hysteresis on
// dual-rail signals, computing on a DATA wave and resetting on a NULL wave.
// Stored values (branch-metric counters, path-metric register, stored symbols)
// are turned into waves by wave gates driven by eval. The environment sequences
// one code symbol as follows:
//   1. pulse clr (eval low): clears the branch-metric counters and loads the
//      path-metric register from the survivor memory's newest column;
//   2. for each of the SYMW code bits: drive rx, e0, e1 to DATA, raise bclk to
//      DATA1, then return the bits and bclk to NULL;
//   3. raise eval and wait for acs_done (all ACS outputs DATA);
//   4. raise sclk to DATA1: the survivor memory shifts, vd_out and dec_q load;
//   5. lower eval and return sclk to NULL; wait for acs_null.
// vd_out holds the decoded symbol after step 4; vd_ser gives the same bits
// serially during the next symbol, bit i valid just before that symbol's i-th
// bclk.
// The path metric is 4 bits in the survivor memory and is fed to the 3-bit
// adders saturated at 7; since both adders add the same path metric, the
// saturation never changes a decision. Units and widths follow the paper; the
// sequencing signals, completion outputs and the saturation are this design's.
module viterbi_ncl
  import ncl_pkg::*;
#(
  parameter int unsigned BMW   = 3,  // branch metric / adder operand width
  parameter int unsigned DEPTH = 4,  // survivor memory stages
  parameter int unsigned SYMW  = 2,  // code bits per symbol (rate 1/2)
  localparam int unsigned PMW  = BMW + 1
) (
  input  logic                       rst,
  input  logic                       clr,
  input  logic                       eval,
  input  dr_t                        bclk,
  input  dr_t                        sclk,
  input  dr_t                        rx,
  input  dr_t                        e0,
  input  dr_t                        e1,
  output dr_t [SYMW-1:0]             vd_out,
  output dr_t                        dec_q,
  output dr_t                        vd_ser,
  output dr_t                        dec,
  output logic [PMW-1:0]             pm,
  output logic [BMW-1:0]             bm0,
  output logic [BMW-1:0]             bm1,
  output dr_t [DEPTH-1:0][PMW-1:0]   smu_mem,
  output logic                       acs_done,
  output logic                       acs_null
);

  // ---------------- branch metric units ----------------
  dr_t [BMW-1:0] bm0_s, bm1_s, bm0_w, bm1_w;
  logic          cnt_clr;

  assign cnt_clr = clr | rst;

  ncl_bmu #(.W(BMW)) u_bmu0 (.rx(rx), .ex(e0), .clr(cnt_clr), .bm(bm0_s));
  ncl_bmu #(.W(BMW)) u_bmu1 (.rx(rx), .ex(e1), .clr(cnt_clr), .bm(bm1_s));

  ncl_gate #(.W(BMW)) u_gbm0 (.en(eval), .d(bm0_s), .q(bm0_w));
  ncl_gate #(.W(BMW)) u_gbm1 (.en(eval), .d(bm1_s), .q(bm1_w));

  // ---------------- path metric register ----------------
  logic [PMW-1:0] smu_pm;
  logic [BMW-1:0] pm_sat;
  dr_t  [BMW-1:0] pm_s, pm_w;

  for (genvar i = 0; i < PMW; i++) begin : g_smu_pm
    assign smu_pm[i] = smu_mem[0][i].r1;
  end

  always_ff @(posedge clr or posedge rst) begin
    if (rst) pm <= '0;
    else     pm <= smu_pm;
  end

  assign pm_sat = (pm > PMW'((1 << BMW) - 1)) ? {BMW{1'b1}} : pm[BMW-1:0];

  for (genvar i = 0; i < BMW; i++) begin : g_pm
    assign pm_s[i] = dr_enc(pm_sat[i]);
    assign bm0[i]  = bm0_s[i].r1;
    assign bm1[i]  = bm1_s[i].r1;
  end

  ncl_gate #(.W(BMW)) u_gpm (.en(eval), .d(pm_s), .q(pm_w));

  // ---------------- add-compare-select ----------------
  dr_t [PMW-1:0] pm_new;
  dr_t           eq, gt;

  ncl_acsu #(.BMW(BMW)) u_acsu (
    .pm(pm_w), .bm0(bm0_w), .bm1(bm1_w),
    .pm_new(pm_new), .dec(dec), .eq(eq), .gt(gt));

  // Completion detection over the ACS outputs.
  always_comb begin
    acs_done = dr_is_data(dec) && dr_is_data(eq) && dr_is_data(gt);
    acs_null = dr_is_null(dec) && dr_is_null(eq) && dr_is_null(gt);
    for (int i = 0; i < PMW; i++) begin
      acs_done &= dr_is_data(pm_new[i]);
      acs_null &= dr_is_null(pm_new[i]);
    end
  end

  // ---------------- survivor memory ----------------
  ncl_smu #(.ROWS(PMW), .DEPTH(DEPTH)) u_smu (
    .clk(sclk), .rst(rst), .d(pm_new), .mem(smu_mem));

  // ---------------- decoded output ----------------
  ncl_decode_out #(.SYMW(SYMW)) u_out (
    .bclk(bclk), .sclk(sclk), .rst(rst), .en(eval),
    .e0(e0), .e1(e1), .dec(dec), .vd_out(vd_out), .dec_q(dec_q), .vd_ser(vd_ser));

  // ---------------- handshake rules ----------------
  // The symbol clock may only capture a complete DATA wave.
  always @(posedge sclk.r1) begin
    if (!rst) assert (acs_done) else $error("sclk raised before the ACS wave was complete");
  end
  // A new symbol may only start once eval is low and the ACS NULL wave is complete.
  always @(posedge clr) begin
    if (!rst) assert (!eval && acs_null) else $error("clr raised before the ACS NULL wave was complete");
  end
  // Bits are clocked only while all three inputs hold DATA.
  always @(posedge bclk.r1) begin
    if (!rst) assert (dr_is_data(rx) && dr_is_data(e0) && dr_is_data(e1))
      else $error("bclk raised without DATA on rx/e0/e1");
  end

endmodule
