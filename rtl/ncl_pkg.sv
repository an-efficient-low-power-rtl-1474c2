// Shared types and helpers for the dual-rail Null Convention Logic (NCL) datapath.
//
// A dual-rail signal carries one of three symbols on two wires: DATA0 (r0=1, r1=0)
// is logic 0, DATA1 (r0=0, r1=1) is logic 1, and NULL (both low) means "no value
// yet". Both rails high is illegal. NCL circuits alternate between a DATA wave and a
// NULL wave, and a result is complete when every output rail pair holds DATA.
// This encoding follows the NCL convention; the helper functions are for
// testbenches, assertions and completion detection.
package ncl_pkg;

  typedef struct packed {
    logic r1;  // DATA1 rail
    logic r0;  // DATA0 rail
  } dr_t;

  localparam dr_t DR_NULL  = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_DATA0 = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1 = '{r1: 1'b1, r0: 1'b0};

  // Encode a Boolean value as a DATA symbol.
  function automatic dr_t dr_enc(input logic b);
    return b ? DR_DATA1 : DR_DATA0;
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return !(d.r1 || d.r0);
  endfunction

  function automatic logic dr_illegal(input dr_t d);
    return d.r1 && d.r0;
  endfunction

endpackage
