// fp_div: Floating point divider: y = a / b (division by zero gives a signed infinity).
//
// IEEE-754 single precision, combinational (the result is valid in the same cycle),
// round to nearest even, denormals flushed to zero. The arithmetic itself lives in
// gl_pkg so that wide datapaths can share it; this module is the unit instantiated
// where the pipeline names a discrete floating point unit. The original pipeline used
// generated vendor units with configurable latency; a zero-latency unit is this
// design's choice, matching the combinational style of the rest of the pipeline.
module fp_div
  import gl_pkg::*;
(
    input  float_t a,
    input  float_t b,
    output float_t y
);
  assign y = fp_div(a, b);
endmodule
