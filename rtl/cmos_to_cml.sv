`timescale 1ps/1fs
// CMOS-to-CML converter (logic view).
//
// Converts the single-ended, rail-to-rail multiplexer output into the
// complementary pair that drives a CML output-driver chain. It re-uses the
// C2MOS latch: the latch is transparent while ck is low and holds while ck
// is high, so data arriving anywhere in the high phase appears at the
// outputs on the falling clock edge. This retiming cancels the skew the
// multiplexer and the delay line leave, and gives both outputs the same
// edge.
//
// The transmitter has two instances that match each other: the data
// converter, clocked by CK_OUT, and the forwarded-clock converter, whose
// data is CK_OUT itself. For the latter this design holds the latch
// permanently transparent (ck tied low), so it adds the same circuit and
// polarity without sampling the clock with itself; the source does not say
// how the clock path drives the latch clock.
//
// The high common-mode level shift and the analog output stage are not
// modelled: qp and qn are logic levels. The latch is intended; in the
// forwarded-clock instance it is always open, so no latch remains there.
module cmos_to_cml (
  input  logic ck,   // retiming clock; latch transparent while low
  input  logic d,    // single-ended data
  output logic qp,   // true output
  output logic qn    // complementary output
);

  logic lat;

  always_latch begin
    if (!ck) lat = d;
  end

  assign qp = lat;
  assign qn = ~lat;

endmodule
