// d_latch: level-sensitive D latch with asynchronous active-low reset.
//
// While en is high the output follows d; while en is low it holds the last
// value. rst_n low forces q to 0 (a reset is this design's own choice so
// that two-state simulation starts from a known value). In the serializer
// cell it is opened while the cell clock is low, so that the second bit of a
// pair reaches the output multiplexer half a clock after the first.
module d_latch (
  input  logic en,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_latch begin
    if (!rst_n)  q = 1'b0;
    else if (en) q = d;
  end

endmodule
