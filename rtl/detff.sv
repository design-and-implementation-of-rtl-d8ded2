// detff: double-edge-triggered 2:1 serializer cell.
//
// Built, as in the transistor-level design, from two D flip-flops, one D
// latch and one 2:1 multiplexer whose select is the clock:
//
//   d0 --> dff_a (rising clk) ---------------------> mux input "clk low"
//   d1 --> dff_b (rising clk) --> latch (open while clk low) --> mux input "clk high"
//
// On a rising clock edge both bits of a pair are captured. During the
// following low half-period the output shows d0; during the next high
// half-period it shows d1, which the latch has passed on at the falling
// edge. Each multiplexer input therefore changes only while the other one
// is selected, so the output never switches while its own data is moving:
// this is why the cell is used instead of a plain multiplexer. The output
// carries two bits per clock period, one per clock level.
//
// Timing: pair captured at rising edge t; q = d0 over [t + T/2, t + T),
// q = d1 over [t + T, t + 3T/2), T being the clock period.
module detff (
  input  logic clk,
  input  logic rst_n,
  input  logic d0,
  input  logic d1,
  output logic q
);

  logic qa, qb, qb_lat;

  dff     u_dff_a (.clk(clk), .rst_n(rst_n), .d(d0), .q(qa));
  dff     u_dff_b (.clk(clk), .rst_n(rst_n), .d(d1), .q(qb));
  d_latch u_lat_b (.en(~clk), .rst_n(rst_n), .d(qb), .q(qb_lat));
  mux2    u_mux   (.a(qa), .b(qb_lat), .sel(clk), .y(q));

endmodule
