// clk_div2: divide-by-two clock generator.
//
// A toggle flip-flop: clk_out inverts on every rising edge of clk_in, so it
// runs at half the frequency with a 50 % duty cycle and its rising edges
// fall on rising edges of clk_in. rst_n low holds it at 0; the first rising
// edge of clk_in after reset makes it rise. Two of these in a chain give
// the 312.5 MHz and 156.25 MHz clocks of the serializer from 625 MHz.
module clk_div2 (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end

endmodule
