// dff: rising-edge D flip-flop with asynchronous active-low reset.
//
// q takes d on each rising edge of clk; rst_n low clears it at once. The
// transistor-level part is a master-slave pair of pass-gate latches; this
// is its register-level equivalent. The reset is this design's own choice.
module dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
