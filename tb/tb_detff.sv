// tb_detff: tests the double-edge 2:1 cell. A new random pair (d0, d1) is
// applied at every falling clock edge. The pair captured at a rising edge
// t must appear on q as d0 over [t + T/2, t + T) and d1 over
// [t + T, t + 3T/2): q is sampled a quarter period after every clock edge
// and compared with the pair captured one or one and a half periods before.
// This also checks the rate: two bits per clock period.
module tb_detff;
  localparam int T = 8;
  logic clk = 1'b0, rst_n = 1'b0, d0 = 1'b0, d1 = 1'b0, q;
  int checks = 0, failures = 0;
  logic [1:0] pairs [$];   // pairs in capture order
  int n_d0 = 0, n_d1 = 0;

  detff dut (.clk(clk), .rst_n(rst_n), .d0(d0), .d1(d1), .q(q));

  always #(T/2) clk = ~clk;

  always @(posedge clk) if (rst_n) pairs.push_back({d1, d0});

  initial begin
    #(T/4);
    #(2 * T);
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL q not cleared in reset"); end
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      {d1, d0} = 2'($urandom);
      // Quarter period after the falling edge: d0 of the last captured pair.
      #(T/4);
      if (pairs.size() > 0) begin
        checks++; n_d0++;
        if (q !== pairs[pairs.size()-1][0]) begin
          failures++;
          $display("FAIL clk low: q=%b expected d0=%b", q, pairs[pairs.size()-1][0]);
        end
      end
      @(posedge clk);
      // Quarter period after the rising edge: d1 of the pair before the one
      // just captured.
      #(T/4);
      if (pairs.size() > 1) begin
        checks++; n_d1++;
        if (q !== pairs[pairs.size()-2][1]) begin
          failures++;
          $display("FAIL clk high: q=%b expected d1=%b", q, pairs[pairs.size()-2][1]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_d0 == 0 || n_d1 == 0) begin failures++; $display("FAIL a half of the clock was never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 5000);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
