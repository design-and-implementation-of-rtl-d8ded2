// tb_dff: tests the rising-edge D flip-flop. Random data changes half-way
// between clock edges; after each rising edge q must equal the d value
// present just before the edge, and it must not follow d between edges.
// An asynchronous reset applied mid-cycle must clear q at once.
module tb_dff;
  logic clk = 1'b0, rst_n, d, q;
  logic exp_q;
  int checks = 0, failures = 0;

  dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b1; d = 1'b1;
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL q not cleared in reset"); end
    @(negedge clk);
    rst_n = 1'b1;
    d = 1'b0;
    exp_q = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL q changed between edges: q=%b expected %b", q, exp_q);
      end
      exp_q = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL after edge: q=%b expected %b", q, exp_q);
      end
      if (i == 500) begin
        // Asynchronous reset between edges.
        #1 rst_n = 1'b0;
        #1;
        checks++;
        if (q !== 1'b0) begin failures++; $display("FAIL asynchronous reset"); end
        rst_n = 1'b1;
        exp_q = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
