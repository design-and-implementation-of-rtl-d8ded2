// tb_clk_div2: tests the divide-by-two clock generator. After reset the
// output must be 0; afterwards it must toggle on every rising edge of the
// input clock and never on a falling edge, giving a period of exactly two
// input periods with a 50 % duty cycle.
module tb_clk_div2;
  logic clk_in = 1'b0, rst_n = 1'b0, clk_out;
  logic exp_out;
  int checks = 0, failures = 0;

  clk_div2 dut (.clk_in(clk_in), .rst_n(rst_n), .clk_out(clk_out));

  always #4 clk_in = ~clk_in;

  initial begin
    #10;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL not cleared in reset"); end
    @(negedge clk_in) rst_n = 1'b1;
    exp_out = 1'b0;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk_in);
      exp_out = ~exp_out;
      #1;
      checks++;
      if (clk_out !== exp_out) begin
        failures++;
        $display("FAIL after rising edge %0d: clk_out=%b expected %b", i, clk_out, exp_out);
      end
      @(negedge clk_in);
      #1;
      checks++;
      if (clk_out !== exp_out) begin
        failures++;
        $display("FAIL changed on falling edge %0d", i);
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
