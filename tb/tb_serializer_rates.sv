// tb_serializer_rates: runs the 8:1 serializer with the fixed word
// D1..D8 = 1,1,0,1,0,1,1,0 at three serial clock frequencies, 625 MHz,
// 312.5 MHz and 156.25 MHz, resetting between runs. At each rate the serial
// output is sampled in the middle of every bit time (T/4 after each clk
// edge) from the first bit of the first captured word on, and must repeat
// 1,1,0,1,0,1,1,0 with one bit per half clock period; the first bit must
// start 6.5 clk periods after the word_clk edge that captured the word.
module tb_serializer_rates;
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [7:0] WORD = 8'b0110_1011;   // din[0] = D1 = 1

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] din = WORD;
  logic       word_clk;
  logic [2:0] stage_clk;
  logic       sout;
  longint     half = 800;

  int checks = 0, failures = 0, rates_run = 0;

  serializer dut (
    .clk(clk), .rst_n(rst_n), .din(din),
    .word_clk(word_clk), .stage_clk(stage_clk), .sout(sout)
  );

  always #(half) clk = ~clk;

  task automatic run_rate(input longint period);
    longint t0;
    half = period / 2;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge word_clk);
    t0 = $time;
    // Wait to the middle of D1: 6.5 periods plus a quarter period.
    #(6 * period + period / 2 + period / 4);
    for (int b = 0; b < 8 * 20; b++) begin
      checks++;
      if (sout !== WORD[b % 8]) begin
        failures++;
        if (failures < 10)
          $display("FAIL period %0d ps bit D%0d at %0t ps after capture: sout=%b expected %b",
                   period, b % 8 + 1, $time - t0, sout, WORD[b % 8]);
      end
      #(period / 2);
    end
    rates_run++;
  endtask

  initial begin
    run_rate(1600);    // 625 MHz
    run_rate(3200);    // 312.5 MHz
    run_rate(6400);    // 156.25 MHz
    checks++;
    if (rates_run != 3) begin failures++; $display("FAIL not all rates run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
