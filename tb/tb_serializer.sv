// tb_serializer: end-to-end, full-size test of the 8:1 serializer.
//
// Runs the top at its default size (N = 8) with a 625 MHz clock. It first
// holds the fixed word D1..D8 = 1,1,0,1,0,1,1,0 for several words, then
// sends random words back to back, then resets the serializer in mid-stream
// and sends random words again. A reference model records every word at the
// rising edge of word_clk that captures it and predicts the serial stream:
// bit k (D(k+1)) of the word captured at t0 must be on sout over
// [t0 + 6.5T + k*T/2, t0 + 7T + k*T/2). sout is sampled in the middle of
// every bit, i.e. T/4 after each edge of clk. The test also checks that
// word_clk and the middle stage clock run at clk/4 and clk/2, that sout is 0
// after reset, and counts the mechanisms exercised: bits sent while clk is
// high and while it is low (the double-edge output), words, stage-clock
// edges and the mid-stream reset.
module tb_serializer;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N      = 8;
  localparam longint      T      = 1600;       // 625 MHz
  localparam longint      LAT    = 6 * T + T/2; // capture edge to first bit
  localparam int unsigned NWORDS = 3000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] din = '0;
  logic         word_clk;
  logic [2:0]   stage_clk;
  logic         sout;

  int checks = 0, failures = 0;

  serializer dut (
    .clk(clk), .rst_n(rst_n), .din(din),
    .word_clk(word_clk), .stage_clk(stage_clk), .sout(sout)
  );

  always #(T/2) clk = ~clk;

  // Reference model: words in capture order with their capture times.
  logic [N-1:0] words  [$];
  longint       tcap   [$];
  bit           track  = 1'b0;    // capture only while the stream is valid
  int           n_hi = 0, n_lo = 0, n_words_checked = 0, n_resets = 0;
  int           n_wclk = 0, n_mclk = 0;

  always @(posedge word_clk) begin
    if (track) begin
      words.push_back(din);
      tcap.push_back($time);
    end
  end

  // Sample sout in the middle of each bit.
  always @(clk) begin
    automatic bit level = clk;
    #(T/4);
    if (track && tcap.size() > 0) begin
      automatic longint rel = $time - tcap[0] - LAT - T/4;
      if (rel >= 0 && rel % (T/2) == 0) begin
        automatic longint g = rel / (T/2);
        automatic int     w = int'(g / longint'(N));
        automatic int     k = int'(g % longint'(N));
        if (w < words.size() - 1) begin
          checks++;
          if (sout !== words[w][k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL t=%0t word %0d bit D%0d: sout=%b expected %b", $time, w, k + 1, sout, words[w][k]);
          end
          if (level) n_hi++; else n_lo++;
          if (k == N - 1) n_words_checked++;
        end
      end
    end
  end

  // Clock ratio checks: count clk rising edges between rising edges of the
  // divided clocks.
  int     cnt_w = 0, cnt_m = 0;
  always @(posedge clk) begin
    cnt_w <= cnt_w + 1;
    cnt_m <= cnt_m + 1;
  end
  always @(posedge word_clk) begin
    if (track && n_wclk > 0) begin
      checks++;
      if (cnt_w != 4) begin
        failures++;
        $display("FAIL word_clk period %0d clk cycles, expected 4", cnt_w);
      end
    end
    cnt_w = 0;
    n_wclk++;
  end
  always @(posedge stage_clk[1]) begin
    if (track && n_mclk > 0) begin
      checks++;
      if (cnt_m != 2) begin
        failures++;
        $display("FAIL stage_clk[1] period %0d clk cycles, expected 2", cnt_m);
      end
    end
    cnt_m = 0;
    n_mclk++;
  end

  // Drive din on falling edges of word_clk, away from its capturing edge.
  task automatic run_words(input int n, input bit fixed);
    for (int i = 0; i < n; i++) begin
      @(negedge word_clk);
      din <= fixed ? 8'b0110_1011 : N'($urandom);
    end
  endtask

  task automatic do_reset();
    track = 1'b0;
    rst_n = 1'b0;
    #(3 * T);
    checks++;
    if (sout !== 1'b0 || word_clk !== 1'b0) begin
      failures++;
      $display("FAIL outputs not cleared in reset: sout=%b word_clk=%b", sout, word_clk);
    end
    words.delete();
    tcap.delete();
    n_wclk = 0;
    n_mclk = 0;
    #(T/4);
    rst_n = 1'b1;
    @(negedge clk);
    track = 1'b1;
    n_resets++;
  endtask

  initial begin
    #(T/4);
    do_reset();
    run_words(6, 1'b1);
    run_words(NWORDS, 1'b0);
    @(negedge word_clk);
    do_reset();
    run_words(NWORDS, 1'b0);
    repeat (4) @(negedge word_clk);

    // Every mechanism must have happened.
    checks++; if (n_hi == 0)   begin failures++; $display("FAIL no bit sent while clk high"); end
    checks++; if (n_lo == 0)   begin failures++; $display("FAIL no bit sent while clk low"); end
    checks++; if (n_resets < 2) begin failures++; $display("FAIL mid-stream reset not exercised"); end
    checks++; if (n_words_checked < 2 * NWORDS - 4) begin
      failures++; $display("FAIL only %0d words checked", n_words_checked);
    end
    $display("bits high=%0d low=%0d words=%0d resets=%0d", n_hi, n_lo, n_words_checked, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(NWORDS) * 2 * 4 * T * 2 + 100 * T);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
