// tb_d_latch: tests the D latch. A reference value is kept beside it: it
// follows d while en is high and holds while en is low, and reset clears it.
// d and en are driven with random values, including changes of d while the
// latch is closed (which must not show) and while it is open (which must).
module tb_d_latch;
  logic en, rst_n, d, q;
  logic ref_q;
  int checks = 0, failures = 0;
  int n_open_change = 0, n_closed_change = 0;

  d_latch dut (.en(en), .rst_n(rst_n), .d(d), .q(q));

  task automatic check(input string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s: en=%b d=%b q=%b expected %b", what, en, d, q, ref_q);
    end
  endtask

  initial begin
    en = 1'b0; d = 1'b1; rst_n = 1'b0; ref_q = 1'b0;
    #1 check("reset");
    rst_n = 1'b1;
    #1 check("closed after reset");
    for (int i = 0; i < 2000; i++) begin
      logic nd, ne;
      ne = 1'($urandom);
      nd = 1'($urandom);
      en = ne;
      #1;
      if (en) ref_q = d;
      check("enable change");
      if (nd != d) begin
        if (en) n_open_change++; else n_closed_change++;
      end
      d = nd;
      #1;
      if (en) ref_q = d;
      check("data change");
    end
    checks++;
    if (n_open_change == 0 || n_closed_change == 0) begin
      failures++;
      $display("FAIL data changes not seen in both latch states");
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
