// tb_mux2: exhaustive test of the 2:1 multiplexer. All eight input
// combinations are applied, several times over, and y is compared with the
// truth table of a multiplexer (sel = 0 selects a, sel = 1 selects b).
module tb_mux2;
  logic a, b, sel, y;
  int checks = 0, failures = 0;

  mux2 dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int v = 0; v < 8; v++) begin
        logic exp_y;
        {sel, b, a} = 3'(v);
        #1;
        case ({sel, b, a})
          3'b000, 3'b010, 3'b101, 3'b100: exp_y = 1'b0;
          default:                        exp_y = 1'b1;
        endcase
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL sel=%b b=%b a=%b y=%b expected %b", sel, b, a, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
