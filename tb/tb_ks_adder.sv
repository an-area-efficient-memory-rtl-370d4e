// Self-checking testbench for ks_adder.
//
// The default 4-bit adder is checked exhaustively (all x, y and carry-in
// combinations) against integer addition; an 8-bit instance, which needs three
// prefix levels, is checked on random operands. A watchdog ends the run with a
// failure if it hangs.
module tb_ks_adder;

  int checks = 0, failures = 0;

  logic [3:0] x4, y4, s4;
  logic       c4, co4;
  logic [7:0] x8, y8, s8;
  logic       c8, co8;

  ks_adder dut4 (.x(x4), .y(y4), .cin(c4), .sum(s4), .cout(co4));
  ks_adder #(.W(8)) dut8 (.x(x8), .y(y8), .cin(c8), .sum(s8), .cout(co8));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned want;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 2; c++) begin
          x4 = 4'(a); y4 = 4'(b); c4 = 1'(c);
          #1;
          want = a + b + c;
          checks++;
          if ({co4, s4} !== 5'(want)) begin
            failures++;
            $display("W=4 %0d+%0d+%0d: got %0d want %0d", a, b, c, {co4, s4}, want);
          end
        end
    for (int i = 0; i < 2000; i++) begin
      x8 = 8'($urandom); y8 = 8'($urandom); c8 = 1'($urandom);
      #1;
      want = int'(x8) + int'(y8) + int'(c8);
      checks++;
      if ({co8, s8} !== 9'(want)) begin
        failures++;
        $display("W=8 %0d+%0d+%0d: got %0d want %0d", x8, y8, c8, {co8, s8}, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
