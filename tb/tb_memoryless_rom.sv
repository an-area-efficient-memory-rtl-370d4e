// Self-checking testbench for memoryless_rom.
//
// Every one of the 64 addresses is applied and the output compared with
// floor(63 * sin(pi/2 * n / 64)), computed here in real arithmetic. The
// monotonic rise of the quarter wave is checked as well. A watchdog ends the
// run with a failure if it hangs.
module tb_memoryless_rom;

  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;

  logic [5:0] addr;
  logic [5:0] amp;

  memoryless_rom dut (.addr(addr), .amp(amp));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, prev;
    prev = -1;
    for (int n = 0; n < 64; n++) begin
      addr = 6'(n);
      #1;
      want = int'($floor(63.0 * $sin(PI / 2.0 * real'(n) / 64.0)));
      checks++;
      if (int'(amp) != want) begin
        failures++;
        $display("addr %0d: got %0d want %0d", n, amp, want);
      end
      checks++;
      if (int'(amp) < prev) begin
        failures++;
        $display("addr %0d: table not monotonic (%0d after %0d)", n, amp, prev);
      end
      prev = int'(amp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
