// Self-checking testbench for quarter_wave_pac.
//
// All 256 values of the 8-bit phase ({half, quadrant, address}) are applied,
// one per clock. The expected sample is worked out here: the quarter-wave
// table floor(63 * sin(pi/2 * n / 64)) in real arithmetic, the address
// mirrored (63 - n) in the second and fourth quarters, and the offset-binary
// result 64 + amp in the first half and 63 - amp in the second. The sample
// must appear exactly one clock after its phase. Each quarter is counted and
// must be visited. A watchdog ends the run with a failure if it hangs.
module tb_quarter_wave_pac;

  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  int quarter_seen [4] = '{0, 0, 0, 0};

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] phase;
  logic [6:0] sample;

  quarter_wave_pac dut (.clk(clk), .rst_n(rst_n), .phase(phase), .sample(sample));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int ph);
    int q, n, amp;
    q = (ph >> 6) & 3;
    n = ph & 63;
    if (q[0]) n = 63 - n;
    amp = int'($floor(63.0 * $sin(PI / 2.0 * real'(n) / 64.0)));
    return q[1] ? (63 - amp) : (64 + amp);
  endfunction

  initial begin
    phase = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (sample != '0) begin
      failures++;
      $display("sample not cleared by reset");
    end
    rst_n = 1'b1;
    for (int p = 0; p < 256; p++) begin
      phase = 8'(p);
      @(negedge clk);
      checks++;
      quarter_seen[(p >> 6) & 3]++;
      if (int'(sample) != expected(p)) begin
        failures++;
        $display("phase %0d: got %0d want %0d", p, sample, expected(p));
      end
      // Symmetry: quarter 2 is the inversion of quarter 0 around 63.5.
      if (p >= 128) begin
        checks++;
        if (int'(sample) != 127 - expected(p - 128)) begin
          failures++;
          $display("phase %0d: odd symmetry broken", p);
        end
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quarter_seen[q] == 0) begin
        failures++;
        $display("quarter %0d never visited", q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
