// End-to-end testbench for ddfs_top at its default parameters.
//
// The synthesizer is run through a sequence of frequency control words:
// fcw = 1 for one full period of 4096 clocks (every phase step), then 16
// (every table address once per period), 100, 1000, 2047 and all-ones
// (aliased, negative-going phase), each held long enough to cover at least
// one full period, with a few random words between them. A plain integer
// accumulator and a real-arithmetic sine table in the testbench give the
// expected phase and sample:
//   phase(t)  = accumulator two clocks earlier (pipeline latency),
//   sample(t) = f(phase(t-1)), one more clock for the output register,
// where f takes the top 8 phase bits, mirrors the table address in the 2nd
// and 4th quarters and inverts the amplitude in the 2nd half.
// The output rate is checked too: while a word is held, the number of
// rising crossings of the sample's sign bit over the window must be
// window * fcw / 4096 within one.
// Counted and required at least once each: a carry crossing each of the two
// slice boundaries, a wrap of the accumulator, the address mirror, the
// amplitude inversion, and a change of the control word. A watchdog ends
// the run with a failure if it hangs.
module tb_ddfs_top;

  localparam real PI = 3.14159265358979323846;
  localparam int MAXT = 40000;

  int checks = 0, failures = 0;
  int n_carry4 = 0, n_carry8 = 0, n_wrap = 0;
  int n_mirror = 0, n_invert = 0, n_switch = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [11:0] fcw;
  logic [11:0] phase;
  logic [6:0]  sample;

  ddfs_top dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .phase(phase), .sample(sample));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (MAXT + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_sample(int unsigned ph);
    int top, q, n, amp;
    top = int'(ph >> 4) & 255;
    q = (top >> 6) & 3;
    n = top & 63;
    if (q[0]) n = 63 - n;
    amp = int'($floor(63.0 * $sin(PI / 2.0 * real'(n) / 64.0)));
    return q[1] ? (63 - amp) : (64 + amp);
  endfunction

  int unsigned hist [MAXT+1];
  int unsigned acc;
  int t;

  // One clock: check outputs, apply w for the next edge, update the model.
  task automatic step(input logic [11:0] w);
    int unsigned want_ph;
    want_ph = (t >= 2) ? hist[t-2] : 0;
    checks++;
    if (phase !== 12'(want_ph)) begin
      failures++;
      if (failures < 10) $display("t=%0d phase %0h want %0h", t, phase, want_ph);
    end
    if (t >= 3) begin
      checks++;
      if (int'(sample) != expected_sample(hist[t-3])) begin
        failures++;
        if (failures < 10) $display("t=%0d sample %0d want %0d", t, sample, expected_sample(hist[t-3]));
      end
    end
    if (phase[10]) n_mirror++;
    if (phase[11]) n_invert++;
    if (w != fcw) n_switch++;
    fcw = w;
    if ((acc & 15) + (int'(w) & 15) > 15) n_carry4++;
    if ((acc & 255) + (int'(w) & 255) > 255) n_carry8++;
    if (acc + int'(w) > 4095) n_wrap++;
    acc = (acc + int'(w)) & 32'hfff;
    t++;
    hist[t] = acc;
    @(negedge clk);
  endtask

  // Hold w for len clocks and check the output frequency over the hold.
  task automatic hold(input logic [11:0] w, input int len);
    int crossings;
    logic prev_sign;
    real want;
    step(w);
    // Let the pipeline fill with the new word before measuring.
    repeat (4) step(w);
    crossings = 0;
    prev_sign = sample[6];
    for (int i = 0; i < len; i++) begin
      step(w);
      if (sample[6] && !prev_sign) crossings++;
      prev_sign = sample[6];
    end
    // A word above half the range aliases to 4096 - w.
    want = real'(len) * real'((int'(w) > 2048) ? 4096 - int'(w) : int'(w)) / 4096.0;
    checks++;
    if (real'(crossings) < want - 1.0 || real'(crossings) > want + 1.0) begin
      failures++;
      $display("fcw=%0d: %0d periods in %0d clocks, want about %0.1f", w, crossings, len, want);
    end
  endtask

  initial begin
    t = 0; acc = 0; hist[0] = 0;
    fcw = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    hold(12'd1, 4096);
    hold(12'd16, 4096);
    hold(12'($urandom_range(1, 4095)), 300);
    hold(12'd100, 4096);
    hold(12'd1000, 2000);
    hold(12'($urandom_range(1, 4095)), 300);
    hold(12'd2047, 2000);
    hold(12'hfff, 4096);
    hold(12'($urandom_range(1, 4095)), 300);
    hold(12'd3, 4096);
    $display("carries 4/8: %0d/%0d wraps %0d mirror %0d invert %0d switches %0d",
             n_carry4, n_carry8, n_wrap, n_mirror, n_invert, n_switch);
    checks++; if (n_carry4 == 0) begin failures++; $display("no carry out of slice 0"); end
    checks++; if (n_carry8 == 0) begin failures++; $display("no carry out of slice 1"); end
    checks++; if (n_wrap   == 0) begin failures++; $display("accumulator never wrapped"); end
    checks++; if (n_mirror == 0) begin failures++; $display("address mirror never used"); end
    checks++; if (n_invert == 0) begin failures++; $display("amplitude inversion never used"); end
    checks++; if (n_switch == 0) begin failures++; $display("control word never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
