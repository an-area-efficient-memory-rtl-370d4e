// Spectral testbench for ddfs_top at its default parameters.
//
// For several frequency control words the synthesizer runs for one full
// accumulator period of 4096 clocks, which holds exactly fcw cycles of the
// output, so the sampling is coherent and no window is needed. The testbench
// then takes a DFT of the 4096 samples (a cosine table of 4096 points and
// direct sums over every bin) and reports:
//   SNR  = power in the fundamental / power in all other bins except DC,
//   SFDR = power in the fundamental / power in the largest other bin.
// It checks that the largest bin is the one at fcw cycles per period, that
// the SNR is at least that of an ideal 6-bit converter
// (6.02 * 6 + 1.76 = 37.88 dB) less 0.5 dB, and that the SFDR is above 40 dB.
// A watchdog ends the run with a failure if it hangs.
module tb_ddfs_spectrum;

  localparam real PI = 3.14159265358979323846;
  localparam int N = 4096;
  localparam int NW = 6;
  localparam int WORDS [NW] = '{1, 3, 16, 100, 683, 1000};

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [11:0] fcw;
  logic [11:0] phase;
  logic [6:0]  sample;

  ddfs_top dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .phase(phase), .sample(sample));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NW * (N + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real costab [N];
  real x [N];

  initial begin
    real re, im, p, p_sig, p_tot, p_spur, snr, sfdr;
    int  k_max, k_sig;
    for (int n = 0; n < N; n++) costab[n] = $cos(2.0 * PI * real'(n) / real'(N));
    fcw = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NW; w++) begin
      fcw = 12'(WORDS[w]);
      // Flush the pipeline (phase 2 clocks, sample 1 more) before sampling.
      repeat (8) @(negedge clk);
      for (int n = 0; n < N; n++) begin
        x[n] = real'(sample);
        @(negedge clk);
      end
      k_sig = WORDS[w];
      p_sig = 0.0; p_tot = 0.0; p_spur = 0.0; k_max = 0;
      for (int k = 1; k <= N / 2; k++) begin
        re = 0.0; im = 0.0;
        for (int n = 0; n < N; n++) begin
          re += x[n] * costab[(k * n) % N];
          im += x[n] * costab[(k * n + 3 * N / 4) % N];
        end
        p = re * re + im * im;
        if (k == N / 2) p = p / 4.0;
        p_tot += p;
        if (k == k_sig) p_sig = p;
        else if (p > p_spur) begin p_spur = p; k_max = k; end
      end
      snr  = 10.0 * $log10(p_sig / (p_tot - p_sig));
      sfdr = 10.0 * $log10(p_sig / p_spur);
      $display("fcw=%0d  SNR=%0.2f dB  SFDR=%0.2f dB (largest spur in bin %0d)",
               WORDS[w], snr, sfdr, k_max);
      checks++;
      if (p_spur >= p_sig) begin
        failures++;
        $display("fcw=%0d: fundamental is not the largest bin", WORDS[w]);
      end
      checks++;
      if (snr < 37.88 - 0.5) begin
        failures++;
        $display("fcw=%0d: SNR %0.2f dB below 6-bit ideal", WORDS[w], snr);
      end
      checks++;
      if (sfdr < 40.0) begin
        failures++;
        $display("fcw=%0d: SFDR %0.2f dB below 40 dB", WORDS[w], sfdr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
