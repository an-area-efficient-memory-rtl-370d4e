// Direct digital frequency synthesizer, top level.
//
// A pipelined 12-bit phase accumulator (pipelined_pa) adds the frequency
// control word on every clock. Its top eight bits drive the quarter-wave
// phase-to-amplitude converter (quarter_wave_pac), whose table is made of
// gates rather than storage; the four lowest phase bits are dropped. The
// result is a 7-bit offset-binary sine sample for an external DAC, at
// f_out = f_clk * fcw / 4096.
//
// Interface: fcw is sampled on every rising edge of clk. phase is the
// accumulator word, brought out for observation. sample is the registered
// sine sample. Timing: phase lags an unpipelined accumulator by two clocks
// (pipeline of three 4-bit slices), and sample follows phase by one clock.
// rst_n is an asynchronous active-low reset; after it phase and sample start
// from zero.
//
// The DAC itself is outside this design; sample is the word it receives.
module ddfs_top #(
  parameter int unsigned PA_W    = ddfs_pkg::PA_W,
  parameter int unsigned SLICE_W = ddfs_pkg::SLICE_W,
  parameter int unsigned ROM_A   = ddfs_pkg::ROM_A,
  parameter int unsigned AMP_W   = ddfs_pkg::AMP_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PA_W-1:0] fcw,
  output logic [PA_W-1:0] phase,
  output logic [AMP_W:0]  sample
);

  pipelined_pa #(.PA_W(PA_W), .SLICE_W(SLICE_W)) u_pa (
    .clk  (clk),
    .rst_n(rst_n),
    .fcw  (fcw),
    .phase(phase)
  );

  quarter_wave_pac #(.ROM_A(ROM_A), .AMP_W(AMP_W)) u_pac (
    .clk   (clk),
    .rst_n (rst_n),
    .phase (phase[PA_W-1 -: ROM_A+2]),
    .sample(sample)
  );

endmodule
