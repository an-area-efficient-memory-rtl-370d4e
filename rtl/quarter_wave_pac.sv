// Quarter-wave phase-to-amplitude converter (PAC).
//
// Only the first quarter of the sine wave is tabulated (memoryless_rom, 64
// entries). The two top phase bits rebuild the rest by symmetry:
//   * the quadrant bit, when set, one's-complements the table address, which
//     mirrors the second and fourth quarters in time;
//   * the half bit, when set, one's-complements the amplitude, which turns the
//     second half of the period negative.
// The output is offset binary: the positive half is {1, amp} = 64 + amp and
// the negative half is {0, ~amp} = 63 - amp. Both halves are therefore
// centred on 63.5, half an LSB off the integer grid, and an inversion alone
// gives the negative samples, so no two's-complement adder is needed.
//
// Interface: phase holds the top ROM_A+2 bits of the accumulator
// ({half, quadrant, address}); sample is registered and follows phase by one
// clock. rst_n is an asynchronous active-low reset that clears sample.
//
// Following the design: quarter-wave symmetry, one's-complement address and
// amplitude, a memory-less table and a register on the output. The one-bit
// sign on top of the six-bit magnitude (a 7-bit sample) and the reset are
// this implementation's choices.
module quarter_wave_pac #(
  parameter int unsigned ROM_A = ddfs_pkg::ROM_A,
  parameter int unsigned AMP_W = ddfs_pkg::AMP_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ROM_A+1:0] phase,
  output logic [AMP_W:0]   sample
);

  logic             half, quadrant;
  logic [ROM_A-1:0] addr_in, addr;
  logic [AMP_W-1:0] amp;
  logic [AMP_W:0]   sample_n;

  assign {half, quadrant, addr_in} = phase;

  // Address mirror for the second and fourth quarters.
  assign addr = quadrant ? ~addr_in : addr_in;

  memoryless_rom #(.ROM_A(ROM_A), .AMP_W(AMP_W)) u_rom (
    .addr(addr),
    .amp (amp)
  );

  // Amplitude inversion for the second half, offset-binary sign on top.
  assign sample_n = half ? {1'b0, ~amp} : {1'b1, amp};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample <= '0;
    else        sample <= sample_n;
  end

endmodule
