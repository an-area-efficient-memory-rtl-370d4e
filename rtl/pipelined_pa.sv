// Pipelined phase accumulator.
//
// A PA_W-bit accumulator adds the frequency control word (FCW) to its phase on
// every clock; the phase wraps modulo 2**PA_W, so the output frequency is
// f_clk * FCW / 2**PA_W. To shorten the carry path the accumulator is cut into
// PA_W/SLICE_W sub-accumulators, each with its own Kogge-Stone adder
// (ks_adder) and register. Slice k works one clock after slice k-1: its FCW
// bits are delayed by k clocks on the way in, it adds the carry that slice k-1
// registered on the previous clock, and its sum is delayed by NS-1-k clocks on
// the way out so that all slices of one phase word leave together. The
// longest combinational path is then one SLICE_W-bit addition.
//
// Interface: fcw is sampled on every rising clock edge; phase is the
// registered accumulator word. Timing: phase at a clock equals what a plain,
// unpipelined accumulator fed the same fcw sequence held NS-1 clocks earlier
// (2 clocks at the default 12 bits in 4-bit slices). rst_n is an asynchronous
// active-low reset that clears the phase, the carries and the delay lines.
//
// Following the design: 12-bit accumulator, 4-bit Kogge-Stone slices, one
// pipeline register per slice. The input/output skew registers and the reset
// are this implementation's own choices.
module pipelined_pa #(
  parameter int unsigned PA_W    = ddfs_pkg::PA_W,
  parameter int unsigned SLICE_W = ddfs_pkg::SLICE_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PA_W-1:0] fcw,
  output logic [PA_W-1:0] phase
);

  localparam int unsigned NS = PA_W / SLICE_W;

  // Static check of the slicing.
  if (NS * SLICE_W != PA_W) begin : g_bad_slicing
    $error("pipelined_pa: PA_W must be a multiple of SLICE_W");
  end

  typedef logic [SLICE_W-1:0] slice_t;

  // in_dly[k][d]: FCW bits of slice k after d+1 clocks of delay (k >= 1).
  // out_dly[k][d]: sum of slice k after d+1 clocks of delay (k <= NS-2).
  slice_t in_dly  [NS][NS];
  slice_t out_dly [NS][NS];
  slice_t acc     [NS];
  logic   carry_q [NS];
  slice_t fcw_sk  [NS];
  slice_t sum_n   [NS];
  logic   cout_n  [NS];

  for (genvar k = 0; k < NS; k++) begin : g_slice
    if (k == 0) begin : g_first
      assign fcw_sk[k] = fcw[SLICE_W-1:0];
    end else begin : g_rest
      assign fcw_sk[k] = in_dly[k][k-1];
    end

    ks_adder #(.W(SLICE_W)) u_add (
      .x   (acc[k]),
      .y   (fcw_sk[k]),
      .cin ((k == 0) ? 1'b0 : carry_q[(k == 0) ? 0 : k-1]),
      .sum (sum_n[k]),
      .cout(cout_n[k])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[k]     <= '0;
        carry_q[k] <= 1'b0;
        for (int d = 0; d < NS; d++) begin
          in_dly[k][d]  <= '0;
          out_dly[k][d] <= '0;
        end
      end else begin
        acc[k]     <= sum_n[k];
        carry_q[k] <= cout_n[k];
        // Input skew: k stages for slice k.
        in_dly[k][0] <= fcw[k*SLICE_W +: SLICE_W];
        for (int d = 1; d < NS; d++) in_dly[k][d] <= in_dly[k][d-1];
        // Output deskew: NS-1-k stages for slice k.
        out_dly[k][0] <= acc[k];
        for (int d = 1; d < NS; d++) out_dly[k][d] <= out_dly[k][d-1];
      end
    end

    if (k == NS - 1) begin : g_last_out
      assign phase[k*SLICE_W +: SLICE_W] = acc[k];
    end else begin : g_dly_out
      assign phase[k*SLICE_W +: SLICE_W] = out_dly[k][NS-2-k];
    end
  end

endmodule
