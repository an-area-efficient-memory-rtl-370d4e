// Shared sizes of the direct digital frequency synthesizer (DDFS).
//
// The synthesizer accumulates a 12-bit phase, keeps its top eight bits, and
// turns them into a sine sample with a quarter-wave table of 64 six-bit
// entries that is built from gates instead of storage. The two top phase
// bits pick the half and the quadrant; the next six address the table.
// PA_W, SLICE_W, ROM_A and AMP_W are the sizes the design is specified
// with. The output word carries one sign bit on top of the six-bit
// magnitude (offset binary), which is this design's own choice.
package ddfs_pkg;

  // Phase accumulator width and the width of one pipelined sub-accumulator.
  localparam int unsigned PA_W    = 12;
  localparam int unsigned SLICE_W = 4;

  // Quarter-wave table: ROM_A address bits, AMP_W amplitude bits.
  localparam int unsigned ROM_A   = 6;
  localparam int unsigned AMP_W   = 6;

endpackage
