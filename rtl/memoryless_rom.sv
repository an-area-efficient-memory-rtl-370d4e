// Memory-less quarter-sine ROM.
//
// A conventional 64 x 6 lookup table needs 384 storage bits and six 64:1
// multiplexers. Here the same table is written as six sum-of-products
// equations of the address bits, so it synthesizes to plain AND/OR/NOT gates
// with no storage at all. The table holds entry n = floor(63 * sin(pi/2 * n/64))
// for n = 0..63, the first quarter of a sine wave scaled to six bits
// (values 0..62).
//
// Naming follows the usual decoder convention: X0 is the most significant
// address bit and X5 the least (addr[5] = X0 ... addr[0] = X5); amp[5] is the
// most significant output bit. The equations of amp[5] and amp[4] are the
// Karnaugh-map results the design is specified with. The equations of amp[3]
// down to amp[0] were minimized for this implementation (prime implicants of
// the same table with a greedy cover), because only the first two are given.
//
// Interface: addr in, amp out. Purely combinational; the caller registers the
// result.
module memoryless_rom #(
  parameter int unsigned ROM_A = ddfs_pkg::ROM_A,
  parameter int unsigned AMP_W = ddfs_pkg::AMP_W
) (
  input  logic [ROM_A-1:0] addr,
  output logic [AMP_W-1:0] amp
);

  // The gate equations are written for exactly a 6-bit address and 6-bit output.
  if (ROM_A != 6 || AMP_W != 6) begin : g_bad_size
    $error("memoryless_rom: the equations are written for ROM_A = 6, AMP_W = 6");
  end

  logic X0, X1, X2, X3, X4, X5;
  assign {X0, X1, X2, X3, X4, X5} = addr[5:0];

  // amp[5]: set from entry 22 (value 32) upwards.
  assign amp[5] = X0 | (~X0 & X1 & (X2 | (X3 & X4)));

  // amp[4]
  assign amp[4] = (X0 & (X3 | X2 | X1))
                | (~X0 & X1 & ~X2 & (~X3 | (X3 & ~X4)))
                | (~X0 & ~X1 & X2 & (X3 | (~X3 & X4 & X5)));

  assign amp[3] = (X0 & X1)
                | (X0 & X2 & X3 & X4)
                | (X0 & X2 & X3 & X5)
                | (X0 & ~X2 & ~X3)
                | (X1 & X2 & X3 & X4)
                | (X1 & X3 & ~X4 & X5)
                | (X1 & ~X2 & ~X3)
                | (X1 & ~X2 & ~X4)
                | (~X0 & ~X1 & X2 & ~X3 & ~X4)
                | (~X0 & ~X1 & X2 & ~X3 & ~X5)
                | (~X0 & ~X1 & ~X2 & X3 & X4);
  assign amp[2] = (X0 & X1 & X3)
                | (X0 & X2 & ~X4 & ~X5)
                | (X0 & ~X1 & ~X3)
                | (X1 & X2 & ~X3 & X4)
                | (X1 & X3 & ~X4 & ~X5)
                | (~X0 & ~X1 & X2 & X3 & X4)
                | (X2 & ~X3 & ~X4 & X5)
                | (~X1 & X2 & ~X3 & ~X5)
                | (~X0 & ~X2 & X3 & ~X4)
                | (~X0 & ~X2 & ~X3 & X4 & X5);
  assign amp[1] = (X0 & X1 & X2 & X5)
                | (X0 & X1 & ~X2 & ~X3)
                | (X0 & ~X1 & ~X2 & X4)
                | (X0 & ~X3 & X4)
                | (X1 & X2 & X3 & X4)
                | (X1 & X2 & X4 & X5)
                | (~X0 & X1 & X2 & ~X4 & ~X5)
                | (X2 & X3 & ~X4 & ~X5)
                | (~X0 & ~X1 & X3 & X5)
                | (~X0 & ~X2 & X3 & ~X4 & X5)
                | (~X0 & ~X1 & X3 & ~X4)
                | (~X1 & ~X3 & X4 & ~X5)
                | (~X2 & ~X3 & X4 & ~X5);
  assign amp[0] = (X0 & X1 & ~X2 & X4)
                | (X0 & ~X1 & X2 & X3 & ~X4 & ~X5)
                | (X0 & ~X1 & X3 & X4 & X5)
                | (X0 & ~X1 & ~X2 & X5)
                | (~X0 & X1 & X2 & ~X3 & ~X5)
                | (X1 & X2 & ~X3 & ~X4 & ~X5)
                | (~X0 & X1 & X3 & X5)
                | (~X0 & X1 & X3 & ~X4)
                | (~X0 & X3 & ~X4 & X5)
                | (~X0 & ~X1 & X4 & ~X5)
                | (~X0 & ~X2 & ~X4 & X5)
                | (~X1 & ~X3 & ~X4 & X5);

endmodule
