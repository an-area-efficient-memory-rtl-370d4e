// Self-checking testbench for pipelined_pa.
//
// Two instances run side by side: the default 12-bit accumulator in three
// 4-bit slices, and a 16-bit one in four slices. Both receive a frequency
// control word that is held for stretches and changed at random, including
// the extremes 0, 1 and all-ones. A plain integer accumulator in the
// testbench gives the expected phase; the pipelined phase must equal it
// exactly NS-1 clocks later (2 and 3 clocks). Carries that cross a slice
// boundary are counted and must occur. A watchdog ends the run with a
// failure if it hangs.
module tb_pipelined_pa;

  localparam int N = 3000;

  int checks = 0, failures = 0;
  int slice_carries = 0;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [11:0] fcw12;
  logic [15:0] fcw16;
  logic [11:0] ph12;
  logic [15:0] ph16;

  pipelined_pa dut12 (.clk(clk), .rst_n(rst_n), .fcw(fcw12), .phase(ph12));
  pipelined_pa #(.PA_W(16), .SLICE_W(4)) dut16 (.clk(clk), .rst_n(rst_n), .fcw(fcw16), .phase(ph16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hist*[t]: plain accumulator after t rising edges since reset.
  int unsigned hist12 [N+1];
  int unsigned hist16 [N+1];

  initial begin
    int unsigned acc12, acc16;
    acc12 = 0; acc16 = 0;
    hist12[0] = 0; hist16[0] = 0;
    fcw12 = '0; fcw16 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      // Check the phase produced by the edges so far.
      checks++;
      if (int'(ph12) != int'((t >= 2) ? hist12[t-2] : 0)) begin
        failures++;
        $display("t=%0d 12-bit: got %0h want %0h", t, ph12, (t >= 2) ? hist12[t-2] : 0);
      end
      checks++;
      if (int'(ph16) != int'((t >= 3) ? hist16[t-3] : 0)) begin
        failures++;
        $display("t=%0d 16-bit: got %0h want %0h", t, ph16, (t >= 3) ? hist16[t-3] : 0);
      end
      // New control word: hold for a while, sometimes jump.
      if (t % 97 == 0 || $urandom_range(0, 15) == 0) begin
        case ($urandom_range(0, 5))
          0: begin fcw12 = '0;  fcw16 = '0;  end
          1: begin fcw12 = 12'd1; fcw16 = 16'd1; end
          2: begin fcw12 = '1;  fcw16 = '1;  end
          default: begin fcw12 = 12'($urandom); fcw16 = 16'($urandom); end
        endcase
      end
      // Count carries out of the lower slices of the 12-bit accumulator.
      if ((acc12 & 32'h00f) + (32'(fcw12) & 32'h00f) > 15) slice_carries++;
      if ((acc12 & 32'h0ff) + (32'(fcw12) & 32'h0ff) > 255) slice_carries++;
      acc12 = (acc12 + 32'(fcw12)) & 32'hfff;
      acc16 = (acc16 + 32'(fcw16)) & 32'hffff;
      hist12[t+1] = acc12;
      hist16[t+1] = acc16;
      @(negedge clk);
    end
    checks++;
    if (slice_carries == 0) begin
      failures++;
      $display("no carry crossed a slice boundary");
    end
    $display("inter-slice carries: %0d", slice_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
