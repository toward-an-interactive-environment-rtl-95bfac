// signal_mux: connects one of N signals of interest to a monitored input.
//
// A measuring module (such as the frequency counter) watches out, which is
// whichever of the N inputs sig selects. The selection lines can be set at
// run time, by software through a shared register or by the board's
// switches, so the signal under observation changes without rebuilding the
// FPGA. Combinational; a select past N-1 gives 0. The run-time multiplexing
// follows the system description; N and the out-of-range rule are this
// design's choices.
module signal_mux #(
  parameter int unsigned N  = 4,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  sig,
  input  logic [SW-1:0] sel,
  output logic          out
);
  always_comb begin
    out = 1'b0;
    for (int unsigned i = 0; i < N; i++)
      if (int'(sel) == i) out = sig[i];
  end
endmodule
