// frequency_counter: measures the frequency of a guest signal in hertz, in
// decimal.
//
// An eight-digit decimal (BCD) counter is incremented on every rising edge of
// the guest signal and cleared once per gate period of GATE_CYCLES clock
// cycles (one second at 50 MHz). At the end of each gate period the count,
// including an edge seen in that last cycle, is copied to frq_value, which
// holds the last measurement for the whole of the following second, and
// valid pulses for one cycle. The digits form a cascade: digit 0 (the least
// significant) counts edges and each digit carries into the next when it
// wraps from 9 to 0; a count past 99,999,999 wraps to 0.
//
// The guest signal is asynchronous: it passes a SYNC_STAGES flip-flop
// synchronizer and its rising edges are detected in the clk domain, so the
// guest frequency must stay below half the clock frequency (25 MHz at
// 50 MHz) and each level must last at least one clock period. Measuring in the
// system clock domain, instead of clocking the digits by the guest signal, is
// this design's choice; the decimal counting, one-second clearing, held
// result and eight digits follow the system description.
module frequency_counter #(
  parameter int unsigned GATE_CYCLES = 50_000_000,  // clock cycles per second
  parameter int unsigned DIGITS      = 8,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                  clk,        // 50 MHz system clock
  input  logic                  rst,
  input  logic                  frq_clk,    // guest signal (asynchronous)
  output logic [DIGITS*4-1:0]   frq_value,  // BCD, digit i in bits [4i+3:4i]
  output logic                  valid       // one-cycle pulse: new frq_value
);
  localparam int unsigned GW = $clog2(GATE_CYCLES);

  // ---- synchronizer and rising-edge detector ----------------------------------
  logic [SYNC_STAGES-1:0] sync;
  logic                   last, edge_seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= '0;
      last <= 1'b0;
    end else begin
      sync <= {sync[SYNC_STAGES-2:0], frq_clk};
      last <= sync[SYNC_STAGES-1];
    end
  end
  assign edge_seen = sync[SYNC_STAGES-1] & ~last;

  // ---- gate timer -------------------------------------------------------------
  logic [GW-1:0] gate;
  logic          gate_end;
  assign gate_end = (gate == GW'(GATE_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst || gate_end) gate <= '0;
    else                 gate <= gate + 1'b1;
  end

  // ---- decade cascade ---------------------------------------------------------
  logic [DIGITS-1:0][3:0] count, count_next;

  always_comb begin
    logic c;                      // carry into digit d
    c = edge_seen;
    for (int unsigned d = 0; d < DIGITS; d++) begin
      count_next[d] = count[d];
      if (c) begin
        count_next[d] = (count[d] == 4'd9) ? 4'd0 : count[d] + 4'd1;
        c             = (count[d] == 4'd9);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      frq_value <= '0;
      valid     <= 1'b0;
    end else if (gate_end) begin
      count     <= '0;
      frq_value <= count_next;
      valid     <= 1'b1;
    end else begin
      count     <= count_next;
      valid     <= 1'b0;
    end
  end

  initial assert (SYNC_STAGES >= 2 && GATE_CYCLES >= 2)
    else $error("frequency_counter: needs SYNC_STAGES >= 2 and GATE_CYCLES >= 2");
endmodule
