// io_interface: brings the board's switches and push buttons into the design.
//
// The 8 switches give a colour in the 8-bit RGB 3:3:2 format of the VGA
// pins. Pressing button 0 loads the switches into the font colour, button 1
// into the background colour, and button 2 loads switches [SEL_W-1:0] into the
// switch-set selection lines of the signal-of-interest multiplexer. Buttons
// and switches are asynchronous, so each passes a two-stage synchronizer and
// a button acts once, on the clock after its synchronized rising edge. No
// debouncing is needed: a bouncing press only reloads the same value.
//
// After reset the font is white, the background blue and the selection 0.
// Choosing colours with the switches, and selection lines set from switches
// or buttons, follow the system description; sharing the 8 switches between
// the two colours through buttons is this design's choice.
module io_interface
  import monitor_pkg::*;
#(
  parameter int unsigned SEL_W = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [7:0]       sw,
  input  logic [2:0]       btn,
  output rgb332_t          font_color,
  output rgb332_t          bg_color,
  output logic [SEL_W-1:0] sel_sw,
  output logic [2:0]       btn_event     // one-cycle pulse per button press
);
  logic [7:0] sw_s1, sw_s2;
  logic [2:0] btn_s1, btn_s2, btn_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_s1  <= '0;
      sw_s2  <= '0;
      btn_s1 <= '0;
      btn_s2 <= '0;
      btn_q  <= '0;
    end else begin
      sw_s1  <= sw;
      sw_s2  <= sw_s1;
      btn_s1 <= btn;
      btn_s2 <= btn_s1;
      btn_q  <= btn_s2;
    end
  end

  assign btn_event = btn_s2 & ~btn_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      font_color <= COLOR_WHITE;
      bg_color   <= COLOR_BLUE;
      sel_sw     <= '0;
    end else begin
      if (btn_event[0]) font_color <= rgb332_t'(sw_s2);
      if (btn_event[1]) bg_color   <= rgb332_t'(sw_s2);
      if (btn_event[2]) sel_sw     <= sw_s2[SEL_W-1:0];
    end
  end
endmodule
