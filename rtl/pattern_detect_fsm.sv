// Serial bit-pattern detector for the code 10110.
//
// A six-state Moore machine watches one bit of serial_in per clock. Each
// state S0..S5 counts how many leading bits of the code 10110 the most
// recent input bits match; S5 means the whole code has just been received.
// The transitions are those of the detector's state diagram:
//
//   state  bit=0  bit=1
//   S0     S0     S1
//   S1     S2     S1
//   S2     S0     S3
//   S3     S2     S4
//   S4     S5     S0
//   S5     S0     S3
//
// Detections may overlap: from S5 a 1 continues with "101" (S3), so
// 10110110 is reported twice. From S4 a 1 returns to S0, as the detector's
// state diagram prescribes, although that 1 could start a new code (a strict
// overlapping detector would go to S1). In 101110110 the code that starts
// at the fifth bit is therefore not reported. Every other transition is the
// one a strict overlapping detector would take.
//
// Timing: everything is clocked on the falling edge of clk_in. On each edge
// the outputs are loaded with the state being left (yet_right_out with its
// number, pattern_detect_out with 1 for S5) and the state advances on
// serial_in. The outputs therefore show the state of the previous clock
// period: the bit that completes the code is sampled on edge k, the state
// becomes S5 there, and pattern_detect_out rises on edge k+1 for one period.
//
// Reset: por_in (power-on reset) and reset_in (reset button) are both
// active high and synchronous; either one sends the machine to S0 on the
// next falling edge. Clearing the two outputs on reset as well, and sending
// the two unused state codes 110 and 111 to S0, are this design's choices;
// the rest follows the detector's description.
//
// Interface:
//   clk_in             clock, falling-edge active
//   serial_in          serial data, sampled on the falling edge
//   reset_in, por_in   synchronous resets, active high
//   yet_right_out      [2:0] code bits matched so far (0..5), registered
//   pattern_detect_out 1 for one period after the full code was matched
module pattern_detect_fsm
  import pattern_pkg::*;
(
  input  logic               clk_in,
  input  logic               serial_in,
  input  logic               reset_in,
  input  logic               por_in,
  output logic [COUNT_W-1:0] yet_right_out,
  output logic               pattern_detect_out
);

  state_t state, state_next;

  // Next state from the current state and the incoming bit.
  always_comb begin
    unique case (state)
      S0:      state_next = serial_in ? S1 : S0;
      S1:      state_next = serial_in ? S1 : S2;
      S2:      state_next = serial_in ? S3 : S0;
      S3:      state_next = serial_in ? S4 : S2;
      S4:      state_next = serial_in ? S0 : S5;
      S5:      state_next = serial_in ? S3 : S0;
      default: state_next = S0;
    endcase
  end

  always_ff @(negedge clk_in) begin
    if (por_in || reset_in) begin
      state              <= S0;
      yet_right_out      <= '0;
      pattern_detect_out <= 1'b0;
    end else begin
      state              <= state_next;
      yet_right_out      <= state;
      pattern_detect_out <= (state == S5);
    end
  end

endmodule
