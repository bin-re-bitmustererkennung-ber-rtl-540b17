// Shared types and constants of the serial bit-pattern detector.
//
// The detector looks for the five-bit code 10110 in a serial stream. Its
// six states S0..S5 stand for "this many bits of the code are matched so
// far", so the state's binary encoding (000..101) is exactly the value
// shown on the 3-bit progress output. S0 is the home state entered on
// reset, S5 the state in which the full code has been seen.
// The six states and their output values follow the detector's
// description; making the state encoding equal to the output value is
// this design's choice, which lets the output come straight from the
// state register.
package pattern_pkg;

  // Width of the "bits matched so far" output.
  localparam int unsigned COUNT_W = 3;

  // State encoding equals the number of matched code bits.
  typedef enum logic [COUNT_W-1:0] {
    S0 = 3'd0,  // home: nothing matched
    S1 = 3'd1,  // "1"
    S2 = 3'd2,  // "10"
    S3 = 3'd3,  // "101"
    S4 = 3'd4,  // "1011"
    S5 = 3'd5   // "10110": pattern detected
  } state_t;

endpackage
