// Reference-stream testbench for pattern_detect_fsm at its default (and
// only) configuration.
//
// Replays a fixed 31-bit stream together with the state the detector is
// expected to reach after each bit, written down by hand from the state
// diagram. The stream passes through every state, contains four codes
// (two of them overlapping a previous code) and several partial matches
// that fall back to S0 or S2. Because the outputs are registered, the state
// reached on falling edge k is expected on yet_right_out after edge k+1,
// and pattern_detect_out must be 1 exactly then for S5. Afterwards a button
// reset and a power-on reset, each applied in a busy state, must bring the
// detector back to S0 and clear the outputs on the same edge.
module pattern_doc_stream_tb;

  localparam int N = 31;
  // Stream, first bit in position 0.
  localparam logic [N-1:0] BITS = {
    1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b0, 1'b1, 1'b0,  // bits 30..21
    1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0,  // bits 20..11
    1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b1,  // bits 10..1
    1'b0                                                         // bit 0
  };
  // Expected state number after each bit, same order as BITS.
  localparam int EXPECT [N] = '{
    0, 1, 2, 3, 4, 5, 0, 1, 2, 3,
    4, 5, 3, 4, 5, 0, 1, 1, 2, 0,
    1, 2, 3, 2, 3, 4, 5, 3, 2, 3,
    2
  };

  logic       clk_in;
  logic       serial_in = 1'b0;
  logic       reset_in = 1'b0;
  logic       por_in = 1'b1;
  logic [2:0] yet_right_out;
  logic       pattern_detect_out;

  int checks = 0;
  int failures = 0;
  int detections = 0;

  pattern_detect_fsm dut (
    .clk_in, .serial_in, .reset_in, .por_in,
    .yet_right_out, .pattern_detect_out
  );

  initial begin
    clk_in = 1'b1;
    forever #10 clk_in = ~clk_in;
  end

  task automatic check(int exp_count, string what);
    checks++;
    if (yet_right_out != 3'(exp_count) || pattern_detect_out != (exp_count == 5)) begin
      failures++;
      $display("FAIL %s: count=%0d detect=%0b, expected count=%0d detect=%0b",
               what, yet_right_out, pattern_detect_out, exp_count, exp_count == 5);
    end
  endtask

  initial begin
    // Power-on reset.
    @(posedge clk_in);
    por_in = 1'b1;
    @(negedge clk_in); #1;
    check(0, "after power-on reset");
    @(posedge clk_in);
    por_in = 1'b0;

    serial_in = BITS[0];
    for (int k = 0; k <= N; k++) begin
      @(negedge clk_in); #1;
      // Edge k has sampled bit k; the outputs now show the state after bit k-1.
      if (k > 0) begin
        check(EXPECT[k-1], $sformatf("after bit %0d", k - 1));
        if (pattern_detect_out) detections++;
      end
      @(posedge clk_in);
      if (k + 1 < N) serial_in = BITS[k+1];
      else           serial_in = 1'b0;
    end
    // One more edge: the state is now S0 after the trailing 0 (from S2).
    checks++;
    if (detections != 4) begin
      failures++;
      $display("FAIL: %0d detections, expected 4", detections);
    end

    // Button reset from a partial match: 1, 0, 1 brings the state to S3.
    serial_in = 1'b1; @(posedge clk_in);
    serial_in = 1'b0; @(posedge clk_in);
    serial_in = 1'b1; @(posedge clk_in);
    serial_in = 1'b1;
    reset_in = 1'b1;
    @(negedge clk_in); #1;
    check(0, "button reset");
    @(posedge clk_in);
    reset_in = 1'b0;
    serial_in = 1'b0;
    @(negedge clk_in); #1;
    check(0, "first edge after button reset");

    // Power-on reset one bit before the code completes: no detection follows.
    serial_in = 1'b1; @(posedge clk_in);
    serial_in = 1'b0; @(posedge clk_in);
    serial_in = 1'b1; @(posedge clk_in);
    serial_in = 1'b1; @(posedge clk_in);
    serial_in = 1'b0;
    por_in = 1'b1;
    @(negedge clk_in); #1;
    check(0, "power-on reset");
    @(posedge clk_in);
    por_in = 1'b0;
    repeat (2) begin
      @(negedge clk_in); #1;
      check(0, "after power-on reset, no code");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(negedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
