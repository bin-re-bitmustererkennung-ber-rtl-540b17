// Self-checking testbench for pattern_detect_fsm, the whole detector.
//
// A reference model, written independently of the design's transition
// table, tracks how many leading bits of the code 10110 the recent input
// matches: after each bit it takes the longest prefix of the code that is a
// suffix of (matched prefix + new bit). The one exception is the detector's
// rule that a 1 received after 1011 returns to the home state. The model
// also reproduces the registered outputs, which show the state of the
// previous clock period, so every output is compared edge by edge and the
// one-clock latency from the last code bit to pattern_detect_out is checked.
//
// The stimulus is a directed prefix (an overlapping double detection and
// the 1011-then-1 case) followed by a long random stream with occasional
// power-on and button resets. Each transition of the state diagram, both
// resets, the overlapping detection and the return home from S4 are counted;
// one that never happened counts as a failure.
module pattern_detect_fsm_tb;
  import pattern_pkg::*;

  localparam logic [4:0] PATTERN   = 5'b10110;
  localparam int         N_RANDOM  = 4000;
  localparam int         WATCHDOG  = 20000;

  logic       clk_in;
  logic       serial_in = 1'b0;
  logic       reset_in = 1'b0;
  logic       por_in = 1'b1;
  logic [2:0] yet_right_out;
  logic       pattern_detect_out;

  int checks = 0;
  int failures = 0;

  pattern_detect_fsm dut (
    .clk_in, .serial_in, .reset_in, .por_in,
    .yet_right_out, .pattern_detect_out
  );

  initial begin
    clk_in = 1'b1;
    forever #10 clk_in = ~clk_in;
  end

  // Reference model state.
  int unsigned m_state = 0;
  logic [2:0]  m_count = '0;
  logic        m_detect = 1'b0;
  bit          m_valid = 1'b0;   // model known after the first reset edge

  // Coverage counters.
  int trans_seen [6][2];
  int por_resets = 0, button_resets = 0;
  int overlap_hits = 0, s4_one_hits = 0;
  int detections = 0;

  // Longest prefix of PATTERN that ends the string "first s code bits, b".
  function automatic int unsigned model_next(int unsigned s, logic b);
    logic str [6];
    int unsigned len;
    if (s == 4 && b) return 0;  // the detector's rule for 1011 followed by 1
    for (int i = 0; i < 6; i++) str[i] = 1'b0;
    for (int i = 0; i < int'(s); i++) str[i] = PATTERN[4-i];
    str[s] = b;
    len = s + 1;
    for (int k = (len > 5 ? 5 : int'(len)); k >= 1; k--) begin
      bit ok = 1'b1;
      for (int j = 0; j < k; j++)
        if (str[int'(len) - k + j] != PATTERN[4-j]) ok = 1'b0;
      if (ok) return k;
    end
    return 0;
  endfunction

  // Apply one bit (and reset levels) for one clock period and check outputs.
  task automatic step(logic b, logic por, logic rst);
    @(posedge clk_in);
    serial_in = b;
    por_in    = por;
    reset_in  = rst;
    @(negedge clk_in);
    #1;
    if (por || rst) begin
      if (m_valid && m_state != 0) begin
        if (por) por_resets++;
        else     button_resets++;
      end
      m_state  = 0;
      m_count  = '0;
      m_detect = 1'b0;
      m_valid  = 1'b1;
    end else if (m_valid) begin
      trans_seen[m_state][b]++;
      if (m_state == 5 && b)  overlap_hits++;
      if (m_state == 4 && b)  s4_one_hits++;
      m_count  = 3'(m_state);
      m_detect = (m_state == 5);
      m_state  = model_next(m_state, b);
    end
    if (m_valid) begin
      checks++;
      if (yet_right_out !== m_count || pattern_detect_out !== m_detect) begin
        failures++;
        if (failures <= 20) $display("MISMATCH t=%0t bit=%0b por=%0b rst=%0b: got count=%0d detect=%0b, expected count=%0d detect=%0b",
                 $time, b, por, rst, yet_right_out, pattern_detect_out, m_count, m_detect);
      end
      if (pattern_detect_out) detections++;
    end
  endtask

  task automatic send_bits(logic [15:0] bits, int n);
    for (int i = n - 1; i >= 0; i--) step(bits[i], 1'b0, 1'b0);
  endtask

  task automatic expect_detections(int start_count, int expected, string what);
    checks++;
    if (detections - start_count != expected) begin
      failures++;
      $display("FAIL %s: %0d detections, expected %0d", what, detections - start_count, expected);
    end
  endtask

  initial begin
    int d0;
    // Power-on reset for two edges.
    step(1'b0, 1'b1, 1'b0);
    step(1'b0, 1'b1, 1'b0);

    // Overlapping codes: 10110110 holds the code twice.
    d0 = detections;
    send_bits(16'b10110110, 8);
    send_bits(16'b00, 2);  // flush the registered outputs
    expect_detections(d0, 2, "overlapping 10110110");

    // 1011 followed by 1 returns home, so the code starting there is lost.
    d0 = detections;
    send_bits(16'b101110110, 9);
    send_bits(16'b00, 2);
    expect_detections(d0, 0, "101110110 after the S4 return");

    // Plain code after a button reset in the middle of a partial match.
    send_bits(16'b101, 3);
    step(1'b1, 1'b0, 1'b1);
    d0 = detections;
    send_bits(16'b10110, 5);
    send_bits(16'b0, 1);
    checks++;
    if (!pattern_detect_out || yet_right_out != 3'd5) begin
      failures++;
      $display("FAIL: code not reported one edge after its last bit");
    end
    send_bits(16'b0, 1);
    expect_detections(d0, 1, "single code after reset");

    // Random stream with occasional resets.
    for (int i = 0; i < N_RANDOM; i++) begin
      logic b, por, rst;
      b   = 1'($urandom_range(0, 1));
      por = ($urandom_range(0, 299) == 0);
      rst = ($urandom_range(0, 199) == 0);
      // Bias toward the code so that deep states are visited often.
      if ($urandom_range(0, 3) == 0) begin
        send_bits(16'b10110, 5);
        continue;
      end
      step(b, por, rst);
    end

    // Coverage of every mechanism.
    for (int s = 0; s < 6; s++)
      for (int b = 0; b < 2; b++) begin
        checks++;
        if (trans_seen[s][b] == 0) begin
          failures++;
          $display("FAIL: transition S%0d on %0d never taken", s, b);
        end
      end
    checks += 4;
    if (por_resets == 0)    begin failures++; $display("FAIL: no power-on reset from a busy state"); end
    if (button_resets == 0) begin failures++; $display("FAIL: no button reset from a busy state"); end
    if (overlap_hits == 0)  begin failures++; $display("FAIL: no overlapping detection"); end
    if (s4_one_hits == 0)   begin failures++; $display("FAIL: S4 on 1 never taken"); end

    $display("coverage: detections=%0d por_resets=%0d button_resets=%0d overlaps=%0d s4_returns=%0d",
             detections, por_resets, button_resets, overlap_hits, s4_one_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(negedge clk_in);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
