// tb_chip8_speaker: self-checking test of the beep tone generator.
//
// With CLK_HZ = 1 MHz and TONE_HZ = 1 kHz one tone period is 1000 clocks.
// Checks silence while the sound timer is zero, then while it is non-zero:
// the period between successive peaks, that the wave only rises then only
// falls (a triangle), that each step is 2 * 2^16 / 1000 ~ 131 codes, and
// that the swing covers nearly the full signed 16-bit range.
module tb_chip8_speaker;
  localparam int CLK_HZ  = 1_000_000;
  localparam int TONE_HZ = 1_000;
  localparam int PERIOD  = CLK_HZ / TONE_HZ;

  logic clk = 0;
  always #5 clk = ~clk;

  logic               rst_n, active;
  logic [7:0]         sound;
  logic signed [15:0] sample;

  chip8_speaker #(.CLK_HZ(CLK_HZ), .TONE_HZ(TONE_HZ), .SAMPLE_W(16)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int lo, int hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d..%0d", what, got, lo, hi);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, dir, peaks, last_peak, smin, smax, bad_step, rises, falls;
    rst_n = 0; sound = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    check("silent sample", int'(sample), 0, 0);
    check("silent active", int'(active), 0, 0);

    sound = 8'd30;
    @(negedge clk);
    @(negedge clk);
    check("active", int'(active), 1, 1);
    prev = int'(sample); dir = 1; peaks = 0; last_peak = -1;
    smin = prev; smax = prev; bad_step = 0; rises = 0; falls = 0;
    for (int c = 1; c <= 5 * PERIOD; c++) begin
      int s, d;
      @(negedge clk);
      s = int'(sample);
      d = s - prev;
      if (d > 0) rises++; else falls++;
      if (s < smin) smin = s;
      if (s > smax) smax = s;
      if (d > 0 && (d < 128 || d > 134)) bad_step++;
      if (d < 0 && (d > -128 || d < -134)) bad_step++;
      if (dir == 1 && d < 0) begin
        if (last_peak >= 0) check("period between peaks", c - last_peak, PERIOD - 1, PERIOD + 1);
        last_peak = c; peaks++; dir = -1;
      end else if (dir == -1 && d > 0) begin
        dir = 1;
      end
      prev = s;
    end
    check("peaks seen", peaks, 4, 6);
    check("no bad steps", bad_step, 0, 0);
    check("rising half", rises, 5 * PERIOD / 2 - 10, 5 * PERIOD / 2 + 10);
    check("minimum", smin, -32768, -32500);
    check("maximum", smax, 32500, 32767);

    sound = 0;
    repeat (2) @(negedge clk);
    check("silent again", int'(sample), 0, 0);
    check("inactive again", int'(active), 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
