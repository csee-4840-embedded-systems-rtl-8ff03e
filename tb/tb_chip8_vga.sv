// tb_chip8_vga: self-checking test of the VGA scan-out.
//
// Connects the scan-out to a behavioural 128x64 picture (a checkerboard of
// 5x3-pixel cells, answered with one clock of latency like the real
// framebuffer) and watches one full frame plus the start of the next. On
// every pixel clock it reconstructs the beam position from the sync edges
// and checks: 800 pixels per line, 525 lines per frame, hsync 96 pixels
// and vsync 2 lines long at the standard positions, blanking outside
// 640x480, and each visible pixel's colour against the picture scaled by 4
// with 64/112-pixel borders. A second frame runs with display_enabled low
// and must be black.
module tb_chip8_vga;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, display_enabled, pix, pix_en;
  logic [6:0] pix_x;
  logic [5:0] pix_y;
  logic [7:0] vga_r, vga_g, vga_b;
  logic       vga_hs, vga_vs, vga_blank_n;

  chip8_vga dut (.*);

  function automatic logic picture(int x, int y);
    return ((x / 5) + (y / 3)) % 2 == 1;
  endfunction

  always_ff @(posedge clk) pix <= picture(int'(pix_x), int'(pix_y));

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Outputs are registered on pix_en; sample them one clock later.
  int  h = -1, v = -1, line_len = 0, hs_len = 0, vs_lines = 0;
  logic prev_hs = 1, prev_vs = 1;
  int  pixel_errs = 0, blank_errs = 0, lines = 0, frames = 0;
  logic sampling = 0;

  always @(posedge clk) begin
    if (rst_n && pix_en) sampling <= 1;
    else sampling <= 0;
  end

  always @(negedge clk) begin
    if (sampling) begin
      // beam position tracking: hsync falls at h = 656, vsync falls at v = 490
      if (prev_hs && !vga_hs) begin
        if (h >= 0) check("pixels per line", line_len, 800);
        h = 656; line_len = 0;
        if (v >= 0) v = v + 1;
        if (v == 525) v = 0;
        if (v >= 0) lines++;
      end else if (h >= 0) begin
        h = (h + 1) % 800;
      end
      if (prev_vs && !vga_vs) begin
        if (v >= 0) check("lines per frame", lines, 525);
        v = 490; lines = 0; frames++;
      end
      line_len++;
      if (!vga_hs) hs_len++;
      if (prev_hs == 0 && vga_hs == 1) begin check("hsync width", hs_len, 96); hs_len = 0; end
      if (prev_hs && !vga_hs && !vga_vs) vs_lines++;
      if (prev_vs == 0 && vga_vs == 1) begin check("vsync lines", vs_lines, 2); vs_lines = 0; end
      prev_hs = vga_hs; prev_vs = vga_vs;
      if (h >= 0 && v >= 0) begin
        logic vis, in_img, exp_on;
        vis    = (h < 640) && (v < 480);
        in_img = (h >= 64) && (h < 576) && (v >= 112) && (v < 368);
        exp_on = vis && in_img && display_enabled && picture((h - 64) / 4, (v - 112) / 4);
        if (vga_blank_n != vis) blank_errs++;
        if ((vga_r == 8'hFF) != exp_on || vga_r != vga_g || vga_g != vga_b) pixel_errs++;
        if (!vis && vga_r != 0) pixel_errs++;
      end
    end
  end

  initial begin
    rst_n = 0; display_enabled = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // first frame: sync up; second: compare; third: disabled
    wait (frames == 2);
    check("pixel errors, frame enabled", pixel_errs, 0);
    check("blank errors", blank_errs, 0);
    pixel_errs = 0;
    display_enabled = 0;
    wait (frames == 3);
    check("pixel errors, frame disabled", pixel_errs, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
