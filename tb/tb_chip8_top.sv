// tb_chip8_top: end-to-end test of the CHIP-8 emulator at its default
// parameters (50 MHz clock, Delay Timer Max 71428, 60 Hz timers).
//
// Plays the part of the host: over the 256-bit bus it loads the hex font
// and a small game-like program, loads all registers with one control-data
// write (IsWrite + Go + DisplayEnabled), presses a key while the program
// waits for one, and at the end stops the CPU, reads every result back and
// draws into the framebuffer itself with a DisplayUpdate request.
//
// The program clears the screen, draws the digit 7, calls a subroutine,
// redraws the 7 to erase it (collision: VF = 1, tested with a skip), waits
// for a key (FX0A), starts the delay and sound timers at 2 ticks, stores
// the key's BCD digits and reads them back, spins on FX07 until the delay
// timer reaches zero, draws the key's digit at (60,30), stores V0-V4 and
// parks on a jump to itself.
//
// Checked: fetches exactly 71428 clocks apart (700 instructions per second
// at 50 MHz), never closer; register, stack, memory and framebuffer
// contents against values worked out by hand; the VGA picture of a whole
// frame (scaled by 4, centred) against the expected 128x64 image, before
// and after the host's own update; the copy-in-progress bit read back; the
// timer tick period of 833,333 clocks; the beep while the sound timer
// runs. Every mechanism of the design is counted and must occur at least
// once: fetch, write_ready, multi-clock
// execute, pacing wait, Direct Write register load, CPU and host display
// copies, a copy request queued behind a running copy, stack push and pop,
// sprite collision, key wait, 60 Hz ticks, beep and VGA frames. The
// counters and the controller-state checks look inside the design through
// hierarchical names; all other results are read through the ports.
module tb_chip8_top;
  import chip8_pkg::*;

  localparam int DT_MAX = 71428;

  logic clk = 0;
  always #10 clk = ~clk;     // 50 MHz

  logic         rst_n, bus_cs, bus_write, bus_read, write_ready;
  logic [7:0]   bus_address;
  logic [255:0] bus_writedata, bus_readdata;
  logic [7:0]   vga_r, vga_g, vga_b;
  logic         vga_hs, vga_vs, vga_blank_n, vga_clk_en;
  logic [1:0]   cpu_state;
  logic         timer_tick;
  logic [15:0]  audio_sample;
  logic         audio_on;

  chip8_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #(20 * 16_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus helpers
  task automatic bus_wr(logic [7:0] a, logic [255:0] d);
    @(negedge clk);
    bus_cs = 1; bus_write = 1; bus_address = a; bus_writedata = d;
    @(negedge clk);
    bus_cs = 0; bus_write = 0;
  endtask

  task automatic bus_rd(logic [7:0] a, output logic [255:0] d);
    @(negedge clk);
    bus_cs = 1; bus_read = 1; bus_address = a;
    @(negedge clk);
    bus_cs = 0; bus_read = 0;
    d = bus_readdata;
  endtask

  // ------------------------------------------------------------ images
  logic [7:0] mem_img [4096];
  logic [127:0] exp_img [64];

  function automatic logic [7:0] font(int digit, int row);
    logic [0:79][7:0] f;
    f = {8'hF0,8'h90,8'h90,8'h90,8'hF0, 8'h20,8'h60,8'h20,8'h20,8'h70,
         8'hF0,8'h10,8'hF0,8'h80,8'hF0, 8'hF0,8'h10,8'hF0,8'h10,8'hF0,
         8'h90,8'h90,8'hF0,8'h10,8'h10, 8'hF0,8'h80,8'hF0,8'h10,8'hF0,
         8'hF0,8'h80,8'hF0,8'h90,8'hF0, 8'hF0,8'h10,8'h20,8'h40,8'h40,
         8'hF0,8'h90,8'hF0,8'h90,8'hF0, 8'hF0,8'h90,8'hF0,8'h10,8'hF0,
         8'hF0,8'h90,8'hF0,8'h90,8'h90, 8'hE0,8'h90,8'hE0,8'h90,8'hE0,
         8'hF0,8'h80,8'h80,8'h80,8'hF0, 8'hE0,8'h90,8'h90,8'h90,8'hE0,
         8'hF0,8'h80,8'hF0,8'h80,8'hF0, 8'hF0,8'h80,8'hF0,8'h80,8'h80};
    return f[digit * 5 + row];
  endfunction

  task automatic put(int a, logic [15:0] op);
    mem_img[a] = op[15:8];
    mem_img[a + 1] = op[7:0];
  endtask

  localparam int KEY = 11;     // the key the host presses

  task automatic build_program();
    for (int a = 0; a < 4096; a++) mem_img[a] = 8'h00;
    for (int d = 0; d < 16; d++) for (int r = 0; r < 5; r++) mem_img[d*5 + r] = font(d, r);
    put('h200, 16'h00E0);  // clear
    put('h202, 16'h6A0A);  // VA = 10
    put('h204, 16'h6B05);  // VB = 5
    put('h206, 16'h6C07);  // VC = 7
    put('h208, 16'hFC29);  // I = font(7)
    put('h20A, 16'hDAB5);  // draw 7 at (10,5)
    put('h20C, 16'h2300);  // call 0x300
    put('h20E, 16'hDAB5);  // draw again: erases, VF = 1
    put('h210, 16'h3F01);  // skip if VF == 1
    put('h212, 16'h6E99);  //   (skipped) VE = 0x99
    put('h214, 16'hF30A);  // V3 = key, waits
    put('h216, 16'h6D02);  // VD = 2
    put('h218, 16'hFD15);  // DT = 2
    put('h21A, 16'hFD18);  // ST = 2
    put('h21C, 16'hA400);  // I = 0x400
    put('h21E, 16'hF333);  // BCD(V3) at 0x400
    put('h220, 16'hF265);  // V0..V2 = mem[0x400..]
    put('h222, 16'hF107);  // loop: V1 = DT
    put('h224, 16'h3100);  //   skip if V1 == 0
    put('h226, 16'h1222);  //   jump loop
    put('h228, 16'h6A3C);  // VA = 60
    put('h22A, 16'h6B1E);  // VB = 30
    put('h22C, 16'hF329);  // I = font(V3)
    put('h22E, 16'hDAB5);  // draw key digit at (60,30)
    put('h230, 16'hA500);  // I = 0x500
    put('h232, 16'hF455);  // mem[0x500..] = V0..V4
    put('h234, 16'h1234);  // park
    put('h300, 16'h6481);  // V4 = 0x81
    put('h302, 16'h00EE);  // return
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_fetch = 0, n_long_exec = 0, n_wait = 0, n_load = 0, n_copy_cpu = 0, n_copy_hps = 0;
  int n_queued = 0, n_push = 0, n_pop = 0, n_coll = 0, n_ready = 0, n_keywait = 0, n_tick = 0, n_beep = 0, n_frames = 0;
  int exec_len = 0;
  int last_tick = -1, n_tick_bad = 0;
  int cyc = 0, last_fetch = -1, n_gap_exact = 0, n_gap_short = 0;
  logic [15:0] exec_op;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_cpu.state == ST_FETCH) n_fetch++;
    if (dut.u_cpu.state == ST_WAIT)  n_wait++;
    if (dut.u_cpu.state == ST_EXEC) begin
      exec_len++;
      if (exec_len == 1) exec_op = dut.u_cpu.op;
      if (exec_op == 16'hF30A && exec_len > 1) n_keywait++;
    end else begin
      if (exec_len > 1) n_long_exec++;
      exec_len = 0;
    end
    if (dut.misc_load) n_load++;
    if (dut.u_cpu.fb_update) n_copy_cpu++;
    if (dut.display_update) n_copy_hps++;
    if (dut.display_update && dut.fb_busy) n_queued++;
    if (dut.stk_push) n_push++;
    if (dut.stk_pop) n_pop++;
    if (timer_tick) begin
      n_tick++;
      if (last_tick >= 0 && cyc - last_tick != 50_000_000 / 60) n_tick_bad++;
      last_tick = cyc;
    end
    if (audio_on) n_beep++;
    if (write_ready) n_ready++;
    if (write_ready && exec_op[15:12] == 4'hD && dut.u_cpu.v[15] == 8'd1) n_coll++;
    // instruction rate: clocks from one fetch to the next (a key wait
    // stretches its own instruction, so that gap is left out)
    if (dut.u_cpu.state == ST_FETCH) begin
      if (last_fetch >= 0 && exec_op != 16'hF30A) begin
        if (cyc - last_fetch == DT_MAX) n_gap_exact++;
        if (cyc - last_fetch < DT_MAX) begin n_gap_short++; $display("FAIL short gap %0d at %0d after %h", cyc - last_fetch, cyc, exec_op); end
      end
      last_fetch = cyc;
    end
  end

  // ------------------------------------------------------------ VGA capture
  // Beam position from the sync edges (hsync falls at column 656, vsync at
  // line 490); the centre pixel of each 4x4 block is sampled.
  logic [127:0] scr [64];
  int  h = -1, v = -1;
  logic prev_hs = 1, prev_vs = 1, sample_now = 0;
  int  smin = 0, smax = 0;

  always @(posedge clk) sample_now <= vga_clk_en;
  always @(negedge clk) begin
    if (audio_on) begin
      if ($signed(audio_sample) < smin) smin = $signed(audio_sample);
      if ($signed(audio_sample) > smax) smax = $signed(audio_sample);
    end
    if (sample_now && rst_n) begin
      if (prev_hs && !vga_hs) begin
        h = 656;
        if (v >= 0) v = (v + 1) % 525;
      end else if (h >= 0) h = (h + 1) % 800;
      if (prev_vs && !vga_vs) begin v = 490; n_frames++; end
      prev_hs = vga_hs; prev_vs = vga_vs;
      if (h >= 64 && h < 576 && v >= 112 && v < 368 && (h - 64) % 4 == 2 && (v - 112) % 4 == 2)
        scr[(v - 112) / 4][127 - (h - 64) / 4] = (vga_r == 8'hFF) && vga_blank_n;
    end
  end

  task automatic check_screen(string tag);
    int start, bad;
    start = n_frames;
    wait (n_frames == start + 2);      // one whole frame captured
    bad = 0;
    for (int r = 0; r < 64; r++) if (scr[r] !== exp_img[r]) bad++;
    check({tag, ": VGA rows differing from expected image"}, 256'(bad), 256'(0));
  endtask

  // ------------------------------------------------------------ main
  initial begin
    logic [255:0] rd;
    ctrl_word_t   cw;
    rst_n = 0; bus_cs = 0; bus_write = 0; bus_read = 0; bus_address = 0; bus_writedata = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;

    // power-on state
    bus_rd(ADDR_CTRL, rd);
    cw = ctrl_word_t'(rd);
    check("reset PC", 256'(cw.pc), 256'(16'h0200));
    check("reset Delay Timer Max", 256'(cw.dt_max), 256'(DT_MAX));

    // load program, clear stack and framebuffer
    build_program();
    for (int w = 0; w < 128; w++) begin
      logic [255:0] d;
      for (int b = 0; b < 32; b++) d[255 - 8*b -: 8] = mem_img[w*32 + b];
      bus_wr(8'(w), d);
    end
    for (int w = 0; w < 32; w++) bus_wr(ADDR_FB_FIRST + 8'(w), '0);
    bus_wr(ADDR_STACK, '0);
    bus_rd(8'h10, rd);
    check("program readback word 0x10", rd[255 -: 32], {mem_img['h200], mem_img['h201], mem_img['h202], mem_img['h203]});

    // registers and Go in one write
    cw = '0;
    cw.pc = 16'h0200; cw.dt_max = DT_MAX;
    cw.ctrl[CTRL_GO] = 1; cw.ctrl[CTRL_ISWRITE] = 1; cw.ctrl[CTRL_DISP_EN] = 1;
    bus_wr(ADDR_CTRL, cw);

    // wait until the program sits in FX0A, then press the key
    wait (n_keywait > 1000);
    check("waiting for key in Execute", 256'(dut.u_cpu.state), 256'(ST_EXEC));
    begin
      byte_word_t kw;
      kw = '0;
      kw[KEY] = 8'h01;
      bus_wr(ADDR_KEYS, kw);
      repeat (10) @(negedge clk);
      bus_wr(ADDR_KEYS, '0);
    end

    // run to the park loop
    wait (dut.u_cpu.pc == 16'h0234 && dut.u_cpu.state == ST_WAIT);
    repeat (100) @(negedge clk);

    // expected picture: digit KEY at (60,30)
    for (int r = 0; r < 64; r++) exp_img[r] = '0;
    for (int r = 0; r < 5; r++)
      for (int b = 0; b < 8; b++)
        if (font(KEY, r)[7 - b]) exp_img[30 + r][127 - (60 + b)] = 1'b1;
    check_screen("program image");

    // stop the CPU, read everything back
    cw = '0;
    cw.ctrl[CTRL_DISP_EN] = 1;
    bus_wr(ADDR_CTRL, cw);
    repeat (10) @(negedge clk);
    check("halted", 256'(dut.u_cpu.state), 256'(ST_DIRECT));
    check("cpu_state output shows Direct Write", 256'(cpu_state), 256'(ST_DIRECT));
    bus_rd(ADDR_CTRL, rd);
    cw = ctrl_word_t'(rd);
    check("V0", 256'(cw.v[0]), 256'(0));
    check("V1", 256'(cw.v[1]), 256'(0));
    check("V2", 256'(cw.v[2]), 256'(1));
    check("V3 = key", 256'(cw.v[3]), 256'(KEY));
    check("V4 set in subroutine", 256'(cw.v[4]), 256'(8'h81));
    check("VA", 256'(cw.v[10]), 256'(60));
    check("VB", 256'(cw.v[11]), 256'(30));
    check("VC", 256'(cw.v[12]), 256'(7));
    check("VD", 256'(cw.v[13]), 256'(2));
    check("VE: collision skip taken", 256'(cw.v[14]), 256'(0));
    check("VF: last draw without collision", 256'(cw.v[15]), 256'(0));
    check("I", 256'(cw.i), 256'(16'h0500));
    check("PC parked", 256'(cw.pc), 256'(16'h0234));
    check("SP", 256'(cw.sp), 256'(0));
    check("delay timer", 256'(cw.timer), 256'(0));
    check("sound timer", 256'(cw.sound), 256'(0));
    check("Go read back", 256'(cw.ctrl[CTRL_GO]), 256'(0));
    check("DisplayEnabled read back", 256'(cw.ctrl[CTRL_DISP_EN]), 256'(1));
    bus_rd(ADDR_STACK, rd);
    check("return address on stack", 256'(rd[255 - 16 -: 16]), 256'(16'h020E));
    bus_rd(8'h20, rd);                  // 0x400
    check("BCD digits", 256'(rd[255 -: 24]), 256'(24'h000101));
    bus_rd(8'h28, rd);                  // 0x500
    check("stored V0-V4", 256'(rd[255 -: 40]), 256'({8'd0, 8'd0, 8'd1, 8'(KEY), 8'h81}));
    for (int w = 0; w < 32; w++) begin
      bus_rd(ADDR_FB_FIRST + 8'(w), rd);
      check($sformatf("working framebuffer word %0d", w), rd, {exp_img[2*w], exp_img[2*w + 1]});
    end

    // the host draws two lit rows and asks for a display update
    bus_wr(ADDR_FB_FIRST, '1);
    cw = '0;
    cw.ctrl[CTRL_DISP_EN] = 1; cw.ctrl[CTRL_DISP_UPD] = 1;
    bus_wr(ADDR_CTRL, cw);
    // a second request while the first copy runs is queued, and the
    // control byte read back shows the copy in progress
    bus_wr(ADDR_CTRL, cw);
    bus_rd(ADDR_CTRL, rd);
    check("copy in progress read back", 256'(rd[CTRL_DISP_UPD]), 256'(1));
    repeat (80) @(negedge clk);
    bus_rd(ADDR_CTRL, rd);
    check("copies finished read back", 256'(rd[CTRL_DISP_UPD]), 256'(0));
    exp_img[0] = '1; exp_img[1] = '1;
    check_screen("after host update");

    // pacing and beep
    check("instructions exactly 71428 clocks apart", 256'(n_gap_exact >= 20), 256'(1));
    check("no instruction faster than Delay Timer Max", 256'(n_gap_short), 256'(0));
    check("60 Hz ticks 833333 clocks apart", 256'(n_tick_bad), 256'(0));
    check("beep amplitude", 256'(smax > 30000 && smin < -30000), 256'(1));

    $display("COUNT fetch=%0d long_exec=%0d wait_cycles=%0d reg_loads=%0d cpu_updates=%0d host_updates=%0d queued_updates=%0d",
             n_fetch, n_long_exec, n_wait, n_load, n_copy_cpu, n_copy_hps, n_queued);
    $display("COUNT push=%0d pop=%0d write_ready=%0d collisions=%0d key_wait_cycles=%0d ticks=%0d beep_cycles=%0d frames=%0d exact_gaps=%0d",
             n_push, n_pop, n_ready, n_coll, n_keywait, n_tick, n_beep, n_frames, n_gap_exact);
    check("mechanism: fetch", 256'(n_fetch > 0), 256'(1));
    check("mechanism: write_ready", 256'(n_ready > 0), 256'(1));
    check("mechanism: multi-clock execute", 256'(n_long_exec > 0), 256'(1));
    check("mechanism: pacing wait", 256'(n_wait > 0), 256'(1));
    check("mechanism: Direct Write register load", 256'(n_load > 0), 256'(1));
    check("mechanism: CPU display update", 256'(n_copy_cpu > 0), 256'(1));
    check("mechanism: host display update", 256'(n_copy_hps > 0), 256'(1));
    check("mechanism: queued display update", 256'(n_queued > 0), 256'(1));
    check("mechanism: stack push", 256'(n_push > 0), 256'(1));
    check("mechanism: stack pop", 256'(n_pop > 0), 256'(1));
    check("mechanism: sprite collision", 256'(n_coll > 0), 256'(1));
    check("mechanism: key wait", 256'(n_keywait > 0), 256'(1));
    check("mechanism: 60 Hz tick", 256'(n_tick > 0), 256'(1));
    check("mechanism: beep", 256'(n_beep > 0), 256'(1));
    check("mechanism: VGA frames", 256'(n_frames > 0), 256'(1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
