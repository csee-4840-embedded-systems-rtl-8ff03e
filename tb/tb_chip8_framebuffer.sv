// tb_chip8_framebuffer: self-checking test of the double framebuffer.
//
// Writes the working buffer through both the bus and the CPU row port,
// checks reads on both ports, checks that the displayed buffer is untouched
// until a display update, that an update copies the whole buffer in 32
// clocks (busy high for exactly that long), and that a request arriving
// during a copy triggers a second copy. Pixel reads are compared with a
// 128x64 bit-array model.
module tb_chip8_framebuffer;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst_n;
  logic         bus_we;
  logic [4:0]   bus_addr;
  logic [255:0] bus_wdata, bus_rdata;
  logic [5:0]   cpu_row;
  logic [127:0] cpu_rdata, cpu_wdata;
  logic         cpu_we, update_req, busy;
  logic [6:0]   pix_x;
  logic [5:0]   pix_y;
  logic         pix;

  chip8_framebuffer #(.WORDS(32)) dut (.*);

  int checks = 0, failures = 0;
  logic [127:0] work_m [64];   // row models, pixel x = bit 127-x
  logic [127:0] disp_m [64];

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic check_display(string what);
    int bad;
    bad = 0;
    for (int t = 0; t < 400; t++) begin
      int x, y;
      x = int'($urandom_range(0, 127));
      y = int'($urandom_range(0, 63));
      pix_x = 7'(x); pix_y = 6'(y);
      @(negedge clk);
      if (pix !== disp_m[y][127 - x]) bad++;
    end
    check({what, " displayed pixels"}, 256'(bad), 256'(0));
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure copy length
  int busy_cycles = 0;
  always @(posedge clk) if (busy) busy_cycles++;

  task automatic do_update(string what);
    int start;
    start = busy_cycles;
    @(negedge clk); update_req = 1;
    @(negedge clk); update_req = 0;
    while (busy) @(negedge clk);
    check({what, " copy cycles"}, 256'(busy_cycles - start), 256'(32));
    for (int r = 0; r < 64; r++) disp_m[r] = work_m[r];
  endtask

  initial begin
    rst_n = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; cpu_row = 0; cpu_we = 0;
    cpu_wdata = 0; update_req = 0; pix_x = 0; pix_y = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear both buffers via bus + update
    for (int w = 0; w < 32; w++) begin
      bus_we = 1; bus_addr = 5'(w); bus_wdata = '0;
      @(negedge clk);
    end
    bus_we = 0;
    for (int r = 0; r < 64; r++) work_m[r] = '0;
    do_update("initial");
    check_display("after clear");

    // bus writes: random words
    for (int w = 0; w < 32; w++) begin
      logic [255:0] d;
      d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      bus_we = 1; bus_addr = 5'(w); bus_wdata = d;
      work_m[2*w] = d[255:128]; work_m[2*w + 1] = d[127:0];
      @(negedge clk);
    end
    bus_we = 0;
    // displayed buffer must not change yet
    check_display("before update");
    // CPU row reads
    for (int r = 0; r < 64; r++) begin
      cpu_row = 6'(r);
      @(negedge clk);
      check($sformatf("cpu row read %0d", r), 256'(cpu_rdata), 256'(work_m[r]));
    end
    // CPU row writes on some rows
    for (int t = 0; t < 40; t++) begin
      int r;
      logic [127:0] d;
      r = int'($urandom_range(0, 63));
      d = {$urandom, $urandom, $urandom, $urandom};
      cpu_row = 6'(r); cpu_we = 1; cpu_wdata = d; work_m[r] = d;
      @(negedge clk);
      cpu_we = 0;
    end
    // bus reads see CPU writes
    for (int w = 0; w < 32; w++) begin
      bus_addr = 5'(w);
      @(negedge clk);
      check($sformatf("bus read %0d", w), bus_rdata, {work_m[2*w], work_m[2*w + 1]});
    end
    do_update("first");
    check_display("after update");

    // request during a copy: a second copy follows
    work_m[10] = ~work_m[10];
    @(negedge clk); update_req = 1;
    @(negedge clk); update_req = 0;
    repeat (5) @(negedge clk);
    cpu_row = 6'd10; cpu_we = 1; cpu_wdata = work_m[10];
    update_req = 1;
    @(negedge clk);
    cpu_we = 0; update_req = 0;
    begin
      int n;
      n = 0;
      while (busy) begin n++; @(negedge clk); end
      // rest of the first copy (words 6-31) then a full second copy
      check("queued copy length", 256'(n), 256'(26 + 32));
    end
    for (int r = 0; r < 64; r++) disp_m[r] = work_m[r];
    check_display("after queued update");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
