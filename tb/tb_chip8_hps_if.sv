// tb_chip8_hps_if: self-checking test of the HPS bus interface.
//
// Drives bus writes and reads to every region of the address map and checks
// the decoded strobes: memory/framebuffer/stack/register writes only while
// the CPU is halted, register loads only with IsWrite, Go and
// DisplayEnabled latched from the control byte, a one-clock DisplayUpdate
// request, keyboard bytes turned into key bits at any time, and read data
// one clock after the read for each source.
module tb_chip8_hps_if;
  import chip8_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst_n, cs, write, read, halted;
  logic [7:0]   address;
  logic [255:0] writedata, readdata;
  logic         mem_we, fb_we, stack_we, misc_load;
  ctrl_word_t   misc;
  logic         go, display_enabled, display_update;
  logic [15:0]  keys;
  logic [255:0] mem_rdata, fb_rdata, stack_entries;
  logic [0:15][7:0] rb_v;
  logic [31:0]  rb_dt_max;
  logic [15:0]  rb_i, rb_pc;
  logic [7:0]   rb_sound, rb_timer, rb_sp;
  logic         rb_fb_busy;

  chip8_hps_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobes are combinational from the bus inputs: check them before the edge
  task automatic wr_check(logic [7:0] a, logic [255:0] d,
                          logic e_mem, logic e_fb, logic e_stk, logic e_misc, logic e_upd);
    @(negedge clk);
    cs = 1; write = 1; address = a; writedata = d;
    #1;
    check($sformatf("mem_we @%h", a), 256'(mem_we), 256'(e_mem));
    check($sformatf("fb_we @%h", a), 256'(fb_we), 256'(e_fb));
    check($sformatf("stack_we @%h", a), 256'(stack_we), 256'(e_stk));
    check($sformatf("misc_load @%h", a), 256'(misc_load), 256'(e_misc));
    check($sformatf("display_update @%h", a), 256'(display_update), 256'(e_upd));
    @(negedge clk);
    cs = 0; write = 0;
  endtask

  task automatic rd_check(logic [7:0] a, logic [255:0] exp);
    @(negedge clk);
    cs = 1; read = 1; address = a;
    @(negedge clk);
    cs = 0; read = 0;
    check($sformatf("read @%h", a), readdata, exp);
  endtask

  function automatic logic [255:0] ctrl_word(logic g, logic isw, logic den, logic upd);
    ctrl_word_t c;
    c = '0;
    for (int k = 0; k < 16; k++) c.v[k] = 8'(k * 11 + 1);
    c.dt_max = 32'd71428;
    c.i = 16'h0321; c.pc = 16'h0246; c.sound = 8'd7; c.timer = 8'd9; c.sp = 8'd3;
    c.ctrl = {3'b000, upd, den, isw, g, 1'b0};
    return c;
  endfunction

  initial begin
    rst_n = 0; cs = 0; write = 0; read = 0; halted = 1; address = 0; writedata = 0;
    mem_rdata = {8{32'hA5A5_0001}}; fb_rdata = {8{32'h5A5A_0002}};
    stack_entries = {16{16'h0BEE}};
    for (int k = 0; k < 16; k++) rb_v[k] = 8'(k);
    rb_dt_max = 32'h0001_1170; rb_i = 16'h0ABC; rb_pc = 16'h0202;
    rb_sound = 8'd1; rb_timer = 8'd2; rb_sp = 8'd4; rb_fb_busy = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("go after reset", 256'(go), 256'(0));

    // halted: every region writable
    wr_check(8'h00, '1, 1, 0, 0, 0, 0);
    wr_check(8'h7F, '1, 1, 0, 0, 0, 0);
    wr_check(8'h80, '1, 0, 1, 0, 0, 0);
    wr_check(8'h9F, '1, 0, 1, 0, 0, 0);
    wr_check(8'hA0, '1, 0, 0, 1, 0, 0);
    wr_check(8'hA3, '1, 0, 0, 0, 0, 0);       // unmapped
    // control word without IsWrite: no register load, Go and DisplayEnabled latch
    wr_check(8'hA2, ctrl_word(1, 0, 1, 0), 0, 0, 0, 0, 0);
    check("go set", 256'(go), 256'(1));
    check("display enabled", 256'(display_enabled), 256'(1));
    // with IsWrite and DisplayUpdate
    wr_check(8'hA2, ctrl_word(0, 1, 0, 1), 0, 0, 0, 1, 1);
    check("go clear", 256'(go), 256'(0));
    check("display disabled", 256'(display_enabled), 256'(0));
    // misc fields decoded MSB-first
    @(negedge clk);
    writedata = ctrl_word(0, 1, 0, 0);
    #1;
    check("misc V3", 256'(misc.v[3]), 256'(8'd34));
    check("misc dt_max", 256'(misc.dt_max), 256'(32'd71428));
    check("misc pc", 256'(misc.pc), 256'(16'h0246));
    check("misc byte 22", 256'(writedata[255 - 8*22 -: 8]), 256'(8'h02));
    check("misc sp", 256'(misc.sp), 256'(8'd3));

    // running: only control and keyboard words act
    halted = 0;
    wr_check(8'h10, '1, 0, 0, 0, 0, 0);
    wr_check(8'h85, '1, 0, 0, 0, 0, 0);
    wr_check(8'hA0, '1, 0, 0, 0, 0, 0);
    wr_check(8'hA2, ctrl_word(1, 1, 1, 1), 0, 0, 0, 0, 1);
    check("go while running", 256'(go), 256'(1));
    begin
      byte_word_t kw;
      kw = '0;
      kw[0] = 8'h01; kw[5] = 8'h80; kw[15] = 8'h02; kw[20] = 8'hFF;   // byte 20 is ignored
      wr_check(8'hA1, kw, 0, 0, 0, 0, 0);
      check("keys", 256'(keys), 256'(16'b1000_0000_0010_0001));
      rd_check(8'hA1, key_readback(16'b1000_0000_0010_0001));
    end

    // reads
    rd_check(8'h05, mem_rdata);
    rd_check(8'h8A, fb_rdata);
    rd_check(8'hA0, stack_entries);
    begin
      ctrl_word_t e;
      e = '0;
      e.v = rb_v; e.dt_max = rb_dt_max; e.i = rb_i; e.pc = rb_pc;
      e.sound = rb_sound; e.timer = rb_timer; e.sp = rb_sp;
      e.ctrl = 8'b0001_1010;   // busy, display enabled, go
      rd_check(8'hA2, e);
    end
    rd_check(8'hB0, '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] key_readback(logic [15:0] k);
    byte_word_t w;
    w = '0;
    for (int i = 0; i < 16; i++) w[i] = {7'd0, k[i]};
    return w;
  endfunction
endmodule
