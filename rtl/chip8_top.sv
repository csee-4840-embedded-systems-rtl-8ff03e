// chip8_top: CHIP-8 hardware emulator for an FPGA with an ARM host (HPS).
//
// The whole CHIP-8 virtual machine is built as hardware: the CPU and its
// controller (chip8_cpu), the 4 KiB program memory (chip8_memory), the
// double framebuffer (chip8_framebuffer), the 16-entry return stack
// (chip8_stack), the 60 Hz delay and sound timers (chip8_timers), a tone
// generator for the beep (chip8_speaker) and the VGA scan-out (chip8_vga).
// The host loads a game and all machine state through one 256-bit bus
// (chip8_hps_if), starts and stops the CPU with the Go bit, feeds it the
// 16-key keyboard state, and may itself draw into the working framebuffer
// and request display updates.
//
// Bus: word-addressed, 256-bit, one access per clock; writes complete on
// the clock edge, read data is valid the clock after bus_read. The word
// map is in chip8_hps_if. write_ready pulses for one clock each time an
// instruction finishes. The VGA outputs are 640x480 at 60 Hz with the
// pixel rate at half the clock (vga_clk_en marks pixel clocks), syncs
// active low. audio_sample is a signed triangle wave while audio_on.
// cpu_state and timer_tick are status outputs (for LEDs or a logic
// analyser); nothing inside depends on them being used.
//
// The block structure and the bus follow the design document; CLK_HZ and
// DT_MAX_RESET are its 50 MHz and 71428 figures, TONE_HZ is this design's.
module chip8_top
  import chip8_pkg::*;
#(
  parameter int          CLK_HZ       = 50_000_000,
  parameter logic [31:0] DT_MAX_RESET = 32'd71428,
  parameter int          TONE_HZ      = 440
) (
  input  logic         clk,
  input  logic         rst_n,
  // HPS bus
  input  logic         bus_cs,
  input  logic         bus_write,
  input  logic         bus_read,
  input  logic [7:0]   bus_address,
  input  logic [255:0] bus_writedata,
  output logic [255:0] bus_readdata,
  output logic         write_ready,
  // VGA
  output logic [7:0]   vga_r,
  output logic [7:0]   vga_g,
  output logic [7:0]   vga_b,
  output logic         vga_hs,
  output logic         vga_vs,
  output logic         vga_blank_n,
  output logic         vga_clk_en,
  // audio
  output logic [15:0]  audio_sample,
  output logic         audio_on,
  // status
  output logic [1:0]   cpu_state,    // 0 Direct Write, 1 Fetch, 2 Execute, 3 Wait
  output logic         timer_tick    // one-clock pulse at 60 Hz
);

  // bus interface outputs
  logic         mem_bus_we, fb_bus_we, stack_we, misc_load;
  ctrl_word_t   misc;
  logic         go, display_enabled, display_update;
  logic [15:0]  keys;
  logic [255:0] mem_bus_rdata, fb_bus_rdata, stack_entries;

  // CPU
  logic             halted;
  cpu_state_e       state;
  logic [11:0]      mem_addr;
  logic [15:0]      mem_rdata;
  logic             mem_we;
  logic [7:0]       mem_wdata;
  logic [5:0]       fb_row;
  logic [127:0]     fb_rdata, fb_wdata;
  logic             fb_we, fb_update;
  logic             stk_push, stk_pop;
  logic [15:0]      stk_wdata, stk_top;
  logic [7:0]       dt, st, sp, t_wdata;
  logic             dt_we, st_we;
  logic [0:15][7:0] v_rb;
  logic [15:0]      i_rb, pc_rb;
  logic [31:0]      dt_max_rb;
  logic             fb_busy;

  // VGA pixel lookup
  logic [6:0] pix_x;
  logic [5:0] pix_y;
  logic       pix;

  chip8_hps_if u_hps_if (
    .clk, .rst_n,
    .cs(bus_cs), .write(bus_write), .read(bus_read),
    .address(bus_address), .writedata(bus_writedata), .readdata(bus_readdata),
    .halted,
    .mem_we(mem_bus_we), .fb_we(fb_bus_we), .stack_we, .misc_load, .misc,
    .go, .display_enabled, .display_update, .keys,
    .mem_rdata(mem_bus_rdata), .fb_rdata(fb_bus_rdata), .stack_entries,
    .rb_v(v_rb), .rb_dt_max(dt_max_rb), .rb_i(i_rb), .rb_pc(pc_rb),
    .rb_sound(st), .rb_timer(dt), .rb_sp(sp), .rb_fb_busy(fb_busy)
  );

  chip8_cpu #(.DT_MAX_RESET(DT_MAX_RESET)) u_cpu (
    .clk, .rst_n,
    .go, .misc_load, .misc, .halted, .write_ready, .state,
    .mem_addr, .mem_rdata, .mem_we, .mem_wdata,
    .fb_row, .fb_rdata, .fb_we, .fb_wdata, .fb_update,
    .stk_push, .stk_pop, .stk_wdata, .stk_top,
    .dt, .dt_we, .st_we, .t_wdata,
    .keys,
    .v_out(v_rb), .i_out(i_rb), .pc_out(pc_rb), .dt_max_out(dt_max_rb)
  );

  chip8_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk,
    .bus_we(mem_bus_we), .bus_addr(bus_address[6:0]),
    .bus_wdata(bus_writedata), .bus_rdata(mem_bus_rdata),
    .cpu_addr(mem_addr), .cpu_rdata(mem_rdata),
    .cpu_we(mem_we), .cpu_wdata(mem_wdata)
  );

  chip8_framebuffer #(.WORDS(FB_WORDS)) u_fb (
    .clk, .rst_n,
    .bus_we(fb_bus_we), .bus_addr(bus_address[4:0]),
    .bus_wdata(bus_writedata), .bus_rdata(fb_bus_rdata),
    .cpu_row(fb_row), .cpu_rdata(fb_rdata), .cpu_we(fb_we), .cpu_wdata(fb_wdata),
    .update_req(fb_update || display_update), .busy(fb_busy),
    .pix_x, .pix_y, .pix
  );

  chip8_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n,
    .push(stk_push), .pop(stk_pop), .push_data(stk_wdata),
    .top(stk_top), .sp,
    .load_all(stack_we), .load_data(bus_writedata),
    .sp_load(misc_load), .sp_wdata(misc.sp),
    .entries(stack_entries)
  );

  chip8_timers #(.CLK_HZ(CLK_HZ), .TICK_HZ(60)) u_timers (
    .clk, .rst_n,
    .dt_we, .st_we, .cpu_wdata(t_wdata),
    .load(misc_load), .load_dt(misc.timer), .load_st(misc.sound),
    .dt, .st, .tick(timer_tick)
  );

  assign cpu_state = state;

  chip8_speaker #(.CLK_HZ(CLK_HZ), .TONE_HZ(TONE_HZ), .SAMPLE_W(16)) u_speaker (
    .clk, .rst_n,
    .sound(st), .sample(audio_sample), .active(audio_on)
  );

  chip8_vga u_vga (
    .clk, .rst_n,
    .display_enabled,
    .pix_x, .pix_y, .pix,
    .pix_en(vga_clk_en),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n
  );

endmodule
