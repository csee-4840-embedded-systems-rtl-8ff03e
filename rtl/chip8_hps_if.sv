// chip8_hps_if: the emulator's side of the 256-bit HPS bus.
//
// Decodes the word address map
//   0x00-0x7F  program memory (128 x 32 bytes)
//   0x80-0x9F  working framebuffer (32 x 32 bytes)
//   0xA0       return stack (16 x 2 bytes)
//   0xA1       keyboard state
//   0xA2       control data: V0-VF, Delay Timer Max, I, PC, sound, timer,
//              SP and the control byte (layout in chip8_pkg::ctrl_word_t)
// and turns bus writes into write strobes for the blocks that hold the
// data. The control byte is always written: it sets Go and DisplayEnabled,
// and a 1 in DisplayUpdate sends a one-clock copy request to the
// framebuffer. The register fields of the same word are loaded (misc_load)
// only if IsWrite is set and the CPU is halted in its Direct Write state.
// misc is the write data itself viewed as the control-data struct; it is
// wired straight through, and misc_load says when it is valid.
// Memory, framebuffer and stack writes are likewise accepted only while the
// CPU is halted, so the HPS never races the running program; keyboard
// writes are accepted at any time so that a running game sees key presses.
// Key k is held when byte k of the keyboard word is non-zero.
//
// Reads: readdata is valid the clock after cs && read. Memory and
// framebuffer words come from those blocks' registered read ports (the top
// gives them the bus address directly); the stack, keyboard and control
// words are sampled here. In the control byte read back, IsWrite is 0 and
// DisplayUpdate shows a copy still pending or running.
//
// The address map, the control-data layout and the meaning of Go, IsWrite
// and DisplayUpdate are the document's; the read path, the write gating
// and the keyboard byte-per-key layout are this design's choices.
module chip8_hps_if
  import chip8_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // bus
  input  logic              cs,
  input  logic              write,
  input  logic              read,
  input  logic [7:0]        address,
  input  logic [255:0]      writedata,
  output logic [255:0]      readdata,
  // CPU status
  input  logic              halted,
  // write strobes (data is writedata, word address is address)
  output logic              mem_we,
  output logic              fb_we,
  output logic              stack_we,
  output logic              misc_load,
  output ctrl_word_t        misc,
  // control and keyboard state
  output logic              go,
  output logic              display_enabled,
  output logic              display_update,
  output logic [15:0]       keys,
  // read-back sources
  input  logic [255:0]      mem_rdata,
  input  logic [255:0]      fb_rdata,
  input  logic [255:0]      stack_entries,
  input  logic [0:15][7:0]  rb_v,
  input  logic [31:0]       rb_dt_max,
  input  logic [15:0]       rb_i,
  input  logic [15:0]       rb_pc,
  input  logic [7:0]        rb_sound,
  input  logic [7:0]        rb_timer,
  input  logic [7:0]        rb_sp,
  input  logic              rb_fb_busy
);
  typedef enum logic [1:0] {SEL_MEM, SEL_FB, SEL_LOCAL} rsel_e;

  logic       wr, rd;
  logic       is_mem, is_fb;
  byte_word_t key_word;
  rsel_e      rsel_q;
  logic [255:0] local_q;
  ctrl_word_t ctrl_rb;

  assign wr     = cs && write;
  assign rd     = cs && read;
  assign is_mem = (address <= ADDR_MEM_LAST);
  assign is_fb  = (address >= ADDR_FB_FIRST) && (address <= ADDR_FB_LAST);
  assign misc   = ctrl_word_t'(writedata);
  assign key_word = byte_word_t'(writedata);

  assign mem_we         = wr && halted && is_mem;
  assign fb_we          = wr && halted && is_fb;
  assign stack_we       = wr && halted && (address == ADDR_STACK);
  assign misc_load      = wr && halted && (address == ADDR_CTRL) && misc.ctrl[CTRL_ISWRITE];
  assign display_update = wr && (address == ADDR_CTRL) && misc.ctrl[CTRL_DISP_UPD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go              <= 1'b0;
      display_enabled <= 1'b0;
      keys            <= '0;
    end else if (wr) begin
      if (address == ADDR_CTRL) begin
        go              <= misc.ctrl[CTRL_GO];
        display_enabled <= misc.ctrl[CTRL_DISP_EN];
      end
      if (address == ADDR_KEYS)
        for (int k = 0; k < 16; k++) keys[k] <= (key_word[k] != 8'd0);
    end
  end

  // control word as read back
  always_comb begin
    ctrl_rb        = '0;
    ctrl_rb.v      = rb_v;
    ctrl_rb.dt_max = rb_dt_max;
    ctrl_rb.i      = rb_i;
    ctrl_rb.pc     = rb_pc;
    ctrl_rb.sound  = rb_sound;
    ctrl_rb.timer  = rb_timer;
    ctrl_rb.sp     = rb_sp;
    ctrl_rb.ctrl[CTRL_GO]       = go;
    ctrl_rb.ctrl[CTRL_DISP_EN]  = display_enabled;
    ctrl_rb.ctrl[CTRL_DISP_UPD] = rb_fb_busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel_q  <= SEL_LOCAL;
      local_q <= '0;
    end else if (rd) begin
      rsel_q <= is_mem ? SEL_MEM : (is_fb ? SEL_FB : SEL_LOCAL);
      case (address)
        ADDR_STACK: local_q <= stack_entries;
        ADDR_KEYS: begin
          local_q <= '0;
          for (int k = 0; k < 16; k++) local_q[255 - 8*k -: 8] <= {7'd0, keys[k]};
        end
        ADDR_CTRL: local_q <= ctrl_rb;
        default:   local_q <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (rsel_q)
      SEL_MEM: readdata = mem_rdata;
      SEL_FB:  readdata = fb_rdata;
      default: readdata = local_q;
    endcase
  end

endmodule
