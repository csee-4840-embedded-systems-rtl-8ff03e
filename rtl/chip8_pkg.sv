// chip8_pkg: constants and types shared by the CHIP-8 hardware emulator.
//
// The HPS talks to the emulator over a 256-bit bus, one 32-byte word per
// address. Multi-byte values are MSB-first, so byte 0 of a word is bits
// [255:248] and byte 31 is bits [7:0]. Because SystemVerilog packs the
// first field of a struct into the most significant bits, the structs below
// overlay a bus word exactly in that byte order. Arrays of bytes in a word
// are declared with ascending ranges ([0:15][7:0]) so that element 0 is the
// first, most significant byte; lint notes the ascending ranges, which are
// intended.
//
// The word address map, the byte layout of the control-data word and the
// control-byte bits follow the original design's hardware/software
// interface; the framebuffer row packing and the keyboard word layout are
// this design's own choices (see the framebuffer and bus-interface modules).
package chip8_pkg;

  localparam int BUS_W     = 256;           // bus word width in bits
  localparam int BUS_BYTES = BUS_W / 8;     // 32 bytes per bus word

  // Word addresses on the HPS bus
  localparam logic [7:0] ADDR_MEM_LAST  = 8'h7F;  // 0x00-0x7F: 128 x 32 B program memory
  localparam logic [7:0] ADDR_FB_FIRST  = 8'h80;  // 32 x 32 B working framebuffer
  localparam logic [7:0] ADDR_FB_LAST   = 8'h9F;
  localparam logic [7:0] ADDR_STACK     = 8'hA0;  // 16 x 2 B return stack
  localparam logic [7:0] ADDR_KEYS      = 8'hA1;  // keyboard state
  localparam logic [7:0] ADDR_CTRL      = 8'hA2;  // registers and control byte

  // Memory and display geometry
  localparam int MEM_BYTES = 4096;
  localparam int MEM_WORDS = MEM_BYTES / BUS_BYTES;   // 128
  localparam int FB_W      = 128;                     // pixels per row
  localparam int FB_H      = 64;                      // rows
  localparam int FB_WORDS  = FB_W * FB_H / BUS_W;     // 32, two rows per word
  localparam int STACK_DEPTH = 16;

  localparam logic [15:0] PC_RESET = 16'h0200;        // programs start at 0x200

  // Bits of the control byte (byte 31 of the control-data word)
  localparam int CTRL_GO         = 1;
  localparam int CTRL_ISWRITE    = 2;
  localparam int CTRL_DISP_EN    = 3;
  localparam int CTRL_DISP_UPD   = 4;

  // Control-data word at ADDR_CTRL, bytes 0..31 from the top down.
  typedef struct packed {
    logic [0:15][7:0] v;         // bytes 0-15  : V0..VF
    logic [31:0]      dt_max;    // bytes 16-19 : Delay Timer Max
    logic [15:0]      i;         // bytes 20-21 : I
    logic [15:0]      pc;        // bytes 22-23 : PC
    logic [7:0]       sound;     // byte  24    : sound timer
    logic [7:0]       timer;     // byte  25    : delay timer
    logic [7:0]       sp;        // byte  26    : stack pointer
    logic [31:0]      unused;    // bytes 27-30
    logic [7:0]       ctrl;      // byte  31    : control byte
  } ctrl_word_t;

  // Stack word at ADDR_STACK: entry 0 in bytes 0-1, entry 15 in bytes 30-31.
  typedef logic [0:STACK_DEPTH-1][15:0] stack_word_t;

  // Keyboard word at ADDR_KEYS: byte k non-zero means key k is held.
  typedef logic [0:BUS_BYTES-1][7:0] byte_word_t;

  // Controller states (Direct Write / Fetch-Decode / Execute / Wait)
  typedef enum logic [1:0] {
    ST_DIRECT = 2'd0,
    ST_FETCH  = 2'd1,
    ST_EXEC   = 2'd2,
    ST_WAIT   = 2'd3
  } cpu_state_e;

endpackage
