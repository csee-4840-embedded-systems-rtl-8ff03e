// chip8_framebuffer: double-buffered 128x64 monochrome display memory.
//
// Two buffers of 1024 bytes each. The "working" buffer is the one programs
// draw into: the CPU reads and writes it a 128-pixel row at a time, the HPS
// a 256-bit bus word (two rows) at a time. The "displayed" buffer is what
// the VGA scan-out reads, one pixel per clock. On a display-update request
// the copy engine copies the whole working buffer into the displayed one,
// one 256-bit word per clock (32 clocks), so the screen never shows a
// half-drawn frame. A request that arrives while a copy runs is held and
// starts another full copy when the current one ends.
//
// Layout: word w holds rows 2w (bits 255:128) and 2w+1 (bits 127:0); pixel
// x of a row is bit 127-x of that row, so the bytes of a word are the
// pixels from left to right, MSB-first. A 1 is a lit pixel.
//
// Timing: cpu_rdata, bus_rdata and pix are registered (valid one clock after
// the address). busy is high from the clock after a request until the last
// word has been copied.
//
// Double buffering, the 2 x 1024-byte size and the copy-on-request come from
// the design document; the row packing, copy rate and request queueing are
// this design's choices.
module chip8_framebuffer #(
  parameter int WORDS = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // HPS port on the working buffer
  input  logic                      bus_we,
  input  logic [$clog2(WORDS)-1:0]  bus_addr,
  input  logic [255:0]              bus_wdata,
  output logic [255:0]              bus_rdata,
  // CPU row port on the working buffer
  input  logic [$clog2(WORDS):0]    cpu_row,
  output logic [127:0]              cpu_rdata,
  input  logic                      cpu_we,
  input  logic [127:0]              cpu_wdata,
  // working -> displayed copy
  input  logic                      update_req,
  output logic                      busy,
  // scan-out port on the displayed buffer
  input  logic [6:0]                pix_x,
  input  logic [$clog2(WORDS):0]    pix_y,
  output logic                      pix
);
  localparam int AW = $clog2(WORDS);

  logic [255:0] work [WORDS];
  logic [255:0] disp [WORDS];

  logic          copying, pending;
  logic [AW-1:0] copy_idx;

  logic [AW-1:0] cpu_w, pix_w;
  assign cpu_w = cpu_row[AW:1];
  assign pix_w = pix_y[AW:1];

  // working buffer: HPS word writes, CPU row writes
  always_ff @(posedge clk) begin
    if (bus_we) work[bus_addr] <= bus_wdata;
    if (cpu_we) begin
      if (cpu_row[0]) work[cpu_w][127:0]   <= cpu_wdata;
      else            work[cpu_w][255:128] <= cpu_wdata;
    end
    bus_rdata <= work[bus_addr];
    cpu_rdata <= cpu_row[0] ? work[cpu_w][127:0] : work[cpu_w][255:128];
  end

  // displayed buffer: written only by the copy engine
  always_ff @(posedge clk) begin
    if (copying) disp[copy_idx] <= work[copy_idx];
    pix <= disp[pix_w][255 - {pix_y[0], pix_x}];
  end

  // copy engine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copying  <= 1'b0;
      pending  <= 1'b0;
      copy_idx <= '0;
    end else begin
      if (copying) begin
        copy_idx <= copy_idx + 1'b1;
        if (copy_idx == AW'(WORDS - 1)) begin
          copying <= pending || update_req;
          pending <= 1'b0;
        end else if (update_req) begin
          pending <= 1'b1;
        end
      end else if (update_req || pending) begin
        copying  <= 1'b1;
        pending  <= 1'b0;
        copy_idx <= '0;
      end
    end
  end

  assign busy = copying || pending;

endmodule
