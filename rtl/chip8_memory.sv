// chip8_memory: the 4 KiB CHIP-8 program memory.
//
// Stored as 128 words of 32 bytes, the width of the HPS bus, so the HPS
// loads or reads a whole 32-byte line per access. Byte n of a word is bits
// [255-8n -: 8] (MSB-first). The CPU sees the same storage through a byte
// port: a read returns the byte at cpu_addr and the byte after it (wrapping
// from 4095 to 0), so a 16-bit opcode comes out in one access; a write
// stores one byte.
//
// Timing: both ports have registered reads; data for an address presented
// on one rising edge is valid after that edge. Writes take effect at the
// edge. The two ports must not write the same word in the same cycle (the
// bus interface only lets the HPS write while the CPU is stopped).
//
// The 4 KiB size and the 128 x 32-byte organisation are the document's; the
// two-byte CPU read and the read latency are this design's choices.
module chip8_memory #(
  parameter int WORDS = 128
) (
  input  logic                      clk,
  // HPS bus port (whole words)
  input  logic                      bus_we,
  input  logic [$clog2(WORDS)-1:0]  bus_addr,
  input  logic [255:0]              bus_wdata,
  output logic [255:0]              bus_rdata,
  // CPU byte port
  input  logic [$clog2(WORDS)+4:0]  cpu_addr,
  output logic [15:0]               cpu_rdata,
  input  logic                      cpu_we,
  input  logic [7:0]                cpu_wdata
);
  localparam int AW = $clog2(WORDS);

  logic [255:0] mem [WORDS];

  // byte address split into word and byte-in-word
  logic [AW-1:0] w0, w1;
  logic [4:0]    b0, b1;
  logic [AW+4:0] next_addr;

  always_comb begin
    next_addr = cpu_addr + 1'b1;
    w0 = cpu_addr[AW+4:5];
    b0 = cpu_addr[4:0];
    w1 = next_addr[AW+4:5];
    b1 = next_addr[4:0];
  end

  always_ff @(posedge clk) begin
    if (bus_we) mem[bus_addr] <= bus_wdata;
    if (cpu_we) mem[w0][255 - 8*b0 -: 8] <= cpu_wdata;
    bus_rdata <= mem[bus_addr];
    cpu_rdata <= {mem[w0][255 - 8*b0 -: 8], mem[w1][255 - 8*b1 -: 8]};
  end

endmodule
