// chip8_stack: the CHIP-8 return-address stack, 16 entries of 2 bytes,
// with its 1-byte stack pointer.
//
// The stack always presents the entry the stack pointer points at ("top").
// CALL pushes: the pointer is incremented, then the return address is
// written at the new pointer. RET pops: the caller takes "top" in the same
// cycle, and the pointer is decremented. Entries are indexed by the pointer
// modulo 16, so the pointer can be read and written as a full byte while a
// 17th nested call simply wraps onto entry 0.
//
// The HPS can load all 16 entries at once from one bus word (entry 0 in the
// most significant 16 bits) and load the pointer; "entries" gives the same
// word back for reads. A push or pop in the same cycle as a load loses.
//
// Timing: push, pop and loads act on the rising edge; top and sp change
// right after it.
//
// Size (16 x 2 bytes, 1-byte pointer) and the "read out the entry at the
// stack pointer, move the pointer up or down" behaviour follow the design
// document; the pre-increment order is that of the CHIP-8 reference.
module chip8_stack #(
  parameter int DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push,
  input  logic                    pop,
  input  logic [15:0]             push_data,
  output logic [15:0]             top,
  output logic [7:0]              sp,
  input  logic                    load_all,
  input  logic [DEPTH*16-1:0]     load_data,
  input  logic                    sp_load,
  input  logic [7:0]              sp_wdata,
  output logic [DEPTH*16-1:0]     entries
);
  localparam int IW = $clog2(DEPTH);

  logic [0:DEPTH-1][15:0] stk;
  logic [7:0]             sp_inc;

  assign sp_inc  = sp + 8'd1;
  assign top     = stk[sp[IW-1:0]];
  assign entries = stk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stk <= '0;
      sp  <= '0;
    end else begin
      if (load_all) stk <= load_data;
      else if (push) stk[sp_inc[IW-1:0]] <= push_data;

      if (sp_load)   sp <= sp_wdata;
      else if (push) sp <= sp_inc;
      else if (pop)  sp <= sp - 8'd1;
    end
  end

  // The CPU never pushes and pops in one cycle.
  assert property (@(posedge clk) !(push && pop));

endmodule
