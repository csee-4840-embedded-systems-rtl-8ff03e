// chip8_timers: the CHIP-8 delay timer and sound timer.
//
// Both are 8-bit registers that count down by one on every tick of a 60 Hz
// clock while they are above zero, and stay at zero after that. The 60 Hz
// tick is made by dividing the system clock by CLK_HZ/TICK_HZ. The CPU
// writes them with FX15 (delay) and FX18 (sound) and reads the delay timer
// with FX07; the HPS can load both from the control-data word. A write in
// the same cycle as a tick takes the written value; an HPS load wins over a
// CPU write.
//
// Timing: tick is a registered one-clock pulse every CLK_HZ/TICK_HZ clocks;
// dt and st count down at the clock edge that ends the pulse.
//
// The two 1-byte registers and the 60 Hz rate are the document's; the clock
// divider is this design's.
module chip8_timers #(
  parameter int CLK_HZ  = 50_000_000,
  parameter int TICK_HZ = 60
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dt_we,
  input  logic       st_we,
  input  logic [7:0] cpu_wdata,
  input  logic       load,
  input  logic [7:0] load_dt,
  input  logic [7:0] load_st,
  output logic [7:0] dt,
  output logic [7:0] st,
  output logic       tick
);
  localparam int DIV = CLK_HZ / TICK_HZ;
  localparam int CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      tick    <= 1'b0;
    end else if (div_cnt == CW'(DIV - 1)) begin
      div_cnt <= '0;
      tick    <= 1'b1;
    end else begin
      div_cnt <= div_cnt + 1'b1;
      tick    <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dt <= '0;
      st <= '0;
    end else begin
      if (load)                 dt <= load_dt;
      else if (dt_we)           dt <= cpu_wdata;
      else if (tick && dt != 0) dt <= dt - 8'd1;

      if (load)                 st <= load_st;
      else if (st_we)           st <= cpu_wdata;
      else if (tick && st != 0) st <= st - 8'd1;
    end
  end

endmodule
