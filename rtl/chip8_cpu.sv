// chip8_cpu: the CHIP-8 CPU and its controller.
//
// Holds V0-VF, the index register I and the program counter, and runs the
// controller state machine
//
//   Direct Write --Go--> Fetch/Decode --> Execute (1..n clocks) --> Wait
//        ^                    ^                                      |
//        +------- !Go --------+----------- Go && timeout ------------+
//
// Direct Write: stopped. The HPS may load V0-VF, I, PC and Delay Timer Max
// (misc_load). When Go rises the pacing counter is cleared and the CPU
// fetches. Fetch/Decode: reads the two opcode bytes at PC and advances PC
// by 2. Execute: carries the instruction out; most instructions take one
// clock, the rest take one clock per step (clear screen 64, sprite draw 2
// per row, register store/load one per register, BCD 3). On finishing it
// pulses write_ready. Wait: holds until the pacing counter, which counts
// every clock from the fetch, reaches Delay Timer Max; so one instruction
// starts every dt_max clocks (71428 clocks at 50 MHz = 700 instructions
// per second), or as soon as a longer instruction ends. If Go falls, the
// CPU returns to Direct Write after the current instruction.
//
// Ports: a byte port into program memory (registered read of two bytes,
// byte write), a row port into the working framebuffer (registered 128-bit
// row read, row write) plus a display-update request after every clear and
// every sprite draw, the return stack (push/pop, entry at SP), the delay
// and sound timers, and the 16 key states.
//
// Instruction set: the 35 instructions of standard CHIP-8. Sprites are 8
// pixels wide, XORed into the 128x64 framebuffer with coordinates wrapping,
// VF = 1 if any lit pixel was erased. 8XY4 sets VF to the carry, 8XY5/8XY7
// to "no borrow", 8XY6/8XYE to the bit shifted out (VX shifted in place).
// FX55/FX65 leave I unchanged. FX29 points I at 5*VX (the hex font is
// expected at address 0). FX0A waits in Execute for a key and stores the
// lowest held key; if Go falls meanwhile it gives up and is repeated on
// resume. CXKK ANDs KK with a 16-bit LFSR that steps every clock.
//
// The register-load port takes the whole control-data word so that its
// layout is defined in one place; its last eight bytes (sound and delay
// timer, SP, spare bytes and control byte) are used by the timers, the
// stack and the bus interface, so lint reports them as unused here.
//
// The state machine, the pacing counter and its 71428 default, the register
// set and PC = 0x200 at reset follow the design document. The instruction
// semantics are those of the CHIP-8 reference the document builds on; the
// step counts, the port timing and the update-after-draw policy are this
// design's choices.
module chip8_cpu
  import chip8_pkg::*;
#(
  parameter logic [31:0] DT_MAX_RESET = 32'd71428
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              go,
  input  logic              misc_load,
  input  ctrl_word_t        misc,
  output logic              halted,
  output logic              write_ready,
  output cpu_state_e        state,
  // program memory byte port
  output logic [11:0]       mem_addr,
  input  logic [15:0]       mem_rdata,
  output logic              mem_we,
  output logic [7:0]        mem_wdata,
  // working framebuffer row port
  output logic [5:0]        fb_row,
  input  logic [127:0]      fb_rdata,
  output logic              fb_we,
  output logic [127:0]      fb_wdata,
  output logic              fb_update,
  // return stack
  output logic              stk_push,
  output logic              stk_pop,
  output logic [15:0]       stk_wdata,
  input  logic [15:0]       stk_top,
  // timers
  input  logic [7:0]        dt,
  output logic              dt_we,
  output logic              st_we,
  output logic [7:0]        t_wdata,
  // keyboard
  input  logic [15:0]       keys,
  // register read-back
  output logic [0:15][7:0]  v_out,
  output logic [15:0]       i_out,
  output logic [15:0]       pc_out,
  output logic [31:0]       dt_max_out
);

  // ---------------------------------------------------------------- state
  logic [0:15][7:0] v;
  logic [15:0]      i_reg, pc;
  logic [31:0]      dt_max, pace;
  logic [15:0]      ir;
  logic [7:0]       step;
  logic [15:0]      lfsr;
  logic             coll;

  assign v_out      = v;
  assign i_out      = i_reg;
  assign pc_out     = pc;
  assign dt_max_out = dt_max;
  assign halted     = (state == ST_DIRECT);

  // ---------------------------------------------------------------- decode
  logic [15:0] op;
  logic [3:0]  x, y, n;
  logic [7:0]  kk, vx, vy;
  logic [11:0] nnn;

  always_comb begin
    op  = (step == 8'd0) ? mem_rdata : ir;   // opcode arrives on the first Execute clock
    x   = op[11:8];
    y   = op[7:4];
    n   = op[3:0];
    kk  = op[7:0];
    nnn = op[11:0];
    vx  = v[x];
    vy  = v[y];
  end

  // ---------------------------------------------------------------- ALU (8XYN)
  logic [7:0] alu_y;
  logic       alu_f, alu_wf;   // flag value, flag written
  logic [8:0] sum;

  always_comb begin
    sum    = {1'b0, vx} + {1'b0, vy};
    alu_y  = vx;
    alu_f  = 1'b0;
    alu_wf = 1'b0;
    unique case (n)
      4'h0: alu_y = vy;
      4'h1: alu_y = vx | vy;
      4'h2: alu_y = vx & vy;
      4'h3: alu_y = vx ^ vy;
      4'h4: begin alu_y = sum[7:0];  alu_f = sum[8];     alu_wf = 1'b1; end
      4'h5: begin alu_y = vx - vy;   alu_f = (vx >= vy); alu_wf = 1'b1; end
      4'h6: begin alu_y = vx >> 1;   alu_f = vx[0];      alu_wf = 1'b1; end
      4'h7: begin alu_y = vy - vx;   alu_f = (vy >= vx); alu_wf = 1'b1; end
      4'hE: begin alu_y = vx << 1;   alu_f = vx[7];      alu_wf = 1'b1; end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- sprite row
  // Row r of a draw: step 2r issues the reads, step 2r+1 XORs and writes.
  logic [7:0]   row_idx;
  logic [127:0] spr_mask, fb_new;
  logic [127:0] spr_row;
  logic         row_coll;
  logic [6:0]   draw_x;

  always_comb begin
    row_idx  = {1'b0, step[7:1]};
    draw_x   = vx[6:0];
    // place the 8 sprite bits at columns draw_x..draw_x+7, wrapping at 128:
    // rotate the row right by draw_x (a shift by 128 gives zero)
    spr_row  = {mem_rdata[15:8], 120'd0};
    spr_mask = (spr_row >> draw_x) | (spr_row << (8'd128 - {1'b0, draw_x}));
    fb_new   = fb_rdata ^ spr_mask;
    row_coll = |(fb_rdata & spr_mask);
  end

  // ---------------------------------------------------------------- helpers
  logic [3:0] low_key;
  logic       any_key;
  always_comb begin
    low_key = '0;
    any_key = |keys;
    for (int k = 15; k >= 0; k--)
      if (keys[k]) low_key = 4'(k);
  end

  logic [7:0] bcd_h, bcd_t, bcd_o;
  always_comb begin
    bcd_h = vx / 8'd100;
    bcd_t = (vx / 8'd10) % 8'd10;
    bcd_o = vx % 8'd10;
  end

  logic [32:0] pace_next;
  logic        timeout;
  assign pace_next = {1'b0, pace} + 33'd1;
  assign timeout   = pace_next >= {1'b0, dt_max};

  // ---------------------------------------------------------------- port drive
  always_comb begin
    mem_addr  = pc[11:0];
    mem_we    = 1'b0;
    mem_wdata = '0;
    fb_row    = '0;
    fb_we     = 1'b0;
    fb_wdata  = '0;
    stk_push  = 1'b0;
    stk_pop   = 1'b0;
    stk_wdata = pc;
    dt_we     = 1'b0;
    st_we     = 1'b0;
    t_wdata   = vx;

    if (state == ST_EXEC) begin
      unique case (op[15:12])
        4'h0: begin
          if (op == 16'h00E0) begin
            fb_row = step[5:0];
            fb_we  = 1'b1;
          end else if (op == 16'h00EE) begin
            stk_pop = (step == 8'd0);
          end
        end
        4'h2: stk_push = (step == 8'd0);
        4'hD: begin
          mem_addr = 12'(i_reg + 16'(row_idx));
          fb_row   = 6'(vy + row_idx);
          fb_we    = step[0];
          fb_wdata = fb_new;
        end
        4'hF: begin
          unique case (kk)
            8'h15: dt_we = (step == 8'd0);
            8'h18: st_we = (step == 8'd0);
            8'h33: begin
              mem_addr  = 12'(i_reg + 16'(step));
              mem_we    = (step < 8'd3);
              mem_wdata = (step == 8'd0) ? bcd_h : (step == 8'd1) ? bcd_t : bcd_o;
            end
            8'h55: begin
              mem_addr  = 12'(i_reg + 16'(step));
              mem_we    = 1'b1;
              mem_wdata = v[step[3:0]];
            end
            8'h65: mem_addr = 12'(i_reg + 16'(step));
            default: ;
          endcase
        end
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_DIRECT;
      v           <= '0;
      i_reg       <= '0;
      pc          <= PC_RESET;
      dt_max      <= DT_MAX_RESET;
      pace        <= '0;
      ir          <= '0;
      step        <= '0;
      lfsr        <= 16'hACE1;
      coll        <= 1'b0;
      write_ready <= 1'b0;
      fb_update   <= 1'b0;
    end else begin
      lfsr        <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
      write_ready <= 1'b0;
      fb_update   <= 1'b0;

      unique case (state)
        ST_DIRECT: begin
          if (misc_load) begin
            v      <= misc.v;
            i_reg  <= misc.i;
            pc     <= misc.pc;
            dt_max <= misc.dt_max;
          end
          if (go) begin
            state <= ST_FETCH;
            pace  <= '0;
          end
        end

        ST_FETCH: begin
          pc    <= pc + 16'd2;
          pace  <= pace + 32'd1;
          step  <= '0;
          coll  <= 1'b0;
          state <= ST_EXEC;
        end

        ST_EXEC: begin : exec
          logic done;
          done = 1'b1;
          pace <= pace + 32'd1;
          if (step != 8'hFF) step <= step + 8'd1;   // saturates while FX0A waits
          if (step == 8'd0) ir <= mem_rdata;

          unique case (op[15:12])
            4'h0: begin
              if (op == 16'h00E0) begin
                done = (step == 8'd63);
                if (done) fb_update <= 1'b1;
              end else if (op == 16'h00EE) begin
                pc <= stk_top;
              end
            end
            4'h1: pc <= {4'h0, nnn};
            4'h2: pc <= {4'h0, nnn};
            4'h3: if (vx == kk) pc <= pc + 16'd2;
            4'h4: if (vx != kk) pc <= pc + 16'd2;
            4'h5: if (n == 4'h0 && vx == vy) pc <= pc + 16'd2;
            4'h6: v[x] <= kk;
            4'h7: v[x] <= vx + kk;
            4'h8: begin
              v[x] <= alu_y;
              if (alu_wf) v[15] <= {7'd0, alu_f};
            end
            4'h9: if (n == 4'h0 && vx != vy) pc <= pc + 16'd2;
            4'hA: i_reg <= {4'h0, nnn};
            4'hB: pc <= 16'({4'h0, nnn} + {8'h0, v[0]});
            4'hC: v[x] <= lfsr[7:0] & kk;
            4'hD: begin
              if (n == 4'h0) begin
                v[15]     <= 8'd0;
                fb_update <= 1'b1;
              end else begin
                done = 1'b0;
                if (step[0]) begin
                  coll <= coll | row_coll;
                  if (row_idx == {4'h0, n} - 8'd1) begin
                    done       = 1'b1;
                    v[15]     <= {7'd0, coll | row_coll};
                    fb_update <= 1'b1;
                  end
                end
              end
            end
            4'hE: begin
              if (kk == 8'h9E && keys[vx[3:0]])  pc <= pc + 16'd2;
              if (kk == 8'hA1 && !keys[vx[3:0]]) pc <= pc + 16'd2;
            end
            4'hF: begin
              unique case (kk)
                8'h07: v[x] <= dt;
                8'h0A: begin
                  if (!go) begin
                    pc <= pc - 16'd2;           // abandon; repeat on resume
                  end else if (any_key) begin
                    v[x] <= {4'h0, low_key};
                  end else begin
                    done = 1'b0;
                  end
                end
                8'h1E: i_reg <= i_reg + {8'h0, vx};
                8'h29: i_reg <= 16'(vx[3:0] * 5);
                8'h33: done = (step == 8'd2);
                8'h55: done = (step == {4'h0, x});
                8'h65: begin
                  if (step != 8'd0) v[step[3:0] - 4'd1] <= mem_rdata[15:8];
                  done = (step == {4'h0, x} + 8'd1);
                end
                default: ;
              endcase
            end
            default: ;
          endcase

          if (done) begin
            state       <= ST_WAIT;
            write_ready <= 1'b1;
          end
        end

        ST_WAIT: begin
          if (!go) begin
            state <= ST_DIRECT;
          end else if (timeout) begin
            state <= ST_FETCH;
            pace  <= '0;
          end else begin
            pace <= pace + 32'd1;
          end
        end

        default: state <= ST_DIRECT;
      endcase
    end
  end

  // The HPS only loads registers while the CPU is stopped.
  assert property (@(posedge clk) misc_load |-> state == ST_DIRECT);

endmodule
