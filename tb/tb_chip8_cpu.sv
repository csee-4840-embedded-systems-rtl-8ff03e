// tb_chip8_cpu: self-checking test of the CHIP-8 CPU and controller.
//
// The CPU runs with the real program memory, framebuffer, stack and timer
// blocks around it (each tested on its own). A reference interpreter
// written here in plain procedural code executes the same programs one
// instruction at a time; after the CPU has finished the same number of
// instructions (counted by write_ready pulses) it is stopped with Go and
// all registers, the stack, the whole 4 KiB memory and the whole working
// framebuffer are compared with the interpreter. V0-VF, I and PC are also
// recorded at every write_ready pulse and compared after each instruction.
//
// Random programs use every instruction and include forward jumps, calls
// into random subroutines, skips, sprite draws with wrap-around and collisions, clears, BCD and register
// store/load; for CXKK the interpreter takes the CPU's random value and
// checks only that it lies within the mask. Directed tests then check the pacing rate (one instruction
// per Delay Timer Max clocks, and longer for long instructions), CXKK, BNNN,
// FX0A waiting for a key and being abandoned when Go falls, and that the
// CPU stays in Direct Write while Go is low.
module tb_chip8_cpu;
  import chip8_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ DUT and neighbours
  logic         rst_n, go, misc_load, halted, write_ready;
  ctrl_word_t   misc;
  cpu_state_e   state;
  logic [11:0]  mem_addr;
  logic [15:0]  mem_rdata;
  logic         mem_we;
  logic [7:0]   mem_wdata;
  logic [5:0]   fb_row;
  logic [127:0] fb_rdata, fb_wdata;
  logic         fb_we, fb_update;
  logic         stk_push, stk_pop;
  logic [15:0]  stk_wdata, stk_top;
  logic [7:0]   dt, st, sp, t_wdata;
  logic         dt_we, st_we, tick;
  logic [15:0]  keys;
  logic [0:15][7:0] v_out;
  logic [15:0]  i_out, pc_out;
  logic [31:0]  dt_max_out;

  logic         mbus_we, fbus_we, stk_load;
  logic [6:0]   mbus_addr;
  logic [4:0]   fbus_addr;
  logic [255:0] bus_wdata, mbus_rdata, fbus_rdata, stk_entries, stk_load_data;
  logic         fb_busy, pix;

  chip8_cpu #(.DT_MAX_RESET(32'd71428)) dut (
    .clk, .rst_n, .go, .misc_load, .misc, .halted, .write_ready, .state,
    .mem_addr, .mem_rdata, .mem_we, .mem_wdata,
    .fb_row, .fb_rdata, .fb_we, .fb_wdata, .fb_update,
    .stk_push, .stk_pop, .stk_wdata, .stk_top,
    .dt, .dt_we, .st_we, .t_wdata, .keys,
    .v_out, .i_out, .pc_out, .dt_max_out
  );

  chip8_memory #(.WORDS(128)) u_mem (
    .clk, .bus_we(mbus_we), .bus_addr(mbus_addr), .bus_wdata(bus_wdata), .bus_rdata(mbus_rdata),
    .cpu_addr(mem_addr), .cpu_rdata(mem_rdata), .cpu_we(mem_we), .cpu_wdata(mem_wdata)
  );

  chip8_framebuffer #(.WORDS(32)) u_fb (
    .clk, .rst_n, .bus_we(fbus_we), .bus_addr(fbus_addr), .bus_wdata(bus_wdata), .bus_rdata(fbus_rdata),
    .cpu_row(fb_row), .cpu_rdata(fb_rdata), .cpu_we(fb_we), .cpu_wdata(fb_wdata),
    .update_req(fb_update), .busy(fb_busy), .pix_x(7'd0), .pix_y(6'd0), .pix
  );

  chip8_stack #(.DEPTH(16)) u_stk (
    .clk, .rst_n, .push(stk_push), .pop(stk_pop), .push_data(stk_wdata), .top(stk_top), .sp,
    .load_all(stk_load), .load_data(stk_load_data), .sp_load(misc_load), .sp_wdata(misc.sp),
    .entries(stk_entries)
  );

  chip8_timers #(.CLK_HZ(50_000_000), .TICK_HZ(60)) u_tim (
    .clk, .rst_n, .dt_we, .st_we, .cpu_wdata(t_wdata),
    .load(misc_load), .load_dt(misc.timer), .load_st(misc.sound), .dt, .st, .tick
  );

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  int last_fetch = -1, fetch_gap = 0;
  always @(posedge clk) begin
    cyc++;
    if (state == ST_FETCH) begin
      if (last_fetch >= 0) fetch_gap = cyc - last_fetch;
      last_fetch = cyc;
    end
  end

  // CXKK results cannot be predicted; the interpreter takes them, in order,
  // from what the CPU produced (the opcode is seen on the memory read port
  // in the first Execute clock, the result on v_out once write_ready pulses).
  logic [7:0]  rnd_q[$];
  logic [15:0] cur_op;
  logic        in_exec = 0;
  always @(negedge clk) begin
    if (state == ST_EXEC && !in_exec) cur_op = mem_rdata;
    in_exec = (state == ST_EXEC);
    if (write_ready && cur_op[15:12] == 4'hC) rnd_q.push_back(v_out[cur_op[11:8]]);
  end

  // ------------------------------------------------------------ reference interpreter
  logic [7:0]   m_mem [4096];
  logic [127:0] m_fb  [64];
  logic [7:0]   m_v   [16];
  logic [15:0]  m_stk [16];
  logic [15:0]  m_i, m_pc;
  logic [7:0]   m_sp, m_dt, m_st;

  task automatic ref_step();
    logic [15:0] op;
    logic [3:0]  x, y, n;
    logic [7:0]  kk, vx, vy;
    logic [8:0]  s9;
    op = {m_mem[m_pc[11:0]], m_mem[12'(m_pc[11:0] + 1)]};
    x = op[11:8]; y = op[7:4]; n = op[3:0]; kk = op[7:0];
    vx = m_v[x]; vy = m_v[y];
    m_pc = m_pc + 2;
    case (op[15:12])
      4'h0: if (op == 16'h00E0) begin
              for (int r = 0; r < 64; r++) m_fb[r] = '0;
            end else if (op == 16'h00EE) begin
              m_pc = m_stk[m_sp[3:0]]; m_sp = m_sp - 1;
            end
      4'h1: m_pc = {4'h0, op[11:0]};
      4'h2: begin m_sp = m_sp + 1; m_stk[m_sp[3:0]] = m_pc; m_pc = {4'h0, op[11:0]}; end
      4'h3: if (vx == kk) m_pc = m_pc + 2;
      4'h4: if (vx != kk) m_pc = m_pc + 2;
      4'h5: if (n == 0 && vx == vy) m_pc = m_pc + 2;
      4'h6: m_v[x] = kk;
      4'h7: m_v[x] = vx + kk;
      4'h8: case (n)
              4'h0: m_v[x] = vy;
              4'h1: m_v[x] = vx | vy;
              4'h2: m_v[x] = vx & vy;
              4'h3: m_v[x] = vx ^ vy;
              4'h4: begin s9 = vx + vy; m_v[x] = s9[7:0]; m_v[15] = {7'd0, s9[8]}; end
              4'h5: begin m_v[x] = vx - vy; m_v[15] = (vx >= vy) ? 8'd1 : 8'd0; end
              4'h6: begin m_v[x] = vx >> 1; m_v[15] = {7'd0, vx[0]}; end
              4'h7: begin m_v[x] = vy - vx; m_v[15] = (vy >= vx) ? 8'd1 : 8'd0; end
              4'hE: begin m_v[x] = vx << 1; m_v[15] = {7'd0, vx[7]}; end
              default: ;
            endcase
      4'h9: if (n == 0 && vx != vy) m_pc = m_pc + 2;
      4'hA: m_i = {4'h0, op[11:0]};
      4'hB: m_pc = {4'h0, op[11:0]} + {8'h0, m_v[0]};
      4'hC: begin
              logic [7:0] r;
              r = (rnd_q.size() > 0) ? rnd_q.pop_front() : 8'hXX;
              check("CXKK result within mask", 256'(r & ~kk), 256'(0));
              m_v[x] = r;
            end
      4'hD: begin
              logic coll;
              coll = 0;
              for (int r = 0; r < n; r++) begin
                logic [7:0] sb;
                int row;
                sb  = m_mem[12'(m_i + 16'(r))];
                row = (int'(vy) + r) % 64;
                for (int b = 0; b < 8; b++) if (sb[7 - b]) begin
                  int px;
                  px = (int'(vx) + b) % 128;
                  if (m_fb[row][127 - px]) coll = 1;
                  m_fb[row][127 - px] = !m_fb[row][127 - px];
                end
              end
              m_v[15] = {7'd0, coll};
            end
      4'hE: begin
              if (kk == 8'h9E && keys[vx[3:0]])  m_pc = m_pc + 2;
              if (kk == 8'hA1 && !keys[vx[3:0]]) m_pc = m_pc + 2;
            end
      4'hF: case (kk)
              8'h07: m_v[x] = m_dt;
              8'h0A: for (int k = 15; k >= 0; k--) if (keys[k]) m_v[x] = 8'(k);
              8'h15: m_dt = vx;
              8'h18: m_st = vx;
              8'h1E: m_i = m_i + {8'h0, vx};
              8'h29: m_i = 16'(vx[3:0]) * 16'd5;
              8'h33: begin
                       m_mem[12'(m_i)]     = vx / 100;
                       m_mem[12'(m_i + 1)] = (vx / 10) % 10;
                       m_mem[12'(m_i + 2)] = vx % 10;
                     end
              8'h55: for (int k = 0; k <= int'(x); k++) m_mem[12'(m_i + 16'(k))] = m_v[k];
              8'h65: for (int k = 0; k <= int'(x); k++) m_v[k] = m_mem[12'(m_i + 16'(k))];
              default: ;
            endcase
      default: ;
    endcase
  endtask

  // ------------------------------------------------------------ program generator
  function automatic logic [15:0] rand_simple(int allow_mem);
    int kind;
    logic [3:0] x, y;
    x = 4'($urandom); y = 4'($urandom);
    kind = int'($urandom_range(0, allow_mem ? 21 : 13));
    case (kind)
      0, 1:  return {4'h6, x, 8'($urandom)};
      2:     return {4'h7, x, 8'($urandom)};
      3, 4:  begin
               logic [3:0] nn;
               case ($urandom_range(0, 8))
                 0: nn = 4'h0; 1: nn = 4'h1; 2: nn = 4'h2; 3: nn = 4'h3; 4: nn = 4'h4;
                 5: nn = 4'h5; 6: nn = 4'h6; 7: nn = 4'h7; default: nn = 4'hE;
               endcase
               return {4'h8, x, y, nn};
             end
      5:     return {4'h3, x, 8'($urandom_range(0, 3))};
      6:     return {4'h4, x, 8'($urandom_range(0, 3))};
      7:     return {4'h5, x, y, 4'h0};
      8:     return {4'h9, x, y, 4'h0};
      9:     return {4'hE, x, ($urandom_range(0, 1) == 1) ? 8'h9E : 8'hA1};
      10:    return {4'hF, x, 8'h15};
      11:    return {4'hF, x, 8'h07};
      12:    return {4'hF, x, 8'h18};
      13:    return {4'hF, x, 8'h0A};
      14:    return {4'hA, 4'h8 + 4'($urandom_range(0, 6)), 8'($urandom)};
      15:    return {4'hF, x, 8'h1E};
      16:    return {4'hF, x, 8'h29};
      17:    return {4'hF, x, 8'h33};
      18:    return {4'hF, x, 8'h55};
      19:    return {4'hF, x, 8'h65};
      20:    return {4'hD, x, y, 4'($urandom)};
      default: return ($urandom_range(0, 3) == 0) ? 16'h00E0 : {4'hD, x, y, 4'($urandom)};
    endcase
  endfunction

  task automatic put16(int a, logic [15:0] w);
    m_mem[a % 4096] = w[15:8];
    m_mem[(a + 1) % 4096] = w[7:0];
  endtask

  task automatic gen_program(int len);
    for (int a = 0; a < 4096; a++) m_mem[a] = 8'($urandom);
    // subroutines at 0x600 + 0x20*j: a few instructions then return
    for (int j = 0; j < 8; j++) begin
      int a;
      a = 'h600 + 'h20 * j;
      for (int k = 0; k < 5; k++) put16(a + 2*k, rand_simple(1));
      put16(a + 10, 16'h00EE);
    end
    for (int p = 0; p < len; p++) begin
      int a, r;
      a = 'h200 + 2*p;
      r = int'($urandom_range(0, 19));
      if (r == 0 && p < len - 4)      put16(a, {4'h1, 12'(a + 2 * $urandom_range(1, 3))});
      else if (r == 1)                put16(a, {4'h2, 12'('h600 + 'h20 * $urandom_range(0, 7))});
      else                            put16(a, rand_simple(1));
    end
    put16('h200 + 2*len, {4'h1, 12'('h200 + 2*len)});   // park
  endtask

  // ------------------------------------------------------------ harness tasks
  task automatic load_memory();
    for (int w = 0; w < 128; w++) begin
      @(negedge clk);
      mbus_we = 1; mbus_addr = 7'(w);
      for (int b = 0; b < 32; b++) bus_wdata[255 - 8*b -: 8] = m_mem[w*32 + b];
    end
    @(negedge clk);
    mbus_we = 0;
  endtask

  task automatic load_fb();
    for (int w = 0; w < 32; w++) begin
      @(negedge clk);
      fbus_we = 1; fbus_addr = 5'(w); bus_wdata = {m_fb[2*w], m_fb[2*w + 1]};
    end
    @(negedge clk);
    fbus_we = 0;
  endtask

  task automatic load_regs(logic [31:0] dtmax);
    @(negedge clk);
    misc = '0;
    for (int k = 0; k < 16; k++) misc.v[k] = m_v[k];
    misc.i = m_i; misc.pc = m_pc; misc.dt_max = dtmax;
    misc.timer = m_dt; misc.sound = m_st; misc.sp = m_sp;
    misc_load = 1;
    stk_load = 1;
    for (int k = 0; k < 16; k++) stk_load_data[255 - 16*k -: 16] = m_stk[k];
    @(negedge clk);
    misc_load = 0; stk_load = 0;
  endtask

  function automatic logic [0:15][7:0] model_v();
    logic [0:15][7:0] r;
    for (int k = 0; k < 16; k++) r[k] = m_v[k];
    return r;
  endfunction

  // registers as they stand after each finished instruction
  logic [0:15][7:0] tr_v[$];
  logic [15:0] tr_i[$], tr_pc[$];

  // run until n instructions have finished, then drop Go and wait for Direct Write
  task automatic run_n(int n);
    int done;
    done = 0;
    @(negedge clk);
    go = 1;
    while (done < n) begin
      @(negedge clk);
      if (write_ready) begin        // the CPU is in Wait: Go low now stops it there
        done++;
        tr_v.push_back(v_out); tr_i.push_back(i_out); tr_pc.push_back(pc_out);
      end
    end
    go = 0;
    while (!halted) @(negedge clk);
  endtask

  task automatic compare(string tag);
    for (int k = 0; k < 16; k++) check($sformatf("%s V%0h", tag, k), 256'(v_out[k]), 256'(m_v[k]));
    check({tag, " I"}, 256'(i_out), 256'(m_i));
    check({tag, " PC"}, 256'(pc_out), 256'(m_pc));
    check({tag, " SP"}, 256'(sp), 256'(m_sp));
    check({tag, " DT"}, 256'(dt), 256'(m_dt));
    check({tag, " ST"}, 256'(st), 256'(m_st));
    for (int k = 0; k < 16; k++)
      check($sformatf("%s stack %0d", tag, k), 256'(stk_entries[255 - 16*k -: 16]), 256'(m_stk[k]));
    for (int w = 0; w < 128; w++) begin
      logic [255:0] e;
      mbus_addr = 7'(w);
      @(negedge clk);
      for (int b = 0; b < 32; b++) e[255 - 8*b -: 8] = m_mem[w*32 + b];
      check($sformatf("%s mem word %0d", tag, w), mbus_rdata, e);
    end
    for (int w = 0; w < 32; w++) begin
      fbus_addr = 5'(w);
      @(negedge clk);
      check($sformatf("%s fb word %0d", tag, w), fbus_rdata, {m_fb[2*w], m_fb[2*w + 1]});
    end
  endtask

  task automatic init_model();
    for (int k = 0; k < 16; k++) begin m_v[k] = 8'($urandom); m_stk[k] = 16'h0200; end
    for (int r = 0; r < 64; r++) m_fb[r] = {$urandom, $urandom, $urandom, $urandom};
    m_i = 16'h0900; m_pc = 16'h0200; m_sp = 8'd0; m_dt = 8'd0; m_st = 8'd0;
  endtask

  // write one instruction at PC and run it alone
  task automatic run_one(logic [15:0] op, logic [31:0] dtmax);
    put16(int'(m_pc), op);
    load_memory();
    load_regs(dtmax);
    run_n(1);
  endtask

  // ------------------------------------------------------------ main
  initial begin
    rst_n = 0; go = 0; misc_load = 0; misc = '0; keys = 16'h0000;
    mbus_we = 0; fbus_we = 0; stk_load = 0; mbus_addr = 0; fbus_addr = 0;
    bus_wdata = 0; stk_load_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset PC", 256'(pc_out), 256'(16'h0200));
    check("reset dt_max", 256'(dt_max_out), 256'(32'd71428));
    check("reset halted", 256'(halted), 256'(1));

    // random programs against the interpreter
    for (int prog = 0; prog < 8; prog++) begin
      int len;
      len = 120;
      keys = 16'($urandom) | 16'h0100;
      init_model();
      gen_program(len);
      load_memory();
      load_fb();
      load_regs(32'd24);
      tr_v.delete(); tr_i.delete(); tr_pc.delete();
      run_n(200);
      for (int s = 0; s < 200; s++) begin
        ref_step();
        check($sformatf("prog %0d step %0d V0-VF", prog, s), 256'(tr_v[s]), 256'(model_v()));
        check($sformatf("prog %0d step %0d I", prog, s), 256'(tr_i[s]), 256'(m_i));
        check($sformatf("prog %0d step %0d PC", prog, s), 256'(tr_pc[s]), 256'(m_pc));
      end
      compare($sformatf("prog %0d", prog));
    end

    // pacing: a one-clock instruction starts every dt_max clocks
    init_model();
    for (int a = 0; a < 64; a++) put16('h200 + 2*a, 16'h7101);
    load_memory();
    load_regs(32'd100);
    run_n(6);
    check("pacing 100", 256'(fetch_gap), 256'(100));
    load_regs(32'd37);
    run_n(6);
    check("pacing 37", 256'(fetch_gap), 256'(37));
    // a clear (64 execute clocks) overruns dt_max = 20: fetch, 64 execute, 1 wait
    init_model();
    for (int a = 0; a < 64; a++) put16('h200 + 2*a, 16'h00E0);
    load_memory();
    load_regs(32'd20);
    run_n(4);
    check("pacing after long instruction", 256'(fetch_gap), 256'(66));

    // CXKK: masked random values that vary
    begin
      int distinct;
      logic [255:0] seen;
      seen = '0; distinct = 0;
      init_model();
      for (int t = 0; t < 24; t++) begin
        run_one(16'hC33C, 32'd3 + 32'(t));
        check("CXKK mask", 256'(v_out[3] & 8'hC3), 256'(0));
        if (!seen[v_out[3]]) begin seen[v_out[3]] = 1; distinct++; end
      end
      check("CXKK varies", 256'(distinct >= 6), 256'(1));
    end

    // BNNN
    init_model();
    m_v[0] = 8'h14;
    run_one(16'hB300, 32'd5);
    check("BNNN", 256'(pc_out), 256'(16'h0314));

    // FX0A waits for a key; abandoned when Go falls
    init_model();
    keys = 16'h0000;
    put16('h200, 16'hF50A);
    load_memory();
    load_regs(32'd5);
    @(negedge clk); go = 1;
    repeat (60) @(negedge clk);
    check("FX0A waiting in execute", 256'(state), 256'(ST_EXEC));
    keys = 16'h0480;              // keys 7 and 10
    while (!write_ready) @(negedge clk);
    go = 0;
    while (!halted) @(negedge clk);
    check("FX0A key", 256'(v_out[5]), 256'(8'd7));
    check("FX0A pc", 256'(pc_out), 256'(16'h0202));
    keys = 16'h0000;
    load_regs(32'd5);
    @(negedge clk); go = 1;
    repeat (30) @(negedge clk);
    go = 0;
    while (!halted) @(negedge clk);
    check("FX0A abandoned pc", 256'(pc_out), 256'(16'h0200));

    // Go low: stays in Direct Write
    repeat (50) @(negedge clk);
    check("direct write holds", 256'(state), 256'(ST_DIRECT));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
