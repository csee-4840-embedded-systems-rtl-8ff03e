// tb_chip8_timers: self-checking test of the 60 Hz delay and sound timers.
//
// Runs the divider at a reduced clock rate (CLK_HZ = 600, so one tick every
// 10 clocks) and checks: the tick period, that both timers count down by
// one per tick and stop at zero, CPU writes, HPS loads and their priority.
module tb_chip8_timers;
  localparam int CLK_HZ = 600;
  localparam int DIV    = CLK_HZ / 60;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, dt_we, st_we, load, tick;
  logic [7:0] cpu_wdata, load_dt, load_st, dt, st;

  chip8_timers #(.CLK_HZ(CLK_HZ), .TICK_HZ(60)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tick period
  int last_tick = -1, cyc = 0, nticks = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tick) begin
      if (last_tick >= 0) check("tick period", cyc - last_tick, DIV);
      last_tick = cyc;
      nticks++;
    end
  end

  initial begin
    rst_n = 0; dt_we = 0; st_we = 0; load = 0; cpu_wdata = 0; load_dt = 0; load_st = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset dt", dt, 0);
    // HPS load
    @(negedge clk);
    load = 1; load_dt = 8'd5; load_st = 8'd3;
    @(negedge clk);
    load = 0;
    check("load dt", dt, 5);
    check("load st", st, 3);
    // follow down-counting, tick by tick
    begin
      int edt, est;
      edt = 5; est = 3;
      for (int k = 0; k < 8; k++) begin
        @(posedge tick);      // tick is registered: the count moves at the edge that ends it
        @(posedge clk);
        @(negedge clk);
        if (edt > 0) edt--;
        if (est > 0) est--;
        check($sformatf("dt after tick %0d", k), dt, edt);
        check($sformatf("st after tick %0d", k), st, est);
      end
    end
    // CPU writes
    dt_we = 1; cpu_wdata = 8'd2;
    @(negedge clk);
    check("cpu dt write", dt, 2);
    dt_we = 0; st_we = 1; cpu_wdata = 8'd4;
    @(negedge clk);
    check("cpu st write", st, 4);
    st_we = 0;
    // HPS load wins over CPU write
    load = 1; load_dt = 8'd9; load_st = 8'd9; dt_we = 1; st_we = 1; cpu_wdata = 8'd1;
    @(negedge clk);
    load = 0; dt_we = 0; st_we = 0;
    check("load priority dt", dt, 9);
    check("load priority st", st, 9);
    repeat (DIV * 12) @(negedge clk);
    check("dt stops at zero", dt, 0);
    check("st stops at zero", st, 0);
    check("ticks seen", int'(nticks >= 20), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
