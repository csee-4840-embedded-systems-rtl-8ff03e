// tb_chip8_stack: self-checking test of the 16 x 2-byte return stack.
//
// Pushes and pops against a queue model (pre-increment on push, read at
// the pointer and post-decrement on pop), checks wrap-around of the entry
// index after 16 pushes, and the HPS whole-stack and pointer loads with the
// MSB-first entry layout.
module tb_chip8_stack;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst_n;
  logic         push, pop, load_all, sp_load;
  logic [15:0]  push_data, top;
  logic [7:0]   sp, sp_wdata;
  logic [255:0] load_data, entries;

  chip8_stack #(.DEPTH(16)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] mstk [16];
  logic [7:0]  msp;

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic check_all(string what);
    logic [255:0] exp;
    for (int k = 0; k < 16; k++) exp[255 - 16*k -: 16] = mstk[k];
    check({what, " entries"}, entries, exp);
    check({what, " sp"}, 256'(sp), 256'(msp));
    check({what, " top"}, 256'(top), 256'(mstk[msp[3:0]]));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; push = 0; pop = 0; load_all = 0; sp_load = 0;
    push_data = 0; sp_wdata = 0; load_data = 0;
    for (int k = 0; k < 16; k++) mstk[k] = 0;
    msp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all("reset");
    // nested calls then returns
    for (int d = 0; d < 10; d++) begin
      push = 1; push_data = 16'h0200 + 16'(2*d);
      msp = msp + 1; mstk[msp[3:0]] = push_data;
      @(negedge clk);
      push = 0;
      check_all($sformatf("push %0d", d));
    end
    for (int d = 0; d < 10; d++) begin
      check($sformatf("pop value %0d", d), 256'(top), 256'(16'h0200 + 16'(2*(9-d))));
      pop = 1;
      msp = msp - 1;
      @(negedge clk);
      pop = 0;
      check_all($sformatf("pop %0d", d));
    end
    // random mix
    for (int t = 0; t < 200; t++) begin
      if ($urandom_range(0, 1) == 1 || msp == 0) begin
        push = 1; push_data = 16'($urandom);
        msp = msp + 1; mstk[msp[3:0]] = push_data;
      end else begin
        pop = 1; msp = msp - 1;
      end
      @(negedge clk);
      push = 0; pop = 0;
      check_all($sformatf("random %0d", t));
    end
    // HPS load of all entries and pointer
    for (int k = 0; k < 16; k++) begin
      mstk[k] = 16'h1000 + 16'(k * 3);
      load_data[255 - 16*k -: 16] = mstk[k];
    end
    load_all = 1; sp_load = 1; sp_wdata = 8'd5; msp = 8'd5;
    @(negedge clk);
    load_all = 0; sp_load = 0;
    check_all("hps load");
    check("hps load top", 256'(top), 256'(16'h1000 + 16'd15));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
