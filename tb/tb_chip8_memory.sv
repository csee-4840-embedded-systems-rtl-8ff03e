// tb_chip8_memory: self-checking test of the 4 KiB program memory.
//
// Fills every word through the bus port with a pattern computed from the
// word index, reads all of them back, then checks the CPU port: two-byte
// reads at random byte addresses (including the wrap from 4095 to 0 and
// reads across a word boundary), byte writes seen by both ports, and the
// one-clock read latency. Expected values come from a byte array model.
module tb_chip8_memory;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         bus_we;
  logic [6:0]   bus_addr;
  logic [255:0] bus_wdata, bus_rdata;
  logic [11:0]  cpu_addr;
  logic [15:0]  cpu_rdata;
  logic         cpu_we;
  logic [7:0]   cpu_wdata;

  chip8_memory #(.WORDS(128)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] model [4096];

  function automatic logic [7:0] pat(int a);
    return 8'((a * 37) ^ (a >> 5) ^ 8'h5A);
  endfunction

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_we = 0; bus_addr = 0; bus_wdata = 0; cpu_addr = 0; cpu_we = 0; cpu_wdata = 0;
    // load through the bus
    for (int w = 0; w < 128; w++) begin
      @(negedge clk);
      bus_we = 1; bus_addr = 7'(w);
      for (int b = 0; b < 32; b++) begin
        bus_wdata[255 - 8*b -: 8] = pat(w*32 + b);
        model[w*32 + b] = pat(w*32 + b);
      end
    end
    @(negedge clk); bus_we = 0;
    // read back through the bus (data valid after the next edge)
    for (int w = 0; w < 128; w++) begin
      logic [255:0] exp;
      bus_addr = 7'(w);
      @(negedge clk);
      for (int b = 0; b < 32; b++) exp[255 - 8*b -: 8] = model[w*32 + b];
      check($sformatf("bus read word %0d", w), bus_rdata, exp);
    end
    // CPU two-byte reads
    for (int t = 0; t < 300; t++) begin
      int a;
      a = (t == 0) ? 4095 : (t == 1) ? 31 : (t == 2) ? 0 : int'($urandom_range(0, 4095));
      cpu_addr = 12'(a);
      @(negedge clk);
      check($sformatf("cpu read %0d", a), 256'(cpu_rdata), 256'({model[a], model[(a + 1) % 4096]}));
    end
    // CPU byte writes
    for (int t = 0; t < 200; t++) begin
      int a;
      logic [7:0] d;
      a = int'($urandom_range(0, 4095));
      d = 8'($urandom);
      cpu_addr = 12'(a); cpu_we = 1; cpu_wdata = d;
      model[a] = d;
      @(negedge clk);
      cpu_we = 0;
      @(negedge clk);
      check($sformatf("cpu write/read %0d", a), 256'(cpu_rdata), 256'({model[a], model[(a + 1) % 4096]}));
    end
    // bus sees CPU writes
    for (int w = 0; w < 128; w++) begin
      logic [255:0] exp;
      bus_addr = 7'(w);
      @(negedge clk);
      for (int b = 0; b < 32; b++) exp[255 - 8*b -: 8] = model[w*32 + b];
      check($sformatf("bus read after cpu writes %0d", w), bus_rdata, exp);
    end
    // read latency: output holds the old address's data until the edge
    cpu_addr = 12'd100;
    @(negedge clk);
    cpu_addr = 12'd200;
    #1;
    check("latency hold", 256'(cpu_rdata), 256'({model[100], model[101]}));
    @(negedge clk);
    check("latency update", 256'(cpu_rdata), 256'({model[200], model[201]}));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
