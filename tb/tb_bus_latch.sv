// tb_bus_latch: self-checking test of the external address latch.
//
// Drives a new pseudo-random bus cycle every clock and raises Miss at random.
// A reference copy is updated at each edge where Miss is low; the latch output
// must equal it after every edge. Reset in the middle of the run must clear
// the latched cycle. Ends with the TB_RESULT line; a watchdog stops a hang.
// Timing: 10-unit clock; inputs change 1 unit after an edge, the output is
// compared 1 unit after the next edge. Hold on Miss is the behaviour under
// test (all devices watch Miss); the random stimulus is this test's own.
module tb_bus_latch;
  import mipsx_pkg::*;
  logic     clk = 0, rst, miss;
  bus_ctl_t bus, lat, exp_lat;
  int       checks = 0, failures = 0;
  logic [31:0] lfsr = 32'hACE1_2345;

  bus_latch dut (.clk, .rst, .miss, .bus, .lat);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] step(logic [31:0] x);
    return {x[30:0], x[31] ^ x[21] ^ x[1] ^ x[0]};
  endfunction

  int held = 0;
  initial begin
    rst = 1; miss = 0; bus = '0; exp_lat = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      lfsr = step(lfsr);
      bus.addr = lfsr;
      lfsr = step(lfsr);
      {bus.mem_cycle, bus.cop_cycle, bus.read, bus.bypass, bus.fpreg} = lfsr[7:0];
      miss = lfsr[9] & lfsr[10];
      if (i == 1000) rst = 1;
      @(posedge clk);
      if (rst) exp_lat = '0;
      else if (!miss) exp_lat = bus;
      else held++;
      #1;
      checks++;
      if (lat !== exp_lat) begin
        failures++;
        $display("FAIL cycle %0d rst %b miss %b lat %h exp %h", i, rst, miss, lat, exp_lat);
      end
      rst = 0;
    end
    checks++;
    if (held < 100) begin failures++; $display("FAIL Miss high only %0d times", held); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
