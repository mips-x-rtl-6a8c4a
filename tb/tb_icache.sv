// tb_icache: self-checking test of the on-chip instruction cache.
// Fills words, checks hits and data against a reference computed here, fills
// all 8 ways of one set and checks that a ninth block evicts exactly one of
// them, checks ICacheDisable, and that reset clears the tags unless
// ICacheTest is high. Finally fills all 512 words and reads them back.
// Timing: 10-unit clock period; inputs change just after an edge and lookups
// are compared before the next one. The geometry checked (4 x 8 x 16) is from
// the source; the eviction and reset checks test this design's choices.
// Ends with the TB_RESULT line; a watchdog stops a hang.
module tb_icache;
  logic clk = 0, rst, test, dis, wr;
  logic [31:0] lk_addr, wr_addr, wr_data, lk_data;
  logic lk_hit;
  int checks = 0, failures = 0;

  icache dut (.clk, .rst, .icache_test(test), .icache_disable(dis),
              .lk_addr, .lk_hit, .lk_data, .wr_en(wr), .wr_addr, .wr_data);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(logic [31:0] a);
    return a ^ 32'hA5C3_0F1E;
  endfunction

  task automatic fill(input logic [31:0] a);
    wr = 1; wr_addr = a; wr_data = pat(a);
    @(posedge clk); #1 wr = 0;
  endtask

  task automatic expect_word(input logic [31:0] a, input logic hit);
    lk_addr = a; #1;
    checks++;
    if (lk_hit !== hit || (hit && lk_data !== pat(a))) begin
      failures++;
      $display("FAIL addr %h hit %b (exp %b) data %h", a, lk_hit, hit, lk_data);
    end
  endtask

  int present;
  initial begin
    rst = 1; test = 0; dis = 0; wr = 0; lk_addr = 0; wr_addr = 0; wr_data = 0;
    repeat (4) @(posedge clk); #1 rst = 0;
    expect_word(32'h0000_1040, 0);
    // a two-word fill as in CM1/CM2
    fill(32'h0000_1040); fill(32'h0000_1044);
    expect_word(32'h0000_1040, 1);
    expect_word(32'h0000_1044, 1);
    expect_word(32'h0000_1048, 0);   // same block, word not yet valid
    // eight blocks of set 0 (set = addr[7:6])
    for (int b = 0; b < 8; b++) fill(32'h0001_0000 + b * 256);
    for (int b = 0; b < 8; b++) expect_word(32'h0001_0000 + b * 256, 1);
    // a ninth block of set 0 must evict exactly one of the eight
    fill(32'h0002_0000);
    expect_word(32'h0002_0000, 1);
    present = 0;
    for (int b = 0; b < 8; b++) begin lk_addr = 32'h0001_0000 + b * 256; #1 present += int'(lk_hit); end
    expect_word(32'h0000_1040, 1);   // other sets untouched
    checks++;
    if (present != 7) begin failures++; $display("FAIL set 0 holds %0d blocks", present); end
    // disable
    dis = 1; expect_word(32'h0002_0000, 0); dis = 0;
    // reset with ICacheTest high keeps the contents
    test = 1; rst = 1; repeat (4) @(posedge clk); #1 rst = 0;
    expect_word(32'h0002_0000, 1);
    test = 0; rst = 1; repeat (4) @(posedge clk); #1 rst = 0;
    expect_word(32'h0002_0000, 0);
    // all 512 words from the reset vector, as the test sequence does
    for (int i = 0; i < 512; i++) fill(32'h07FF_FF80 + i * 4);
    for (int i = 0; i < 512; i++) expect_word(32'h07FF_FF80 + i * 4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
