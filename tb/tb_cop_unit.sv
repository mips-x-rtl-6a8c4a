// tb_cop_unit: self-checking test of the coprocessor bus interface (FPU
// configuration, coprocessor number 1).
//
// The testbench plays the part of the processor and the external latch: each
// call of step() presents one latched bus cycle (the instruction in MEM), the
// data bus, Miss and WBEnable for one clock. An execution unit model answers
// operations after three cycles with a + b + fn. Checked:
//   * movtoc writes its register only after WBEnable, and a pending write is
//     dropped when another coprocessor instruction ends MEM first;
//   * movfrc drives the register on the data bus, with the value of a pending
//     write bypassed, and keeps it there while Miss is high;
//   * an operation starts the execution unit, a second one for the busy unit
//     stalls (stall output high) until the first is done, and both results
//     reach their registers;
//   * ldf re-latches its data while Miss is high, so the last word presented
//     is the one written; stf drives its register in the next cycle with Miss
//     low, for exactly one cycle;
//   * instructions for another coprocessor number are ignored.
//   * a movfrc in the cycle that squashes a pending write reads the old value;
//   * 600 random movtoc/movfrc/foreign-coprocessor steps, with WBEnable on
//     time, delayed by up to two steps, or withheld, against a reference.
// Timing: 10-unit clock; outputs are sampled 1 unit before the edge that
// ends the cycle. The rules checked are the source's; the coprocessor word
// layout and the execution-unit latency are this design's own.
// Ends with the TB_RESULT line; a watchdog stops a hang.
module tb_cop_unit;
  import mipsx_pkg::*;
  logic        clk = 0, rst = 1, wb_enable = 0, miss = 0;
  bus_ctl_t    lat;
  logic [31:0] data_i = '0, data_o;
  logic        data_oe, stall, ex_start, ex_done = 0;
  logic [16:0] ex_fn;
  logic [31:0] ex_a, ex_b, ex_result;
  int          checks = 0, failures = 0;

  cop_unit dut (
    .clk, .rst, .lat, .wb_enable, .miss, .data_i, .data_o, .data_oe, .stall,
    .ex_start, .ex_fn, .ex_a, .ex_b, .ex_done, .ex_result
  );

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // execution unit: three cycles
  int cnt = 0;
  logic [31:0] res;
  always @(posedge clk) begin
    ex_done <= 1'b0;
    if (ex_start) begin res <= ex_a + ex_b + 32'(ex_fn); cnt <= 3; end
    else if (cnt > 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin ex_done <= 1'b1; ex_result <= res; end
    end
  end

  function automatic bus_ctl_t cop(int num, int rd, int rs1, int rs2, int fn, bit rd_not_wr);
    bus_ctl_t b;
    cop_word_t w;
    w.num = 3'(num); w.rd = 4'(rd); w.rs1 = 4'(rs1); w.rs2 = 4'(rs2); w.fn = 17'(fn);
    b = '0;
    b.cop_cycle = 1'b1; b.read = rd_not_wr; b.addr = 32'(w);
    return b;
  endfunction
  function automatic bus_ctl_t fp(int reg_n, bit rd_not_wr);
    bus_ctl_t b;
    b = '0;
    b.cop_cycle = 1'b1; b.mem_cycle = 1'b1; b.read = rd_not_wr; b.fpreg = 4'(reg_n);
    b.addr = 32'h0000_8000;
    return b;
  endfunction
  localparam bus_ctl_t NOP = '0;

  // one clock with the given inputs; outputs are sampled just before the edge
  logic        s_oe, s_stall;
  logic [31:0] s_data;
  task automatic step(bus_ctl_t l, logic [31:0] d = '0, bit m = 0, bit wbe = 0);
    lat = l; data_i = d; miss = m; wb_enable = wbe;
    #4 s_oe = data_oe; s_data = data_o; s_stall = stall;
    @(posedge clk); #1;
  endtask

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Random register moves against a reference. A coprocessor instruction's
  // WBEnable comes in the step after its MEM step, or up to two steps later
  // (an Icache miss delays the WB), or never (an exception squashed it).
  logic [31:0] refr [16];
  int n_rd = 0, n_commit = 0, n_squash = 0;
  task automatic random_moves();
    logic [31:0] lf = 32'h1357_9BDF;
    bit          pend_v = 0, owe = 0, wbe;
    int          pend_r = 0, delay = 0, r;
    logic [31:0] pend_d = '0, d, expv;
    bus_ctl_t    l;
    repeat (3) step(NOP);
    for (int i = 0; i < 16; i++) refr[i] = dut.regs[i];
    for (int i = 0; i < 600; i++) begin
      lf = {lf[30:0], lf[31] ^ lf[21] ^ lf[1] ^ lf[0]};
      lf = {lf[30:0], lf[31] ^ lf[21] ^ lf[1] ^ lf[0]};
      lf = {lf[30:0], lf[31] ^ lf[21] ^ lf[1] ^ lf[0]};
      lf = {lf[30:0], lf[31] ^ lf[21] ^ lf[1] ^ lf[0]};
      wbe = 1'b0;
      if (owe) begin
        if (delay > 0) delay--;
        else begin owe = 1'b0; wbe = lf[2:0] != 3'd0; end
      end
      r = int'(lf[6:3]);
      d = lf ^ 32'(i);
      l = NOP;
      if (delay == 0 || !owe) begin
        unique case (lf[9:8])
          2'd0: l = cop(1, r, 0, 0, 0, 0);         // movtoc
          2'd1: l = cop(1, r, 0, 0, 0, 1);         // movfrc
          2'd2: l = cop(2, r, 0, 0, 0, lf[10]);    // another coprocessor
          default: l = NOP;
        endcase
      end
      expv = (pend_v && wbe && pend_r == r) ? pend_d : refr[r];
      if (pend_v && wbe) begin refr[pend_r] = pend_d; pend_v = 0; n_commit++; end
      else if (pend_v && l.cop_cycle) begin pend_v = 0; n_squash++; end
      step(l, (l.cop_cycle && !l.read) ? d : 32'h0, 1'b0, wbe);
      if (l.cop_cycle && l.read && l.addr[2:0] == 3'd1) begin
        n_rd++;
        check($sformatf("random movfrc r%0d step %0d", r, i), s_oe && s_data == expv);
      end
      if (l.cop_cycle && !l.read && l.addr[2:0] == 3'd1) begin
        pend_v = 1; pend_r = r; pend_d = d;
      end
      if (l.cop_cycle) begin owe = 1'b1; delay = (lf[13:11] == 3'd0) ? 1 + int'(lf[14]) : 0; end
    end
    if (owe) begin
      repeat (delay) step(NOP);
      step(NOP, 0, 0, 1);
      if (pend_v) begin refr[pend_r] = pend_d; n_commit++; end
    end
    step(NOP);
    for (int i = 0; i < 16; i++) check($sformatf("random final r%0d", i), dut.regs[i] == refr[i]);
  endtask

  initial begin
    lat = NOP;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // movtoc r3 <- 0x1111, committed
    step(cop(1, 3, 0, 0, 0, 0), 32'h1111);
    step(NOP, 0, 0, 1);
    check("movtoc committed", dut.regs[3] == 32'h1111);
    // movtoc r4 <- 0x2222 squashed by a following instruction for coprocessor 2
    // (no WBEnable for it: it was squashed; the later instruction's WB has one)
    step(cop(1, 4, 0, 0, 0, 0), 32'h2222);
    step(NOP);
    step(cop(2, 1, 0, 0, 0, 1), 32'h0);
    step(NOP, 0, 0, 1);
    check("squashed movtoc leaves r4", dut.regs[4] == 32'h0);
    // movtoc r5 <- 0x5555 then movfrc r5 in its WB cycle: bypass
    step(cop(1, 5, 0, 0, 0, 0), 32'h5555);
    step(cop(1, 5, 0, 0, 0, 1), 0, 0, 1);
    check("movfrc bypasses the pending write", s_oe && s_data == 32'h5555);
    step(NOP, 0, 0, 1);
    check("r5 written", dut.regs[5] == 32'h5555);
    // movfrc r3 held on the bus while Miss is high
    step(cop(1, 3, 0, 0, 0, 1));
    check("movfrc drives r3", s_oe && s_data == 32'h1111);
    lat = NOP;
    step(NOP, 0, 1);
    check("movfrc value held under Miss", s_oe && s_data == 32'h1111);
    step(NOP);
    check("bus released", !s_oe);
    // another coprocessor's movfrc: silent
    step(cop(2, 3, 0, 0, 0, 1));
    check("other coprocessor ignored", !s_oe);
    // operation r6 = r3 + r5 + 7, then r7 = r6 + r6 + 1 issued while busy
    step(cop(1, 6, 3, 5, 7, 0));
    check("operation started", dut.busy_q);
    step(NOP, 0, 0, 1);          // WB of the first operation
    begin
      int stalls = 0;
      lat = cop(1, 7, 6, 6, 1, 0);
      miss = 1'b0;
      #1;
      while (stall) begin
        miss = 1'b1;             // the Miss line is the OR of every stall
        stalls++;
        @(posedge clk); #1;
      end
      check("second operation stalled", stalls > 0);
      step(cop(1, 7, 6, 6, 1, 0));
    end
    step(NOP, 0, 0, 1);          // WB of the second operation
    repeat (5) step(NOP);
    check("r6 = r3 + r5 + 7", dut.regs[6] == 32'h1111 + 32'h5555 + 7);
    check("r7 = r6 + r6 + 1", dut.regs[7] == 2 * (32'h1111 + 32'h5555 + 7) + 1);
    // ldf f8: wrong word first, re-latched under Miss, right word last
    step(fp(8, 1), 32'hBAD0);
    step(NOP, 32'hBAD1, 1, 1);
    step(NOP, 32'h8888, 1, 1);
    step(NOP, 0, 0, 1);
    check("ldf keeps the last word presented", dut.regs[8] == 32'h8888);
    // stf f8: driven in the next cycle, for one cycle
    step(fp(8, 0));
    check("stf silent in MEM", !s_oe);
    step(NOP, 0, 1, 1);
    check("stf waits for Miss low", !s_oe);
    step(NOP, 0, 0, 1);
    check("stf drives f8", s_oe && s_data == 32'h8888);
    step(NOP);
    check("stf drives one cycle", !s_oe);
    // movtoc r9 squashed by an exception (no WBEnable); the handler's first
    // movfrc r9 squashes it and must read the old value, not the pending one
    step(cop(1, 9, 0, 0, 0, 0), 32'h9999);
    step(NOP);
    step(NOP);
    step(cop(1, 9, 0, 0, 0, 1));
    check("movfrc does not bypass a squashed write", s_oe && s_data == 32'h0);
    step(NOP, 0, 0, 1);
    check("squashed write not performed", dut.regs[9] == 32'h0);
    random_moves();
    $display("random moves: %0d movfrc checked, %0d commits, %0d squashes", n_rd, n_commit, n_squash);
    checks++;
    if (n_rd < 50 || n_commit < 50 || n_squash < 10) begin
      failures++; $display("FAIL random sequence too thin");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
