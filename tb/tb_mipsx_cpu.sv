// tb_mipsx_cpu: self-checking test of the processor's external interface.
//
// The processor runs a pseudo-random program (loads, stores, load-through,
// store-through, movtoc, empty slots, one jump with its two delay slots) from
// the reset vector. tb_core stands in for the integer datapath and checks
// every completed load against a reference memory updated in program order.
// The pins are served by a bus responder written here, which behaves like an
// ideal external cache with late misses:
//   * it latches the address when Miss is low and drives read data in the
//     next cycle;
//   * for a chosen access it first drives a wrong word, then holds Miss high
//     for one to three cycles in the following cycle and presents the right
//     word in the last of them, so the processor's re-latch is exercised;
//   * it writes store data taken from the bus in the cycle after the store's
//     MEM cycle once Miss is low (the delayed write).
// Further checks: the pins carry the ALU-stage address and control when the
// pipeline advances; WBEnable is high exactly at the commit of a coprocessor
// instruction; an interrupt is taken and masked; an exception during an
// Icache miss restarts at address 0; interrupts taken with a store or movtoc
// in ALU put no bus cycle out for it; the Icache-miss and store-interlock
// cycles occur; finally ICacheTest mode shows the Icache words on the data
// pins after a reset that keeps the Icache. A watchdog stops a hang.
// Timing: 10-unit clock. The responder's late-miss behaviour follows the
// source's Ecache protocol; the miss pattern and the program are this test's
// own. Ends with the TB_RESULT line.
module tb_mipsx_cpu;
  import mipsx_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset = 1'b1, interrupt = 1'b0, exception = 1'b0;
  logic        icache_disable = 1'b0, icache_test = 1'b0;
  logic [31:0] address_o, data_o, data_i;
  logic        address_oe, mem_cycle, read_write_b, bypass_cache, cop_cycle, wb_enable, data_oe;
  logic [3:0]  fpreg;
  logic        miss;
  logic        alu_valid, redirect, int_unmask, advance, wb_commit, exc_taken;
  logic [31:0] alu_pc, alu_instr, alu_result, alu_sdata, redirect_pc, wb_pc, wb_rdata, exc_pc;
  logic [3:0]  alu_fpreg;
  kind_e       alu_kind, wb_kind;

  mipsx_cpu dut (
    .clk, .reset, .address_o, .address_oe, .address_tristate(1'b0), .mem_cycle, .read_write_b,
    .bypass_cache, .cop_cycle, .fpreg, .wb_enable, .data_o, .data_oe, .data_i, .miss,
    .interrupt, .exception, .icache_disable, .icache_test,
    .alu_valid, .alu_pc, .alu_instr, .alu_kind, .alu_result, .alu_fpreg, .alu_sdata,
    .redirect, .redirect_pc, .int_unmask, .advance, .wb_commit, .wb_pc, .wb_kind,
    .wb_rdata, .exc_taken, .exc_pc
  );

  tb_core core (
    .clk, .reset, .alu_valid, .alu_pc, .alu_instr, .alu_kind, .alu_result, .alu_fpreg,
    .alu_sdata, .redirect, .redirect_pc, .int_unmask, .advance, .wb_commit, .wb_pc,
    .wb_kind, .wb_rdata, .exc_taken, .exc_pc
  );

  int checks = 0, failures = 0, cycle = 0;
  localparam int HANDLER = 900;

  // ---------------- bus responder ----------------
  logic [31:0] mem [logic [31:0]];
  function automatic logic [31:0] word(logic [31:0] a);
    if (a >= RESET_VECTOR && a < RESET_VECTOR + 32'd4096) return (a - RESET_VECTOR) >> 2;
    if (a < 32'd256) return 32'(HANDLER) + (a >> 2);
    return mem.exists(a) ? mem[a] : core.init_word(a);
  endfunction

  typedef struct { bit v; bit rd; bit bad; logic [31:0] a; } acc_t;
  acc_t        mq, wq;
  int          stall_cnt = 0;
  logic [31:0] lfsr = 32'h1234_5678;
  logic        r_oe;
  logic [31:0] r_data;

  assign miss = !reset && wq.v && stall_cnt > 0;

  always_comb begin
    r_oe = 1'b0; r_data = '0;
    if (miss) begin
      if (wq.rd) begin
        r_oe = 1'b1;
        r_data = (stall_cnt == 1) ? word(wq.a) : ~word(wq.a);
      end
    end else if (mq.v && mq.rd) begin
      r_oe = 1'b1;
      r_data = mq.bad ? ~word(mq.a) : word(mq.a);
    end
  end
  assign data_i = (r_oe ? r_data : '0) | (data_oe ? data_o : '0);

  int n_late = 0, n_dwrite = 0;
  always @(posedge clk) begin
    lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
    if (reset) begin
      mq.v <= 0; wq.v <= 0; stall_cnt <= 0;
    end else if (!miss) begin
      if (wq.v && !wq.rd) begin
        mem[{wq.a[31:2], 2'b00}] = data_i;
        n_dwrite++;
      end
      wq        <= mq;
      stall_cnt <= (mq.v && mq.bad) ? 1 + int'(lfsr[4:3] % 3) : 0;
      if (mq.v && mq.bad) n_late++;
      mq.v   <= mem_cycle;
      mq.rd  <= read_write_b;
      mq.a   <= address_o;
      mq.bad <= lfsr[2:0] == 3'd0;
    end else begin
      stall_cnt <= stall_cnt - 1;
    end
  end

  // one driver at a time
  always @(posedge clk) if (!reset) begin
    checks++;
    if (r_oe && data_oe) begin failures++; $display("FAIL cycle %0d: bus driven twice", cycle); end
  end

  // ---------------- pin checks ----------------
  int n_wbe = 0, n_cm = 0, n_ilock = 0;
  always @(posedge clk) if (!reset && !icache_test) begin
    if (advance && alu_valid && kind_is_mem(alu_kind)) begin
      checks++;
      if (address_o !== alu_result || !mem_cycle || read_write_b !== !kind_is_write(alu_kind) ||
          bypass_cache !== (alu_kind inside {K_LDT, K_STT}) || !address_oe) begin
        failures++;
        $display("FAIL cycle %0d: pins %h mc %b rw %b bp %b for %s at %h", cycle, address_o,
                 mem_cycle, read_write_b, bypass_cache, alu_kind.name(), alu_result);
      end
    end
    if (advance && alu_valid && alu_kind == K_MOVTOC) begin
      checks++;
      if (!cop_cycle || mem_cycle || address_o !== alu_result) begin
        failures++; $display("FAIL cycle %0d: movtoc pins", cycle);
      end
    end
    if (wb_commit) begin
      checks++;
      if (wb_enable !== kind_is_cop(wb_kind)) begin
        failures++; $display("FAIL cycle %0d: WBEnable %b at commit of %s", cycle, wb_enable, wb_kind.name());
      end
      if (wb_enable) n_wbe++;
    end
    if (!miss && dut.cm_q == 2'd2) n_cm++;
    if (!miss && dut.cm_q == 2'd1) n_ilock++;
  end

  // ---------------- program ----------------
  int last = 199;
  initial begin
    logic [31:0] r;
    kind_e k;
    #1;
    r = 32'hC0FF_EE11;
    for (int i = 0; i < last; i++) begin
      r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      unique case (r[2:0])
        3'd0, 3'd1: k = K_LD;
        3'd2, 3'd3: k = K_ST;
        3'd4:       k = K_LDT;
        3'd5:       k = K_STT;
        3'd6:       k = K_MOVTOC;
        default:    k = K_NONE;
      endcase
      if (i > 0 && core.prog[i - 1].kind inside {K_ST, K_STT}) k = K_NONE;   // store write slot
      core.prog[i].kind  = k;
      core.prog[i].addr  = (k == K_MOVTOC) ? 32'h0000_0452 : 32'h0000_4000 + {24'd0, r[11:6], 2'b00};
      core.prog[i].sdata = r ^ 32'(i);
    end
    core.prog[last - 1].kind = K_NONE;
    core.prog[last].kind = K_LD; core.prog[last].addr = 32'h0000_4000;
    core.prog[100].kind = K_NONE;
    core.prog[101].kind = K_NONE;
    core.prog[102].kind = K_NONE;
    core.prog[100].jump = 1'b1;
    core.prog[100].target = RESET_VECTOR + 32'd120 * 4;
    core.prog[HANDLER + 3].ret = 1'b1;
  end

  // ---------------- interrupt and exception ----------------
  int n_int = 0, n_exc = 0;
  bit exc_armed = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (n_int < 8 && cycle > 120 + 97 * n_int && advance && !interrupt) interrupt <= 1'b1;
    if (exc_taken && interrupt) begin interrupt <= 1'b0; n_int++; end
    if (n_exc == 0 && cycle > 400 && dut.cm_q == 2'd2 && !miss) exc_armed = 1;
    exception = exc_armed && n_exc == 0;
    if (exc_taken && exception) begin n_exc++; exc_armed = 0; exception = 1'b0; end
  end
  // the interrupt is masked after it is taken: no second one before unmask
  bit masked = 0;
  always @(posedge clk) if (!reset) begin
    if (exc_taken) begin
      checks++;
      if (masked && !exception) begin failures++; $display("FAIL interrupt taken while masked"); end
      masked = 1;
    end
    if (int_unmask) masked = 0;
  end
  // an instruction squashed in ALU never leaves the chip: no write or
  // coprocessor cycle goes out in the cycle an exception is taken
  int n_alu_squash = 0;
  always @(posedge clk) if (!reset && exc_taken) begin
    checks++;
    if (alu_valid && alu_kind inside {K_ST, K_STT, K_MOVTOC}) n_alu_squash++;
    if (cop_cycle || (mem_cycle && !read_write_b)) begin
      failures++; $display("FAIL cycle %0d: bus cycle of a squashed instruction left the chip", cycle);
    end
  end
  // the handler starts at address 0
  always @(posedge clk) if (!reset && exc_taken) begin
    @(posedge clk);
    checks++;
    if (dut.pc_q !== EXC_VECTOR) begin failures++; $display("FAIL handler PC %h", dut.pc_q); end
  end

  task automatic need(string name, int n);
    checks++;
    $display("mechanism %-26s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    checks++;
    if (address_o !== RESET_VECTOR) begin failures++; $display("FAIL reset address %h", address_o); end
    reset <= 1'b0;
    wait (core.max_index >= last);
    repeat (10) @(posedge clk);
    need("Icache miss (CM1/CM2)", n_cm);
    need("store interlock", n_ilock);
    need("late miss", n_late);
    need("delayed write", n_dwrite);
    need("WBEnable", n_wbe);
    need("interrupt", n_int);
    need("exception", n_exc);
    need("write squashed in ALU", n_alu_squash);
    // ICacheTest: reset keeps the Icache, the PC increments from the reset
    // vector and the data pins show the Icache words
    for (int i = 0; i < 1024; i++) begin core.prog[i].kind = K_NONE; core.prog[i].jump = 1'b0; end
    icache_test <= 1'b1;
    reset <= 1'b1;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    begin
      int shown = 0;
      repeat (60) begin
        @(negedge clk);
        if (data_oe) begin
          shown++;
          checks++;
          if (data_o !== word(dut.pc_q)) begin
            failures++; $display("FAIL test mode word %h at %h", data_o, dut.pc_q);
          end
        end
      end
      need("ICacheTest words shown", shown);
    end
    checks += core.checks;
    failures += core.failures;
    $display("cycles %0d commits %0d", cycle, core.commits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog: stopped at index %0d", core.max_index);
    $display("TB_RESULT checks=%0d failures=%0d", checks + core.checks, failures + core.failures + 1);
    $finish;
  end
endmodule
