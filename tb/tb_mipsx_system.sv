// tb_mipsx_system: end-to-end test of a MIPS-X node at its default sizes.
//
// The processor runs a program from the reset vector through an Ecache of
// 16K words in front of a behavioural main memory, with three coprocessors
// (the FPU and two general ones) whose execution units are modelled here
// (result = a + b + fn after a few cycles). tb_core checks every completed
// load and movfrc against a reference model updated in program order.
// The test makes each mechanism happen and counts it: Icache miss cycles and
// hits, the store interlock, Ecache misses, dirty victim write-backs, the
// address reload through AddressTristate, delayed writes, load-through and
// store-through, PID change, coprocessor stall, WBEnable commits and a
// squashed coprocessor write (an exception in the MEM cycle of a movtoc),
// ldf/stf, an interrupt, and an exception taken during an Icache miss. In
// every cycle where an exception is taken, no write or coprocessor cycle may
// leave the chip. A mechanism that never happened counts as a failure. At
// the end the coprocessor register files are compared with the reference.
// The dut uses its default parameters. Timing: 10-unit clock period; main
// memory answers after a fixed latency of a few cycles. The mechanisms
// counted are those of the source; the program, the memory latency and the
// execution-unit models are this test's own. Ends with the TB_RESULT line; a
// watchdog stops a hang.
module tb_mipsx_system;
  import mipsx_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset = 1'b1, interrupt = 1'b0, exception;
  logic icache_disable = 1'b0, icache_test = 1'b0;

  logic        alu_valid, redirect, int_unmask, advance, wb_commit, exc_taken;
  logic [31:0] alu_pc, alu_instr, alu_result, alu_sdata, redirect_pc, wb_pc, wb_rdata, exc_pc;
  logic [3:0]  alu_fpreg;
  kind_e       alu_kind, wb_kind;
  logic        mm_req, mm_we, mm_ack;
  logic [31:0] mm_addr, mm_wdata, mm_rdata;
  logic        ex_start [3], ex_done [3];
  logic [16:0] ex_fn [3];
  logic [31:0] ex_a [3], ex_b [3], ex_result [3];
  bus_ctl_t    bus;
  logic [31:0] data_bus;
  logic        miss, wb_enable, address_tristate;

  mipsx_system dut (.*);

  tb_core core (
    .clk, .reset, .alu_valid, .alu_pc, .alu_instr, .alu_kind, .alu_result, .alu_fpreg,
    .alu_sdata, .redirect, .redirect_pc, .int_unmask, .advance, .wb_commit, .wb_pc,
    .wb_kind, .wb_rdata, .exc_taken, .exc_pc
  );

  int checks = 0, failures = 0, cycle = 0;

  // ---------------- main memory (behavioural) ----------------
  localparam int MM_LAT = 2;
  localparam int HANDLER = 900;        // descriptor index of the handler's first word
  logic [31:0] mm [logic [31:0]];
  int          mm_wait = 0;
  function automatic logic [31:0] mm_read(logic [31:0] a);
    if (a >= RESET_VECTOR && a < RESET_VECTOR + 32'd4096) return (a - RESET_VECTOR) >> 2;
    if (a < 32'd256) return 32'(HANDLER) + (a >> 2);
    return mm.exists(a) ? mm[a] : core.init_word(a);
  endfunction
  always @(posedge clk) begin
    mm_ack <= 1'b0;
    if (mm_req && !mm_ack) begin
      if (mm_wait == MM_LAT) begin
        mm_ack  <= 1'b1;
        mm_wait <= 0;
        if (mm_we) mm[mm_addr] = mm_wdata;
        else       mm_rdata <= mm_read(mm_addr);
      end else mm_wait <= mm_wait + 1;
    end
  end

  // ---------------- coprocessor execution units ----------------
  for (genvar i = 0; i < 3; i++) begin : g_ex
    int cnt = 0;
    logic [31:0] res;
    always @(posedge clk) begin
      ex_done[i] <= 1'b0;
      if (ex_start[i]) begin
        res <= core.cop_op(ex_fn[i], ex_a[i], ex_b[i]);
        cnt <= 3;
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) begin ex_done[i] <= 1'b1; ex_result[i] <= res; end
      end
    end
  end

  // ---------------- program ----------------
  function automatic logic [31:0] cw(int num, int rd, int rs1, int rs2, int fn);
    cop_word_t w;
    w.num = 3'(num); w.rd = 4'(rd); w.rs1 = 4'(rs1); w.rs2 = 4'(rs2); w.fn = 17'(fn);
    return 32'(w);
  endfunction
  task automatic put(int i, kind_e k, logic [31:0] a, logic [31:0] sd = 0, int fr = 0);
    core.prog[i].kind = k; core.prog[i].addr = a; core.prog[i].sdata = sd;
    core.prog[i].fpreg = 4'(fr);
  endtask

  int last;
  initial begin
    #1;
    put(0,  K_ST,  32'h0001_0000, 32'h1111_1111);
    put(2,  K_LD,  32'h0001_0000);
    put(3,  K_LD,  32'h0002_0000);          // same line index: dirty victim written back
    put(4,  K_LD,  32'h0001_0010);          // back-to-back load misses
    put(5,  K_LD,  32'h0001_0000);          // reads the written-back word
    put(6,  K_MOVTOC, cw(2, 3, 0, 0, 0), 32'h100);
    put(7,  K_MOVFRC, cw(2, 3, 0, 0, 0));
    put(8,  K_MOVFRC, cw(2, 4, 3, 3, 1));   // aluc
    put(9,  K_MOVFRC, cw(2, 5, 4, 3, 2));   // aluc while busy: coprocessor stall
    put(10, K_MOVFRC, cw(2, 5, 0, 0, 0));
    put(11, K_LDF, 32'h0001_0020, 0, 2);
    put(12, K_STF, 32'h0001_0030, 0, 2);
    put(14, K_LD,  32'h0001_0030);
    put(15, K_LDT, 32'h0003_0000);
    put(16, K_STT, 32'h0003_0004, 32'h3333_3333);
    put(18, K_LDT, 32'h0003_0004);
    put(19, K_MOVTOC, cw(0, 0, 0, 0, 0), 32'd5);   // new PID
    put(21, K_LD,  32'h0001_0000);          // misses under the new PID
    put(22, K_MOVTOC, cw(3, 1, 0, 0, 0), 32'h77);
    put(23, K_MOVTOC, cw(3, 2, 1, 1, 3));   // aluc issued as movtoc
    put(24, K_MOVFRC, cw(3, 2, 0, 0, 0));
    // mixed traffic, period 7 so stores fall on both word parities
    for (int j = 0; j < 40; j++) begin
      automatic int i = 25 + j * 7;
      put(i,     K_ST,     32'h0001_0100 + 32'((j * 4) % 256), 32'(j) * 32'h0101_0101);
      put(i + 2, K_LD,     32'h0001_0100 + 32'((j * 4) % 256));
      put(i + 3, K_MOVTOC, cw(2, 8 + j % 8, 0, 0, 0), 32'(j));
      put(i + 4, K_MOVFRC, cw(2, 8 + j % 8, 0, 0, 0));
      put(i + 5, K_LD,     32'h0002_0200 + 32'(j * 16));
      put(i + 6, K_MOVFRC, cw(1, 1 + j % 4, 2, 2, j + 1));   // FPU operation
    end
    last = 25 + 40 * 7;
    put(last, K_LD, 32'h0001_0000);
    // handler at address 0: three empty slots, then return (two delay slots)
    core.prog[HANDLER + 3].ret = 1'b1;
  end

  // ---------------- stimulus: reset, interrupt, exception ----------------
  int n_int = 0, n_exc = 0, n_cexc = 0;
  bit exc_armed = 0, exc_a = 0;
  logic cop_exc;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle == 6) reset <= 1'b0;
    // interrupt while a coprocessor instruction goes from ALU into MEM
    if (n_int == 0 && cycle > 150 && advance && dut.u_cpu.rf_q.valid &&
        core.prog[dut.u_cpu.rf_q.instr[9:0]].kind == K_MOVTOC)
      interrupt <= 1'b1;
    if (exc_taken && interrupt) begin interrupt <= 1'b0; n_int++; end
    // exception during an Icache miss cycle
    if (n_exc == 0 && cycle > 700 && dut.u_cpu.cm_q == 2'd2 && !miss) exc_armed = 1;
    exc_a = exc_armed && n_exc == 0;
    if (exc_taken && exc_a) begin n_exc++; exc_armed = 0; exc_a = 1'b0; end
    if (exc_taken && cop_exc) n_cexc++;
  end
  // exception in the MEM cycle of a movtoc: its WBEnable is never given and
  // the coprocessor's pending write is squashed by the next coprocessor cycle
  assign cop_exc = n_cexc == 0 && cycle > 300 && !reset && dut.u_cpu.cm_q == 2'd0 &&
                   dut.u_cpu.me_q.valid && !dut.u_cpu.me_q.done && dut.u_cpu.me_q.kind == K_MOVTOC &&
                   dut.u_cpu.me_q.addr[2:0] != 3'(COP_ECACHE);
  assign exception = exc_a || cop_exc;

  // an instruction squashed in ALU never leaves the chip: no write or
  // coprocessor cycle goes out in the cycle an exception is taken
  int n_exc_checked = 0;
  always @(posedge clk) if (!reset && exc_taken) begin
    checks++; n_exc_checked++;
    if (bus.cop_cycle || (bus.mem_cycle && !bus.read)) begin
      failures++; $display("FAIL cycle %0d: bus cycle of a squashed instruction left the chip", cycle);
    end
  end

  // ---------------- mechanism counters ----------------
  int m_cm = 0, m_ilock = 0, m_ic_hit = 0, m_fill = 0, m_wbk = 0, m_reload = 0,
      m_dwrite = 0, m_ldt = 0, m_stt = 0, m_pid = 0, m_cstall = 0, m_wben = 0,
      m_squash = 0, m_ldf = 0, m_stf = 0, m_late = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.u_cpu.cm_q == 2'd2 && !miss) m_cm++;
    if (dut.u_cpu.cm_q == 2'd1 && !miss) m_ilock++;
    if (dut.u_cpu.cm_q == 2'd0 && dut.u_cpu.ic_hit && advance) m_ic_hit++;
    if (dut.u_ecache.st_q == 3'd2 && mm_ack) m_fill++;
    if (dut.u_ecache.st_q == 3'd1 && mm_ack) m_wbk++;
    if (address_tristate) m_reload++;
    if (!miss && dut.u_ecache.wq_q.valid && !dut.u_ecache.wq_q.read &&
        !dut.u_ecache.wq_q.bypass && dut.u_ecache.wq_q.hit) m_dwrite++;
    if (dut.u_ecache.st_q == 3'd3 && mm_ack) m_ldt++;
    if (!miss && dut.u_ecache.wq_q.valid && !dut.u_ecache.wq_q.read && dut.u_ecache.wq_q.bypass) m_stt++;
    if (!miss && wb_enable && dut.u_ecache.pend_q) m_pid++;
    if (dut.g_cop[1].u_cop.stall) m_cstall++;
    if (!miss && wb_enable) m_wben++;
    if (!miss && dut.g_cop[0].u_cop.any_cop && dut.g_cop[0].u_cop.pend_q && !wb_enable &&
        !dut.g_cop[0].u_cop.pend_ok_q) m_squash++;
    if (!miss && dut.g_cop[1].u_cop.any_cop && dut.g_cop[1].u_cop.pend_q && !wb_enable &&
        !dut.g_cop[1].u_cop.pend_ok_q) m_squash++;
    if (!miss && dut.g_cop[2].u_cop.any_cop && dut.g_cop[2].u_cop.pend_q && !wb_enable &&
        !dut.g_cop[2].u_cop.pend_ok_q) m_squash++;
    if (!miss && dut.g_cop[0].u_cop.fp_ld) m_ldf++;
    if (!miss && dut.g_cop[0].u_cop.st_pend_q) m_stf++;
    if (miss && dut.u_cpu.wb_q.valid && dut.u_cpu.wb_q.kind == K_LD) m_late++;
  end

  task automatic need(string name, int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  // ---------------- end of test ----------------
  initial begin
    wait (reset == 1'b0);
    wait (core.max_index >= last);
    repeat (20) @(posedge clk);
    need("Icache miss (CM1/CM2)", m_cm);
    need("Icache hit", m_ic_hit);
    need("store interlock", m_ilock);
    need("late miss stall on load", m_late);
    need("Ecache block fill", m_fill);
    need("dirty victim write-back", m_wbk);
    need("address reload (AddressTristate)", m_reload);
    need("delayed write", m_dwrite);
    need("load-through", m_ldt);
    need("store-through", m_stt);
    need("PID change", m_pid);
    need("coprocessor stall", m_cstall);
    need("WBEnable commit", m_wben);
    need("squashed coprocessor write", m_squash);
    need("ldf", m_ldf);
    need("stf", m_stf);
    need("interrupt", n_int);
    need("exception", n_exc);
    // coprocessor register files against the reference
    for (int r = 0; r < 16; r++) begin
      checks += 3;
      if (dut.g_cop[0].u_cop.regs[r] !== core.ref_cop[1][r]) begin
        failures++; $display("FAIL FPU f%0d = %h exp %h", r, dut.g_cop[0].u_cop.regs[r], core.ref_cop[1][r]);
      end
      if (dut.g_cop[1].u_cop.regs[r] !== core.ref_cop[2][r]) begin
        failures++; $display("FAIL cop2 r%0d = %h exp %h", r, dut.g_cop[1].u_cop.regs[r], core.ref_cop[2][r]);
      end
      if (dut.g_cop[2].u_cop.regs[r] !== core.ref_cop[3][r]) begin
        failures++; $display("FAIL cop3 r%0d = %h exp %h", r, dut.g_cop[2].u_cop.regs[r], core.ref_cop[3][r]);
      end
    end
    checks++;
    if (dut.u_ecache.pid_q !== 8'd5) begin failures++; $display("FAIL PID %0d", dut.u_ecache.pid_q); end
    $display("cycles %0d commits %0d", cycle, core.commits);
    checks += core.checks;
    failures += core.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: stopped at index %0d", core.max_index);
    $display("TB_RESULT checks=%0d failures=%0d", checks + core.checks, failures + core.failures);
    $finish;
  end
endmodule
