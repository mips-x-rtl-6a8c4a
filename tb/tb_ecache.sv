// tb_ecache: self-checking test of the external cache and its controller at
// the default size (16K words).
//
// A small model of the processor's bus behaviour drives the Ecache: an access
// is put on the address pins in its ALU cycle, its read data is latched at
// the end of its MEM cycle and latched again at every edge at which Miss is
// high (the load is re-executed), a store's data is driven in the following
// cycle once Miss is low, a movtoc to the Ecache drives the new PID in its
// MEM cycle and WBEnable is given in its WB cycle. The address bus carries
// the Ecache's own drive while it asserts AddressTristate. Main memory is a
// behavioural model with a two-cycle latency.
// The access stream is pseudo-random: loads, stores, load-through,
// store-through and PID changes on addresses chosen so that blocks conflict
// in the direct-mapped array (64 KB apart), with the rule that the slot after
// a store carries no memory access. Load-through and store-through use an
// address region of their own, as uncached data would. Every load is checked at completion
// against a reference memory updated in program order; at the end every
// dirty block is compared with the reference too. The test counts block
// fills, dirty write-backs, address reloads, delayed writes, load-through,
// store-through and PID changes, and fails if one never happened.
// Timing: 10-unit clock; the bus model updates with non-blocking assignments
// at each edge, as the processor's registers would. The protocol modelled is
// the source's; the address pattern and memory latency are this test's own.
// Ends with the TB_RESULT line; a watchdog stops a hang.
module tb_ecache;
  import mipsx_pkg::*;
  logic        clk = 0, rst = 1;
  logic [31:0] addr_bus, data_bus, ec_data, addr_drive;
  logic        mem_cycle, cop_cycle, rw_b, bypass, wb_enable, ec_oe, miss, mem_miss, address_tristate;
  logic        mm_req, mm_we, mm_ack = 0;
  logic [31:0] mm_addr, mm_wdata, mm_rdata;
  int          checks = 0, failures = 0, cycle = 0;

  ecache dut (
    .clk, .rst, .addr_bus, .mem_cycle, .cop_cycle, .read_write_b(rw_b), .bypass_cache(bypass),
    .wb_enable, .data_i(data_bus), .data_o(ec_data), .data_oe(ec_oe), .miss, .mem_miss,
    .address_tristate, .addr_drive, .mm_req, .mm_we, .mm_addr, .mm_wdata, .mm_rdata, .mm_ack
  );
  assign miss = mem_miss;

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h2468_ACE1;
  endfunction

  // ---------------- main memory ----------------
  logic [31:0] mm [logic [31:0]];
  int          mm_wait = 0;
  always @(posedge clk) begin
    mm_ack <= 1'b0;
    if (mm_req && !mm_ack) begin
      if (mm_wait == 2) begin
        mm_ack  <= 1'b1;
        mm_wait <= 0;
        if (mm_we) mm[mm_addr] = mm_wdata;
        else       mm_rdata <= mm.exists(mm_addr) ? mm[mm_addr] : init_word(mm_addr);
      end else mm_wait <= mm_wait + 1;
    end
  end

  // ---------------- processor bus model ----------------
  typedef enum logic [2:0] {A_NONE, A_LD, A_ST, A_LDT, A_STT, A_PID} acc_e;
  typedef struct { acc_e k; logic [31:0] a; logic [31:0] d; } acc_t;
  localparam int N = 3000;
  acc_t prog [N];
  acc_t al, me, wb;
  int   pc = 0;
  logic [31:0] mdr, st_d, hold_d;
  bit   relatch = 0, st_pend = 0, hold = 0;
  logic [31:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] ref_rd(logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : init_word(a);
  endfunction

  logic        cpu_oe;
  logic [31:0] cpu_d;
  always_comb begin
    cop_word_t w;
    w = '0;
    mem_cycle = al.k inside {A_LD, A_ST, A_LDT, A_STT};
    cop_cycle = al.k == A_PID;
    rw_b      = !(al.k inside {A_ST, A_STT, A_PID});
    bypass    = al.k inside {A_LDT, A_STT};
    w.num     = 3'(COP_ECACHE);
    addr_bus  = address_tristate ? addr_drive : (al.k == A_PID ? 32'(w) : al.a);
    cpu_oe = 1'b0; cpu_d = '0;
    if (st_pend && !miss) begin cpu_oe = 1'b1; cpu_d = st_d; end
    else if (!miss && me.k == A_PID) begin cpu_oe = 1'b1; cpu_d = me.d; end
    else if (miss && hold) begin cpu_oe = 1'b1; cpu_d = hold_d; end
    data_bus  = (cpu_oe ? cpu_d : '0) | (ec_oe ? ec_data : '0);
    wb_enable = wb.k == A_PID;
  end

  int n_loads = 0;
  logic [7:0] pid_ref = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      checks++;
      if (cpu_oe && ec_oe) begin failures++; $display("FAIL cycle %0d: two drivers", cycle); end
      if (!miss) begin
        // completion of the WB instruction
        if (wb.k inside {A_LD, A_LDT}) begin
          checks++; n_loads++;
          if (mdr !== ref_rd(wb.a)) begin
            failures++;
            $display("FAIL cycle %0d: load %h got %h exp %h", cycle, wb.a, mdr, ref_rd(wb.a));
          end
        end
        if (wb.k inside {A_ST, A_STT}) ref_mem[wb.a] = wb.d;
        if (wb.k == A_PID) pid_ref = wb.d[7:0];
        relatch <= me.k inside {A_LD, A_LDT};
        if (me.k inside {A_LD, A_LDT}) mdr <= data_bus;
        st_pend <= me.k inside {A_ST, A_STT};
        st_d    <= me.d;
        hold    <= me.k == A_PID;
        hold_d  <= me.d;
        wb <= me; me <= al;
        if (pc < N) begin al <= prog[pc]; pc <= pc + 1; end
        else al <= '{A_NONE, 0, 0};
      end else if (relatch) mdr <= data_bus;
    end
  end

  // ---------------- counters ----------------
  int m_fill = 0, m_wbk = 0, m_reload = 0, m_dwrite = 0, m_ldt = 0, m_stt = 0, m_pid = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.st_q == 3'd2 && mm_ack) m_fill++;
    if (dut.st_q == 3'd1 && mm_ack) m_wbk++;
    if (address_tristate) m_reload++;
    if (!miss && dut.wq_q.valid && !dut.wq_q.read && !dut.wq_q.bypass && dut.wq_q.hit) m_dwrite++;
    if (dut.st_q == 3'd3 && mm_ack) m_ldt++;
    if (!miss && dut.wq_q.valid && !dut.wq_q.read && dut.wq_q.bypass) m_stt++;
    if (!miss && wb_enable && dut.pend_q) m_pid++;
  end

  task automatic need(string name, int n);
    checks++;
    $display("mechanism %-18s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    logic [31:0] r = 32'h7654_3210;
    acc_e k;
    al = '{A_NONE, 0, 0}; me = al; wb = al;
    for (int i = 0; i < N; i++) begin
      r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      r = {r[30:0], r[31] ^ r[21] ^ r[1] ^ r[0]};
      unique case (r[3:0])
        4'd0, 4'd1, 4'd2, 4'd3, 4'd4: k = A_LD;
        4'd5, 4'd6, 4'd7, 4'd8:       k = A_ST;
        4'd9:                         k = A_LDT;
        4'd10:                        k = A_STT;
        4'd11:                        k = (r[9:6] == 0) ? A_PID : A_NONE;
        default:                      k = A_NONE;
      endcase
      if (i > 0 && prog[i - 1].k inside {A_ST, A_STT}) k = A_NONE;
      prog[i].k = k;
      // cached accesses: 8 lines x 4 tags, words of 4 blocks; bypassed ones
      // use their own region (the cache does not look at bypassed data)
      prog[i].a = {9'd0, k inside {A_LDT, A_STT}, 4'd0, r[13:12], 12'd0, r[8:6], r[11:10], 2'b00};
      prog[i].d = (k == A_PID) ? {29'd0, r[17:15]} : r ^ 32'(i);
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (pc == N);
    repeat (20) @(posedge clk);
    #1;
    // every valid dirty block must hold the reference data
    for (int l = 0; l < 16384 / 4; l++) begin
      if (dut.valid_q[l] && dut.dirty_q[l]) begin
        for (int w = 0; w < 4; w++) begin
          logic [31:0] a;
          a = {dut.tags[l][dut.TW-1:0], 12'(l), 2'(w), 2'b00};
          checks++;
          if (dut.dmem[l * 4 + w] !== ref_rd(a)) begin
            failures++; $display("FAIL dirty word %h = %h exp %h", a, dut.dmem[l * 4 + w], ref_rd(a));
          end
        end
      end
    end
    checks++;
    if (dut.pid_q !== pid_ref) begin failures++; $display("FAIL PID %0d exp %0d", dut.pid_q, pid_ref); end
    need("block fill", m_fill);
    need("dirty write-back", m_wbk);
    need("address reload", m_reload);
    need("delayed write", m_dwrite);
    need("load-through", m_ldt);
    need("store-through", m_stt);
    need("PID change", m_pid);
    $display("loads checked %0d, cycles %0d", n_loads, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
