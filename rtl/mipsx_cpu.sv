// mipsx_cpu: the MIPS-X processor as seen from its pins.
//
// What it does: runs the five-stage pipeline IF, RF, ALU, MEM, WB and turns it
// into the external bus protocol. It holds the on-chip instruction cache, the
// PC unit, the pipeline registers, the memory data register, the Icache-miss
// sequencer, the store interlock, interrupt/exception sequencing and the pin
// drivers. The integer datapath (register file, ALU, shifter, decode, branch
// logic) is not part of this module: it connects through the "core" ports. The
// core sees the instruction in the ALU stage (alu_instr, alu_pc) and answers in
// the same cycle with its bus usage (alu_kind), the Result Bus value
// (alu_result: an address, a coprocessor word or an ALU result), the FPU
// register number and the data to store. Completed instructions are reported
// on wb_commit with the data read from the bus (wb_rdata).
//
// How it works (one clock period = one processor cycle):
//   * ALU cycle: the address pins show the Result Bus; MemCycle, CopCycle,
//     Read/Write_b, BypassCache and FPReg describe the instruction. The
//     external latches capture them at the clock edge ending the cycle.
//   * MEM cycle: read data is latched into the memory data register at the end
//     of the cycle; a movtoc drives its data during MEM.
//   * WB cycle: a late Miss (high during WB) holds the whole pipeline. While
//     Miss is high the data latch repeats the previous cycle's latch, so the
//     load is re-executed until the Ecache presents the right data. A store
//     drives its data in the cycle after its MEM cycle, once Miss is low, for
//     exactly one cycle (delayed write). WBEnable is high in the WB cycle of a
//     coprocessor instruction.
//   * Icache miss: in the cycle the fetch misses, the PC replaces the ALU
//     instruction's address on the pins. Two cache-miss cycles CM1 and CM2
//     follow: CM1 returns the missed word and sends the next PC, CM2 returns
//     the second word and re-sends the displaced ALU-stage address. Both words
//     are written into the Icache; the second is fetched straight from the
//     fill register in the cycle after CM2. The WB of the instruction in MEM is
//     postponed until after CM2. If a store sits in MEM when the miss is
//     detected, one interlock cycle is inserted first, so the store's delayed
//     write gets its bus slot before the first fetch address goes out.
//   * Interrupt (latched every cycle, masked after it is taken until
//     int_unmask) and Exception (not latched) are acted on at the end of a
//     cycle in which Miss is low: the WB instruction completes, a store in MEM
//     still performs its write, everything younger is squashed (no WBEnable
//     for a squashed coprocessor instruction, and an instruction in ALU puts
//     no bus cycle on the pins) and fetching restarts at 0.
//   * Reset forces the reset vector on the address pins and restarts the
//     fetch there; ICacheTest forces the PC to increment and makes the data
//     pins show the words read from the Icache.
//   * Bus hold under Miss: a value the processor drove on the data bus in the
//     last cycle with Miss low (movtoc data, an ICacheTest word) stays driven
//     while Miss is high, so every device that re-latches during a stall sees
//     the same word. Store data is the exception: it is on the bus for exactly
//     one cycle with Miss low. The Icache fill of a stalled miss cycle repeats
//     its word and address the same way.
//
// Source and own choices: the stage timing, Miss semantics, delayed write,
// store interlock, CM1/CM2 sequence, WBEnable rules, exception actions,
// vectors and test modes follow the source description. Own choices: a single
// clock instead of the two-phase clock; the core interface above; WBEnable is
// also given for ldf/stf; interrupts start unmasked after reset; the PC
// redirect port for branches (branch logic belongs to the core).
//
// Lint notes: the WB-stage register keeps the full MEM-stage record, of
// which WB reads only what commit needs (its address and data fields and
// the done flag are unused there); the pin name "interrupt" matches a C++
// word. Both warnings stand.
module mipsx_cpu
  import mipsx_pkg::*;
(
  input  logic        clk,
  input  logic        reset,            // Reset pin (active high, synchronous)
  // ---- pins ----
  output logic [31:0] address_o,        // Address0..31 (bit 31 = Address0)
  output logic        address_oe,       // low while AddressTristate is high
  input  logic        address_tristate,
  output logic        mem_cycle,
  output logic        read_write_b,     // 1 = read
  output logic        bypass_cache,
  output logic        cop_cycle,
  output logic [3:0]  fpreg,
  output logic        wb_enable,
  output logic [31:0] data_o,
  output logic        data_oe,
  input  logic [31:0] data_i,
  input  logic        miss,
  input  logic        interrupt,
  input  logic        exception,
  input  logic        icache_disable,
  input  logic        icache_test,
  // ---- core (integer datapath) ----
  output logic        alu_valid,
  output logic [31:0] alu_pc,
  output logic [31:0] alu_instr,
  input  kind_e       alu_kind,
  input  logic [31:0] alu_result,
  input  logic [3:0]  alu_fpreg,
  input  logic [31:0] alu_sdata,
  input  logic        redirect,         // take redirect_pc as the next fetch address
  input  logic [31:0] redirect_pc,
  input  logic        int_unmask,       // PSW write that re-enables interrupts
  output logic        advance,          // pipeline moves at this clock edge
  output logic        wb_commit,        // WB instruction completes at this edge
  output logic [31:0] wb_pc,
  output kind_e       wb_kind,
  output logic [31:0] wb_rdata,
  output logic        exc_taken,        // exception sequence starts at this edge
  output logic [31:0] exc_pc            // PC of the oldest squashed instruction
);

  typedef enum logic [1:0] {CM_IDLE, CM_ILOCK, CM_1, CM_2} cm_e;
  typedef enum logic [1:0] {T_NONE, T_MDR, T_FILL0, T_FILL1} tgt_e;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } fstage_t;

  typedef struct packed {
    logic        valid;
    logic        done;      // bus access already performed (frozen by an Icache miss)
    logic [31:0] pc;
    kind_e       kind;
    logic [31:0] addr;
    logic [31:0] sdata;
  } mstage_t;

  logic [31:0] pc_q;
  logic        from_fill_q;
  fstage_t     rf_q, al_q;
  mstage_t     me_q, wb_q;
  cm_e         cm_q;
  logic [31:0] fill0_q, fill1_q, mdr_q;
  tgt_e        tgt_q;
  logic [31:0] tgt_addr_q;    // Icache address of a fill target being re-latched
  logic        st_pend_q;
  logic [31:0] st_data_q;
  logic        int_q, int_mask_q;

  // ---------------- instruction fetch ----------------
  logic        ic_hit;
  logic [31:0] ic_data;
  logic        ic_wr;
  logic [31:0] ic_wr_addr;

  icache u_icache (
    .clk, .rst(reset), .icache_test, .icache_disable,
    .lk_addr(pc_q), .lk_hit(ic_hit), .lk_data(ic_data),
    .wr_en(ic_wr), .wr_addr(ic_wr_addr), .wr_data(data_i)
  );

  logic        fetch_ok;
  logic [31:0] fetch_word;
  assign fetch_ok   = from_fill_q || ic_hit;
  assign fetch_word = from_fill_q ? fill1_q : ic_data;

  logic me_store_pending;   // store in MEM whose delayed write is still to come
  assign me_store_pending = me_q.valid && !me_q.done && (me_q.kind inside {K_ST, K_STT});

  logic miss_start;         // the fetch misses in this cycle
  assign miss_start = !reset && cm_q == CM_IDLE && !fetch_ok;

  logic exc_now;
  assign exc_now = !reset && (exception || (int_q && !int_mask_q));

  kind_e al_kind;
  assign al_kind = al_q.valid ? alu_kind : K_NONE;

  // ---------------- pins of the ALU-phase bus cycle ----------------
  always_comb begin
    address_o    = alu_result;   // Result Bus by default
    mem_cycle    = 1'b0;
    cop_cycle    = 1'b0;
    read_write_b = 1'b1;
    bypass_cache = 1'b0;
    fpreg        = '0;
    if (reset) begin
      address_o = RESET_VECTOR;
    end else if ((cm_q == CM_IDLE && miss_start && !me_store_pending) || cm_q == CM_ILOCK) begin
      address_o = pc_q;          // PC Bus: first word of the Icache miss
      mem_cycle = 1'b1;
    end else if (cm_q == CM_1) begin
      address_o = pc_q + 32'd4;  // second word
      mem_cycle = 1'b1;
    end else if (cm_q == CM_IDLE && miss_start) begin
      // store interlock: leave this slot free for the store's write
      mem_cycle = 1'b0;
    end else if (!exc_now) begin
      // normal cycle, or CM2 re-sending the displaced ALU-stage cycle; an
      // instruction squashed in ALU by an exception never leaves the chip
      mem_cycle    = kind_is_mem(al_kind);
      cop_cycle    = kind_is_cop(al_kind);
      read_write_b = !kind_is_write(al_kind);
      bypass_cache = al_kind inside {K_LDT, K_STT};
      fpreg        = (al_kind inside {K_LDF, K_STF}) ? alu_fpreg : 4'd0;
    end
  end
  assign address_oe = !address_tristate;

  assign wb_enable = wb_q.valid && kind_is_cop(wb_q.kind);

  // ---------------- data pins ----------------
  // A value put on the bus in a cycle with Miss low stays driven while Miss is
  // high (movtoc data "stays driven until Miss is released"); the store's
  // delayed write is the exception: it is on the bus for exactly one cycle.
  logic        fresh_oe;
  logic [31:0] fresh_d;
  logic        hold_oe_q;
  logic [31:0] hold_d_q;
  always_comb begin
    fresh_oe = 1'b0;
    fresh_d  = '0;
    if (cm_q == CM_IDLE && me_q.valid && !me_q.done && me_q.kind == K_MOVTOC) begin
      fresh_oe = 1'b1; fresh_d = me_q.sdata;
    end else if (icache_test && cm_q == CM_IDLE && fetch_ok && !reset) begin
      fresh_oe = 1'b1; fresh_d = fetch_word;
    end
    data_oe = 1'b0;
    data_o  = '0;
    if (st_pend_q && !miss) begin
      data_oe = 1'b1; data_o = st_data_q;
    end else if (!miss) begin
      data_oe = fresh_oe; data_o = fresh_d;
    end else begin
      data_oe = hold_oe_q; data_o = hold_d_q;
    end
  end
  always_ff @(posedge clk) begin
    if (reset) hold_oe_q <= 1'b0;
    else if (!miss) begin
      hold_oe_q <= fresh_oe && !st_pend_q;
      hold_d_q  <= fresh_d;
    end
  end

  // ---------------- data latch target ----------------
  tgt_e tgt_cur, tgt_use;
  always_comb begin
    unique case (cm_q)
      CM_1:    tgt_cur = T_FILL0;
      CM_2:    tgt_cur = T_FILL1;
      CM_ILOCK: tgt_cur = T_NONE;
      default: tgt_cur = (me_q.valid && !me_q.done && (me_q.kind inside {K_LD, K_LDT, K_MOVFRC}))
                         ? T_MDR : T_NONE;
    endcase
    tgt_use = miss ? tgt_q : tgt_cur;
  end

  assign ic_wr      = !reset && (tgt_use == T_FILL0 || tgt_use == T_FILL1);
  logic [31:0] tgt_addr_cur;
  assign tgt_addr_cur = (tgt_cur == T_FILL1) ? pc_q + 32'd4 : pc_q;
  assign ic_wr_addr   = miss ? tgt_addr_q : tgt_addr_cur;

  // ---------------- pipeline control ----------------
  logic full_adv;   // every stage moves
  assign full_adv  = !reset && !miss && !exc_now &&
                     ((cm_q == CM_IDLE && !miss_start) || cm_q == CM_2);
  assign advance   = full_adv;
  assign wb_commit = !reset && !miss && wb_q.valid;
  assign wb_pc     = wb_q.pc;
  assign wb_kind   = wb_q.kind;
  assign wb_rdata  = mdr_q;
  assign exc_taken = !miss && exc_now;

  assign alu_valid = al_q.valid;
  assign alu_pc    = al_q.pc;
  assign alu_instr = al_q.instr;

  always_comb begin
    if (me_q.valid && !me_store_pending) exc_pc = me_q.pc;
    else if (al_q.valid)                 exc_pc = al_q.pc;
    else if (rf_q.valid)                 exc_pc = rf_q.pc;
    else                                 exc_pc = pc_q;
  end

  mstage_t me_next;
  always_comb begin
    me_next.valid = al_q.valid;
    me_next.done  = 1'b0;
    me_next.pc    = al_q.pc;
    me_next.kind  = al_kind;
    me_next.addr  = alu_result;
    me_next.sdata = alu_sdata;
  end

  always_ff @(posedge clk) begin
    // data latch (repeats the previous target while Miss is high)
    unique case (tgt_use)
      T_MDR:   mdr_q   <= data_i;
      T_FILL0: fill0_q <= data_i;
      T_FILL1: fill1_q <= data_i;
      default: ;
    endcase
    int_q <= interrupt;

    if (reset) begin
      pc_q        <= RESET_VECTOR;
      from_fill_q <= 1'b0;
      rf_q.valid  <= 1'b0;
      al_q.valid  <= 1'b0;
      me_q.valid  <= 1'b0;
      wb_q.valid  <= 1'b0;
      cm_q        <= CM_IDLE;
      tgt_q       <= T_NONE;
      st_pend_q   <= 1'b0;
      int_mask_q  <= 1'b0;
    end else if (!miss) begin
      tgt_q <= tgt_cur;
      tgt_addr_q <= tgt_addr_cur;
      if (int_unmask) int_mask_q <= 1'b0;
      // delayed write of a store: performed in this cycle, set up for the next
      st_pend_q <= me_store_pending;
      if (me_store_pending) st_data_q <= me_q.sdata;

      if (exc_now) begin
        int_mask_q  <= 1'b1;
        wb_q        <= me_q;
        wb_q.valid  <= me_store_pending;
        me_q.valid  <= 1'b0;
        al_q.valid  <= 1'b0;
        rf_q.valid  <= 1'b0;
        pc_q        <= EXC_VECTOR;
        from_fill_q <= 1'b0;
        cm_q        <= CM_IDLE;
      end else if (full_adv) begin
        wb_q        <= me_q;
        me_q        <= me_next;
        al_q        <= rf_q;
        rf_q.valid  <= 1'b1;
        rf_q.pc     <= pc_q;
        rf_q.instr  <= (cm_q == CM_2) ? fill0_q : fetch_word;
        pc_q        <= (redirect && !icache_test && cm_q != CM_2) ? redirect_pc : pc_q + 32'd4;
        from_fill_q <= (cm_q == CM_2);
        cm_q        <= CM_IDLE;
      end else begin
        // Icache miss sequence: the WB stage drains, the rest stays frozen
        wb_q.valid <= 1'b0;
        if (me_q.valid) me_q.done <= 1'b1;
        unique case (cm_q)
          CM_IDLE:  cm_q <= me_store_pending ? CM_ILOCK : CM_1;
          CM_ILOCK: cm_q <= CM_1;
          CM_1:     cm_q <= CM_2;
          default:  cm_q <= CM_IDLE;
        endcase
      end
    end
  end

  // The store's write slot must not carry another memory or coprocessor cycle
  // (the software rule the architecture relies on).
  a_store_slot: assert property (@(posedge clk) disable iff (reset)
    (st_pend_q && !miss && cm_q == CM_IDLE) |-> !(me_q.valid && !me_q.done && kind_is_mem(me_q.kind)))
    else $error("memory instruction scheduled in the write slot of a store");
endmodule
