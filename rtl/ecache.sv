// ecache: external cache (Ecache) of a MIPS-X node and its controller.
//
// What it does: a direct-mapped, virtually addressed, write-back cache for
// instructions and data, with 4-word blocks, between the processor pins and a
// word-wide main-memory port. Its tags hold the process id (PID) next to the
// address tag, since the cache is virtual; the PID is written by the
// processor with a movtoc to the Ecache controller, which is a coprocessor.
//
// How it works (one clock period = one processor cycle):
//   * The address register (AR) captures the address bus at every clock edge
//     at which Miss is low, or while the controller itself drives the bus.
//     The cycle after a MemCycle is that access's data phase: the data array
//     is read at AR and driven on the data bus for a read; the tag compare
//     runs in parallel and its result is registered.
//   * Late miss: in the following cycle (the processor's WB) the controller
//     raises memMiss if the access missed. For a miss it writes back a dirty
//     victim block, fetches the 4-word block, then reloads AR: it asserts
//     AddressTristate, drives the missed address (the address of the next
//     access had displaced it in AR), presents the data in one more stalled
//     cycle while driving the displaced address back into AR, and releases
//     memMiss. The processor re-latches the load data during every stalled
//     cycle, so it ends with the right word.
//   * Delayed write: a store probes the tags in its MEM cycle. In its WB cycle,
//     once Miss is low, the processor drives the data and the Ecache writes
//     the word and sets the dirty bit. A store miss is served first (victim
//     write-back, block fetch).
//   * BypassCache: a load-through (ldt) reads main memory directly while Miss
//     is held; a store-through (stt) is captured in a one-word posted-write
//     register and written to main memory in the background (it also updates
//     the word if the block is cached). Any access that needs main memory
//     waits until the posted write is done.
//   * PID: a movtoc to coprocessor COP_ECACHE with fn = 0 delivers the new PID
//     in its MEM cycle; it takes effect when WBEnable is seen, and is dropped
//     if another coprocessor instruction reaches MEM first.
//   * Bus hold: while another device holds Miss high (a coprocessor stall),
//     the Ecache keeps driving the word it drove in the last cycle with Miss
//     low, so the processor's re-latch during the stall keeps the read data.
//
// Main memory port: mm_req with mm_we, mm_addr (byte address), mm_wdata; the
// memory answers with a one-cycle mm_ack (and mm_rdata for a read). One word
// per request.
//
// Source and own choices: the direct-mapped virtual organisation, 4-word
// blocks, write-back, PID in the controller, late miss, address reload through
// AddressTristate, delayed write and bypass follow the source description,
// as do the tag/valid/dirty/compare structure and the Miss OR of Figure 4.
// Own choices: 16K words as the default size (the source gives 16K to 64K),
// an 8-bit PID, main memory addressed with the virtual address (translation
// is outside the scope of the description), the posted write for stt, no
// flush operation, and a load-through that does not look at a cached copy.
//
// Lint notes: of the coprocessor word only the number and fn are read (the
// PID move needs no register fields), and the small address-field functions
// each use only their own bits. These unused-bit warnings stand.
module ecache
  import mipsx_pkg::*;
#(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned PID_W = 8
) (
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic [31:0] addr_bus,        // resolved address bus
  input  logic        mem_cycle,
  input  logic        cop_cycle,
  input  logic        read_write_b,
  input  logic        bypass_cache,
  input  logic        wb_enable,
  input  logic [31:0] data_i,          // resolved data bus
  output logic [31:0] data_o,
  output logic        data_oe,
  input  logic        miss,            // global Miss (wired OR)
  output logic        mem_miss,        // this cache's contribution to Miss
  output logic        address_tristate,
  output logic [31:0] addr_drive,
  // main memory side
  output logic        mm_req,
  output logic        mm_we,
  output logic [31:0] mm_addr,
  output logic [31:0] mm_wdata,
  input  logic [31:0] mm_rdata,
  input  logic        mm_ack
);
  localparam int unsigned LINES = WORDS / 4;
  localparam int unsigned IB    = $clog2(LINES);
  localparam int unsigned TW    = 32 - 4 - IB;       // address tag width

  typedef logic [IB-1:0]       idx_t;
  typedef logic [PID_W+TW-1:0] tagv_t;

  logic [31:0] dmem [WORDS];
  tagv_t       tags [LINES];
  logic [LINES-1:0] valid_q, dirty_q;

  function automatic idx_t idx_of(logic [31:0] a);  return a[4 +: IB];   endfunction
  function automatic logic [1:0] off_of(logic [31:0] a); return a[3:2];  endfunction
  function automatic logic [IB+1:0] word_of(logic [31:0] a); return a[2 +: IB+2]; endfunction

  logic [PID_W-1:0] pid_q;
  function automatic tagv_t tagv_of(logic [31:0] a, logic [PID_W-1:0] p);
    return {p, a[31 -: TW]};
  endfunction

  // ---------------- pipeline of bus accesses ----------------
  typedef struct packed {
    logic valid;
    logic read;
    logic bypass;
  } mq_t;
  typedef struct packed {
    logic        valid;
    logic        read;
    logic        bypass;
    logic        hit;
    logic        served;
    logic [31:0] addr;
  } wq_t;

  logic [31:0] ar_q;
  mq_t         mq_q;
  wq_t         wq_q;

  typedef enum logic [2:0] {S_IDLE, S_WBK, S_FILL, S_LDT, S_RELOAD, S_PRESENT, S_RESTORE} st_e;
  st_e         st_q;
  logic [1:0]  cnt_q;
  logic [31:0] msave_q, ldt_q;
  logic        pw_busy_q;
  logic [31:0] pw_addr_q, pw_data_q;

  logic mq_hit;
  assign mq_hit = valid_q[idx_of(ar_q)] && tags[idx_of(ar_q)] == tagv_of(ar_q, pid_q);

  logic need;
  assign need = wq_q.valid && !wq_q.served &&
                ((!wq_q.bypass && !wq_q.hit) || (wq_q.bypass && wq_q.read) ||
                 (wq_q.bypass && !wq_q.read && pw_busy_q));
  assign mem_miss = (st_q != S_IDLE) || need;

  idx_t  wq_idx;
  assign wq_idx = idx_of(wq_q.addr);
  logic  victim_dirty;
  assign victim_dirty = valid_q[wq_idx] && dirty_q[wq_idx];
  logic [31:0] victim_base;
  assign victim_base = {tags[wq_idx][TW-1:0], wq_idx, 4'b0000};

  // ---------------- outputs ----------------
  logic        hold_oe_q;
  logic [31:0] hold_d_q;
  always_comb begin
    address_tristate = 1'b0;
    addr_drive       = '0;
    data_oe          = 1'b0;
    data_o           = dmem[word_of(ar_q)];
    unique case (st_q)
      S_RELOAD:  begin address_tristate = 1'b1; addr_drive = wq_q.addr; end
      S_PRESENT: begin
        address_tristate = 1'b1; addr_drive = msave_q;
        data_oe = 1'b1;
        if (wq_q.bypass) data_o = ldt_q;
      end
      S_RESTORE: begin address_tristate = 1'b1; addr_drive = msave_q; end
      S_IDLE: begin
        if (!miss) data_oe = mq_q.valid && mq_q.read && !mq_q.bypass;
        else begin
          // another device stalls: keep the last word on the bus, so that
          // the processor re-latches the same value
          data_oe = hold_oe_q; data_o = hold_d_q;
        end
      end
      default: ;
    endcase
  end
  always_ff @(posedge clk) begin
    if (rst) hold_oe_q <= 1'b0;
    else if ((st_q == S_IDLE && !miss) || st_q == S_PRESENT) begin
      hold_oe_q <= data_oe;
      hold_d_q  <= data_o;
    end
  end

  always_comb begin
    mm_req = 1'b0; mm_we = 1'b0; mm_addr = '0; mm_wdata = '0;
    unique case (st_q)
      S_WBK: begin
        mm_req = 1'b1; mm_we = 1'b1;
        mm_addr  = victim_base | {28'd0, cnt_q, 2'b00};
        mm_wdata = dmem[{wq_idx, cnt_q}];
      end
      S_FILL: begin
        mm_req = 1'b1;
        mm_addr = {wq_q.addr[31:4], cnt_q, 2'b00};
      end
      S_LDT: begin
        mm_req = 1'b1;
        mm_addr = {wq_q.addr[31:2], 2'b00};
      end
      default: if (pw_busy_q) begin
        mm_req = 1'b1; mm_we = 1'b1; mm_addr = pw_addr_q; mm_wdata = pw_data_q;
      end
    endcase
  end

  // ---------------- PID coprocessor register ----------------
  logic             pm_valid_q, pm_mine_q;   // cop instruction in its MEM cycle
  logic             pend_q;
  logic [PID_W-1:0] pend_pid_q;
  cop_word_t        bus_cw;
  assign bus_cw = cop_word_t'(addr_bus);

  always_ff @(posedge clk) begin
    if (rst) begin
      pid_q <= '0; pm_valid_q <= 1'b0; pm_mine_q <= 1'b0; pend_q <= 1'b0;
    end else if (!miss) begin
      pm_valid_q <= cop_cycle && !mem_cycle;
      pm_mine_q  <= cop_cycle && !mem_cycle && !read_write_b &&
                    bus_cw.num == COP_ECACHE && bus_cw.fn == '0;
      if (wb_enable && pend_q) begin
        pid_q  <= pend_pid_q;
        pend_q <= 1'b0;
      end else if (pm_valid_q) begin
        pend_q <= 1'b0;          // squashed by a newer coprocessor instruction
      end
      if (pm_mine_q) begin
        pend_q     <= 1'b1;
        pend_pid_q <= data_i[PID_W-1:0];
      end
    end
  end

  // ---------------- access pipeline, controller, arrays ----------------
  always_ff @(posedge clk) begin
    if (!miss || address_tristate) ar_q <= address_tristate ? addr_drive : addr_bus;
    if (rst) begin
      mq_q      <= '0;
      wq_q      <= '0;
      st_q      <= S_IDLE;
      cnt_q     <= '0;
      pw_busy_q <= 1'b0;
      valid_q   <= '0;
      dirty_q   <= '0;
    end else begin
      if (!miss) begin
        // delayed write of a cached store, or capture of a store-through
        if (wq_q.valid && !wq_q.read && !wq_q.bypass && wq_q.hit) begin
          dmem[word_of(wq_q.addr)] <= data_i;
          dirty_q[wq_idx] <= 1'b1;
        end
        if (wq_q.valid && !wq_q.read && wq_q.bypass) begin
          pw_busy_q <= 1'b1;
          pw_addr_q <= {wq_q.addr[31:2], 2'b00};
          pw_data_q <= data_i;
          if (wq_q.hit) dmem[word_of(wq_q.addr)] <= data_i;
        end
        wq_q.valid  <= mq_q.valid;
        wq_q.read   <= mq_q.read;
        wq_q.bypass <= mq_q.bypass;
        wq_q.hit    <= mq_hit;
        wq_q.served <= 1'b0;
        wq_q.addr   <= ar_q;
        mq_q.valid  <= mem_cycle;
        mq_q.read   <= read_write_b;
        mq_q.bypass <= bypass_cache;
      end

      if (pw_busy_q && st_q inside {S_IDLE, S_RELOAD, S_PRESENT, S_RESTORE} && mm_ack)
        pw_busy_q <= 1'b0;

      unique case (st_q)
        S_IDLE: if (need && !pw_busy_q) begin
          msave_q <= ar_q;
          cnt_q   <= '0;
          if (wq_q.bypass)       st_q <= S_LDT;
          else if (victim_dirty) st_q <= S_WBK;
          else                   st_q <= S_FILL;
        end
        S_WBK: if (mm_ack) begin
          cnt_q <= cnt_q + 2'd1;
          if (cnt_q == 2'd3) begin
            st_q <= S_FILL;
            dirty_q[wq_idx] <= 1'b0;
          end
        end
        S_FILL: if (mm_ack) begin
          dmem[{wq_idx, cnt_q}] <= mm_rdata;
          cnt_q <= cnt_q + 2'd1;
          if (cnt_q == 2'd3) begin
            tags[wq_idx]    <= tagv_of(wq_q.addr, pid_q);
            valid_q[wq_idx] <= 1'b1;
            dirty_q[wq_idx] <= 1'b0;
            wq_q.hit        <= 1'b1;
            st_q <= wq_q.read ? S_RELOAD : S_RESTORE;
          end
        end
        S_LDT: if (mm_ack) begin
          ldt_q <= mm_rdata;
          st_q  <= S_RELOAD;
        end
        S_RELOAD: st_q <= S_PRESENT;
        S_PRESENT, S_RESTORE: begin
          st_q        <= S_IDLE;
          wq_q.served <= 1'b1;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A controller-driven data cycle must never coincide with a stt capture.
  a_mm_port: assert property (@(posedge clk) disable iff (rst)
    (st_q inside {S_WBK, S_FILL, S_LDT}) |-> !pw_busy_q)
    else $error("main-memory port used twice");
endmodule
