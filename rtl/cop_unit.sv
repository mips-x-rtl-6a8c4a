// cop_unit: the bus side of a MIPS-X coprocessor (optionally the FPU).
//
// What it does: takes coprocessor instructions off the latched address bus
// and executes the interface part of them: register moves with the processor
// (movtoc, movfrc), operations (aluc) handed to an execution unit, and, when
// IS_FPU is set, floating-point loads and stores (ldf, stf) that move data
// between memory and the coprocessor's registers without passing through the
// processor. The arithmetic itself sits outside, behind the ex_* port.
//
// How it works (one clock period = one processor cycle; lat is the bus cycle
// captured by the external latch, valid during the MEM cycle):
//   * An instruction is for this unit when CopCycle is high with MemCycle low
//     and the coprocessor number matches, or, for the FPU, when CopCycle and
//     MemCycle are both high (ldf/stf, register from FPReg).
//   * movfrc (Read/Write_b high): the register is driven on the data bus
//     during MEM. movtoc (Read/Write_b low): the data on the bus is taken at
//     the end of MEM. An operation (fn != 0) starts the execution unit at the
//     end of MEM; the processor's r0 data that comes with it is ignored.
//   * Write-back enable: a register write (movtoc, operation result, ldf data)
//     is held as pending at the end of MEM and is written only when WBEnable
//     is seen. A pending write is dropped (squashed) when another coprocessor
//     instruction, for any unit, completes its MEM cycle before WBEnable came.
//     Reads of a pending register are bypassed from the pending result once
//     WBEnable for it has been seen (in the same cycle or before); a read in
//     the cycle that squashes it gets the old register value.
//   * ldf: the data is latched at the end of MEM and re-latched during the
//     stalled cycles that follow, like the processor does for a load, so a late
//     Ecache miss leaves the right word. stf: the register is driven in the
//     cycle after MEM once Miss is low, for one cycle (delayed write).
//   * Stall: the unit raises its Miss contribution when an instruction for it
//     is in MEM while the previous operation is still executing.
//   * Bus hold: a movfrc value driven in a cycle with Miss low stays on the
//     bus while Miss stays high (the processor re-latches it during a stall).
//
// Source and own choices: the instruction set seen on the bus, the WBEnable
// commit/squash rules, the result bypass, the ldf/stf timing and the use of
// Miss to stall follow the source description. Own choices: the field layout
// of the coprocessor word (mipsx_pkg), 16 registers, one operation in flight,
// and stalling any instruction for a busy unit.
//
// Lint notes: the BypassCache bit of the latched cycle is not read (it means
// nothing to a coprocessor), and ex_fn is the fn field of the latched word
// passed straight to the execution unit. Both warnings stand.
module cop_unit
  import mipsx_pkg::*;
#(
  parameter logic [2:0] COP_NUM = 3'd1,
  parameter bit         IS_FPU  = 1'b1,
  parameter int unsigned NREGS  = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_ctl_t    lat,
  input  logic        wb_enable,
  input  logic        miss,
  input  logic [31:0] data_i,
  output logic [31:0] data_o,
  output logic        data_oe,
  output logic        stall,
  // execution unit
  output logic        ex_start,
  output logic [16:0] ex_fn,
  output logic [31:0] ex_a,
  output logic [31:0] ex_b,
  input  logic        ex_done,
  input  logic [31:0] ex_result
);
  localparam int unsigned RB = $clog2(NREGS);

  logic [31:0] regs [NREGS];
  cop_word_t   cw;
  assign cw = cop_word_t'(lat.addr);

  logic mine_cop, mine_move, mine_op, fp_ld, fp_st, any_cop;
  assign mine_cop  = lat.cop_cycle && !lat.mem_cycle && cw.num == COP_NUM;
  assign mine_move = mine_cop && cw.fn == '0;
  assign mine_op   = mine_cop && cw.fn != '0;
  assign fp_ld     = IS_FPU && lat.cop_cycle && lat.mem_cycle && lat.read;
  assign fp_st     = IS_FPU && lat.cop_cycle && lat.mem_cycle && !lat.read;
  assign any_cop   = lat.cop_cycle;

  // pending register write
  logic          pend_q, pend_ready_q, pend_ok_q;
  logic [RB-1:0] pend_rd_q;
  logic [31:0]   pend_val_q;
  logic          busy_q, discard_q;     // operation executing / its result unwanted
  logic          relatch_q;             // ldf data may be re-latched while Miss is high
  logic          st_pend_q;
  logic [31:0]   st_data_q;

  // a pending result is bypassed only once it is confirmed (WBEnable seen
  // now or before); an unconfirmed one is being squashed by this instruction
  function automatic logic [31:0] rd_reg(logic [RB-1:0] r);
    if (pend_q && pend_ready_q && (pend_ok_q || wb_enable) && pend_rd_q == r) return pend_val_q;
    return regs[r];
  endfunction

  logic [RB-1:0] move_reg, op_rd;
  assign move_reg = (fp_ld || fp_st) ? RB'(lat.fpreg) : RB'(cw.rd);
  assign op_rd    = RB'(cw.rd);

  assign stall    = (mine_cop || fp_ld || fp_st) && busy_q;
  assign ex_start = mine_op && !busy_q && !miss;
  assign ex_fn    = cw.fn;
  assign ex_a     = rd_reg(RB'(cw.rs1));
  assign ex_b     = rd_reg(RB'(cw.rs2));

  // bus drive: a movfrc value stays on the bus while Miss is high; the stf
  // data is driven for exactly one cycle
  logic        fresh_oe, hold_oe_q;
  logic [31:0] hold_d_q;
  assign fresh_oe = mine_cop && lat.read && !busy_q;
  always_comb begin
    data_oe = 1'b0;
    data_o  = '0;
    if (st_pend_q && !miss) begin
      data_oe = 1'b1; data_o = st_data_q;
    end else if (!miss) begin
      data_oe = fresh_oe; data_o = rd_reg(move_reg);
    end else begin
      data_oe = hold_oe_q; data_o = hold_d_q;
    end
  end
  always_ff @(posedge clk) begin
    if (rst) hold_oe_q <= 1'b0;
    else if (!miss) begin
      hold_oe_q <= fresh_oe && !st_pend_q;
      hold_d_q  <= rd_reg(move_reg);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q    <= 1'b0;
      busy_q    <= 1'b0;
      discard_q <= 1'b0;
      relatch_q <= 1'b0;
      st_pend_q <= 1'b0;
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      // execution unit result
      if (busy_q && ex_done) begin
        busy_q <= 1'b0;
        if (!discard_q) begin
          pend_val_q   <= ex_result;
          pend_ready_q <= 1'b1;
        end
      end

      if (miss) begin
        if (relatch_q && pend_q) pend_val_q <= data_i;
      end else begin
        relatch_q <= 1'b0;
        st_pend_q <= fp_st;
        if (fp_st) st_data_q <= rd_reg(move_reg);

        // WBEnable: commit, or mark for commit when the result arrives
        if (pend_q && wb_enable) pend_ok_q <= 1'b1;
        // a coprocessor instruction ending MEM squashes an unconfirmed write
        if (any_cop && pend_q && !wb_enable && !pend_ok_q) begin
          pend_q <= 1'b0;
          if (busy_q && !ex_done) discard_q <= 1'b1;
        end

        if (mine_move && !lat.read) begin
          pend_q <= 1'b1; pend_ready_q <= 1'b1; pend_ok_q <= 1'b0;
          pend_rd_q <= move_reg; pend_val_q <= data_i;
        end else if (fp_ld) begin
          pend_q <= 1'b1; pend_ready_q <= 1'b1; pend_ok_q <= 1'b0;
          pend_rd_q <= move_reg; pend_val_q <= data_i;
          relatch_q <= 1'b1;
        end else if (mine_op && !busy_q) begin
          pend_q <= 1'b1; pend_ready_q <= 1'b0; pend_ok_q <= 1'b0;
          pend_rd_q <= op_rd;
          busy_q <= 1'b1; discard_q <= 1'b0;
        end
      end

      // the write itself
      if (pend_q && (pend_ok_q || (wb_enable && !miss)) &&
          (pend_ready_q || (busy_q && ex_done && !discard_q))) begin
        regs[pend_rd_q] <= (pend_ready_q) ? pend_val_q : ex_result;
        if (!(!miss && (mine_move && !lat.read || fp_ld || mine_op && !busy_q)))
          pend_q <= 1'b0;
      end
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (rst) ex_start |-> !busy_q)
    else $error("operation started while busy");
endmodule
