// tb_core: stand-in for the MIPS-X integer datapath, for testbenches.
//
// Instruction words are indices into a descriptor table (prog) that the
// testbench fills; the model answers the processor's ALU-stage questions from
// it (bus usage, Result Bus value, FPU register, store data, jump) and checks
// every completed instruction against a reference model of memory and of the
// coprocessor registers, updated in program order at commit:
//   ld/ldt/ldf read ref memory, st/stt/stf write it, movtoc/aluc write the
//   reference coprocessor registers, movfrc must return them.
// Memory words that were never written read as init_word(addr).
// A jump descriptor redirects the fetch (to its address, or to the saved
// restart PC when it is the handler's return) and re-enables interrupts.
// Interface: the core ports of mipsx_cpu, plus checks/failures/commits
// counters read hierarchically by the testbench. Timing: the ALU-stage answer
// is combinational in the same cycle; commits are checked at clock edges with
// wb_commit high. The instruction classes follow the source; the descriptor
// table and the reference model are test scaffolding of this design.
module tb_core
  import mipsx_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        alu_valid,
  input  logic [31:0] alu_pc,
  input  logic [31:0] alu_instr,
  output kind_e       alu_kind,
  output logic [31:0] alu_result,
  output logic [3:0]  alu_fpreg,
  output logic [31:0] alu_sdata,
  output logic        redirect,
  output logic [31:0] redirect_pc,
  output logic        int_unmask,
  input  logic        advance,
  input  logic        wb_commit,
  input  logic [31:0] wb_pc,
  input  kind_e       wb_kind,
  input  logic [31:0] wb_rdata,
  input  logic        exc_taken,
  input  logic [31:0] exc_pc
);
  typedef struct {
    kind_e       kind;
    logic [31:0] addr;    // memory address, coprocessor word, or ALU result
    logic [3:0]  fpreg;
    logic [31:0] sdata;
    bit          jump;    // redirect fetch
    bit          ret;     // return from exception: jump to the saved PC, unmask
    logic [31:0] target;
  } desc_t;

  desc_t       prog [1024];
  logic [31:0] ref_mem [logic [31:0]];
  logic [31:0] ref_cop [8][16];
  logic [31:0] epc;
  int          checks = 0, failures = 0, commits = 0, max_index = -1;
  logic [31:0] last_pc [$];

  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h1357_9BDF;
  endfunction
  function automatic logic [31:0] rd_mem(logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : init_word(a);
  endfunction
  // the operation performed by the testbench execution units
  function automatic logic [31:0] cop_op(logic [16:0] fn, logic [31:0] a, logic [31:0] b);
    return a + b + 32'(fn);
  endfunction

  desc_t d_alu;
  always_comb begin
    d_alu       = prog[alu_instr[9:0]];
    alu_kind    = alu_valid ? d_alu.kind : K_NONE;
    alu_result  = d_alu.addr;
    alu_fpreg   = d_alu.fpreg;
    alu_sdata   = d_alu.sdata;
    redirect    = alu_valid && (d_alu.jump || d_alu.ret);
    redirect_pc = d_alu.ret ? epc : d_alu.target;
    int_unmask  = alu_valid && d_alu.ret && advance;
  end

  // commit-time reference
  logic [31:0] wb_instr_q [logic [31:0]];   // pc -> instruction word, recorded in ALU
  always @(posedge clk) begin
    if (alu_valid) wb_instr_q[alu_pc] = alu_instr;
    if (exc_taken) epc <= exc_pc;
  end

  always @(posedge clk) begin
    if (!reset && wb_commit) begin
      desc_t d;
      cop_word_t cw;
      d  = prog[wb_instr_q[wb_pc][9:0]];
      cw = cop_word_t'(d.addr);
      commits++;
      if (int'(wb_instr_q[wb_pc][9:0]) > max_index && wb_instr_q[wb_pc][9:0] < 10'd900)
        max_index = int'(wb_instr_q[wb_pc][9:0]);
      unique case (wb_kind)
        K_LD, K_LDT: begin
          checks++;
          if (wb_rdata !== rd_mem(d.addr)) begin
            failures++;
            $display("FAIL load pc %h addr %h got %h exp %h", wb_pc, d.addr, wb_rdata, rd_mem(d.addr));
          end
        end
        K_ST, K_STT: ref_mem[d.addr] = d.sdata;
        K_LDF:       ref_cop[COP_FPU][d.fpreg] = rd_mem(d.addr);
        K_STF:       ref_mem[d.addr] = ref_cop[COP_FPU][d.fpreg];
        K_MOVTOC: begin
          if (cw.fn == '0) ref_cop[cw.num][cw.rd] = d.sdata;
          else ref_cop[cw.num][cw.rd] = cop_op(cw.fn, ref_cop[cw.num][cw.rs1], ref_cop[cw.num][cw.rs2]);
        end
        K_MOVFRC: begin
          if (cw.fn == '0) begin
            checks++;
            if (wb_rdata !== ref_cop[cw.num][cw.rd]) begin
              failures++;
              $display("FAIL movfrc pc %h cop %0d r%0d got %h exp %h", wb_pc, cw.num, cw.rd,
                       wb_rdata, ref_cop[cw.num][cw.rd]);
            end
          end else begin
            ref_cop[cw.num][cw.rd] = cop_op(cw.fn, ref_cop[cw.num][cw.rs1], ref_cop[cw.num][cw.rs2]);
          end
        end
        default: ;
      endcase
    end
  end

  initial begin
    for (int c = 0; c < 8; c++) for (int r = 0; r < 16; r++) ref_cop[c][r] = '0;
    for (int i = 0; i < 1024; i++)
      prog[i] = '{kind: K_NONE, addr: 32'(i) * 32'd3, fpreg: 4'd0, sdata: '0,
                  jump: 1'b0, ret: 1'b0, target: '0};
    epc = '0;
  end
endmodule
