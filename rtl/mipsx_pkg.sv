// mipsx_pkg: types and constants shared by the MIPS-X external-interface RTL.
//
// The whole system is modelled with one clock: one clock period is one
// processor cycle (phi1 followed by phi2 of the two-phase chip clock). Pins that
// the chip makes "valid phi2 of ALU, stable phi1 of MEM" are driven
// combinationally during the ALU cycle and captured by the external latches at
// the clock edge that ends it. The global stall signal Miss freezes every
// pipeline register at that edge, exactly as the chip does no state change on
// phi1 while Miss is high.
//
// Bit numbering: the chip numbers its buses from the MSB (Address0 is the most
// significant bit, Address30/31 the two byte bits). The RTL uses the usual
// [31:0] vectors with bit 0 the least significant, so pin AddressN is
// addr[31-N]. FPReg1..FPReg4 map to fpreg[3:0] with FPReg1 taken as the MSB.
//
// What follows the source description: the instruction classes that use the
// bus (ld, st, ldt, stt, ldf, stf, movtoc, movfrc; aluc is a movfrc or movtoc
// with MIPS-X register 0), the three-bit coprocessor number (up to eight
// coprocessors), the 4-bit FPU register number and the reset address.
// What is this design's own choice: the field layout of the coprocessor word
// placed on the address bus (the real layout lives in the programmer's manual)
// and the coprocessor numbers given to the Ecache controller and the FPU.
//
// Reset address: the byte address 0x07FFFF80 given for the address pins is
// used. The source also names the internal word address 0x7ffffe0, which is
// a different location (0x07FFFF80 / 4 = 0x1FFFFE0); the byte address seen on
// the pins was followed. The exception vector 0 is the address of the
// handler's first instruction ("Address 0 where there is a nop").
//
// Lint note: a tool that elaborates one module on its own reports the
// constants that module does not use (RESET_VECTOR and EXC_VECTOR outside the
// processor, COP_ECACHE and COP_FPU outside the Ecache and the top) as unused
// parameters. They are used by the other modules of the design; the warning
// stands.
package mipsx_pkg;

  // Byte address forced on the address pins during reset.
  localparam logic [31:0] RESET_VECTOR = 32'h07FF_FF80;
  // Exceptions and interrupts jump to location 0 in system space.
  localparam logic [31:0] EXC_VECTOR   = 32'h0000_0000;

  // Bus usage of the instruction in the ALU stage, as the core reports it.
  typedef enum logic [3:0] {
    K_NONE   = 4'd0,  // compute instruction: no memory or coprocessor cycle
    K_LD     = 4'd1,  // load word through the Ecache
    K_ST     = 4'd2,  // store word (probe in MEM, delayed write in WB)
    K_LDT    = 4'd3,  // load-through: BypassCache
    K_STT    = 4'd4,  // store-through: BypassCache
    K_LDF    = 4'd5,  // load float: memory -> FPU register
    K_STF    = 4'd6,  // store float: FPU register -> memory
    K_MOVTOC = 4'd7,  // MIPS-X register -> coprocessor (aluc may use it)
    K_MOVFRC = 4'd8   // coprocessor -> MIPS-X register (aluc uses it with r0)
  } kind_e;

  function automatic logic kind_is_mem(kind_e k);
    return k inside {K_LD, K_ST, K_LDT, K_STT, K_LDF, K_STF};
  endfunction

  function automatic logic kind_is_cop(kind_e k);
    return k inside {K_LDF, K_STF, K_MOVTOC, K_MOVFRC};
  endfunction

  function automatic logic kind_is_write(kind_e k);
    return k inside {K_ST, K_STT, K_STF, K_MOVTOC};
  endfunction

  // Coprocessor word carried on the address bus (own layout, see above).
  //   [2:0]   coprocessor number
  //   [6:3]   rd : coprocessor register written or read by a move,
  //                destination of an operation
  //   [10:7]  rs1: first source register of an operation
  //   [14:11] rs2: second source register of an operation
  //   [31:15] fn : 0 = register move (movtoc/movfrc), otherwise an operation
  //                code handed to the coprocessor's execution unit (aluc)
  typedef struct packed {
    logic [16:0] fn;
    logic [3:0]  rs2;
    logic [3:0]  rs1;
    logic [3:0]  rd;
    logic [2:0]  num;
  } cop_word_t;

  localparam logic [2:0] COP_ECACHE = 3'd0;  // Ecache controller (holds the PID)
  localparam logic [2:0] COP_FPU    = 3'd1;  // floating-point unit

  // Bus cycle as seen by the external latches: the control pins and the address.
  typedef struct packed {
    logic        mem_cycle;
    logic        cop_cycle;
    logic        read;        // Read/Write_b: 1 = read
    logic        bypass;      // BypassCache
    logic [3:0]  fpreg;       // FPReg1..4
    logic [31:0] addr;
  } bus_ctl_t;

endpackage
