// mipsx_system: one MIPS-X processor node.
//
// What it does: wires the processor (mipsx_cpu, with its on-chip Icache), the
// external cache (ecache, whose controller is also a coprocessor holding the
// PID), the external latch (bus_latch) and N_COP coprocessors (cop_unit; the
// first one is the floating-point unit with the direct ldf/stf path) into the
// system of the source description: the address bus goes to the Ecache and,
// through the latch, to the coprocessors; the data bus is shared by all of
// them; Miss is the OR of the Ecache's memMiss and every coprocessor's stall,
// and every device watches it.
//
// Buses: the address bus carries the processor's address pins unless the
// Ecache asserts AddressTristate, in which case it carries the Ecache's
// drive. The data bus is the OR of the drivers that are enabled (a tri-state
// bus in the chip set); an assertion checks that at most one drives at a time.
//
// Brought out as ports: the processor's core interface (the integer datapath,
// which is not part of this RTL), the main-memory port of the Ecache (main
// memory and the shared system bus are outside), the execution-unit port of
// every coprocessor (the arithmetic is outside), and the bus signals for
// observation. One clock period is one processor cycle.
//
// Source and own choices: the set of devices, their connections and the Miss
// OR follow the system and Ecache diagrams of the source. Own choices: three
// coprocessors by default (number 1 the FPU, 2 and 3 generic; the Ecache
// controller is number 0), and the data bus modelled as an OR of enabled
// drivers rather than tri-state wires.
//
// Lint note: the pin name "interrupt" matches a C++ word; it is the pin's
// name in the source and stands.
module mipsx_system
  import mipsx_pkg::*;
#(
  parameter int unsigned ECACHE_WORDS = 16384,
  parameter int unsigned N_COP        = 3
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        interrupt,
  input  logic        exception,
  input  logic        icache_disable,
  input  logic        icache_test,
  // core (integer datapath)
  output logic        alu_valid,
  output logic [31:0] alu_pc,
  output logic [31:0] alu_instr,
  input  kind_e       alu_kind,
  input  logic [31:0] alu_result,
  input  logic [3:0]  alu_fpreg,
  input  logic [31:0] alu_sdata,
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  input  logic        int_unmask,
  output logic        advance,
  output logic        wb_commit,
  output logic [31:0] wb_pc,
  output kind_e       wb_kind,
  output logic [31:0] wb_rdata,
  output logic        exc_taken,
  output logic [31:0] exc_pc,
  // main memory
  output logic        mm_req,
  output logic        mm_we,
  output logic [31:0] mm_addr,
  output logic [31:0] mm_wdata,
  input  logic [31:0] mm_rdata,
  input  logic        mm_ack,
  // coprocessor execution units
  output logic        ex_start  [N_COP],
  output logic [16:0] ex_fn     [N_COP],
  output logic [31:0] ex_a      [N_COP],
  output logic [31:0] ex_b      [N_COP],
  input  logic        ex_done   [N_COP],
  input  logic [31:0] ex_result [N_COP],
  // observation
  output bus_ctl_t    bus,
  output logic [31:0] data_bus,
  output logic        miss,
  output logic        wb_enable,
  output logic        address_tristate
);
  // processor pins
  logic [31:0] cpu_addr, cpu_data;
  logic        cpu_addr_oe, cpu_data_oe;
  logic        mem_cycle, rw_b, bypass, cop_cycle;
  logic [3:0]  fpreg;

  // Ecache
  logic [31:0] ec_data, ec_addr_drive;
  logic        ec_data_oe, mem_miss;

  // coprocessors
  bus_ctl_t    lat;
  logic [31:0] cp_data  [N_COP];
  logic        cp_oe    [N_COP];
  logic        cp_stall [N_COP];

  mipsx_cpu u_cpu (
    .clk, .reset,
    .address_o(cpu_addr), .address_oe(cpu_addr_oe), .address_tristate,
    .mem_cycle, .read_write_b(rw_b), .bypass_cache(bypass), .cop_cycle, .fpreg,
    .wb_enable, .data_o(cpu_data), .data_oe(cpu_data_oe), .data_i(data_bus),
    .miss, .interrupt, .exception, .icache_disable, .icache_test,
    .alu_valid, .alu_pc, .alu_instr, .alu_kind, .alu_result, .alu_fpreg, .alu_sdata,
    .redirect, .redirect_pc, .int_unmask, .advance, .wb_commit, .wb_pc, .wb_kind,
    .wb_rdata, .exc_taken, .exc_pc
  );

  always_comb begin
    bus.mem_cycle = mem_cycle;
    bus.cop_cycle = cop_cycle;
    bus.read      = rw_b;
    bus.bypass    = bypass;
    bus.fpreg     = fpreg;
    bus.addr      = cpu_addr_oe ? cpu_addr : ec_addr_drive;
  end

  ecache #(.WORDS(ECACHE_WORDS)) u_ecache (
    .clk, .rst(reset),
    .addr_bus(bus.addr), .mem_cycle, .cop_cycle, .read_write_b(rw_b), .bypass_cache(bypass),
    .wb_enable, .data_i(data_bus), .data_o(ec_data), .data_oe(ec_data_oe),
    .miss, .mem_miss, .address_tristate, .addr_drive(ec_addr_drive),
    .mm_req, .mm_we, .mm_addr, .mm_wdata, .mm_rdata, .mm_ack
  );

  bus_latch u_latch (.clk, .rst(reset), .miss, .bus, .lat);

  for (genvar i = 0; i < N_COP; i++) begin : g_cop
    cop_unit #(.COP_NUM(3'(i + 1)), .IS_FPU(i == 0)) u_cop (
      .clk, .rst(reset), .lat, .wb_enable, .miss, .data_i(data_bus),
      .data_o(cp_data[i]), .data_oe(cp_oe[i]), .stall(cp_stall[i]),
      .ex_start(ex_start[i]), .ex_fn(ex_fn[i]), .ex_a(ex_a[i]), .ex_b(ex_b[i]),
      .ex_done(ex_done[i]), .ex_result(ex_result[i])
    );
  end

  // data bus and the Miss wired-OR
  int unsigned n_drivers;
  always_comb begin
    data_bus  = (cpu_data_oe ? cpu_data : '0) | (ec_data_oe ? ec_data : '0);
    miss      = mem_miss;
    n_drivers = 32'(cpu_data_oe) + 32'(ec_data_oe);
    for (int i = 0; i < N_COP; i++) begin
      data_bus  = data_bus | (cp_oe[i] ? cp_data[i] : '0);
      miss      = miss | cp_stall[i];
      n_drivers = n_drivers + 32'(cp_oe[i]);
    end
  end

  a_one_driver: assert property (@(posedge clk) disable iff (reset) n_drivers <= 1)
    else $error("data bus driven by %0d devices", n_drivers);
endmodule
