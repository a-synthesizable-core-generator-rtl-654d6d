// m68k_demo_system -- demonstration system: the 68000-compatible core with
// its ROM and RAM, an interrupt acknowledge responder and one 6800-style
// peripheral register.
//
// What it does.  The core runs the program held in the ROM (reset vectors
// at 0 and 4).  The RAM answers after m68k_demo_memory's wait states, and an
// unmapped address is answered with a bus error.  Everything else the core's
// bus can do is reachable from the ports so that a test bench can exercise
// it: interrupt requests (ipl_n), bus requests (br_n, bgack_n), HALT, and
// the external reset.
//
// Glue logic (this design's choice; the document describes the system only
// as a core with a memory-mapped ROM and RAM):
//  * Interrupt acknowledge: a bus cycle with FC = 111 is answered either
//    with VPA (auto vector, when int_autovec is 1) or with DTACK and the
//    vector number int_vector on the low data byte.
//  * 6800 peripheral: addresses PERIPH_BASE .. PERIPH_BASE+1 assert VPA;
//    the core then runs a synchronous cycle against the E clock.  The
//    peripheral is one 8-bit register (periph_reg); it is written on the
//    falling edge of E while VMA is asserted and R/W is low, and read on
//    both byte lanes.
//  * The data bus is the OR of the enabled drivers (core, memory,
//    acknowledge vector, peripheral); DTACK, BERR and VPA are active-low
//    wired-AND of their sources.
// HALT and RESET are separate inputs and outputs here: the core's own
// RESET (RESET instruction) and HALT (double bus fault) outputs appear on
// reset_out_n and halt_out_n and do not feed back into the core.
//
// Ports carry plain signals; all timing is on the rising edge of clk.  rst_n
// is synchronous and active low.  The ROM loading port writes a 16-bit word
// at a word address and is meant to be used while rst_n is low.
module m68k_demo_system #(
  parameter int unsigned ROM_BYTES    = 4096,
  parameter int unsigned RAM_BYTES    = 4096,
  parameter logic [23:0] RAM_BASE     = 24'h01_0000,
  parameter int unsigned WAIT_STATES  = 2,
  parameter logic [23:0] PERIPH_BASE  = 24'hFF_0000,
  parameter int unsigned RESET_CLOCKS = 124
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        halt_n,
  input  logic [2:0]  ipl_n,
  input  logic [7:0]  int_vector,
  input  logic        int_autovec,
  input  logic        br_n,
  input  logic        bgack_n,
  output logic        bg_n,
  output logic        reset_out_n,
  output logic        halt_out_n,
  output logic [23:0] adbus,
  output logic        as_n,
  output logic        rw,
  output logic [2:0]  fc,
  output logic        e,
  output logic        vma_n,
  output logic        dtack_n,
  output logic        berr_n,
  output logic        vpa_n,
  output logic [7:0]  periph_reg,
  output logic [31:0] pc,
  output logic [15:0] sr,
  output logic        instr_done,
  input  logic        load_we,
  input  logic [$clog2(ROM_BYTES)-1:1] load_addr,
  input  logic [15:0] load_data
);

  logic [15:0] cpu_dbus_o, mem_dbus_o, dbus;
  logic        cpu_dbus_oe, mem_dbus_oe, adbus_oe;
  logic        uds_n, lds_n;
  logic        mem_dtack_n, mem_berr_n;
  logic [23:0] cpu_adbus;
  logic        cpu_as_n;

  cpu68000 #(.RESET_CLOCKS(RESET_CLOCKS)) u_cpu (
    .clk,
    .rst_n,
    .rst_out_n(reset_out_n),
    .halt_n,
    .halt_out_n,
    .dbus_i(dbus),
    .dbus_o(cpu_dbus_o),
    .dbus_oe(cpu_dbus_oe),
    .adbus(cpu_adbus),
    .adbus_oe,
    .as_n(cpu_as_n),
    .rw,
    .uds_n,
    .lds_n,
    .dtack_n,
    .berr_n,
    .br_n,
    .bg_n,
    .bgack_n,
    .ipl_n,
    .fc,
    .e,
    .vma_n,
    .vpa_n,
    .pc_o(pc),
    .sr_o(sr),
    .instr_done
  );

  // The strobes are only valid while the core drives the bus.
  assign adbus = adbus_oe ? cpu_adbus : 24'd0;
  assign as_n  = adbus_oe ? cpu_as_n  : 1'b1;

  m68k_demo_memory #(
    .ROM_BYTES(ROM_BYTES), .RAM_BYTES(RAM_BYTES), .RAM_BASE(RAM_BASE),
    .WAIT_STATES(WAIT_STATES)
  ) u_mem (
    .clk,
    .rst(!rst_n),
    .adbus,
    .as_n,
    .rw,
    .uds_n,
    .lds_n,
    .fc,
    .dbus_i(dbus),
    .dbus_o(mem_dbus_o),
    .dbus_oe(mem_dbus_oe),
    .dtack_n(mem_dtack_n),
    .berr_n(mem_berr_n),
    .load_we,
    .load_addr,
    .load_data
  );

  // Interrupt acknowledge and peripheral decode.
  logic iack_cycle, periph_sel;
  assign iack_cycle = !as_n && fc == 3'b111;
  assign periph_sel = !as_n && fc != 3'b111 && adbus[23:1] == PERIPH_BASE[23:1];

  assign vpa_n   = !((iack_cycle && int_autovec) || periph_sel);
  assign dtack_n = mem_dtack_n && !(iack_cycle && !int_autovec);
  assign berr_n  = mem_berr_n || periph_sel;

  // 6800 peripheral register: written at the end of the E-high phase.
  logic e_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_q        <= 1'b0;
      periph_reg <= '0;
    end else begin
      e_q <= e;
      if (periph_sel && !vma_n && !rw && e_q && !e && (!uds_n || !lds_n))
        periph_reg <= !uds_n ? dbus[15:8] : dbus[7:0];
    end
  end

  always_comb begin
    dbus = '0;
    if (cpu_dbus_oe)                  dbus = dbus | cpu_dbus_o;
    if (mem_dbus_oe)                  dbus = dbus | mem_dbus_o;
    if (iack_cycle && !int_autovec)   dbus = dbus | {int_vector, int_vector};
    if (periph_sel && !vma_n && rw)   dbus = dbus | {periph_reg, periph_reg};
  end

endmodule
