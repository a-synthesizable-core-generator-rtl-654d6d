// m68k_demo_memory -- ROM and RAM on the 68000 asynchronous bus.
//
// The demonstration system maps a ROM and a RAM into the address space of
// the core.  The ROM sits at address 0 (it holds the reset vectors, the
// other exception vectors and the program); the RAM sits at RAM_BASE.  Both
// are 16 bits wide and split into an upper (even address, UDS) and a lower
// (odd address, LDS) byte bank, so byte writes touch only one half.
//
// Bus protocol.  A transfer starts when AS is asserted with a function code
// other than 111 (interrupt acknowledge, answered elsewhere).  A decoded
// ROM access acknowledges with DTACK in the first clock of AS, a RAM access
// after WAIT_STATES further clocks; DTACK is combinational on AS and the
// wait counter so a zero-wait access completes without a wait loop in the
// core.  Read data is driven (dbus_oe) while AS and R/W are high in a
// decoded region.  A write takes place in every clock in which AS, DTACK,
// R/W low and a data strobe are all asserted; the core keeps the data
// stable over those clocks, so repeated writes are harmless.  Writes to the
// ROM are ignored.  An access that decodes to neither region is answered
// with BERR (bus error) instead of DTACK.
//
// load_we/load_addr/load_data write a word into the ROM from outside; a
// test bench uses it to place the program before reset is released (a real
// board would program the ROM instead).
//
// From the document: a ROM holding the initial stack pointer, initial PC and
// the program, and a RAM, both with a 68000-compatible bus interface, at
// fixed places in the address map.  Sizes, base address, wait states and
// the bus-error response are this design's choices (the document gives
// none).
module m68k_demo_memory #(
  parameter int unsigned ROM_BYTES   = 4096,
  parameter int unsigned RAM_BYTES   = 4096,
  parameter logic [23:0] RAM_BASE    = 24'h01_0000,
  parameter int unsigned WAIT_STATES = 2
) (
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  input  logic [23:0] adbus,
  input  logic        as_n,
  input  logic        rw,
  input  logic        uds_n,
  input  logic        lds_n,
  input  logic [2:0]  fc,
  input  logic [15:0] dbus_i,       // write data from the core
  output logic [15:0] dbus_o,       // read data to the core
  output logic        dbus_oe,
  output logic        dtack_n,
  output logic        berr_n,
  // ROM loading port
  input  logic        load_we,
  input  logic [$clog2(ROM_BYTES)-1:1] load_addr,   // word address
  input  logic [15:0] load_data
);

  localparam int unsigned ROM_WORDS = ROM_BYTES / 2;
  localparam int unsigned RAM_WORDS = RAM_BYTES / 2;
  localparam int unsigned ROM_AW    = $clog2(ROM_BYTES);
  localparam int unsigned RAM_AW    = $clog2(RAM_BYTES);
  localparam int unsigned WW        = $clog2(WAIT_STATES + 2);

  logic [7:0] rom_hi [ROM_WORDS];
  logic [7:0] rom_lo [ROM_WORDS];
  logic [7:0] ram_hi [RAM_WORDS];
  logic [7:0] ram_lo [RAM_WORDS];

  logic          active, rom_sel, ram_sel, ack;
  logic [WW-1:0] wait_cnt;
  logic [ROM_AW-2:0] rom_word;
  logic [RAM_AW-2:0] ram_word;
  logic [23:0]   ram_off;

  assign ram_off  = adbus - RAM_BASE;
  assign active   = !as_n && fc != 3'b111;
  assign rom_sel  = active && adbus < 24'(ROM_BYTES);
  assign ram_sel  = active && adbus >= RAM_BASE && ram_off < 24'(RAM_BYTES);
  assign rom_word = adbus[ROM_AW-1:1];
  assign ram_word = ram_off[RAM_AW-1:1];

  // Wait-state counter: counts clocks of an asserted AS.
  always_ff @(posedge clk) begin
    if (rst || as_n)                           wait_cnt <= '0;
    else if (wait_cnt != WW'(WAIT_STATES + 1)) wait_cnt <= wait_cnt + 1'b1;
  end

  assign ack     = rom_sel || (ram_sel && wait_cnt >= WW'(WAIT_STATES));
  assign dtack_n = !ack;
  assign berr_n  = !(active && !rom_sel && !ram_sel);

  always_comb begin
    dbus_o  = '0;
    dbus_oe = 1'b0;
    if (rom_sel && rw) begin
      dbus_o  = {rom_hi[rom_word], rom_lo[rom_word]};
      dbus_oe = 1'b1;
    end else if (ram_sel && rw) begin
      dbus_o  = {ram_hi[ram_word], ram_lo[ram_word]};
      dbus_oe = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (load_we) begin
      rom_hi[load_addr] <= load_data[15:8];
      rom_lo[load_addr] <= load_data[7:0];
    end
  end

  always_ff @(posedge clk) begin
    if (ram_sel && ack && !rw) begin
      if (!uds_n) ram_hi[ram_word] <= dbus_i[15:8];
      if (!lds_n) ram_lo[ram_word] <= dbus_i[7:0];
    end
  end

endmodule
