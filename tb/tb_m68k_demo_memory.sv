// tb_m68k_demo_memory -- bus-level test of the demonstration ROM and RAM.
//
// The bench plays the 68000 bus master: it loads random words into the
// ROM through the loading port, then runs random read and write cycles
// (word and byte, ROM, RAM and unmapped addresses) with the real strobe
// order: address and R/W, then AS and the data strobes, then it waits for
// DTACK or BERR, samples the data and negates the strobes.  It checks the
// read data against a model, that ROM accesses answer in the first clock,
// that RAM accesses take WAIT_STATES extra clocks, that writes to the ROM
// are ignored, that unmapped addresses get BERR and that interrupt
// acknowledge cycles (FC = 111) get no answer.
module tb_m68k_demo_memory;
  localparam int ROM_BYTES = 4096, RAM_BYTES = 4096, WAIT_STATES = 2;
  localparam logic [23:0] RAM_BASE = 24'h01_0000;
  logic clk = 0, rst = 1;
  logic [23:0] adbus = 0;
  logic as_n = 1, rw = 1, uds_n = 1, lds_n = 1;
  logic [2:0] fc = 3'b101;
  logic [15:0] dbus_i = 0, dbus_o;
  logic dbus_oe, dtack_n, berr_n;
  logic load_we = 0;
  logic [11:1] load_addr = 0;
  logic [15:0] load_data = 0;
  int checks = 0, failures = 0;
  logic [15:0] rom [2048];
  logic [15:0] ram [2048];

  m68k_demo_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h expected %0h", what, got, exp);
    end
  endtask

  // One bus cycle; returns read data, number of clocks to the answer, berr.
  task automatic cycle(input logic [23:0] a, input logic rd, input logic [1:0] strobes,
                       input logic [15:0] wd, output logic [15:0] d, output int clocks,
                       output logic be);
    @(negedge clk); adbus = a; rw = rd; dbus_i = wd;
    @(negedge clk); as_n = 0; {uds_n, lds_n} = ~strobes; #1;
    clocks = 0;
    while (dtack_n && berr_n && clocks < 20) begin @(negedge clk); clocks++; end
    be = !berr_n; d = dbus_o;
    @(negedge clk); as_n = 1; uds_n = 1; lds_n = 1; rw = 1;
  endtask

  initial begin
    logic [15:0] d, exp;
    int clocks, w;
    logic be;
    logic [1:0] st;
    logic [23:0] a;
    for (int i = 0; i < 2048; i++) begin rom[i] = 16'($urandom); ram[i] = 0; end
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); load_we = 1; load_addr = 11'(i); load_data = rom[i];
    end
    @(negedge clk); load_we = 0; rst = 0;
    // RAM content is undefined after power-up: write every word first.
    for (int i = 0; i < 2048; i++) begin
      ram[i] = 16'($urandom);
      cycle(RAM_BASE + 24'(2 * i), 0, 2'b11, ram[i], d, clocks, be);
    end
    for (int i = 0; i < 3000; i++) begin
      int kind;
      kind = $urandom_range(0, 9);
      st = (kind % 2) ? 2'b11 : ($urandom_range(0, 1) ? 2'b10 : 2'b01);
      w = $urandom_range(0, 2047);
      if (kind < 4) begin                     // ROM
        a = {12'd0, 11'(w), 1'b0};
        cycle(a, kind != 3, st, 16'($urandom), d, clocks, be);
        chk("rom answers at once", clocks, 0);
        chk("rom berr", int'(be), 0);
        if (kind != 3) begin
          exp = rom[w];
          chk("rom data", st[1] ? int'(d[15:8]) : 0, st[1] ? int'(exp[15:8]) : 0);
          chk("rom data", st[0] ? int'(d[7:0]) : 0, st[0] ? int'(exp[7:0]) : 0);
        end
      end else if (kind < 9) begin            // RAM
        logic [15:0] wd;
        a = RAM_BASE + {12'd0, 11'(w), 1'b0};
        wd = 16'($urandom);
        cycle(a, kind >= 7, st, wd, d, clocks, be);
        chk("ram wait states", clocks, WAIT_STATES);
        chk("ram berr", int'(be), 0);
        if (kind >= 7) begin
          chk("ram data", st[1] ? int'(d[15:8]) : 0, st[1] ? int'(ram[w][15:8]) : 0);
          chk("ram data", st[0] ? int'(d[7:0]) : 0, st[0] ? int'(ram[w][7:0]) : 0);
        end else begin
          if (st[1]) ram[w][15:8] = wd[15:8];
          if (st[0]) ram[w][7:0] = wd[7:0];
        end
      end else begin                          // unmapped, then IACK space
        a = 24'h80_0000 | 24'($urandom_range(0, 65535) * 2);
        cycle(a, 1, 2'b11, 0, d, clocks, be);
        chk("unmapped berr", int'(be), 1);
        fc = 3'b111;
        cycle(24'hFF_FFF5, 1, 2'b01, 0, d, clocks, be);
        chk("iack ignored", clocks, 20);
        fc = 3'b101;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
