// tb_m68k_demo_system -- end-to-end test of the demonstration system at its
// default size.
//
// Loads a hand-assembled 68000 program into the ROM through the loading
// port, releases reset and lets the core run it.  The program exercises
// arithmetic, SWAP, MULU, DIVU and a division by zero, a DBF loop,
// JSR/RTS, TRAP, ILLEGAL, the 6800 peripheral (VPA/VMA/E cycle), a bus
// error on an unmapped address, PEA, LINK/UNLK, TAS, ABCD/SBCD/NBCD,
// the bit operations, predecrement/postincrement/displacement
// addressing, MOVE to SR, an
// auto-vectored and a vectored interrupt (driven here once the program
// signals through the peripheral register), trace, and RESET.  While it
// runs the bench also requests the bus (BR/BG/BGACK) and holds HALT for a
// while.  Results are read from the RAM; every bus mechanism is counted from
// the pins and the bench fails if any one of them never happened.
module tb_m68k_demo_system;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0, halt_n = 1'b1, br_n = 1'b1, bgack_n = 1'b1;
  logic [2:0]  ipl_n = 3'b111;
  logic [7:0]  int_vector = 8'd0;
  logic        int_autovec = 1'b1;
  logic        bg_n, reset_out_n, halt_out_n, as_n, rw, e, vma_n, dtack_n, berr_n, vpa_n;
  logic [23:0] adbus;
  logic [2:0]  fc;
  logic [7:0]  periph_reg;
  logic [31:0] pc;
  logic [15:0] sr;
  logic        instr_done;
  logic        load_we = 1'b0;
  logic [11:1] load_addr = '0;
  logic [15:0] load_data = '0;

  int checks = 0, failures = 0;
  int n_wait = 0, n_berr = 0, n_iack_auto = 0, n_iack_vec = 0, n_vma = 0;
  int n_bg = 0, n_reset = 0, n_halt_idle = 0, n_instr = 0, n_instr_halted = 0;
  int cycle = 0;

  m68k_demo_system dut (.*);

  always #5 clk = ~clk;

  localparam int PROG_N = 291;
  localparam logic [39:0] PROG [291] = '{
    {24'h000000, 16'h0001},
    {24'h000002, 16'h1000},
    {24'h000004, 16'h0000},
    {24'h000006, 16'h0400},
    {24'h000008, 16'h0000},
    {24'h00000A, 16'h0300},
    {24'h000010, 16'h0000},
    {24'h000012, 16'h0310},
    {24'h000014, 16'h0000},
    {24'h000016, 16'h0350},
    {24'h000024, 16'h0000},
    {24'h000026, 16'h0330},
    {24'h000060, 16'h0000},
    {24'h000062, 16'h0340},
    {24'h000064, 16'h0000},
    {24'h000066, 16'h0340},
    {24'h000068, 16'h0000},
    {24'h00006A, 16'h0340},
    {24'h00006C, 16'h0000},
    {24'h00006E, 16'h0340},
    {24'h000070, 16'h0000},
    {24'h000072, 16'h0340},
    {24'h000074, 16'h0000},
    {24'h000076, 16'h0340},
    {24'h000078, 16'h0000},
    {24'h00007A, 16'h0340},
    {24'h00007C, 16'h0000},
    {24'h00007E, 16'h0340},
    {24'h000080, 16'h0000},
    {24'h000082, 16'h0320},
    {24'h000100, 16'h0000},
    {24'h000102, 16'h0340},
    {24'h000300, 16'h52B9},
    {24'h000302, 16'h0001},
    {24'h000304, 16'h0108},
    {24'h000306, 16'h4E73},
    {24'h000310, 16'h52B9},
    {24'h000312, 16'h0001},
    {24'h000314, 16'h0104},
    {24'h000316, 16'h54AF},
    {24'h000318, 16'h0002},
    {24'h00031A, 16'h4E73},
    {24'h000320, 16'h52B9},
    {24'h000322, 16'h0001},
    {24'h000324, 16'h0100},
    {24'h000326, 16'h4E73},
    {24'h000330, 16'h52B9},
    {24'h000332, 16'h0001},
    {24'h000334, 16'h0110},
    {24'h000336, 16'h4E73},
    {24'h000340, 16'h52B9},
    {24'h000342, 16'h0001},
    {24'h000344, 16'h010C},
    {24'h000346, 16'h4E73},
    {24'h000350, 16'h52B9},
    {24'h000352, 16'h0001},
    {24'h000354, 16'h0114},
    {24'h000356, 16'h4E73},
    {24'h000400, 16'h7000},
    {24'h000402, 16'h23C0},
    {24'h000404, 16'h0001},
    {24'h000406, 16'h0100},
    {24'h000408, 16'h23C0},
    {24'h00040A, 16'h0001},
    {24'h00040C, 16'h0104},
    {24'h00040E, 16'h23C0},
    {24'h000410, 16'h0001},
    {24'h000412, 16'h0108},
    {24'h000414, 16'h23C0},
    {24'h000416, 16'h0001},
    {24'h000418, 16'h010C},
    {24'h00041A, 16'h23C0},
    {24'h00041C, 16'h0001},
    {24'h00041E, 16'h0110},
    {24'h000420, 16'h23C0},
    {24'h000422, 16'h0001},
    {24'h000424, 16'h0114},
    {24'h000426, 16'h7005},
    {24'h000428, 16'h7207},
    {24'h00042A, 16'hD280},
    {24'h00042C, 16'h23C1},
    {24'h00042E, 16'h0001},
    {24'h000430, 16'h0000},
    {24'h000432, 16'h243C},
    {24'h000434, 16'h1234},
    {24'h000436, 16'h5678},
    {24'h000438, 16'h4842},
    {24'h00043A, 16'h23C2},
    {24'h00043C, 16'h0001},
    {24'h00043E, 16'h0004},
    {24'h000440, 16'h283C},
    {24'h000442, 16'h0000},
    {24'h000444, 16'hFFFF},
    {24'h000446, 16'h2A3C},
    {24'h000448, 16'h0000},
    {24'h00044A, 16'h1234},
    {24'h00044C, 16'hCAC4},
    {24'h00044E, 16'h23C5},
    {24'h000450, 16'h0001},
    {24'h000452, 16'h0008},
    {24'h000454, 16'h263C},
    {24'h000456, 16'h0001},
    {24'h000458, 16'hE240},
    {24'h00045A, 16'h2C3C},
    {24'h00045C, 16'h0000},
    {24'h00045E, 16'h03E8},
    {24'h000460, 16'h86C6},
    {24'h000462, 16'h23C3},
    {24'h000464, 16'h0001},
    {24'h000466, 16'h0020},
    {24'h000468, 16'h7C00},
    {24'h00046A, 16'h86C6},
    {24'h00046C, 16'h7C00},
    {24'h00046E, 16'h7009},
    {24'h000470, 16'hDC80},
    {24'h000472, 16'h51C8},
    {24'h000474, 16'hFFFC},
    {24'h000476, 16'h23C6},
    {24'h000478, 16'h0001},
    {24'h00047A, 16'h000C},
    {24'h00047C, 16'h4EB9},
    {24'h00047E, 16'h0000},
    {24'h000480, 16'h05CE},
    {24'h000482, 16'h23C7},
    {24'h000484, 16'h0001},
    {24'h000486, 16'h0010},
    {24'h000488, 16'h4E40},
    {24'h00048A, 16'h4AFC},
    {24'h00048C, 16'h13FC},
    {24'h00048E, 16'h00A5},
    {24'h000490, 16'h00FF},
    {24'h000492, 16'h0000},
    {24'h000494, 16'h7000},
    {24'h000496, 16'h1039},
    {24'h000498, 16'h00FF},
    {24'h00049A, 16'h0000},
    {24'h00049C, 16'h23C0},
    {24'h00049E, 16'h0001},
    {24'h0004A0, 16'h0014},
    {24'h0004A2, 16'h3239},
    {24'h0004A4, 16'h0080},
    {24'h0004A6, 16'h0000},
    {24'h0004A8, 16'h41F9},
    {24'h0004AA, 16'h0001},
    {24'h0004AC, 16'h0040},
    {24'h0004AE, 16'h2105},
    {24'h0004B0, 16'h2102},
    {24'h0004B2, 16'h2618},
    {24'h0004B4, 16'h23C3},
    {24'h0004B6, 16'h0001},
    {24'h0004B8, 16'h0018},
    {24'h0004BA, 16'h3628},
    {24'h0004BC, 16'h0002},
    {24'h0004BE, 16'h23C3},
    {24'h0004C0, 16'h0001},
    {24'h0004C2, 16'h001C},
    {24'h0004C4, 16'h4DF9},
    {24'h0004C6, 16'h00AB},
    {24'h0004C8, 16'hCDEF},
    {24'h0004CA, 16'h4E56},
    {24'h0004CC, 16'hFFF8},
    {24'h0004CE, 16'h4879},
    {24'h0004D0, 16'h00C0},
    {24'h0004D2, 16'hFFEE},
    {24'h0004D4, 16'h221F},
    {24'h0004D6, 16'h23C1},
    {24'h0004D8, 16'h0001},
    {24'h0004DA, 16'h0024},
    {24'h0004DC, 16'h23CE},
    {24'h0004DE, 16'h0001},
    {24'h0004E0, 16'h0028},
    {24'h0004E2, 16'h4E5E},
    {24'h0004E4, 16'h23CE},
    {24'h0004E6, 16'h0001},
    {24'h0004E8, 16'h002C},
    {24'h0004EA, 16'h23CF},
    {24'h0004EC, 16'h0001},
    {24'h0004EE, 16'h0030},
    {24'h0004F0, 16'h13FC},
    {24'h0004F2, 16'h0005},
    {24'h0004F4, 16'h0001},
    {24'h0004F6, 16'h0034},
    {24'h0004F8, 16'h4AF9},
    {24'h0004FA, 16'h0001},
    {24'h0004FC, 16'h0034},
    {24'h0004FE, 16'h7400},
    {24'h000500, 16'h4AC2},
    {24'h000502, 16'h40C3},
    {24'h000504, 16'h23C2},
    {24'h000506, 16'h0001},
    {24'h000508, 16'h0038},
    {24'h00050A, 16'h23C3},
    {24'h00050C, 16'h0001},
    {24'h00050E, 16'h003C},
    {24'h000510, 16'h44FC},
    {24'h000512, 16'h0004},
    {24'h000514, 16'h223C},
    {24'h000516, 16'h0000},
    {24'h000518, 16'h0045},
    {24'h00051A, 16'h7438},
    {24'h00051C, 16'hC501},
    {24'h00051E, 16'h40C3},
    {24'h000520, 16'h23C2},
    {24'h000522, 16'h0001},
    {24'h000524, 16'h0040},
    {24'h000526, 16'h7412},
    {24'h000528, 16'h7234},
    {24'h00052A, 16'h8501},
    {24'h00052C, 16'h23C2},
    {24'h00052E, 16'h0001},
    {24'h000530, 16'h0044},
    {24'h000532, 16'h7401},
    {24'h000534, 16'h4802},
    {24'h000536, 16'h23C2},
    {24'h000538, 16'h0001},
    {24'h00053A, 16'h0048},
    {24'h00053C, 16'h44FC},
    {24'h00053E, 16'h0000},
    {24'h000540, 16'h41F9},
    {24'h000542, 16'h0001},
    {24'h000544, 16'h0084},
    {24'h000546, 16'h43F9},
    {24'h000548, 16'h0001},
    {24'h00054A, 16'h0082},
    {24'h00054C, 16'h13FC},
    {24'h00054E, 16'h0058},
    {24'h000550, 16'h0001},
    {24'h000552, 16'h0083},
    {24'h000554, 16'h13FC},
    {24'h000556, 16'h0067},
    {24'h000558, 16'h0001},
    {24'h00055A, 16'h0081},
    {24'h00055C, 16'hC308},
    {24'h00055E, 16'h40C4},
    {24'h000560, 16'h23C3},
    {24'h000562, 16'h0001},
    {24'h000564, 16'h004C},
    {24'h000566, 16'h23C4},
    {24'h000568, 16'h0001},
    {24'h00056A, 16'h0050},
    {24'h00056C, 16'h7400},
    {24'h00056E, 16'h08C2},
    {24'h000570, 16'h001F},
    {24'h000572, 16'h7223},
    {24'h000574, 16'h0342},
    {24'h000576, 16'h0802},
    {24'h000578, 16'h001F},
    {24'h00057A, 16'h40C3},
    {24'h00057C, 16'h0882},
    {24'h00057E, 16'h001F},
    {24'h000580, 16'h23C2},
    {24'h000582, 16'h0001},
    {24'h000584, 16'h0054},
    {24'h000586, 16'h23C3},
    {24'h000588, 16'h0001},
    {24'h00058A, 16'h0058},
    {24'h00058C, 16'h13FC},
    {24'h00058E, 16'h00FF},
    {24'h000590, 16'h0001},
    {24'h000592, 16'h0090},
    {24'h000594, 16'h08B9},
    {24'h000596, 16'h0009},
    {24'h000598, 16'h0001},
    {24'h00059A, 16'h0090},
    {24'h00059C, 16'h46FC},
    {24'h00059E, 16'h2000},
    {24'h0005A0, 16'h13FC},
    {24'h0005A2, 16'h005A},
    {24'h0005A4, 16'h00FF},
    {24'h0005A6, 16'h0000},
    {24'h0005A8, 16'h2039},
    {24'h0005AA, 16'h0001},
    {24'h0005AC, 16'h010C},
    {24'h0005AE, 16'h0C80},
    {24'h0005B0, 16'h0000},
    {24'h0005B2, 16'h0002},
    {24'h0005B4, 16'h66F2},
    {24'h0005B6, 16'h007C},
    {24'h0005B8, 16'h8000},
    {24'h0005BA, 16'h4E71},
    {24'h0005BC, 16'h4E71},
    {24'h0005BE, 16'h027C},
    {24'h0005C0, 16'h7FFF},
    {24'h0005C2, 16'h4E70},
    {24'h0005C4, 16'h13FC},
    {24'h0005C6, 16'h003C},
    {24'h0005C8, 16'h00FF},
    {24'h0005CA, 16'h0000},
    {24'h0005CC, 16'h60FE},
    {24'h0005CE, 16'h7EFF},
    {24'h0005D0, 16'h4E75}
  };

  function automatic logic [31:0] ram_l(input int off);
    int w;
    w = off / 2;
    return {dut.u_mem.ram_hi[w], dut.u_mem.ram_lo[w], dut.u_mem.ram_hi[w+1], dut.u_mem.ram_lo[w+1]};
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic mech(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end else begin
      $display("mechanism %-22s %0d", what, n);
    end
  endtask

  // Mechanism counters, from the pins.
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (!as_n && dtack_n && berr_n && vpa_n) n_wait++;
    if (!as_n && !berr_n) n_berr++;
    if (!as_n && fc == 3'b111 && !vpa_n) n_iack_auto++;
    if (!as_n && fc == 3'b111 && !dtack_n) n_iack_vec++;
    if (!vma_n) n_vma++;
    if (!bg_n) n_bg++;
    if (!reset_out_n) n_reset++;
    if (instr_done) n_instr++;
    if (!halt_n && instr_done) n_instr_halted++;
    if (!halt_n && as_n) n_halt_idle++;
    // The core must not use the bus while it has granted it.
    if (!bgack_n && !as_n) begin
      failures++; checks++;
      $display("FAIL bus used while granted at cycle %0d", cycle);
    end
  end

  // Watchdog.
  initial begin
    #3_000_000;
    $display("FAIL watchdog: program did not finish (pc %06h)", pc);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bus request while the program runs.
  initial begin
    wait (cycle == 700);
    @(negedge clk) br_n = 1'b0;
    wait (!bg_n);
    @(negedge clk) bgack_n = 1'b0; br_n = 1'b1;
    repeat (12) @(negedge clk);
    bgack_n = 1'b1;
  end

  // HALT held for 60 clocks; after the current instruction the core stops.
  initial begin
    wait (cycle == 1500);
    @(negedge clk) halt_n = 1'b0;
    repeat (60) @(negedge clk);
    halt_n = 1'b1;
  end

  initial begin
    // load the program while reset is held
    for (int i = 0; i < PROG_N; i++) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = PROG[i][27:17]; load_data = PROG[i][15:0];
    end
    @(negedge clk) load_we = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // interrupts once the program has unmasked them
    wait (periph_reg == 8'h5A);
    repeat (20) @(negedge clk);
    ipl_n = ~3'd3; int_autovec = 1'b1;
    wait (!as_n && fc == 3'b111);
    @(negedge clk);
    check("autovector level on address", {29'd0, adbus[3:1]}, 32'd3);
    wait (as_n);
    @(negedge clk) ipl_n = 3'b111;
    repeat (40) @(negedge clk);
    ipl_n = ~3'd5; int_autovec = 1'b0; int_vector = 8'd64;
    wait (!as_n && fc == 3'b111);
    wait (as_n);
    @(negedge clk) ipl_n = 3'b111;

    wait (periph_reg == 8'h3C);
    repeat (10) @(negedge clk);
    check("ADD",              ram_l(0),  32'd12);
    check("SWAP",             ram_l(4),  32'h5678_1234);
    check("MULU",             ram_l(8),  32'h1233_EDCC);
    check("DBF loop sum",     ram_l(12), 32'd45);
    check("JSR/RTS",          ram_l(16), 32'hFFFF_FFFF);
    check("peripheral read",  ram_l(20), 32'h0000_00A5);
    check("(An)+ after -(An)", ram_l(24), 32'h5678_1234);
    check("d16(An)",          ram_l(28), 32'h5678_EDCC);
    check("DIVU",             ram_l(32), 32'h01C8_007B);
    check("PEA",              ram_l(36), 32'h00C0_FFEE);
    check("LINK frame pointer", ram_l(40), 32'h0001_0FFC);
    check("UNLK frame pointer", ram_l(44), 32'h00AB_CDEF);
    check("UNLK stack pointer", ram_l(48), 32'h0001_1000);
    check("TAS memory",       ram_l(52) >> 24, 32'h85);
    check("TAS register",     ram_l(56), 32'h80);
    check("TAS flags N Z V C", ram_l(60) & 32'hF, 32'h4);
    check("ABCD register",    ram_l(64), 32'h83);
    check("ABCD flags X C",   ram_l(76) & 32'h11, 32'h00);
    check("SBCD register",    ram_l(68), 32'h78);
    check("NBCD with X in",   ram_l(72), 32'h98);
    check("ABCD memory",      (ram_l(128) >> 16) & 32'hFF, 32'h25);
    check("ABCD memory source kept", ram_l(128) & 32'hFF, 32'h58);
    check("ABCD memory X C",  ram_l(80) & 32'h11, 32'h11);
    check("BSET/BCHG/BCLR register", ram_l(84), 32'h8);
    check("BTST Z flag",      ram_l(88) & 32'h4, 32'h0);
    check("BCLR memory",      ram_l(144) >> 24, 32'hFD);
    check("TRAP count",       ram_l(256), 32'd1);
    check("ILLEGAL count",    ram_l(260), 32'd1);
    check("bus error count",  ram_l(264), 32'd1);
    check("interrupt count",  ram_l(268), 32'd2);
    check("trace count",      ram_l(272), 32'd3);
    check("divide-by-zero count", ram_l(276), 32'd1);
    // the instruction running when HALT arrives may still finish
    check("instructions while halted", 32'(n_instr_halted > 1), 0);
    check("core not double faulted", {31'd0, halt_out_n}, 32'd1);
    check("RESET length", n_reset, 124);
    mech("wait states", n_wait);
    mech("bus error", n_berr);
    mech("autovector IACK", n_iack_auto);
    mech("vectored IACK", n_iack_vec);
    mech("VPA/VMA peripheral", n_vma);
    mech("bus grant", n_bg);
    mech("RESET instruction", n_reset);
    mech("HALT idle", n_halt_idle);
    mech("instructions", n_instr);
    $display("cycles %0d instructions %0d", cycle, n_instr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
