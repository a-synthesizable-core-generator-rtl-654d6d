// tb_cpu68000 -- instruction-level test of the core with a behavioural
// memory in the bench.
//
// For each of ITER runs the bench draws two random 32-bit operands A and B
// with $urandom (with some runs forced to corner values), patches them into
// the immediates of a fixed program, resets the core and lets it execute
// twenty-three operations on them (ADD, SUB, AND, OR, EOR, CMP, Scc, NEG,
// NOT, CLR, SWAP, EXT.W, EXT.L, TST, LSL, ASR, ROR, MULU, ADDI, SUBQ,
// DIVU.W and DIVS.W by A.W | 1 after an ORI.W that makes the divisor
// non-zero, and MULS), each
// followed by MOVE from SR and stores of the result and the status register.
// A reference model in the bench computes results and condition codes from
// the 68000 rules and compares them with memory.  Random operands make the
// quotients overflow in about half of the runs; the corner runs (B = 0,
// the first run, and a small signed B in one run of eight) divide without
// overflow.  Odd runs answer every bus
// cycle after a random number of wait states; even runs answer at once and
// also check that MULU.W takes 38 + 2n clocks (n = ones in the multiplier)
// by timing the instruction from the preceding instruction-end strobe.
module tb_cpu68000;
  import m68k_pkg::*;
  localparam int ITER = 24;
  localparam int R = 'h6000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        rst_out_n, halt_out_n, dbus_oe, adbus_oe, as_n, rw, uds_n, lds_n;
  logic        bg_n, e, vma_n, instr_done;
  logic [15:0] dbus_i, dbus_o, sr_o;
  logic [23:0] adbus;
  logic [2:0]  fc;
  logic [31:0] pc_o;
  logic        dtack_n, berr_n;

  cpu68000 dut (
    .clk, .rst_n, .rst_out_n, .halt_n(1'b1), .halt_out_n,
    .dbus_i, .dbus_o, .dbus_oe, .adbus, .adbus_oe, .as_n, .rw, .uds_n, .lds_n,
    .dtack_n, .berr_n, .br_n(1'b1), .bg_n, .bgack_n(1'b1), .ipl_n(3'b111), .fc,
    .e, .vma_n, .vpa_n(1'b1), .pc_o, .sr_o, .instr_done
  );

  always #5 clk = ~clk;

  localparam int PROG_N = 230;
  localparam logic [39:0] PROG [230] = '{
    {24'h000000, 16'h0000},
    {24'h000002, 16'h8000},
    {24'h000004, 16'h0000},
    {24'h000006, 16'h0400},
    {24'h000400, 16'h203C},
    {24'h000402, 16'h0000},
    {24'h000404, 16'h0000},
    {24'h000406, 16'h223C},
    {24'h000408, 16'h0000},
    {24'h00040A, 16'h0000},
    {24'h00040C, 16'h2401},
    {24'h00040E, 16'hD480},
    {24'h000410, 16'h40C3},
    {24'h000412, 16'h23C2},
    {24'h000414, 16'h0000},
    {24'h000416, 16'h6000},
    {24'h000418, 16'h33C3},
    {24'h00041A, 16'h0000},
    {24'h00041C, 16'h6004},
    {24'h00041E, 16'h2401},
    {24'h000420, 16'h9480},
    {24'h000422, 16'h40C3},
    {24'h000424, 16'h23C2},
    {24'h000426, 16'h0000},
    {24'h000428, 16'h6008},
    {24'h00042A, 16'h33C3},
    {24'h00042C, 16'h0000},
    {24'h00042E, 16'h600C},
    {24'h000430, 16'h2401},
    {24'h000432, 16'hC480},
    {24'h000434, 16'h40C3},
    {24'h000436, 16'h23C2},
    {24'h000438, 16'h0000},
    {24'h00043A, 16'h6010},
    {24'h00043C, 16'h33C3},
    {24'h00043E, 16'h0000},
    {24'h000440, 16'h6014},
    {24'h000442, 16'h2401},
    {24'h000444, 16'h8480},
    {24'h000446, 16'h40C3},
    {24'h000448, 16'h23C2},
    {24'h00044A, 16'h0000},
    {24'h00044C, 16'h6018},
    {24'h00044E, 16'h33C3},
    {24'h000450, 16'h0000},
    {24'h000452, 16'h601C},
    {24'h000454, 16'h2401},
    {24'h000456, 16'hB182},
    {24'h000458, 16'h40C3},
    {24'h00045A, 16'h23C2},
    {24'h00045C, 16'h0000},
    {24'h00045E, 16'h6020},
    {24'h000460, 16'h33C3},
    {24'h000462, 16'h0000},
    {24'h000464, 16'h6024},
    {24'h000466, 16'h2401},
    {24'h000468, 16'hB480},
    {24'h00046A, 16'h40C3},
    {24'h00046C, 16'h23C2},
    {24'h00046E, 16'h0000},
    {24'h000470, 16'h6028},
    {24'h000472, 16'h33C3},
    {24'h000474, 16'h0000},
    {24'h000476, 16'h602C},
    {24'h000478, 16'h2401},
    {24'h00047A, 16'hB480},
    {24'h00047C, 16'h57C2},
    {24'h00047E, 16'h40C3},
    {24'h000480, 16'h23C2},
    {24'h000482, 16'h0000},
    {24'h000484, 16'h6030},
    {24'h000486, 16'h33C3},
    {24'h000488, 16'h0000},
    {24'h00048A, 16'h6034},
    {24'h00048C, 16'h2401},
    {24'h00048E, 16'h4482},
    {24'h000490, 16'h40C3},
    {24'h000492, 16'h23C2},
    {24'h000494, 16'h0000},
    {24'h000496, 16'h6038},
    {24'h000498, 16'h33C3},
    {24'h00049A, 16'h0000},
    {24'h00049C, 16'h603C},
    {24'h00049E, 16'h2401},
    {24'h0004A0, 16'h4682},
    {24'h0004A2, 16'h40C3},
    {24'h0004A4, 16'h23C2},
    {24'h0004A6, 16'h0000},
    {24'h0004A8, 16'h6040},
    {24'h0004AA, 16'h33C3},
    {24'h0004AC, 16'h0000},
    {24'h0004AE, 16'h6044},
    {24'h0004B0, 16'h2401},
    {24'h0004B2, 16'h4282},
    {24'h0004B4, 16'h40C3},
    {24'h0004B6, 16'h23C2},
    {24'h0004B8, 16'h0000},
    {24'h0004BA, 16'h6048},
    {24'h0004BC, 16'h33C3},
    {24'h0004BE, 16'h0000},
    {24'h0004C0, 16'h604C},
    {24'h0004C2, 16'h2401},
    {24'h0004C4, 16'h4842},
    {24'h0004C6, 16'h40C3},
    {24'h0004C8, 16'h23C2},
    {24'h0004CA, 16'h0000},
    {24'h0004CC, 16'h6050},
    {24'h0004CE, 16'h33C3},
    {24'h0004D0, 16'h0000},
    {24'h0004D2, 16'h6054},
    {24'h0004D4, 16'h2401},
    {24'h0004D6, 16'h4882},
    {24'h0004D8, 16'h40C3},
    {24'h0004DA, 16'h23C2},
    {24'h0004DC, 16'h0000},
    {24'h0004DE, 16'h6058},
    {24'h0004E0, 16'h33C3},
    {24'h0004E2, 16'h0000},
    {24'h0004E4, 16'h605C},
    {24'h0004E6, 16'h2401},
    {24'h0004E8, 16'h48C2},
    {24'h0004EA, 16'h40C3},
    {24'h0004EC, 16'h23C2},
    {24'h0004EE, 16'h0000},
    {24'h0004F0, 16'h6060},
    {24'h0004F2, 16'h33C3},
    {24'h0004F4, 16'h0000},
    {24'h0004F6, 16'h6064},
    {24'h0004F8, 16'h2401},
    {24'h0004FA, 16'h4A82},
    {24'h0004FC, 16'h40C3},
    {24'h0004FE, 16'h23C2},
    {24'h000500, 16'h0000},
    {24'h000502, 16'h6068},
    {24'h000504, 16'h33C3},
    {24'h000506, 16'h0000},
    {24'h000508, 16'h606C},
    {24'h00050A, 16'h2401},
    {24'h00050C, 16'hE78A},
    {24'h00050E, 16'h40C3},
    {24'h000510, 16'h23C2},
    {24'h000512, 16'h0000},
    {24'h000514, 16'h6070},
    {24'h000516, 16'h33C3},
    {24'h000518, 16'h0000},
    {24'h00051A, 16'h6074},
    {24'h00051C, 16'h2401},
    {24'h00051E, 16'hE442},
    {24'h000520, 16'h40C3},
    {24'h000522, 16'h23C2},
    {24'h000524, 16'h0000},
    {24'h000526, 16'h6078},
    {24'h000528, 16'h33C3},
    {24'h00052A, 16'h0000},
    {24'h00052C, 16'h607C},
    {24'h00052E, 16'h2401},
    {24'h000530, 16'hE03A},
    {24'h000532, 16'h40C3},
    {24'h000534, 16'h23C2},
    {24'h000536, 16'h0000},
    {24'h000538, 16'h6080},
    {24'h00053A, 16'h33C3},
    {24'h00053C, 16'h0000},
    {24'h00053E, 16'h6084},
    {24'h000540, 16'h2401},
    {24'h000542, 16'hC4C0},
    {24'h000544, 16'h40C3},
    {24'h000546, 16'h23C2},
    {24'h000548, 16'h0000},
    {24'h00054A, 16'h6088},
    {24'h00054C, 16'h33C3},
    {24'h00054E, 16'h0000},
    {24'h000550, 16'h608C},
    {24'h000552, 16'h2401},
    {24'h000554, 16'h0642},
    {24'h000556, 16'h1234},
    {24'h000558, 16'h40C3},
    {24'h00055A, 16'h23C2},
    {24'h00055C, 16'h0000},
    {24'h00055E, 16'h6090},
    {24'h000560, 16'h33C3},
    {24'h000562, 16'h0000},
    {24'h000564, 16'h6094},
    {24'h000566, 16'h2401},
    {24'h000568, 16'h5B82},
    {24'h00056A, 16'h40C3},
    {24'h00056C, 16'h23C2},
    {24'h00056E, 16'h0000},
    {24'h000570, 16'h6098},
    {24'h000572, 16'h33C3},
    {24'h000574, 16'h0000},
    {24'h000576, 16'h609C},
    {24'h000578, 16'h2401},
    {24'h00057A, 16'h2600},
    {24'h00057C, 16'h0043},
    {24'h00057E, 16'h0001},
    {24'h000580, 16'h84C3},
    {24'h000582, 16'h40C3},
    {24'h000584, 16'h23C2},
    {24'h000586, 16'h0000},
    {24'h000588, 16'h60A0},
    {24'h00058A, 16'h33C3},
    {24'h00058C, 16'h0000},
    {24'h00058E, 16'h60A4},
    {24'h000590, 16'h2401},
    {24'h000592, 16'h2600},
    {24'h000594, 16'h0043},
    {24'h000596, 16'h0001},
    {24'h000598, 16'h85C3},
    {24'h00059A, 16'h40C3},
    {24'h00059C, 16'h23C2},
    {24'h00059E, 16'h0000},
    {24'h0005A0, 16'h60A8},
    {24'h0005A2, 16'h33C3},
    {24'h0005A4, 16'h0000},
    {24'h0005A6, 16'h60AC},
    {24'h0005A8, 16'h2401},
    {24'h0005AA, 16'hC5C0},
    {24'h0005AC, 16'h40C3},
    {24'h0005AE, 16'h23C2},
    {24'h0005B0, 16'h0000},
    {24'h0005B2, 16'h60B0},
    {24'h0005B4, 16'h33C3},
    {24'h0005B6, 16'h0000},
    {24'h0005B8, 16'h60B4},
    {24'h0005BA, 16'h785A},
    {24'h0005BC, 16'h33C4},
    {24'h0005BE, 16'h0000},
    {24'h0005C0, 16'h7FFE},
    {24'h0005C2, 16'h60FE}
  };
  localparam int N_OPS = 23;
  localparam logic [31:0] PC_AFTER_MULU = 32'h00000544;

  logic [15:0] mem [32768];
  int checks = 0, failures = 0;
  int waits = 0, wcnt = 0;

  // Behavioural memory: DTACK after `waits` clocks of AS.
  always_ff @(posedge clk) begin
    if (as_n) wcnt <= 0;
    else      wcnt <= wcnt + 1;
    if (!as_n && !rw && wcnt >= waits) begin
      if (!uds_n) mem[adbus[15:1]][15:8] <= dbus_o[15:8];
      if (!lds_n) mem[adbus[15:1]][7:0]  <= dbus_o[7:0];
    end
  end
  assign dtack_n = !(!as_n && wcnt >= waits);
  assign berr_n  = 1'b1;
  assign dbus_i  = mem[adbus[15:1]];

  // Timing of MULU: cycles between the end of the instruction before it and
  // its own end.
  int cyc = 0, last_done = 0, mulu_clocks = 0;
  always @(posedge clk) begin
    cyc++;
    if (instr_done) begin
      if (pc_o == PC_AFTER_MULU) mulu_clocks = cyc - last_done;
      last_done = cyc;
    end
  end

  initial begin
    #20_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef struct { logic [31:0] r; logic [4:0] cc; } res_t;   // cc = {X,N,Z,V,C}

  function automatic logic [4:0] nz(input logic [4:0] cc, input logic [31:0] v, input int bits);
    logic [4:0] o;
    o = cc;
    o[3] = v[bits-1];
    o[2] = (bits == 32) ? (v == 0) : (bits == 16) ? (v[15:0] == 0) : (v[7:0] == 0);
    return o;
  endfunction

  function automatic res_t model(input int k, input logic [31:0] A, input logic [31:0] B,
                                 input logic [4:0] x_in);
    res_t o;
    logic [32:0] s;
    logic [4:0] cc;
    logic [31:0] v;
    int cnt;
    logic c;
    logic [15:0] d;
    logic [31:0] q, rm;
    longint sq, sr;
    // MOVE.L d1,d2 first
    cc = nz({x_in, 4'b0000}, B, 32);
    v  = B;
    case (k)
      0: begin s = {1'b0, B} + {1'b0, A}; v = s[31:0]; cc = nz(cc, v, 32);
               cc[0] = s[32]; cc[4] = s[32]; cc[1] = (A[31] == B[31]) && (v[31] != B[31]); end
      1, 5, 6: begin s = {1'b0, B} - {1'b0, A}; cc = nz(cc, s[31:0], 32);
               cc[0] = s[32]; cc[1] = (A[31] != B[31]) && (s[31] != B[31]);
               if (k == 1) begin v = s[31:0]; cc[4] = s[32]; end
               if (k == 6) v = {B[31:8], (A == B) ? 8'hFF : 8'h00}; end
      2: begin v = B & A; cc = nz(cc, v, 32); end
      3: begin v = B | A; cc = nz(cc, v, 32); end
      4: begin v = B ^ A; cc = nz(cc, v, 32); end
      7: begin v = -B; cc = nz(cc, v, 32); cc[0] = (B != 0); cc[4] = (B != 0);
               cc[1] = (B == 32'h8000_0000); end
      8: begin v = ~B; cc = nz(cc, v, 32); end
      9: begin v = 0; cc = nz(cc, v, 32); end
      10: begin v = {B[15:0], B[31:16]}; cc = nz(cc, v, 32); end
      11: begin v = {B[31:16], {8{B[7]}}, B[7:0]}; cc = nz(cc, v, 16); end
      12: begin v = {{16{B[15]}}, B[15:0]}; cc = nz(cc, v, 32); end
      13: ;
      14: begin v = B << 3; cc = nz(cc, v, 32); cc[0] = B[29]; cc[4] = B[29]; end
      15: begin v = {B[31:16], 16'($signed(B[15:0]) >>> 2)}; cc = nz(cc, v, 16);
                cc[0] = B[1]; cc[4] = B[1]; end
      16: begin
        cnt = A[5:0]; v = B; c = 1'b0;
        for (int i = 0; i < cnt; i++) begin c = v[0]; v[7:0] = {v[0], v[7:1]}; end
        cc = nz(cc, v, 8); cc[0] = c;
      end
      17: begin v = B[15:0] * A[15:0]; cc = nz(cc, v, 32); end
      18: begin s = {17'd0, B[15:0]} + 33'h1234; v = {B[31:16], s[15:0]}; cc = nz(cc, v, 16);
                cc[0] = s[16]; cc[4] = s[16]; cc[1] = !B[15] && v[15]; end
      20: begin
        d = A[15:0] | 16'd1;
        cc = nz(cc, {16'd0, d}, 16);                 // ORI.W #1,d3
        if (B[31:16] >= d) begin
          cc[1] = 1'b1; cc[0] = 1'b0;                  // overflow: d2 unchanged
        end else begin
          q = B / {16'd0, d}; rm = B % {16'd0, d};
          v = {rm[15:0], q[15:0]};
          cc[3] = q[15]; cc[2] = (q[15:0] == 16'd0); cc[1] = 1'b0; cc[0] = 1'b0;
        end
      end
      21: begin
        d = A[15:0] | 16'd1;
        cc = nz(cc, {16'd0, d}, 16);                 // ORI.W #1,d3
        sq = longint'($signed(B)) / longint'($signed(d));
        sr = longint'($signed(B)) % longint'($signed(d));
        if (sq > 32767 || sq < -32768) begin
          cc[1] = 1'b1; cc[0] = 1'b0;                  // overflow: d2 unchanged
        end else begin
          v = {16'(sr), 16'(sq)};
          cc[3] = v[15]; cc[2] = (v[15:0] == 16'd0); cc[1] = 1'b0; cc[0] = 1'b0;
        end
      end
      22: begin v = 32'($signed(B[15:0]) * $signed(A[15:0])); cc = nz(cc, v, 32); end
      default: begin s = {1'b0, B} - 33'd5; v = s[31:0]; cc = nz(cc, v, 32);
                cc[0] = s[32]; cc[4] = s[32]; cc[1] = B[31] && !v[31]; end
    endcase
    o.r = v; o.cc = cc;
    return o;
  endfunction

  function automatic logic [31:0] mem_l(input int a);
    return {mem[a/2], mem[a/2+1]};
  endfunction

  initial begin
    logic [31:0] A, B;
    logic [4:0]  x;
    res_t e;
    for (int it = 0; it < ITER; it++) begin
      A = $urandom; B = $urandom;
      case (it % 8)
        2: A = B;
        3: begin A = 32'h8000_0000; B = 32'h8000_0000; end
        4: B = 32'd0;
        6: B = 32'($signed(B) >>> 12);
        5: A = {$urandom_range(0, 65535)} << 16;
        default: ;
      endcase
      if (it == 0) begin A = 32'h0000_FFFF; B = 32'h0000_1234; end
      waits = 0;
      rst_n = 1'b0;
      repeat (3) @(negedge clk);   // let a write still in progress finish
      for (int i = 0; i < 32768; i++) mem[i] = 16'h0000;
      for (int i = 0; i < PROG_N; i++) mem[PROG[i][39:17]] = PROG[i][15:0];
      mem['h402/2] = A[31:16]; mem['h404/2] = A[15:0];
      mem['h408/2] = B[31:16]; mem['h40A/2] = B[15:0];
      rst_n = 1'b1;
      while (mem['h7FFE/2] != 16'h005A) begin
        @(negedge clk);
        if (it % 2 == 1 && as_n) waits = $urandom_range(0, 3);
      end
      x = 5'b0;
      for (int k = 0; k < N_OPS; k++) begin
        e = model(k, A, B, x[4]);
        x = e.cc;
        checks++;
        if (mem_l(R + 8*k) !== e.r || mem[(R + 8*k + 4)/2] !== {11'b0010_0111_000, e.cc}) begin
          failures++;
          $display("FAIL run %0d op %0d A=%08h B=%08h: got %08h sr %04h expected %08h sr %04h",
                   it, k, A, B, mem_l(R + 8*k), mem[(R + 8*k + 4)/2], e.r,
                   {11'b0010_0111_000, e.cc});
        end
      end
      if (it % 2 == 0) begin
        checks++;
        if (mulu_clocks != 17 + 38 + 2 * $countones(A[15:0])) begin
          failures++;
          $display("FAIL MULU timing: %0d clocks for multiplier %04h, expected %0d", mulu_clocks,
                   A[15:0], 17 + 38 + 2 * $countones(A[15:0]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
