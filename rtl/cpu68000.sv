// cpu68000 -- 68000 op-code compatible CPU core built as one state machine.
//
// Organisation.  The core is a register-transfer design around a 32-bit
// internal databus.  A control-unit state machine issues, in every state, a
// command to every register-control multiplexer (hold, load or reset for
// most of them; special loads for a few) and to the functional unit (ALU and
// shifter).  Everything that one clock does is decided by the current state
// and the few inputs it tests; one state lasts one clock.
//
// Shared sequences.  The bus read cycle (read0 .. read14), the bus write
// cycle (write0 .. write15), the wait-state loop, the 6800 peripheral cycle
// and the effective-address (EA) sequences are written once and called like
// subroutines through a three-entry state stack: the caller pushes the state
// to continue with and jumps in; the last state of the sequence pulls it.
// A word read is read0 read1 read2 read4 read5 read6 (six clocks with DTACK
// already low); a long read continues with read7 read9 read10 read12 read13
// read14.  read4/read12 (and write4/write12) test DTACK, then BERR, then
// VPA; with none asserted they push themselves and run two wait clocks.
//
// Instruction flow.  read_ir0 copies PC to the effective address register
// and calls the read cycle; read_ir1 loads IR; decode works out the operands
// and the execution kind.  If there are memory or register operands it
// pushes `exec` and runs the source EA sequence, then the destination EA
// sequence (which reads the destination only for read-modify-write
// instructions), then pulls back into `exec`, which computes with the
// functional unit and writes the result to a register or calls the write
// cycle.  Every instruction ends in the interrupt check (int_check0..2),
// which compares the IPL level with the SR mask using the ALU's 3-bit
// subtraction, then goes back to read_ir0.
//
// Exceptions.  Interrupts, TRAP, illegal/unimplemented opcodes, privilege
// violations, trace and bus error share one sequence: save SR, set S and
// clear T, push PC and SR on the system stack, (for an interrupt) run the
// interrupt-acknowledge bus cycle with FC = 111 and take the vector number
// from the data bus, or 24 + level when VPA answers (auto vector), multiply
// the vector number by four with two ALU left shifts, read the vector and
// load PC.  RTE pulls SR and PC back.  A bus error inside the exception
// sequence halts the core and drives HALT.
//
// Reset.  After the reset input is released the core runs RESET_CLOCKS idle
// clocks, resets every register (SR = 2700h), reads the initial SSP from
// address 0 and the initial PC from address 4 and starts fetching.  The
// RESET instruction drives the reset output for RESET_CLOCKS clocks.
//
// MULU.W is the shift-and-add loop of the document: the multiplier is
// sign-extended with ones so that the loop ends when its upper half has been
// shifted to zero; each multiplier bit costs two clocks, plus two for an
// add.  From mulu0 to the interrupt check it takes 38 + 2n clocks (n = ones
// in the multiplier), the 68000 figure the document quotes.
//
// MULS.W runs the same loop on the operand magnitudes and negates the
// product at the end when the signs differ.
//
// DIVU.W, which the document's decode table names but does not spell out,
// is a restoring division: temp holds {remainder, quotient}, and each of
// sixteen clocks shifts it left and lets the ALU subtract the divisor from
// the partial remainder.  A quotient over 16 bits sets V and leaves Dn
// alone; a zero divisor takes exception vector 5.  DIVS.W runs the same
// loop on the magnitudes and negates quotient and remainder at the end
// (the remainder takes the dividend's sign).  Its clock count (about
// 20 after the operands are read) is this design's, not the 68000's.
//
// Interface.  68000 pins with active-low signals marked _n; the
// bidirectional pins are split into input, output and output-enable:
// dbus_i/dbus_o/dbus_oe, adbus/adbus_oe (the strobes AS, UDS, LDS, R/W share
// adbus_oe), rst_n (reset in) / rst_out_n (reset out, RESET instruction),
// halt_n (in: holds the core at the next instruction boundary) / halt_out_n.
// adbus is 24 bits including bit 0, as the document declares it; UDS/LDS
// still select the byte lanes.  The core runs on the rising clock edge.
//
// From the document: the register set, the 32-bit internal databus, the
// idle/load/reset command style, the state stack, the read/write cycle
// state sequences and their DTACK/BERR/VPA tests, the reset sequence, the
// interrupt check and acknowledge sequence, MULU's algorithm and timing, and
// the fetch/decode/EA/execute structure.  This design's own choices: the
// instruction subset below, the exact state list, one state per clock, the
// E/VMA peripheral cycle, bus arbitration, trace and the exception stack
// frame (PC and SR only, also for bus error).
//
// Lint note: the state stack's level output, the register file's USP/SSP
// outputs and the E clock's phase output are left unconnected on purpose
// (they serve debugging and the block benches); verilator reports these as
// empty pin connections.
//
// Instructions: MOVE, MOVEA, MOVEQ, ADD, ADDA, ADDI, ADDQ, SUB, SUBA, SUBI,
// SUBQ, AND, ANDI, OR, ORI, EOR, EORI, CMP, CMPI, CLR, NEG, NOT, TST, TAS,
// ABCD, SBCD, NBCD, BTST, BCHG, BCLR, BSET,
// SWAP, EXT, MULU, MULS, DIVU, DIVS, ASd/LSd/ROd/ROXd (register and memory forms), Bcc,
// BRA, BSR, DBcc, Scc, JMP, JSR, LEA, PEA, LINK, UNLK, RTS, RTE, TRAP, NOP,
// RESET, ILLEGAL, MOVE to and from SR, MOVE to CCR, ANDI/ORI/EORI to CCR and
// SR.  TAS runs an ordinary read and a separate write, not the 68000's
// indivisible read-modify-write bus cycle.  Addressing modes: Dn,
// An, (An), (An)+, -(An), d16(An), d16(PC), abs.W, abs.L, #imm.  Other
// opcodes and the d8(An,Xn) modes raise the illegal-instruction exception.
module cpu68000
  import m68k_pkg::*;
#(
  parameter int unsigned RESET_CLOCKS = 124
) (
  input  logic        clk,
  input  logic        rst_n,        // RESET pin, input side
  output logic        rst_out_n,    // RESET pin, output side (RESET instr.)
  input  logic        halt_n,       // HALT pin, input side
  output logic        halt_out_n,   // HALT pin, output side (double fault)
  input  logic [15:0] dbus_i,
  output logic [15:0] dbus_o,
  output logic        dbus_oe,
  output logic [23:0] adbus,
  output logic        adbus_oe,
  output logic        as_n,
  output logic        rw,
  output logic        uds_n,
  output logic        lds_n,
  input  logic        dtack_n,
  input  logic        berr_n,
  input  logic        br_n,
  output logic        bg_n,
  input  logic        bgack_n,
  input  logic [2:0]  ipl_n,
  output logic [2:0]  fc,
  output logic        e,
  output logic        vma_n,
  input  logic        vpa_n,
  // observation
  output logic [31:0] pc_o,
  output logic [15:0] sr_o,
  output logic        instr_done    // one clock at the end of each instruction
);

  // ------------------------------------------------------------------
  // Control-unit states
  // ------------------------------------------------------------------
  typedef enum logic [6:0] {
    S_RESET_WAIT, S_RESET123, S_RESET124, S_RESET125, S_RESET126, S_RESET127,
    S_READ_IR0, S_READ_IR1, S_DECODE,
    S_READ0, S_READ1, S_READ2, S_READ4, S_READ5, S_READ6, S_READ7,
    S_READ9, S_READ10, S_READ12, S_READ13, S_READ14,
    S_WRITE0, S_WRITE1, S_WRITE2, S_WRITE3, S_WRITE4, S_WRITE5, S_WRITE6, S_WRITE7,
    S_WRITE8, S_WRITE9, S_WRITE10, S_WRITE11, S_WRITE12, S_WRITE13, S_WRITE14, S_WRITE15,
    S_WAIT0, S_WAIT1, S_PERIPH0, S_PERIPH1,
    S_EA_START, S_EA_D16, S_EA_PCD16, S_EA_ABSW, S_EA_ABSL, S_EA_IMM,
    S_EA_READ, S_EA_RDONE, S_EA_DONE,
    S_EXEC,
    S_MULU0, S_MULU1, S_MULU2, S_MULU3, S_MULU4, S_MULU6, S_MULU_WRITE,
    S_MULU_WAIT0, S_MULU_WAIT1, S_MULU_WAIT2,
    S_DIVU0, S_DIVU1, S_DIVU_WRITE,
    S_PEA0, S_LINK0, S_LINK1, S_LINK2, S_UNLK0, S_UNLK1, S_UNLK2,
    S_BCC1, S_DBCC1, S_JSR0, S_JSR1, S_RTS1, S_RTE1, S_RTE2, S_RTE3,
    S_RESET_INSTR,
    S_INT_CHECK0, S_INT_CHECK1, S_INT_CHECK2,
    S_EXC0, S_EXC1, S_EXC2, S_EXC3, S_EXC4, S_EXC5, S_EXC6, S_EXC7,
    S_IACK0, S_IACK1,
    S_BUSERROR, S_HALTED, S_BGRANT0, S_BGRANT1
  } state_t;

  localparam int unsigned SW = $bits(state_t);
  // The counter times the reset sequences and DIVU's sixteen steps.
  localparam int unsigned CW = (RESET_CLOCKS >= 16) ? $clog2(RESET_CLOCKS + 1) : 5;

  // What the execute state does with the operands.
  typedef enum logic [4:0] {
    EX_ALU, EX_MULU, EX_DIVU, EX_BCC, EX_DBCC, EX_JMP, EX_JSR, EX_LEA, EX_RTS, EX_RTE,
    EX_NOP, EX_RESET, EX_TRAP, EX_SRW, EX_PEA, EX_LINK, EX_UNLK, EX_DIVS, EX_MULS
  } exec_t;

  // Source selected for the ALU's left input in the execute state.
  typedef enum logic [2:0] {
    A_SOURCE, A_SEXTW, A_SWAP, A_EXTW, A_EXTL, A_SR, A_SCC, A_ZERO
  } asel_t;

  typedef enum logic [1:0] { SRW_MOVE, SRW_OR, SRW_AND, SRW_EOR } srw_t;

  typedef struct packed {
    exec_t      kind;
    alu_op_t    alu;
    asel_t      asel;
    logic       use_sh;
    shift_op_t  sh;
    size_t      sz;
    logic       has_src;
    logic [2:0] src_mode, src_reg;
    logic       src_addr_only;
    logic       has_dst;
    logic [2:0] dst_mode, dst_reg;
    logic       dst_read;
    logic       write_back;
    logic       set_cc;
    logic       tas;           // TAS: result is the operand with bit 7 set
    logic [1:0] bcd;           // 0 none, 1 ABCD, 2 SBCD, 3 NBCD
    logic       bitop;         // BTST/BCHG/BCLR/BSET, kind in ir[7:6]
    logic       use_quick;     // source is an immediate from the opcode
    logic [31:0] quick;
    srw_t       srw;
    logic       srw_ccr;       // target is the CCR (else whole SR)
    logic       priv;
    logic       illegal;
    logic [7:0] vec;
  } dec_t;

  // Datapath registers of the core.
  typedef struct packed {
    logic [15:0] ir;
    logic [31:0] pc;
    logic [31:0] ear;      // effective address register
    logic [31:0] temp;     // write data / MULU accumulator
    logic [31:0] temp_l;   // data assembled by the read cycle
    logic [31:0] source;
    logic [31:0] dest;
    logic [31:0] opnd;     // operand produced by an EA sequence
    logic [15:0] sr;
    logic [15:0] sr_save;
    logic [15:0] rdata;    // data bus sample
    size_t       size;     // size of the current bus transfer
    dec_t        dec;      // decoded instruction
    logic [2:0]  ea_mode, ea_reg;
    logic        ea_dst;   // 0: source EA phase, 1: destination EA phase
    logic [2:0]  ipl_reg;
    logic        be;       // bus error seen in this bus cycle
    logic        periph_ack;
    logic        vma;
    logic        iack;     // current read is an interrupt acknowledge
    logic        autovec;
    logic        exc_int;
    logic        in_exc;
    logic [7:0]  vec;
    logic        fc_prog;
    logic        trace_pend;
    logic [CW-1:0] cnt;
    logic        mul_neg;  // MULS: operand signs differ, negate the product
    logic        rst_out;
    logic        halt_out;
    logic        bg;
  } regs_t;

  state_t state, next_state, return_state;
  regs_t  r, nx;

  // ------------------------------------------------------------------
  // Sub-blocks
  // ------------------------------------------------------------------
  logic        unit_rst;
  logic [SW-1:0] saved_bits;
  state_t      saved;
  st_ctrl_t    st_ctrl;
  logic        st_ovf, st_unf;

  assign unit_rst = !rst_n || state == S_RESET123;

  m68k_state_stack #(.W(SW), .DEPTH(3)) u_stack (
    .clk, .rst(unit_rst), .st_ctrl, .push_state(return_state),
    .saved(saved_bits), .level(), .overflow(st_ovf), .underflow(st_unf)
  );
  assign saved = state_t'(saved_bits);

  logic [3:0]  rd_a_sel, rd_b_sel, rf_wsel;
  logic [31:0] rd_a, rd_b, rf_wdata;
  logic        rf_we;
  size_t       rf_wsize;

  m68k_regfile u_regs (
    .clk, .rst(unit_rst), .supervisor(r.sr[13]),
    .rd_a_sel, .rd_a, .rd_b_sel, .rd_b,
    .wr_en(rf_we), .wr_sel(rf_wsel), .wr_size(rf_wsize), .wr_data(rf_wdata),
    .usp(), .ssp()
  );

  alu_op_t     alu_op;
  size_t       alu_size;
  logic [31:0] alu_a, alu_b, alu_out;
  logic [4:0]  alu_cc;

  m68k_alu u_alu (
    .op(alu_op), .size(alu_size), .a(alu_a), .b(alu_b), .cc_in(r.sr[4:0]),
    .result(alu_out), .cc_out(alu_cc)
  );

  logic [5:0]  sh_count;
  logic [31:0] sh_out;
  logic [4:0]  sh_cc;

  m68k_shifter u_shift (
    .op(r.dec.sh), .size(r.dec.sz), .count(sh_count), .data(r.dest),
    .cc_in(r.sr[4:0]), .result(sh_out), .cc_out(sh_cc)
  );

  ctrl_t      addr_ctrl, as_ctrl, rw_ctrl, uds_ctrl;
  fc_ctrl_t   fc_ctrl;
  dbus_ctrl_t dbus_ctrl;
  logic [31:0] databus;
  typedef enum logic [1:0] { DBS_EAR, DBS_TEMP, DBS_ZERO } dbsel_t;
  dbsel_t     databus_ctrl;

  always_comb begin
    unique case (databus_ctrl)
      DBS_EAR:  databus = r.ear;
      DBS_TEMP: databus = r.temp;
      default:  databus = '0;
    endcase
  end

  m68k_bus_ctrl u_bus (
    .clk, .rst(unit_rst), .addr_ctrl, .as_ctrl, .rw_ctrl, .uds_ctrl, .fc_ctrl,
    .dbus_ctrl, .databus, .size(r.size), .supervisor(r.sr[13]), .prog_space(r.fc_prog),
    .adbus, .adbus_oe, .as_n, .rw, .uds_n, .lds_n, .fc, .dbus_o, .dbus_oe
  );

  logic e_fall, e_low_start;
  m68k_e_clock u_eclk (
    .clk, .rst(!rst_n), .e, .e_fall, .e_low_start, .phase()
  );

  assign pc_o       = r.pc;
  assign sr_o       = r.sr;
  assign vma_n      = !r.vma;
  assign rst_out_n  = !r.rst_out;
  assign halt_out_n = !r.halt_out;
  assign bg_n       = !r.bg;
  assign instr_done = (state == S_INT_CHECK0);

  // ------------------------------------------------------------------
  // Instruction decoder (combinational on IR)
  // ------------------------------------------------------------------
  function automatic size_t sz2(input logic [1:0] s);
    unique case (s)
      2'b00:   return SZ_BYTE;
      2'b01:   return SZ_WORD;
      default: return SZ_LONG;
    endcase
  endfunction

  dec_t dec;
  always_comb begin
    logic [15:0] op;
    logic [1:0]  sh_kind;
    op  = r.ir;
    sh_kind = 2'b00;
    dec = '0;
    dec.kind = EX_ALU;
    dec.alu  = ALU_PASS;
    dec.asel = A_SOURCE;
    dec.sz   = sz2(op[7:6]);
    dec.vec  = 8'd4;
    unique case (op[15:12])
      4'h0: begin // immediate group
        dec.has_src = 1'b1; dec.src_mode = 3'd7; dec.src_reg = 3'd4;
        if ((op[8] && op[5:3] != 3'd1) || op[11:8] == 4'h8) begin
          // Bit operations: bit number in Dn (dynamic) or an immediate byte.
          // Byte operand in memory, long operand in a data register.
          dec.bitop = 1'b1; dec.sz = SZ_BYTE;
          if (op[8]) begin dec.src_mode = 3'd0; dec.src_reg = op[11:9]; end
          dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          dec.dst_read = 1'b1; dec.set_cc = 1'b1; dec.write_back = (op[7:6] != 2'b00);
          if (op[5:3] == 3'd1 || (op[5:3] == 3'd7 && op[2:1] != 2'b00)) dec.illegal = 1'b1;
        end else if (op[8] || op[7:6] == 2'b11 || op[11:9] == 3'b100 || op[11:9] == 3'b111) begin
          dec.illegal = 1'b1;
        end else if (op[5:0] == 6'b111100) begin // to CCR / SR
          dec.kind = EX_SRW;
          dec.srw_ccr = (op[7:6] == 2'b00);
          dec.priv = (op[7:6] == 2'b01);
          unique case (op[11:9])
            3'b000:  dec.srw = SRW_OR;
            3'b001:  dec.srw = SRW_AND;
            3'b101:  dec.srw = SRW_EOR;
            default: dec.illegal = 1'b1;
          endcase
          if (op[7:6] == 2'b10) dec.illegal = 1'b1;
        end else begin
          dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          dec.dst_read = 1'b1; dec.write_back = 1'b1; dec.set_cc = 1'b1;
          unique case (op[11:9])
            3'b000:  dec.alu = ALU_OR;
            3'b001:  dec.alu = ALU_AND;
            3'b010:  dec.alu = ALU_SUB;
            3'b011:  dec.alu = ALU_ADD;
            3'b101:  dec.alu = ALU_EOR;
            default: begin dec.alu = ALU_CMP; dec.write_back = 1'b0; end
          endcase
          if (op[5:3] == 3'd1) dec.illegal = 1'b1;
        end
      end
      4'h1, 4'h2, 4'h3: begin // MOVE / MOVEA
        dec.sz = (op[13:12] == 2'b01) ? SZ_BYTE : (op[13:12] == 2'b11) ? SZ_WORD : SZ_LONG;
        dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
        dec.has_dst = 1'b1; dec.dst_mode = op[8:6]; dec.dst_reg = op[11:9];
        dec.write_back = 1'b1;
        dec.set_cc = (op[8:6] != 3'd1);
        if (op[8:6] == 3'd1 && dec.sz == SZ_BYTE) dec.illegal = 1'b1;
      end
      4'h4: begin
        if (op == 16'h4E70) begin dec.kind = EX_RESET; dec.priv = 1'b1; end
        else if (op == 16'h4E71) dec.kind = EX_NOP;
        else if (op == 16'h4E73) begin dec.kind = EX_RTE; dec.priv = 1'b1; end
        else if (op == 16'h4E75) dec.kind = EX_RTS;
        else if (op[15:4] == 12'h4E4) begin dec.kind = EX_TRAP; dec.vec = {4'h2, op[3:0]}; end
        else if (op[15:3] == 13'b0100_1110_0101_0) begin // LINK An,#d16
          dec.kind = EX_LINK; dec.sz = SZ_WORD;
          dec.has_src = 1'b1; dec.src_mode = 3'd7; dec.src_reg = 3'd4;
        end
        else if (op[15:3] == 13'b0100_1110_0101_1) dec.kind = EX_UNLK;
        else if (op[15:7] == 9'b0100_1110_1) begin // JSR / JMP
          dec.kind = op[6] ? EX_JMP : EX_JSR;
          dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
          dec.src_addr_only = 1'b1;
          if (op[5:3] < 3'd2 || op[5:3] == 3'd3 || op[5:3] == 3'd4) dec.illegal = 1'b1;
        end else if (op[8:6] == 3'b111) begin // LEA
          dec.kind = EX_LEA;
          dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
          dec.src_addr_only = 1'b1;
          if (op[5:3] < 3'd2 || op[5:3] == 3'd3 || op[5:3] == 3'd4) dec.illegal = 1'b1;
        end else if (op[15:3] == 13'b0100_1000_0100_0) begin // SWAP
          dec.sz = SZ_LONG; dec.asel = A_SWAP;
          dec.has_dst = 1'b1; dec.dst_reg = op[2:0]; dec.dst_read = 1'b1;
          dec.write_back = 1'b1; dec.set_cc = 1'b1;
        end else if (op[15:6] == 10'b0100_1000_00) begin // NBCD
          dec.sz = SZ_BYTE; dec.bcd = 2'd3;
          dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          dec.dst_read = 1'b1; dec.write_back = 1'b1; dec.set_cc = 1'b1;
          if (op[5:3] == 3'd1 || (op[5:3] == 3'd7 && op[2:1] != 2'b00)) dec.illegal = 1'b1;
        end else if (op[15:6] == 10'b0100_1000_01) begin // PEA
          dec.kind = EX_PEA; dec.sz = SZ_LONG;
          dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
          dec.src_addr_only = 1'b1;
          if (op[5:3] < 3'd2 || op[5:3] == 3'd3 || op[5:3] == 3'd4) dec.illegal = 1'b1;
        end else if (op[11:6] == 6'b101011 && op != 16'h4AFC) begin // TAS
          dec.sz = SZ_BYTE; dec.alu = ALU_PASS; dec.asel = A_ZERO; dec.tas = 1'b1;
          dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          dec.dst_read = 1'b1; dec.write_back = 1'b1; dec.set_cc = 1'b1;
          if (op[5:3] == 3'd1 || (op[5:3] == 3'd7 && op[2:1] != 2'b00)) dec.illegal = 1'b1;
        end else if (op[15:7] == 9'b0100_1000_1 && op[5:3] == 3'd0) begin // EXT
          dec.sz = op[6] ? SZ_LONG : SZ_WORD; dec.asel = op[6] ? A_EXTL : A_EXTW;
          dec.has_dst = 1'b1; dec.dst_reg = op[2:0]; dec.dst_read = 1'b1;
          dec.write_back = 1'b1; dec.set_cc = 1'b1;
        end else if (op[11:6] == 6'b000011) begin // MOVE from SR
          dec.sz = SZ_WORD; dec.asel = A_SR;
          dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          dec.write_back = 1'b1;
        end else if (op[11:6] == 6'b010011 || op[11:6] == 6'b011011) begin // to CCR / SR
          dec.kind = EX_SRW; dec.srw = SRW_MOVE; dec.sz = SZ_WORD;
          dec.srw_ccr = !op[9]; dec.priv = op[9];
          dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
        end else if (op[7:6] != 2'b11 && (op[11:8] == 4'h2 || op[11:8] == 4'h4 ||
                                          op[11:8] == 4'h6 || op[11:8] == 4'hA)) begin
          dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          unique case (op[11:8])
            4'h2: begin dec.alu = ALU_CLR; dec.write_back = 1'b1; end
            4'h4: begin dec.alu = ALU_NEG; dec.write_back = 1'b1; dec.dst_read = 1'b1; end
            4'h6: begin dec.alu = ALU_NOT; dec.write_back = 1'b1; dec.dst_read = 1'b1; end
            default: begin dec.alu = ALU_PASS; dec.asel = A_ZERO; dec.dst_read = 1'b1; end
          endcase
          dec.set_cc = 1'b1;
          if (op[5:3] == 3'd1) dec.illegal = 1'b1;
        end else begin
          dec.illegal = 1'b1;
        end
      end
      4'h5: begin
        if (op[7:6] == 2'b11) begin
          if (op[5:3] == 3'd1) begin
            dec.kind = EX_DBCC;
          end else begin // Scc
            dec.sz = SZ_BYTE; dec.asel = A_SCC;
            dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
            dec.write_back = 1'b1;
          end
        end else begin // ADDQ / SUBQ
          dec.alu = op[8] ? ALU_SUB : ALU_ADD;
          dec.use_quick = 1'b1;
          dec.quick = {28'd0, (op[11:9] == 3'd0), op[11:9]};
          dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          dec.dst_read = 1'b1; dec.write_back = 1'b1;
          dec.set_cc = (op[5:3] != 3'd1);
          if (op[5:3] == 3'd1) begin
            dec.sz = SZ_LONG;
            if (op[7:6] == 2'b00) dec.illegal = 1'b1;
          end
        end
      end
      4'h6: dec.kind = EX_BCC;
      4'h7: begin // MOVEQ
        dec.sz = SZ_LONG; dec.use_quick = 1'b1;
        dec.quick = {{24{op[7]}}, op[7:0]};
        dec.has_dst = 1'b1; dec.dst_reg = op[11:9];
        dec.write_back = 1'b1; dec.set_cc = 1'b1;
        if (op[8]) dec.illegal = 1'b1;
      end
      4'h8, 4'h9, 4'hB, 4'hC, 4'hD: begin
        unique case (op[15:12])
          4'h8:    dec.alu = ALU_OR;
          4'h9:    dec.alu = ALU_SUB;
          4'hB:    dec.alu = op[8] ? ALU_EOR : ALU_CMP;
          4'hC:    dec.alu = ALU_AND;
          default: dec.alu = ALU_ADD;
        endcase
        dec.write_back = (dec.alu != ALU_CMP);
        dec.set_cc = 1'b1;
        if (op[7:6] == 2'b11) begin
          if (op[15:12] == 4'hC) begin // MULU.W / MULS.W <ea>,Dn
            dec.kind = op[8] ? EX_MULS : EX_MULU; dec.sz = SZ_WORD;
            dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
            dec.has_dst = 1'b1; dec.dst_reg = op[11:9]; dec.dst_read = 1'b1;
          end else if (op[15:12] == 4'h8) begin // DIVU.W / DIVS.W <ea>,Dn
            dec.kind = op[8] ? EX_DIVS : EX_DIVU; dec.sz = SZ_WORD;
            dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
            dec.has_dst = 1'b1; dec.dst_reg = op[11:9]; dec.dst_read = 1'b1;
          end else if (op[15:12] == 4'h9 || op[15:12] == 4'hD) begin // SUBA / ADDA
            dec.sz = op[8] ? SZ_LONG : SZ_WORD;
            dec.asel = op[8] ? A_SOURCE : A_SEXTW;
            dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
            dec.has_dst = 1'b1; dec.dst_mode = 3'd1; dec.dst_reg = op[11:9];
            dec.dst_read = 1'b1; dec.set_cc = 1'b0;
          end else begin
            dec.illegal = 1'b1; // CMPA
          end
        end else if ((op[15:12] == 4'h8 || op[15:12] == 4'hC) && op[8:4] == 5'b10000) begin
          // SBCD / ABCD: Dy,Dx or -(Ay),-(Ax)
          dec.sz = SZ_BYTE; dec.bcd = (op[15:12] == 4'hC) ? 2'd1 : 2'd2;
          dec.has_src = 1'b1; dec.src_mode = op[3] ? 3'd4 : 3'd0; dec.src_reg = op[2:0];
          dec.has_dst = 1'b1; dec.dst_mode = op[3] ? 3'd4 : 3'd0; dec.dst_reg = op[11:9];
          dec.dst_read = 1'b1;
        end else if (!op[8] || op[15:12] == 4'hB && op[8] == 1'b0) begin // <ea>,Dn
          dec.has_src = 1'b1; dec.src_mode = op[5:3]; dec.src_reg = op[2:0];
          dec.has_dst = 1'b1; dec.dst_reg = op[11:9]; dec.dst_read = 1'b1;
        end else begin // Dn,<ea>
          dec.has_src = 1'b1; dec.src_reg = op[11:9];
          dec.has_dst = 1'b1; dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          dec.dst_read = 1'b1;
          // ADDX, SUBX, ABCD, SBCD, EXG, CMPM are not built.
          if (op[5:3] == 3'd1 || (op[5:3] == 3'd0 && op[15:12] != 4'hB)) dec.illegal = 1'b1;
        end
      end
      4'hE: begin // shifts and rotates
        dec.use_sh = 1'b1; dec.set_cc = 1'b1; dec.write_back = 1'b1;
        dec.has_dst = 1'b1; dec.dst_read = 1'b1;
        if (op[7:6] == 2'b11) begin // memory form, by one
          dec.sz = SZ_WORD;
          dec.use_quick = 1'b1; dec.quick = 32'd1;
          dec.dst_mode = op[5:3]; dec.dst_reg = op[2:0];
          if (op[11] || op[5:3] < 3'd2) dec.illegal = 1'b1;
        end else begin
          dec.dst_reg = op[2:0];
          if (op[5]) begin // count in a data register
            dec.has_src = 1'b1; dec.src_reg = op[11:9];
          end else begin
            dec.use_quick = 1'b1;
            dec.quick = {28'd0, (op[11:9] == 3'd0), op[11:9]};
          end
        end
        // kind: 00 AS, 01 LS, 10 ROX, 11 RO; direction op[8] (1 = left)
        sh_kind = (op[7:6] == 2'b11) ? op[10:9] : op[4:3];
        unique case (sh_kind)
          2'b00:   dec.sh = op[8] ? SH_ASL  : SH_ASR;
          2'b01:   dec.sh = op[8] ? SH_LSL  : SH_LSR;
          2'b10:   dec.sh = op[8] ? SH_ROXL : SH_ROXR;
          default: dec.sh = op[8] ? SH_ROL  : SH_ROR;
        endcase
      end
      4'hA: begin dec.kind = EX_TRAP; dec.vec = 8'd10; end
      4'hF: begin dec.kind = EX_TRAP; dec.vec = 8'd11; end
      default: dec.illegal = 1'b1;
    endcase
  end

  // ------------------------------------------------------------------
  // Register-file read selects and functional-unit operand selection
  // ------------------------------------------------------------------
  // Division works on magnitudes; DIVS restores the signs at the end.
  logic        div_signed, div_neg_q, div_neg_r;
  logic [15:0] div_abs, div_q, div_r;
  logic [31:0] dvd_abs;
  assign div_signed = (r.dec.kind == EX_DIVS);
  assign div_neg_q  = div_signed && (r.dest[31] ^ r.source[15]);
  assign div_neg_r  = div_signed && r.dest[31];
  assign div_abs    = (div_signed && r.source[15]) ? 16'(-r.source[15:0]) : r.source[15:0];
  assign dvd_abs    = div_neg_r ? -r.dest : r.dest;
  assign div_q      = div_neg_q ? 16'(-r.temp[15:0]) : r.temp[15:0];
  assign div_r      = div_neg_r ? 16'(-r.temp[31:16]) : r.temp[31:16];

  // MULS multiplies the magnitudes in the MULU loop and negates at the end.
  logic        muls;
  logic [15:0] mul_abs_s, mul_abs_d;
  assign muls      = (r.dec.kind == EX_MULS);
  assign mul_abs_s = (muls && r.source[15]) ? 16'(-r.source[15:0]) : r.source[15:0];
  assign mul_abs_d = (muls && r.dest[15])   ? 16'(-r.dest[15:0])   : r.dest[15:0];

  logic sp_state;
  always_comb begin
    sp_state = state inside {S_JSR0, S_RTE2, S_EXC1, S_EXC2, S_PEA0,
                             S_LINK0, S_LINK1, S_LINK2, S_UNLK1} ||
               (state == S_EXEC && r.dec.kind inside {EX_RTS, EX_RTE});
    rd_a_sel = sp_state ? 4'd15 : {r.ea_mode != 3'd0, r.ea_reg};
    rd_b_sel = {state inside {S_LINK0, S_UNLK0}, r.ir[2:0]};   // An for LINK/UNLK
  end

  logic [4:0] cc_now;
  assign cc_now = r.sr[4:0];

  always_comb begin
    alu_op   = ALU_NOP;
    alu_size = r.dec.sz;
    alu_a    = r.source;
    alu_b    = r.dest;
    sh_count = r.source[5:0];
    unique case (state)
      S_EXEC: begin
        alu_op = r.dec.alu;
        unique case (r.dec.asel)
          A_SEXTW: alu_a = {{16{r.source[15]}}, r.source[15:0]};
          A_SWAP:  alu_a = {r.dest[15:0], r.dest[31:16]};
          A_EXTW:  alu_a = {r.dest[31:16], {8{r.dest[7]}}, r.dest[7:0]};
          A_EXTL:  alu_a = {{16{r.dest[15]}}, r.dest[15:0]};
          A_SR:    alu_a = {16'd0, r.sr};
          A_SCC:   alu_a = {24'd0, {8{cond_true(r.ir[11:8], cc_now)}}};
          A_ZERO:  alu_a = r.dest;
          default: alu_a = r.source;
        endcase
        if (r.dec.dst_mode == 3'd1) alu_size = SZ_LONG; // address register target
      end
      S_INT_CHECK2: alu_op = ALU_SUB_3BIT;
      S_MULU0: begin alu_op = ALU_SIGNEX_ONE; alu_b = {16'd0, mul_abs_s}; end
      S_MULU3: begin alu_op = ALU_ADD; alu_size = SZ_LONG; alu_b = r.temp; end
      S_MULU6:      alu_op = ALU_SHIFT_R;
      S_MULU_WRITE: begin
        alu_op = ALU_PASS; alu_size = SZ_LONG; alu_a = r.mul_neg ? -r.temp : r.temp;
      end
      S_DIVU1: begin
        alu_op = ALU_SUB; alu_size = SZ_LONG;
        alu_a = {16'd0, div_abs}; alu_b = {15'd0, r.temp[31:15]};
      end
      S_EXC5, S_EXC6: alu_op = ALU_SHIFT_L;
      default: ;
    endcase
  end

  // ------------------------------------------------------------------
  // Control unit: one case item per state; every command defaults to idle
  // ------------------------------------------------------------------
  // Bus-cycle acknowledge shared by read4/read12/write4/write12: DTACK, or
  // the end of a 6800 peripheral transfer.
  // Decimal add (d + s + x) or subtract (d - s - x) of two BCD bytes:
  // binary arithmetic, then a correction of 6 per digit that carried or
  // borrowed.  Returns {carry/borrow, result}.
  function automatic logic [8:0] bcd_op(input logic add, input logic [7:0] s,
                                        input logic [7:0] d, input logic x);
    logic [9:0] t;
    logic       lo, c;
    if (add) begin
      lo = ({1'b0, d[3:0]} + {1'b0, s[3:0]} + 5'(x)) > 5'd9;
      t  = {2'b00, d} + {2'b00, s} + 10'(x) + (lo ? 10'h6 : 10'h0);
      c  = t > 10'h99;
      if (c) t = t + 10'h60;
    end else begin
      lo = {1'b0, d[3:0]} < ({1'b0, s[3:0]} + 5'(x));
      c  = {2'b00, d} < ({2'b00, s} + 10'(x));
      t  = {2'b00, d} - {2'b00, s} - 10'(x) - (lo ? 10'h6 : 10'h0);
      if (c) t = t - 10'h60;
    end
    return {c, t[7:0]};
  endfunction
  logic [8:0] bcd_r;
  logic [31:0] bit_mask;

  logic bus_ack;
  assign bus_ack = !dtack_n || r.periph_ack;

  logic [31:0] result;
  logic [4:0]  result_cc;
  logic [2:0]  inc;
  logic        cond;
  logic [15:0] srw_new;

  always_comb begin
    nx           = r;
    next_state   = state;
    return_state = state;
    st_ctrl      = ST_IDLE;
    addr_ctrl    = CTRL_IDLE;
    as_ctrl      = CTRL_IDLE;
    rw_ctrl      = CTRL_IDLE;
    uds_ctrl     = CTRL_IDLE;
    fc_ctrl      = FC_IDLE;
    dbus_ctrl    = DB_IDLE;
    databus_ctrl = DBS_EAR;
    rf_we        = 1'b0;
    rf_wsel      = {r.ea_mode != 3'd0, r.ea_reg};
    rf_wsize     = SZ_LONG;
    rf_wdata     = '0;
    result       = r.dec.use_sh ? sh_out : alu_out;
    result_cc    = r.dec.use_sh ? sh_cc  : alu_cc;
    if (r.dec.dst_mode == 3'd1 && r.dec.asel == A_SOURCE && r.dec.alu == ALU_PASS &&
        r.dec.sz == SZ_WORD)
      result = {{16{r.source[15]}}, r.source[15:0]};  // MOVEA.W
    bcd_r        = '0;
    bit_mask     = '0;
    if (r.dec.tas) result = alu_out | 32'h80;
    if (r.dec.bitop) begin
      bit_mask = 32'd1 << ((r.dec.dst_mode == 3'd0) ? r.source[4:0] : {2'b00, r.source[2:0]});
      unique case (r.ir[7:6])
        2'b00:   result = r.dest;                 // BTST
        2'b01:   result = r.dest ^ bit_mask;      // BCHG
        2'b10:   result = r.dest & ~bit_mask;     // BCLR
        default: result = r.dest | bit_mask;      // BSET
      endcase
      result_cc = {r.sr[CC_X], r.sr[CC_N], (r.dest & bit_mask) == 32'd0, r.sr[CC_V], r.sr[CC_C]};
    end
    if (r.dec.bcd != 2'd0) begin
      bcd_r = bcd_op(r.dec.bcd == 2'd1,
                     (r.dec.bcd == 2'd3) ? r.dest[7:0] : r.source[7:0],
                     (r.dec.bcd == 2'd3) ? 8'd0 : r.dest[7:0], r.sr[CC_X]);
      result    = {r.dest[31:8], bcd_r[7:0]};
      // X = C = decimal carry; Z only cleared by a non-zero result; N, V kept.
      result_cc = {bcd_r[8], r.sr[CC_N], r.sr[CC_Z] && bcd_r[7:0] == 8'd0, r.sr[CC_V], bcd_r[8]};
    end
    inc          = (r.dec.sz == SZ_BYTE && r.ea_reg == 3'd7) ? 3'd2 : size_bytes(r.dec.sz);
    cond         = cond_true(r.ir[11:8], cc_now);
    srw_new      = '0;

    unique case (state)
      // ---------------- reset sequence ----------------
      S_RESET_WAIT: begin
        nx.cnt = r.cnt + 1'b1;
        if (r.cnt == CW'(RESET_CLOCKS - 1)) next_state = S_RESET123;
      end
      S_RESET123: begin
        nx = '0;
        nx.sr = 16'h2700;
        next_state = S_RESET124;
        st_ctrl = ST_RESET;
      end
      S_RESET124: begin
        nx.ear = 32'd0; nx.size = SZ_LONG; nx.fc_prog = 1'b1;
        return_state = S_RESET125; st_ctrl = ST_PUSH; next_state = S_READ0;
      end
      S_RESET125: begin
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = r.temp_l;
        next_state = S_RESET126;
      end
      S_RESET126: begin
        nx.ear = 32'd4; nx.size = SZ_LONG; nx.fc_prog = 1'b1;
        return_state = S_RESET127; st_ctrl = ST_PUSH; next_state = S_READ0;
      end
      S_RESET127: begin
        nx.pc = r.temp_l; nx.fc_prog = 1'b0;
        next_state = S_READ_IR0;
      end

      // ---------------- fetch and decode ----------------
      S_READ_IR0: begin
        if (!br_n) begin
          next_state = S_BGRANT0;
        end else if (!halt_n) begin
          next_state = S_READ_IR0;      // halted at the instruction boundary
        end else begin
          nx.ear = r.pc; nx.size = SZ_WORD; nx.fc_prog = 1'b1;
          nx.trace_pend = r.sr[15];
          return_state = S_READ_IR1; st_ctrl = ST_PUSH; next_state = S_READ0;
        end
      end
      S_READ_IR1: begin
        nx.ir = r.temp_l[15:0]; nx.pc = r.pc + 32'd2; nx.fc_prog = 1'b0;
        next_state = S_DECODE;
      end
      S_DECODE: begin
        nx.dec = dec;
        nx.source = dec.quick;
        if (dec.illegal || (dec.priv && !r.sr[13])) begin
          nx.vec = dec.illegal ? 8'd4 : 8'd8;
          nx.pc  = r.pc - 32'd2;
          next_state = S_EXC0;
        end else if (dec.has_src) begin
          nx.ea_dst = 1'b0; nx.ea_mode = dec.src_mode; nx.ea_reg = dec.src_reg;
          return_state = S_EXEC; st_ctrl = ST_PUSH; next_state = S_EA_START;
        end else if (dec.has_dst) begin
          nx.ea_dst = 1'b1; nx.ea_mode = dec.dst_mode; nx.ea_reg = dec.dst_reg;
          return_state = S_EXEC; st_ctrl = ST_PUSH; next_state = S_EA_START;
        end else begin
          next_state = S_EXEC;
        end
      end

      // ---------------- read cycle ----------------
      S_READ0: begin
        fc_ctrl = r.iack ? FC_LOAD_INT : FC_LOAD; rw_ctrl = CTRL_LOAD;
        next_state = S_READ1;
      end
      S_READ1: begin
        databus_ctrl = DBS_EAR; addr_ctrl = CTRL_LOAD;
        next_state = S_READ2;
      end
      S_READ2: begin
        as_ctrl = CTRL_LOAD; uds_ctrl = CTRL_LOAD;
        next_state = S_READ4;
      end
      S_READ4, S_READ12: begin
        if (bus_ack) begin
          nx.be = 1'b0; next_state = (state == S_READ4) ? S_READ5 : S_READ13;
        end else if (!berr_n) begin
          nx.be = 1'b1; next_state = (state == S_READ4) ? S_READ5 : S_READ13;
        end else if (!vpa_n && r.iack) begin
          nx.autovec = 1'b1; next_state = S_READ5;
        end else if (!vpa_n) begin
          return_state = state; st_ctrl = ST_PUSH; next_state = S_PERIPH0;
        end else begin
          return_state = state; st_ctrl = ST_PUSH; next_state = S_WAIT0;
        end
      end
      S_READ5, S_READ13: begin
        nx.rdata = dbus_i;
        next_state = (state == S_READ5) ? S_READ6 : S_READ14;
      end
      S_READ6: begin
        as_ctrl = CTRL_RESET; uds_ctrl = CTRL_RESET;
        nx.periph_ack = 1'b0; nx.vma = 1'b0;
        if (r.be && !r.iack) begin
          next_state = S_BUSERROR;
        end else if (r.size == SZ_LONG) begin
          nx.temp_l[31:16] = r.rdata;
          next_state = S_READ7;
        end else begin
          if (r.size == SZ_BYTE) nx.temp_l = {24'd0, r.ear[0] ? r.rdata[7:0] : r.rdata[15:8]};
          else                   nx.temp_l = {16'd0, r.rdata};
          st_ctrl = ST_PULL; next_state = saved;
        end
      end
      S_READ7: begin
        nx.ear = r.ear + 32'd2;
        next_state = S_READ9;
      end
      S_READ9: begin
        databus_ctrl = DBS_EAR; addr_ctrl = CTRL_LOAD;
        next_state = S_READ10;
      end
      S_READ10: begin
        as_ctrl = CTRL_LOAD; uds_ctrl = CTRL_LOAD;
        next_state = S_READ12;
      end
      S_READ14: begin
        as_ctrl = CTRL_RESET; uds_ctrl = CTRL_RESET;
        nx.periph_ack = 1'b0; nx.vma = 1'b0;
        nx.ear = r.ear - 32'd2;
        if (r.be) begin
          next_state = S_BUSERROR;
        end else begin
          nx.temp_l[15:0] = r.rdata;
          st_ctrl = ST_PULL; next_state = saved;
        end
      end

      // ---------------- wait states and 6800 peripheral cycle ----------------
      S_WAIT0: next_state = S_WAIT1;
      S_WAIT1: begin st_ctrl = ST_PULL; next_state = saved; end
      S_PERIPH0: begin
        if (e_low_start) begin nx.vma = 1'b1; next_state = S_PERIPH1; end
      end
      S_PERIPH1: begin
        if (e_fall) begin
          nx.periph_ack = 1'b1; st_ctrl = ST_PULL; next_state = saved;
        end
      end

      // ---------------- write cycle ----------------
      S_WRITE0: begin
        fc_ctrl = FC_LOAD; rw_ctrl = CTRL_LOAD;
        next_state = S_WRITE1;
      end
      S_WRITE1, S_WRITE9: begin
        databus_ctrl = DBS_EAR; addr_ctrl = CTRL_LOAD;
        next_state = (state == S_WRITE1) ? S_WRITE2 : S_WRITE10;
      end
      S_WRITE2, S_WRITE10: begin
        as_ctrl = CTRL_LOAD; rw_ctrl = CTRL_RESET;
        next_state = (state == S_WRITE2) ? S_WRITE3 : S_WRITE11;
      end
      S_WRITE3, S_WRITE11: begin
        databus_ctrl = DBS_TEMP;
        dbus_ctrl = (state == S_WRITE3 && r.size == SZ_LONG) ? DB_LOAD_HI : DB_LOAD;
        uds_ctrl = CTRL_LOAD;
        next_state = (state == S_WRITE3) ? S_WRITE4 : S_WRITE12;
      end
      S_WRITE4, S_WRITE12: begin
        if (bus_ack) begin
          nx.be = 1'b0; next_state = (state == S_WRITE4) ? S_WRITE5 : S_WRITE13;
        end else if (!berr_n) begin
          nx.be = 1'b1; next_state = (state == S_WRITE4) ? S_WRITE5 : S_WRITE13;
        end else if (!vpa_n) begin
          return_state = state; st_ctrl = ST_PUSH; next_state = S_PERIPH0;
        end else begin
          return_state = state; st_ctrl = ST_PUSH; next_state = S_WAIT0;
        end
      end
      S_WRITE5:  next_state = S_WRITE6;
      S_WRITE13: next_state = S_WRITE14;
      S_WRITE6, S_WRITE14: begin
        as_ctrl = CTRL_RESET; uds_ctrl = CTRL_RESET;
        nx.periph_ack = 1'b0; nx.vma = 1'b0;
        next_state = (state == S_WRITE6) ? S_WRITE7 : S_WRITE15;
      end
      S_WRITE7, S_WRITE15: begin
        dbus_ctrl = DB_RESET; rw_ctrl = CTRL_LOAD;
        if (state == S_WRITE15) nx.ear = r.ear - 32'd2;
        if (r.be) begin
          next_state = S_BUSERROR;
        end else if (state == S_WRITE7 && r.size == SZ_LONG) begin
          next_state = S_WRITE8;
        end else begin
          st_ctrl = ST_PULL; next_state = saved;
        end
      end
      S_WRITE8: begin
        nx.ear = r.ear + 32'd2;
        next_state = S_WRITE9;
      end

      // ---------------- effective address sequences ----------------
      S_EA_START: begin
        unique case (r.ea_mode)
          3'd0, 3'd1: begin nx.opnd = rd_a; next_state = S_EA_DONE; end
          3'd2: begin nx.ear = rd_a; next_state = S_EA_READ; end
          3'd3: begin
            nx.ear = rd_a;
            rf_we = 1'b1; rf_wdata = rd_a + 32'(inc);
            next_state = S_EA_READ;
          end
          3'd4: begin
            nx.ear = rd_a - 32'(inc);
            rf_we = 1'b1; rf_wdata = rd_a - 32'(inc);
            next_state = S_EA_READ;
          end
          3'd5: begin
            nx.ear = r.pc; nx.size = SZ_WORD; nx.fc_prog = 1'b1;
            return_state = S_EA_D16; st_ctrl = ST_PUSH; next_state = S_READ0;
          end
          3'd7: begin
            nx.ear = r.pc; nx.fc_prog = 1'b1; st_ctrl = ST_PUSH; next_state = S_READ0;
            unique case (r.ea_reg)
              3'd0: begin nx.size = SZ_WORD; return_state = S_EA_ABSW; end
              3'd1: begin nx.size = SZ_LONG; return_state = S_EA_ABSL; end
              3'd2: begin nx.size = SZ_WORD; return_state = S_EA_PCD16; end
              3'd4: begin
                nx.size = (r.dec.sz == SZ_LONG) ? SZ_LONG : SZ_WORD;
                return_state = S_EA_IMM;
              end
              default: begin
                st_ctrl = ST_RESET; nx.vec = 8'd4; nx.pc = r.pc - 32'd2;
                next_state = S_EXC0;
              end
            endcase
          end
          default: begin // d8(An,Xn) is not built
            st_ctrl = ST_RESET; nx.vec = 8'd4; nx.pc = r.pc - 32'd2;
            next_state = S_EXC0;
          end
        endcase
      end
      S_EA_D16: begin
        nx.ear = rd_a + {{16{r.temp_l[15]}}, r.temp_l[15:0]};
        nx.pc = r.pc + 32'd2; nx.fc_prog = 1'b0;
        next_state = S_EA_READ;
      end
      S_EA_PCD16: begin
        nx.ear = r.pc + {{16{r.temp_l[15]}}, r.temp_l[15:0]};
        nx.pc = r.pc + 32'd2; nx.fc_prog = 1'b0;
        next_state = S_EA_READ;
      end
      S_EA_ABSW: begin
        nx.ear = {{16{r.temp_l[15]}}, r.temp_l[15:0]};
        nx.pc = r.pc + 32'd2; nx.fc_prog = 1'b0;
        next_state = S_EA_READ;
      end
      S_EA_ABSL: begin
        nx.ear = r.temp_l; nx.pc = r.pc + 32'd4; nx.fc_prog = 1'b0;
        next_state = S_EA_READ;
      end
      S_EA_IMM: begin
        unique case (r.dec.sz)
          SZ_BYTE: nx.opnd = {24'd0, r.temp_l[7:0]};
          SZ_WORD: nx.opnd = {16'd0, r.temp_l[15:0]};
          default: nx.opnd = r.temp_l;
        endcase
        nx.pc = r.pc + ((r.dec.sz == SZ_LONG) ? 32'd4 : 32'd2); nx.fc_prog = 1'b0;
        next_state = S_EA_DONE;
      end
      S_EA_READ: begin
        nx.fc_prog = 1'b0;
        if (!r.ea_dst && r.dec.src_addr_only) begin
          nx.opnd = r.ear; next_state = S_EA_DONE;
        end else if (r.ea_dst && !r.dec.dst_read) begin
          next_state = S_EA_DONE;
        end else begin
          nx.size = r.dec.sz;
          return_state = S_EA_RDONE; st_ctrl = ST_PUSH; next_state = S_READ0;
        end
      end
      S_EA_RDONE: begin
        nx.opnd = r.temp_l; next_state = S_EA_DONE;
      end
      S_EA_DONE: begin
        if (!r.ea_dst) begin
          nx.source = r.opnd;
          if (r.dec.has_dst) begin
            nx.ea_dst = 1'b1; nx.ea_mode = r.dec.dst_mode; nx.ea_reg = r.dec.dst_reg;
            next_state = S_EA_START;
          end else begin
            st_ctrl = ST_PULL; next_state = saved;
          end
        end else begin
          nx.dest = r.opnd;
          st_ctrl = ST_PULL; next_state = saved;
        end
      end

      // ---------------- execution ----------------
      S_EXEC: begin
        unique case (r.dec.kind)
          EX_ALU: begin
            if (r.dec.set_cc) nx.sr[4:0] = result_cc;
            next_state = S_INT_CHECK0;
            if (r.dec.write_back) begin
              if (r.dec.dst_mode == 3'd0) begin
                rf_we = 1'b1; rf_wsel = {1'b0, r.dec.dst_reg};
                rf_wsize = r.dec.bitop ? SZ_LONG : r.dec.sz; rf_wdata = result;
              end else if (r.dec.dst_mode == 3'd1) begin
                rf_we = 1'b1; rf_wsel = {1'b1, r.dec.dst_reg};
                rf_wsize = SZ_LONG; rf_wdata = result;
              end else begin
                nx.temp = result; nx.size = r.dec.sz; nx.fc_prog = 1'b0;
                return_state = S_INT_CHECK0; st_ctrl = ST_PUSH; next_state = S_WRITE0;
              end
            end
          end
          EX_MULU, EX_MULS: next_state = S_MULU0;
          EX_DIVU, EX_DIVS: next_state = S_DIVU0;
          EX_PEA:  next_state = S_PEA0;
          EX_LINK: next_state = S_LINK0;
          EX_UNLK: next_state = S_UNLK0;
          EX_BCC: begin
            if (r.ir[7:0] == 8'd0) begin
              nx.ear = r.pc; nx.size = SZ_WORD; nx.fc_prog = 1'b1;
              return_state = S_BCC1; st_ctrl = ST_PUSH; next_state = S_READ0;
            end else if (r.ir[11:8] == 4'h1) begin // BSR.S
              nx.source = r.pc + {{24{r.ir[7]}}, r.ir[7:0]};
              next_state = S_JSR0;
            end else begin
              if (r.ir[11:8] == 4'h0 || cond) nx.pc = r.pc + {{24{r.ir[7]}}, r.ir[7:0]};
              next_state = S_INT_CHECK0;
            end
          end
          EX_DBCC: begin
            if (cond) begin
              nx.pc = r.pc + 32'd2; next_state = S_INT_CHECK0;
            end else begin
              rf_we = 1'b1; rf_wsel = {1'b0, r.ir[2:0]}; rf_wsize = SZ_WORD;
              rf_wdata = rd_b - 32'd1;
              if (rd_b[15:0] == 16'd0) begin
                nx.pc = r.pc + 32'd2; next_state = S_INT_CHECK0;
              end else begin
                nx.ear = r.pc; nx.size = SZ_WORD; nx.fc_prog = 1'b1;
                return_state = S_DBCC1; st_ctrl = ST_PUSH; next_state = S_READ0;
              end
            end
          end
          EX_JMP: begin nx.pc = r.source; next_state = S_INT_CHECK0; end
          EX_JSR: next_state = S_JSR0;
          EX_LEA: begin
            rf_we = 1'b1; rf_wsel = {1'b1, r.ir[11:9]}; rf_wdata = r.source;
            next_state = S_INT_CHECK0;
          end
          EX_RTS: begin
            nx.ear = rd_a; nx.size = SZ_LONG;
            rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a + 32'd4;
            return_state = S_RTS1; st_ctrl = ST_PUSH; next_state = S_READ0;
          end
          EX_RTE: begin
            nx.ear = rd_a; nx.size = SZ_WORD;
            return_state = S_RTE1; st_ctrl = ST_PUSH; next_state = S_READ0;
          end
          EX_RESET: begin
            nx.cnt = '0; nx.rst_out = 1'b1; next_state = S_RESET_INSTR;
          end
          EX_TRAP: begin nx.vec = r.dec.vec; next_state = S_EXC0; end
          EX_SRW: begin
            unique case (r.dec.srw)
              SRW_OR:  srw_new = r.sr | r.source[15:0];
              SRW_AND: srw_new = r.sr & r.source[15:0];
              SRW_EOR: srw_new = r.sr ^ r.source[15:0];
              default: srw_new = r.source[15:0];
            endcase
            if (r.dec.srw_ccr) nx.sr[7:0] = {3'b000, srw_new[4:0]};
            else               nx.sr      = srw_new & 16'hA71F;
            next_state = S_INT_CHECK0;
          end
          default: next_state = S_INT_CHECK0; // NOP
        endcase
      end

      S_BCC1: begin
        if (r.ir[11:8] == 4'h1) begin // BSR.W
          nx.source = r.pc + {{16{r.temp_l[15]}}, r.temp_l[15:0]};
          nx.pc = r.pc + 32'd2;
          next_state = S_JSR0;
        end else begin
          if (r.ir[11:8] == 4'h0 || cond) nx.pc = r.pc + {{16{r.temp_l[15]}}, r.temp_l[15:0]};
          else                            nx.pc = r.pc + 32'd2;
          nx.fc_prog = 1'b0;
          next_state = S_INT_CHECK0;
        end
      end
      S_DBCC1: begin
        nx.pc = r.pc + {{16{r.temp_l[15]}}, r.temp_l[15:0]}; nx.fc_prog = 1'b0;
        next_state = S_INT_CHECK0;
      end
      S_JSR0: begin
        nx.temp = r.pc; nx.size = SZ_LONG; nx.fc_prog = 1'b0;
        nx.ear = rd_a - 32'd4;
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a - 32'd4;
        return_state = S_JSR1; st_ctrl = ST_PUSH; next_state = S_WRITE0;
      end
      S_JSR1: begin nx.pc = r.source; next_state = S_INT_CHECK0; end

      // PEA: push the effective address like JSR pushes the PC.
      S_PEA0: begin
        nx.temp = r.source; nx.size = SZ_LONG; nx.fc_prog = 1'b0;
        nx.ear = rd_a - 32'd4;
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a - 32'd4;
        return_state = S_INT_CHECK0; st_ctrl = ST_PUSH; next_state = S_WRITE0;
      end
      // LINK An,#d: push An, An = SP, SP = SP + d (one register write each).
      S_LINK0: begin
        nx.temp = rd_b; nx.size = SZ_LONG; nx.fc_prog = 1'b0;
        nx.ear = rd_a - 32'd4;
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a - 32'd4;
        return_state = S_LINK1; st_ctrl = ST_PUSH; next_state = S_WRITE0;
      end
      S_LINK1: begin
        rf_we = 1'b1; rf_wsel = {1'b1, r.ir[2:0]}; rf_wdata = rd_a;
        next_state = S_LINK2;
      end
      S_LINK2: begin
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a + {{16{r.source[15]}}, r.source[15:0]};
        next_state = S_INT_CHECK0;
      end
      // UNLK An: SP = An, then An is popped from the stack.
      S_UNLK0: begin
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_b;
        nx.ear = rd_b; nx.size = SZ_LONG; nx.fc_prog = 1'b0;
        return_state = S_UNLK1; st_ctrl = ST_PUSH; next_state = S_READ0;
      end
      S_UNLK1: begin
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a + 32'd4;
        next_state = S_UNLK2;
      end
      S_UNLK2: begin
        rf_we = 1'b1; rf_wsel = {1'b1, r.ir[2:0]}; rf_wdata = r.temp_l;
        next_state = S_INT_CHECK0;
      end
      S_RTS1: begin nx.pc = r.temp_l; next_state = S_INT_CHECK0; end
      S_RTE1: begin
        nx.sr_save = r.temp_l[15:0]; nx.ear = r.ear + 32'd2; nx.size = SZ_LONG;
        return_state = S_RTE2; st_ctrl = ST_PUSH; next_state = S_READ0;
      end
      S_RTE2: begin
        nx.pc = r.temp_l;
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a + 32'd6;
        next_state = S_RTE3;
      end
      S_RTE3: begin nx.sr = r.sr_save & 16'hA71F; next_state = S_INT_CHECK0; end
      S_RESET_INSTR: begin
        nx.cnt = r.cnt + 1'b1;
        if (r.cnt == CW'(RESET_CLOCKS - 1)) begin
          nx.rst_out = 1'b0; next_state = S_INT_CHECK0;
        end
      end

      // ---------------- MULU.W shift-and-add ----------------
      S_MULU0: begin
        nx.dest   = alu_out;               // multiplier <ea> with ones above
        nx.source = {16'd0, mul_abs_d};    // multiplicand Dn.W
        nx.mul_neg = muls && (r.source[15] ^ r.dest[15]);
        nx.temp   = '0;                    // product accumulator
        next_state = S_MULU1;
      end
      S_MULU1: next_state = S_MULU2;
      S_MULU2: next_state = r.dest[0] ? S_MULU3 : S_MULU6;
      S_MULU3: begin nx.temp = alu_out; next_state = S_MULU4; end
      S_MULU4: next_state = S_MULU6;
      S_MULU6: begin
        nx.dest = alu_out; nx.source = {r.source[30:0], 1'b0};
        next_state = (alu_out[31:16] == 16'd0) ? S_MULU_WRITE : S_MULU2;
      end
      S_MULU_WRITE: begin
        nx.sr[3:0] = alu_cc[3:0];
        rf_we = 1'b1; rf_wsel = {1'b0, r.dec.dst_reg}; rf_wdata = alu_out;
        next_state = S_MULU_WAIT0;
      end
      // ---------------- DIVU.W restoring division ----------------
      // temp holds {remainder, quotient}: each step shifts it left by one and
      // the ALU subtracts the divisor from the 17-bit partial remainder; no
      // borrow means the subtraction stands and the quotient bit is one.
      S_DIVU0: begin
        nx.temp = dvd_abs; nx.cnt = '0;
        if (r.source[15:0] == 16'd0) begin
          nx.vec = 8'd5; next_state = S_EXC0;            // divide by zero
        end else if (dvd_abs[31:16] >= div_abs) begin
          nx.sr[CC_V] = 1'b1; nx.sr[CC_C] = 1'b0;          // quotient overflow
          next_state = S_INT_CHECK0;
        end else begin
          next_state = S_DIVU1;
        end
      end
      S_DIVU1: begin
        if (alu_cc[CC_C]) nx.temp = {r.temp[30:0], 1'b0};
        else              nx.temp = {alu_out[15:0], r.temp[14:0], 1'b1};
        nx.cnt = r.cnt + 1'b1;
        if (r.cnt == CW'(15)) next_state = S_DIVU_WRITE;
      end
      S_DIVU_WRITE: begin
        nx.sr[CC_C] = 1'b0;
        next_state = S_INT_CHECK0;
        if (div_signed && r.temp[15:0] > (div_neg_q ? 16'h8000 : 16'h7FFF)) begin
          nx.sr[CC_V] = 1'b1;                              // signed quotient overflow
        end else begin
          nx.sr[CC_N] = div_q[15]; nx.sr[CC_Z] = (div_q == 16'd0); nx.sr[CC_V] = 1'b0;
          rf_we = 1'b1; rf_wsel = {1'b0, r.dec.dst_reg}; rf_wsize = SZ_LONG;
          rf_wdata = {div_r, div_q};
        end
      end

      S_MULU_WAIT0: next_state = S_MULU_WAIT1;
      S_MULU_WAIT1: next_state = S_MULU_WAIT2;
      S_MULU_WAIT2: next_state = S_INT_CHECK0;

      // ---------------- interrupt check ----------------
      S_INT_CHECK0: begin
        if (r.trace_pend) begin
          nx.trace_pend = 1'b0; nx.vec = 8'd9; next_state = S_EXC0;
        end else begin
          nx.ipl_reg = ~ipl_n; nx.dest = {29'd0, ~ipl_n};
          next_state = S_INT_CHECK1;
        end
      end
      S_INT_CHECK1: begin
        nx.source = {29'd0, r.sr[10:8]};
        next_state = S_INT_CHECK2;
      end
      S_INT_CHECK2: begin
        if (!alu_cc[CC_C] && !alu_cc[CC_Z]) begin
          nx.sr_save = r.sr;
          nx.sr[13] = 1'b1; nx.sr[15] = 1'b0; nx.sr[10:8] = r.ipl_reg;
          nx.exc_int = 1'b1; nx.in_exc = 1'b1;
          next_state = S_EXC1;
        end else begin
          next_state = S_READ_IR0;
        end
      end

      // ---------------- exception processing ----------------
      S_EXC0: begin
        nx.sr_save = r.sr; nx.sr[13] = 1'b1; nx.sr[15] = 1'b0;
        nx.in_exc = 1'b1; nx.trace_pend = 1'b0;
        next_state = S_EXC1;
      end
      S_EXC1: begin
        nx.temp = r.pc; nx.size = SZ_LONG; nx.fc_prog = 1'b0;
        nx.ear = rd_a - 32'd4;
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a - 32'd4;
        return_state = S_EXC2; st_ctrl = ST_PUSH; next_state = S_WRITE0;
      end
      S_EXC2: begin
        nx.temp = {16'd0, r.sr_save}; nx.size = SZ_WORD;
        nx.ear = rd_a - 32'd2;
        rf_we = 1'b1; rf_wsel = 4'd15; rf_wdata = rd_a - 32'd2;
        return_state = S_EXC3; st_ctrl = ST_PUSH; next_state = S_WRITE0;
      end
      S_EXC3: next_state = r.exc_int ? S_IACK0 : S_EXC4;
      S_IACK0: begin
        nx.ear = {8'd0, 20'hFFFFF, r.ipl_reg, 1'b1}; nx.size = SZ_BYTE;
        nx.iack = 1'b1; nx.autovec = 1'b0; nx.be = 1'b0;
        return_state = S_IACK1; st_ctrl = ST_PUSH; next_state = S_READ0;
      end
      S_IACK1: begin
        nx.iack = 1'b0; nx.exc_int = 1'b0; nx.be = 1'b0;
        if (r.autovec)   nx.vec = 8'd24 + {5'd0, r.ipl_reg};
        else if (r.be)   nx.vec = 8'd24;                  // spurious interrupt
        else             nx.vec = r.temp_l[7:0];
        next_state = S_EXC4;
      end
      S_EXC4: begin nx.dest = {24'd0, r.vec}; next_state = S_EXC5; end
      S_EXC5: begin nx.dest = alu_out; next_state = S_EXC6; end
      S_EXC6: begin
        nx.ear = alu_out; nx.size = SZ_LONG; nx.fc_prog = 1'b0;
        return_state = S_EXC7; st_ctrl = ST_PUSH; next_state = S_READ0;
      end
      S_EXC7: begin
        nx.pc = r.temp_l; nx.in_exc = 1'b0;
        next_state = S_READ_IR0;
      end
      S_BUSERROR: begin
        st_ctrl = ST_RESET;
        as_ctrl = CTRL_RESET; uds_ctrl = CTRL_RESET; dbus_ctrl = DB_RESET; rw_ctrl = CTRL_LOAD;
        nx.be = 1'b0; nx.periph_ack = 1'b0; nx.vma = 1'b0; nx.iack = 1'b0;
        if (r.in_exc) begin
          nx.halt_out = 1'b1; next_state = S_HALTED;   // double bus fault
        end else begin
          nx.vec = 8'd2; next_state = S_EXC0;
        end
      end
      S_HALTED: addr_ctrl = CTRL_RESET;

      // ---------------- bus arbitration ----------------
      S_BGRANT0: begin
        addr_ctrl = CTRL_RESET; nx.bg = 1'b1;
        next_state = S_BGRANT1;
      end
      S_BGRANT1: begin
        if (!bgack_n) nx.bg = 1'b0;
        if (br_n && bgack_n) begin nx.bg = 1'b0; next_state = S_READ_IR0; end
      end

      default: next_state = S_RESET_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_RESET_WAIT;
      r     <= '0;
    end else begin
      state <= next_state;
      r     <= nx;
    end
  end

  // The shared sequences never nest deeper than the stack.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!st_ovf) else $error("state stack overflow");
      assert (!st_unf) else $error("state stack underflow");
    end
  end

endmodule
