// m68k_pkg -- types and helpers shared by the 68000-compatible core.
//
// The core is organised as a control-unit state machine that issues a
// command to every register-control multiplexer in every state.  Most
// multiplexers understand the three common commands idle (hold), load
// (take the internal databus) and reset (go to the reset value, or high
// impedance for bus pins).  Those commands, the operand-size code, the ALU
// and shifter operation codes and the 68000 condition-code test live here.
//
// Following the 68000 programming model, the size code is 00 byte, 01 word,
// 10 long.  The command encodings reset=00, load=01, idle=11 follow the
// encoding a synthesis tool would pick for the type (reset, load, idle);
// everything else in this package is this design's own choice.
package m68k_pkg;

  typedef enum logic [1:0] {
    SZ_BYTE = 2'b00,
    SZ_WORD = 2'b01,
    SZ_LONG = 2'b10
  } size_t;

  // Common register-control multiplexer command.
  typedef enum logic [1:0] {
    CTRL_RESET = 2'b00,
    CTRL_LOAD  = 2'b01,
    CTRL_IDLE  = 2'b11
  } ctrl_t;

  // State-stack command (st_ctrl).
  typedef enum logic [1:0] {
    ST_IDLE  = 2'b00,
    ST_PUSH  = 2'b01,
    ST_PULL  = 2'b10,
    ST_RESET = 2'b11
  } st_ctrl_t;

  // Function-code multiplexer command.
  typedef enum logic [1:0] {
    FC_IDLE     = 2'b00,
    FC_RESET    = 2'b01,
    FC_LOAD     = 2'b10,  // user/supervisor x program/data
    FC_LOAD_INT = 2'b11   // interrupt acknowledge space (111)
  } fc_ctrl_t;

  // Data-bus output multiplexer command.
  typedef enum logic [1:0] {
    DB_IDLE    = 2'b00,
    DB_RESET   = 2'b01,  // release the data bus
    DB_LOAD    = 2'b10,  // drive the low word (or the byte on both halves)
    DB_LOAD_HI = 2'b11   // drive the high word of a long operand
  } dbus_ctrl_t;

  // ALU operations (alu_ctrl).  Result = f(a, b): a is the left (source)
  // operand, b the right (destination) operand.
  typedef enum logic [3:0] {
    ALU_NOP        = 4'd0,   // result = b, flags unchanged
    ALU_PASS       = 4'd1,   // result = a, N Z from a, V = C = 0 (MOVE)
    ALU_ADD        = 4'd2,   // b + a
    ALU_SUB        = 4'd3,   // b - a
    ALU_CMP        = 4'd4,   // b - a, X unaffected
    ALU_AND        = 4'd5,
    ALU_OR         = 4'd6,
    ALU_EOR        = 4'd7,
    ALU_NOT        = 4'd8,   // ~b
    ALU_NEG        = 4'd9,   // 0 - b
    ALU_SUB_3BIT   = 4'd10,  // b[2:0] - a[2:0] (interrupt level compare)
    ALU_SHIFT_L    = 4'd11,  // b << 1, 32 bit
    ALU_SHIFT_R    = 4'd12,  // b >> 1, 32 bit, zero fill
    ALU_SIGNEX_ONE = 4'd13,  // {16'hFFFF, b[15:0]}
    ALU_CLR        = 4'd14   // 0, N = 0 Z = 1 V = C = 0
  } alu_op_t;

  typedef enum logic [2:0] {
    SH_ASL = 3'd0, SH_ASR = 3'd1, SH_LSL = 3'd2, SH_LSR = 3'd3,
    SH_ROL = 3'd4, SH_ROR = 3'd5, SH_ROXL = 3'd6, SH_ROXR = 3'd7
  } shift_op_t;

  // Condition code bits inside the 5-bit CCR: {X, N, Z, V, C}.
  localparam int CC_C = 0, CC_V = 1, CC_Z = 2, CC_N = 3, CC_X = 4;

  // 68000 condition test used by Bcc, DBcc and Scc.
  function automatic logic cond_true(input logic [3:0] cc, input logic [4:0] ccr);
    logic n, z, v, c;
    n = ccr[CC_N]; z = ccr[CC_Z]; v = ccr[CC_V]; c = ccr[CC_C];
    unique case (cc)
      4'h0: return 1'b1;                 // T
      4'h1: return 1'b0;                 // F
      4'h2: return !c && !z;             // HI
      4'h3: return c || z;               // LS
      4'h4: return !c;                   // CC
      4'h5: return c;                    // CS
      4'h6: return !z;                   // NE
      4'h7: return z;                    // EQ
      4'h8: return !v;                   // VC
      4'h9: return v;                    // VS
      4'hA: return !n;                   // PL
      4'hB: return n;                    // MI
      4'hC: return n == v;               // GE
      4'hD: return n != v;               // LT
      4'hE: return !z && (n == v);       // GT
      default: return z || (n != v);    // LE
    endcase
  endfunction

  // Mask, sign bit position and byte count of an operand size.
  function automatic logic [31:0] size_mask(input size_t sz);
    unique case (sz)
      SZ_BYTE: return 32'h0000_00FF;
      SZ_WORD: return 32'h0000_FFFF;
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction

  function automatic int unsigned size_msb(input size_t sz);
    unique case (sz)
      SZ_BYTE: return 7;
      SZ_WORD: return 15;
      default: return 31;
    endcase
  endfunction

  function automatic logic [2:0] size_bytes(input size_t sz);
    unique case (sz)
      SZ_BYTE: return 3'd1;
      SZ_WORD: return 3'd2;
      default: return 3'd4;
    endcase
  endfunction

endpackage
