// m68k_shifter -- shift and rotate half of the functional unit.
//
// Purely combinational.  Performs the eight 68000 shift/rotate kinds
// (ASL, ASR, LSL, LSR, ROL, ROR, ROXL, ROXR) on a byte, word or long operand
// by a count of 0..63, and produces {X, N, Z, V, C}.  The size input matters
// for the rotates and for the flags, which is why the functional unit takes
// it.  The shift is written as a chain of up to 63 one-bit steps, each
// enabled while its index is below the count; this is the simplest circuit
// that gives the 68000 flag rules (C and X = last bit out, V = sign changed
// at any step of ASL, X kept by ROL/ROR and by a zero count).  Bits above
// the operand size pass through unchanged.  The step-chain structure is this
// design's choice; the document names the operations only.
module m68k_shifter
  import m68k_pkg::*;
(
  input  shift_op_t   op,
  input  size_t       size,
  input  logic [5:0]  count,
  input  logic [31:0] data,
  input  logic [4:0]  cc_in,    // {X, N, Z, V, C}
  output logic [31:0] result,
  output logic [4:0]  cc_out
);

  logic [31:0] mask, v;
  logic [4:0]  msb;
  logic        x, c, ovf, out_bit, sign;

  always_comb begin
    mask = size_mask(size);
    msb  = 5'(size_msb(size));
    v    = data & mask;
    x    = cc_in[CC_X];
    c    = 1'b0;
    ovf  = 1'b0;
    out_bit = 1'b0;
    sign    = 1'b0;
    for (int i = 0; i < 63; i++) begin
      if (i < int'(count)) begin
        sign = v[msb];
        unique case (op)
          SH_ASL, SH_LSL: begin
            out_bit = v[msb];
            v = (v << 1) & mask;
            if (op == SH_ASL && v[msb] != sign) ovf = 1'b1;
            c = out_bit; x = out_bit;
          end
          SH_ASR, SH_LSR: begin
            out_bit = v[0];
            v = v >> 1;
            if (op == SH_ASR) v[msb] = sign;
            c = out_bit; x = out_bit;
          end
          SH_ROL: begin
            out_bit = v[msb];
            v = ((v << 1) | {31'd0, out_bit}) & mask;
            c = out_bit;
          end
          SH_ROR: begin
            out_bit = v[0];
            v = v >> 1;
            v[msb] = out_bit;
            c = out_bit;
          end
          SH_ROXL: begin
            out_bit = v[msb];
            v = ((v << 1) | {31'd0, x}) & mask;
            x = out_bit; c = out_bit;
          end
          default: begin // SH_ROXR
            out_bit = v[0];
            v = v >> 1;
            v[msb] = x;
            x = out_bit; c = out_bit;
          end
        endcase
      end
    end
    // A zero count clears C, except ROXd which copies X into C.
    if (count == 6'd0 && (op == SH_ROXL || op == SH_ROXR)) c = x;
    result = (data & ~mask) | (v & mask);
    cc_out[CC_X] = x;
    cc_out[CC_N] = v[msb];
    cc_out[CC_Z] = (v == 32'd0);
    cc_out[CC_V] = ovf;
    cc_out[CC_C] = c;
  end

endmodule
