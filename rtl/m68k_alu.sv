// m68k_alu -- arithmetic and logic half of the functional unit.
//
// Purely combinational.  Two operands, a (left, source) and b (right,
// destination), and a size code feed the unit; it returns the result and
// the five condition codes {X, N, Z, V, C} computed on the low 8, 16 or 32
// bits.  Bits above the operand size pass through from b for byte and word
// operations, so a sized result can be written back to a register without
// disturbing its upper part.  Z is set when the low 8/16/32 bits are all
// zero and N copies the sign bit of the sized result, as the functional
// unit is described to do; X, V and C follow the 68000 rules.  Operations
// that leave a flag alone return its value from cc_in.
//
// The operation set covers what the control unit uses: add, subtract,
// compare, logic, negate, a 3-bit subtraction for the interrupt-level
// check, one-bit 32-bit shifts and the "sign extend with ones" step of the
// MULU loop (both named by the control-unit tables).  The exact list and the
// encoding are this design's choice.
module m68k_alu
  import m68k_pkg::*;
(
  input  alu_op_t     op,
  input  size_t       size,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  cc_in,     // {X, N, Z, V, C} before the operation
  output logic [31:0] result,
  output logic [4:0]  cc_out     // {X, N, Z, V, C} after the operation
);

  logic [31:0] mask;
  int unsigned msb;
  logic [32:0] sum;
  logic        sa, sb, sr;
  logic [3:0]  d3;

  always_comb begin
    mask   = size_mask(size);
    msb    = size_msb(size);
    result = b;
    cc_out = cc_in;
    sum    = '0;
    d3     = '0;
    sa     = a[msb];
    sb     = b[msb];
    sr     = 1'b0;

    unique case (op)
      ALU_NOP: ;
      ALU_PASS: begin
        result = (b & ~mask) | (a & mask);
        cc_out[CC_V] = 1'b0; cc_out[CC_C] = 1'b0;
      end
      ALU_ADD: begin
        sum    = {1'b0, b & mask} + {1'b0, a & mask};
        result = (b & ~mask) | (sum[31:0] & mask);
        sr     = sum[msb];
        cc_out[CC_C] = (size == SZ_LONG) ? sum[32] : sum[msb+1];
        cc_out[CC_V] = (sa == sb) && (sr != sa);
        cc_out[CC_X] = cc_out[CC_C];
      end
      ALU_SUB, ALU_CMP: begin
        sum    = {1'b0, b & mask} - {1'b0, a & mask};
        if (op == ALU_SUB) result = (b & ~mask) | (sum[31:0] & mask);
        sr     = sum[msb];
        cc_out[CC_C] = (a & mask) > (b & mask);
        cc_out[CC_V] = (sa != sb) && (sr != sb);
        if (op == ALU_SUB) cc_out[CC_X] = cc_out[CC_C];
      end
      ALU_AND: begin
        result = (b & ~mask) | (a & b & mask);
        cc_out[CC_V] = 1'b0; cc_out[CC_C] = 1'b0;
      end
      ALU_OR: begin
        result = (b & ~mask) | ((a | b) & mask);
        cc_out[CC_V] = 1'b0; cc_out[CC_C] = 1'b0;
      end
      ALU_EOR: begin
        result = (b & ~mask) | ((a ^ b) & mask);
        cc_out[CC_V] = 1'b0; cc_out[CC_C] = 1'b0;
      end
      ALU_NOT: begin
        result = (b & ~mask) | (~b & mask);
        cc_out[CC_V] = 1'b0; cc_out[CC_C] = 1'b0;
      end
      ALU_NEG: begin
        sum    = 33'd0 - {1'b0, b & mask};
        result = (b & ~mask) | (sum[31:0] & mask);
        sr     = sum[msb];
        cc_out[CC_C] = (b & mask) != 32'd0;
        cc_out[CC_V] = sb && sr;
        cc_out[CC_X] = cc_out[CC_C];
      end
      ALU_SUB_3BIT: begin
        d3     = {1'b0, b[2:0]} - {1'b0, a[2:0]};
        result = {29'd0, d3[2:0]};
        cc_out[CC_C] = d3[3];
        cc_out[CC_V] = 1'b0;
      end
      ALU_SHIFT_L:    result = {b[30:0], 1'b0};
      ALU_SHIFT_R:    result = {1'b0, b[31:1]};
      ALU_SIGNEX_ONE: result = {16'hFFFF, b[15:0]};
      ALU_CLR: begin
        result = b & ~mask;
        cc_out[CC_V] = 1'b0; cc_out[CC_C] = 1'b0;
      end
      default: ;
    endcase

    // N and Z come from the sized result for every flag-setting operation.
    if (op == ALU_SUB_3BIT) begin
      cc_out[CC_Z] = (d3[2:0] == 3'd0);
      cc_out[CC_N] = d3[2];
    end else if (op == ALU_CMP) begin
      cc_out[CC_Z] = ((sum[31:0] & mask) == 32'd0);
      cc_out[CC_N] = sum[msb];
    end else if (op != ALU_NOP && op != ALU_SHIFT_L && op != ALU_SHIFT_R &&
                 op != ALU_SIGNEX_ONE) begin
      cc_out[CC_Z] = ((result & mask) == 32'd0);
      cc_out[CC_N] = result[msb];
    end
  end

endmodule
