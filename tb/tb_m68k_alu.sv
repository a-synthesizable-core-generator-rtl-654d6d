// tb_m68k_alu -- random test of the ALU against a reference model.
//
// Draws operation, size, operands and incoming flags with $urandom (one in
// eight operands forced to a corner value: 0, all ones, the sign bit) and
// compares result and {X,N,Z,V,C} with a model written from the 68000 rules
// using signed arithmetic (overflow = the signed result does not fit).
module tb_m68k_alu;
  import m68k_pkg::*;
  alu_op_t     op;
  size_t       size;
  logic [31:0] a, b, result;
  logic [4:0]  cc_in, cc_out;
  int checks = 0, failures = 0;

  m68k_alu dut (.*);

  initial begin
    #10_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [31:0] pick();
    unique case ($urandom_range(0, 7))
      0: return 32'd0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000 >> (8 * $urandom_range(0, 3));
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [31:0] er, m;
    logic [4:0]  ec;
    longint      sa, sb, sr, lim;
    int          bits;
    for (int i = 0; i < 20000; i++) begin
      op    = alu_op_t'($urandom_range(0, 14));
      size  = size_t'($urandom_range(0, 2));
      a     = pick(); b = pick(); cc_in = 5'($urandom);
      #1;
      bits = (size == SZ_BYTE) ? 8 : (size == SZ_WORD) ? 16 : 32;
      m    = (bits == 32) ? 32'hFFFF_FFFF : (32'd1 << bits) - 1;
      sa   = (bits == 8) ? longint'($signed(a[7:0])) : (bits == 16) ? longint'($signed(a[15:0])) : longint'($signed(a));
      sb   = (bits == 8) ? longint'($signed(b[7:0])) : (bits == 16) ? longint'($signed(b[15:0])) : longint'($signed(b));
      lim  = longint'(1) <<< (bits - 1);
      er = b; ec = cc_in;
      case (op)
        ALU_PASS: begin er = (b & ~m) | (a & m); ec[1:0] = 0; end
        ALU_ADD: begin
          er = (b & ~m) | ((a + b) & m);
          sr = sa + sb; ec[1] = (sr >= lim) || (sr < -lim);
          ec[0] = ({32'd0, a & m} + {32'd0, b & m}) > {32'd0, m}; ec[4] = ec[0];
        end
        ALU_SUB, ALU_CMP: begin
          if (op == ALU_SUB) er = (b & ~m) | ((b - a) & m);
          sr = sb - sa; ec[1] = (sr >= lim) || (sr < -lim);
          ec[0] = (a & m) > (b & m); if (op == ALU_SUB) ec[4] = ec[0];
        end
        ALU_AND: begin er = (b & ~m) | (a & b & m); ec[1:0] = 0; end
        ALU_OR:  begin er = (b & ~m) | ((a | b) & m); ec[1:0] = 0; end
        ALU_EOR: begin er = (b & ~m) | ((a ^ b) & m); ec[1:0] = 0; end
        ALU_NOT: begin er = b ^ m; ec[1:0] = 0; end
        ALU_NEG: begin
          er = (b & ~m) | ((0 - b) & m);
          sr = -sb; ec[1] = (sr >= lim); ec[0] = (b & m) != 0; ec[4] = ec[0];
        end
        ALU_SUB_3BIT: begin
          er = {29'd0, 3'(b[2:0] - a[2:0])}; ec[0] = a[2:0] > b[2:0]; ec[1] = 0;
          ec[2] = (b[2:0] == a[2:0]); ec[3] = er[2];
        end
        ALU_SHIFT_L: er = b << 1;
        ALU_SHIFT_R: er = b >> 1;
        ALU_SIGNEX_ONE: er = {16'hFFFF, b[15:0]};
        ALU_CLR: begin er = b & ~m; ec[1:0] = 0; end
        default: ;
      endcase
      if (op == ALU_CMP) begin
        ec[2] = ((b - a) & m) == 0; ec[3] = (((b - a) & m) >> (bits - 1)) & 1;
      end else if (!(op inside {ALU_NOP, ALU_SHIFT_L, ALU_SHIFT_R, ALU_SIGNEX_ONE, ALU_SUB_3BIT})) begin
        ec[2] = (er & m) == 0; ec[3] = ((er & m) >> (bits - 1)) & 1;
      end
      checks++;
      if (result !== er || cc_out !== ec) begin
        failures++;
        if (failures < 10)
          $display("FAIL op %0d size %0d a %08h b %08h cc %05b: got %08h %05b expected %08h %05b",
                   op, size, a, b, cc_in, result, cc_out, er, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
