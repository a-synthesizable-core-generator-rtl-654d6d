// tb_m68k_shifter -- random test of the shifter/rotator against a
// reference model that shifts one bit at a time in a loop.
//
// Operation, size, count (0..63, small counts favoured), data and incoming
// flags are drawn with $urandom; result and {X,N,Z,V,C} are compared with
// the 68000 rules: C = last bit out (0 for a zero count, X for ROXd with a
// zero count), X = C except for ROL/ROR and zero counts, V = the sign bit
// changed at some step of ASL.
module tb_m68k_shifter;
  import m68k_pkg::*;
  shift_op_t   op;
  size_t       size;
  logic [5:0]  count;
  logic [31:0] data, result;
  logic [4:0]  cc_in, cc_out;
  int checks = 0, failures = 0;

  m68k_shifter dut (.*);

  initial begin
    #10_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] v, m;
    logic [4:0]  ec;
    logic        x, c, ovf, msb0, out;
    int          bits;
    for (int i = 0; i < 20000; i++) begin
      op    = shift_op_t'($urandom_range(0, 7));
      size  = size_t'($urandom_range(0, 2));
      count = ($urandom_range(0, 3) == 0) ? 6'($urandom) : 6'($urandom_range(0, 9));
      data  = $urandom; cc_in = 5'($urandom);
      #1;
      bits = (size == SZ_BYTE) ? 8 : (size == SZ_WORD) ? 16 : 32;
      m    = (bits == 32) ? 32'hFFFF_FFFF : (32'd1 << bits) - 1;
      v = data & m; x = cc_in[4]; c = 0; ovf = 0;
      for (int k = 0; k < count; k++) begin
        msb0 = v[bits-1];
        case (op)
          SH_ASL, SH_LSL: begin out = v[bits-1]; v = (v << 1) & m; c = out; x = out;
                                if (op == SH_ASL && v[bits-1] != msb0) ovf = 1; end
          SH_ASR, SH_LSR: begin out = v[0]; v = v >> 1;
                                if (op == SH_ASR) v[bits-1] = msb0; c = out; x = out; end
          SH_ROL: begin out = v[bits-1]; v = ((v << 1) & m) | out; c = out; end
          SH_ROR: begin out = v[0]; v = v >> 1; v[bits-1] = out; c = out; end
          SH_ROXL: begin out = v[bits-1]; v = ((v << 1) & m) | x; x = out; c = out; end
          default: begin out = v[0]; v = v >> 1; v[bits-1] = x; x = out; c = out; end
        endcase
      end
      if (count == 0 && op inside {SH_ROXL, SH_ROXR}) c = x;
      ec = {x, v[bits-1], (v & m) == 0, ovf, c};
      checks++;
      if (result !== ((data & ~m) | v) || cc_out !== ec) begin
        failures++;
        if (failures < 10)
          $display("FAIL op %0d size %0d count %0d data %08h cc %05b: got %08h %05b expected %08h %05b",
                   op, size, count, data, cc_in, result, cc_out, (data & ~m) | v, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
