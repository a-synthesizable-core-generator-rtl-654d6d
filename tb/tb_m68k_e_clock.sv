// tb_m68k_e_clock -- checks the E clock divider.
//
// After reset, E must be low for LOW_CLKS clocks and high for HIGH_CLKS
// clocks, repeatedly; e_low_start must pulse in the first low clock and
// e_fall in the last high clock of every period.  A random reset in the
// middle must restart the pattern.
module tb_m68k_e_clock;
  localparam int LOW = 6, HIGH = 4;
  logic clk = 0, rst = 1, e, e_fall, e_low_start;
  logic [3:0] phase;
  int checks = 0, failures = 0;

  m68k_e_clock dut (.*);
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
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int p;
    for (int run = 0; run < 4; run++) begin
      rst = 1; @(negedge clk); rst = 0;
      p = 0;
      repeat (LOW * 7 + $urandom_range(0, 40)) begin
        chk("e", e, p >= LOW);
        chk("e_low_start", e_low_start, p == 0);
        chk("e_fall", e_fall, p == LOW + HIGH - 1);
        @(negedge clk);
        p = (p + 1) % (LOW + HIGH);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
