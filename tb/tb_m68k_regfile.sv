// tb_m68k_regfile -- random test of the register file against a model.
//
// Each clock draws a write (register 0-15, size, data, supervisor bit) and
// two read selects with $urandom.  The model keeps D0-D7, A0-A6, USP and
// SSP; A7 maps to SSP or USP by the supervisor bit, and byte/word writes
// keep the upper bits.  Reads are checked combinationally every clock.
module tb_m68k_regfile;
  import m68k_pkg::*;
  logic        clk = 0, rst = 1, supervisor = 0, wr_en = 0;
  logic [3:0]  rd_a_sel = 0, rd_b_sel = 0, wr_sel = 0;
  logic [31:0] rd_a, rd_b, wr_data = 0, usp, ssp;
  size_t       wr_size = SZ_LONG;
  int checks = 0, failures = 0;
  logic [31:0] model [17];   // 0-14 D0-A6, 15 USP, 16 SSP

  m68k_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int idx(input logic [3:0] s, input logic sup);
    return (s == 15) ? (sup ? 16 : 15) : int'(s);
  endfunction

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] mk;
    for (int i = 0; i < 17; i++) model[i] = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 5000; i++) begin
      supervisor = 1'($urandom);
      wr_en = 1'($urandom); wr_sel = 4'($urandom); wr_size = size_t'($urandom_range(0, 2));
      wr_data = $urandom; rd_a_sel = 4'($urandom); rd_b_sel = 4'($urandom);
      #1;
      chk("rd_a", rd_a, model[idx(rd_a_sel, supervisor)]);
      chk("rd_b", rd_b, model[idx(rd_b_sel, supervisor)]);
      chk("usp", usp, model[15]);
      chk("ssp", ssp, model[16]);
      @(posedge clk);
      if (wr_en) begin
        mk = (wr_size == SZ_BYTE) ? 32'hFF : (wr_size == SZ_WORD) ? 32'hFFFF : 32'hFFFF_FFFF;
        model[idx(wr_sel, supervisor)] = (model[idx(wr_sel, supervisor)] & ~mk) | (wr_data & mk);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
