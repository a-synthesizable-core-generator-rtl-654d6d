// m68k_regfile -- programmer-visible registers of the 68000-compatible core.
//
// Holds D0-D7, A0-A6 and the two stack pointers USP and SSP, each 32 bits.
// Register numbers are 4 bits, {is_address, index}: 0-7 are D0-D7 and 8-15
// are A0-A7.  A7 is the system stack pointer when the supervisor input is 1
// and the user stack pointer otherwise.  Two combinational read ports serve
// the control unit; one synchronous write port takes a size code, and a
// byte or word write changes only the low 8 or 16 bits of the register (a
// long write changes all 32).  The document lists these registers and the
// sized-write rule; the port arrangement is this design's choice.  Reset
// clears every register, as the reset state of the control unit does.
module m68k_regfile
  import m68k_pkg::*;
(
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  input  logic        supervisor,   // SR.S: selects SSP or USP as A7
  input  logic [3:0]  rd_a_sel,
  output logic [31:0] rd_a,
  input  logic [3:0]  rd_b_sel,
  output logic [31:0] rd_b,
  input  logic        wr_en,
  input  logic [3:0]  wr_sel,
  input  size_t       wr_size,
  input  logic [31:0] wr_data,
  output logic [31:0] usp,
  output logic [31:0] ssp
);

  logic [31:0] regs [15];   // D0-D7, A0-A6
  logic [31:0] usp_q, ssp_q;

  function automatic logic [31:0] read_reg(input logic [3:0] sel);
    if (sel == 4'd15) return supervisor ? ssp_q : usp_q;
    return regs[sel];
  endfunction

  assign rd_a = read_reg(rd_a_sel);
  assign rd_b = read_reg(rd_b_sel);
  assign usp  = usp_q;
  assign ssp  = ssp_q;

  logic [31:0] merged;
  always_comb begin
    merged = (read_reg(wr_sel) & ~size_mask(wr_size)) | (wr_data & size_mask(wr_size));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) regs[i] <= '0;
      usp_q <= '0;
      ssp_q <= '0;
    end else if (wr_en) begin
      if (wr_sel == 4'd15) begin
        if (supervisor) ssp_q <= merged;
        else            usp_q <= merged;
      end else begin
        regs[wr_sel] <= merged;
      end
    end
  end

endmodule
