// m68k_state_stack -- stack of control-unit states.
//
// The control unit shares its read cycle, write cycle and effective-address
// sequences between instructions by calling them like subroutines: before
// jumping into a shared sequence it pushes the state to come back to, and
// the last state of the sequence pulls it and jumps there.  This module is
// that stack: DEPTH entries (three in the original design) of W-bit state
// codes, with the st_ctrl commands idle, push, pull and reset.  `saved` is
// the top entry, the state a pull returns to.  A push shifts every entry one
// place down and puts push_state on top; a pull shifts them up and fills
// the bottom with zero.  The registers load on the rising clock edge.
// overflow/underflow flag a push into a full stack or a pull from an empty
// one for assertions and debugging; the stack keeps working (the deepest
// entry is lost on overflow).
module m68k_state_stack
  import m68k_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 3
) (
  input  logic         clk,
  input  logic         rst,          // synchronous, active high
  input  st_ctrl_t     st_ctrl,
  input  logic [W-1:0] push_state,
  output logic [W-1:0] saved,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic         overflow,
  output logic         underflow
);

  logic [W-1:0] stack [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] cnt;

  assign saved     = stack[0];
  assign level     = cnt;
  assign overflow  = (st_ctrl == ST_PUSH) && (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign underflow = (st_ctrl == ST_PULL) && (cnt == '0);

  always_ff @(posedge clk) begin
    if (rst || st_ctrl == ST_RESET) begin
      for (int i = 0; i < DEPTH; i++) stack[i] <= '0;
      cnt <= '0;
    end else if (st_ctrl == ST_PUSH) begin
      stack[0] <= push_state;
      for (int i = 1; i < DEPTH; i++) stack[i] <= stack[i-1];
      if (cnt != DEPTH[$clog2(DEPTH+1)-1:0]) cnt <= cnt + 1'b1;
    end else if (st_ctrl == ST_PULL) begin
      for (int i = 0; i < DEPTH - 1; i++) stack[i] <= stack[i+1];
      stack[DEPTH-1] <= '0;
      if (cnt != '0) cnt <= cnt - 1'b1;
    end
  end

endmodule
