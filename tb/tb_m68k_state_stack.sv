// tb_m68k_state_stack -- random push/pull/reset sequence against a queue.
//
// Commands are drawn with $urandom; the model is a SystemVerilog queue
// holding at most DEPTH entries (a push into a full stack drops the
// deepest).  `saved` must equal the top of the model (0 when empty), and
// the level and the overflow/underflow flags must match.
module tb_m68k_state_stack;
  import m68k_pkg::*;
  localparam int W = 8, DEPTH = 3;
  logic clk = 0, rst = 1;
  st_ctrl_t st_ctrl = ST_IDLE;
  logic [W-1:0] push_state = 0, saved;
  logic [1:0] level;
  logic overflow, underflow;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int n_push = 0, n_pull = 0;

  m68k_state_stack #(.W(W), .DEPTH(DEPTH)) dut (.*);
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
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 5000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      st_ctrl = (r < 45) ? ST_PUSH : (r < 90) ? ST_PULL : (r < 93) ? ST_RESET : ST_IDLE;
      push_state = W'($urandom);
      #1;
      chk("saved", saved, q.size() ? q[0] : 0);
      chk("level", level, q.size());
      chk("overflow", overflow, st_ctrl == ST_PUSH && q.size() == DEPTH);
      chk("underflow", underflow, st_ctrl == ST_PULL && q.size() == 0);
      @(posedge clk);
      case (st_ctrl)
        ST_PUSH:  begin q.push_front(push_state); if (q.size() > DEPTH) void'(q.pop_back()); n_push++; end
        ST_PULL:  if (q.size()) begin void'(q.pop_front()); n_pull++; end
        ST_RESET: q.delete();
        default: ;
      endcase
      @(negedge clk);
    end
    $display("pushes %0d pulls %0d", n_push, n_pull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
