// tb_m68k_bus_ctrl -- random command test of the bus-pin registers.
//
// Every clock all six commands, the internal databus, the size and the
// supervisor/program inputs are drawn with $urandom.  A model applies the
// same commands (address load/release, AS, R/W, UDS/LDS from size and
// address bit 0, function code, data-bus drive of low word, high word or a
// copied byte) and the pins are compared after every clock edge.
module tb_m68k_bus_ctrl;
  import m68k_pkg::*;
  logic clk = 0, rst = 1;
  ctrl_t addr_ctrl = CTRL_IDLE, as_ctrl = CTRL_IDLE, rw_ctrl = CTRL_IDLE, uds_ctrl = CTRL_IDLE;
  fc_ctrl_t fc_ctrl = FC_IDLE;
  dbus_ctrl_t dbus_ctrl = DB_IDLE;
  logic [31:0] databus = 0;
  size_t size = SZ_WORD;
  logic supervisor = 0, prog_space = 0;
  logic [23:0] adbus;
  logic adbus_oe, as_n, rw, uds_n, lds_n, dbus_oe;
  logic [2:0] fc;
  logic [15:0] dbus_o;
  int checks = 0, failures = 0;

  m68k_bus_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic ctrl_t rc();
    unique case ($urandom_range(0, 2))
      0: return CTRL_RESET;
      1: return CTRL_LOAD;
      default: return CTRL_IDLE;
    endcase
  endfunction

  initial begin
    logic [23:0] m_ad; logic m_oe, m_as, m_rw, m_uds, m_lds, m_doe;
    logic [2:0] m_fc; logic [15:0] m_d;
    m_ad = 0; m_oe = 0; m_as = 1; m_rw = 1; m_uds = 1; m_lds = 1; m_doe = 0; m_fc = 0; m_d = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 5000; i++) begin
      addr_ctrl = rc(); as_ctrl = rc(); rw_ctrl = rc(); uds_ctrl = rc();
      fc_ctrl = fc_ctrl_t'($urandom_range(0, 3)); dbus_ctrl = dbus_ctrl_t'($urandom_range(0, 3));
      databus = $urandom; size = size_t'($urandom_range(0, 2));
      supervisor = 1'($urandom); prog_space = 1'($urandom);
      // model, using the values before the edge
      if (uds_ctrl == CTRL_LOAD) begin
        m_uds = (size == SZ_BYTE) ? m_ad[0] : 1'b0;
        m_lds = (size == SZ_BYTE) ? !m_ad[0] : 1'b0;
      end else if (uds_ctrl == CTRL_RESET) begin m_uds = 1; m_lds = 1; end
      if (addr_ctrl == CTRL_LOAD) begin m_ad = databus[23:0]; m_oe = 1; end
      else if (addr_ctrl == CTRL_RESET) m_oe = 0;
      if (as_ctrl != CTRL_IDLE) m_as = (as_ctrl == CTRL_RESET);
      if (rw_ctrl != CTRL_IDLE) m_rw = (rw_ctrl == CTRL_LOAD);
      case (fc_ctrl)
        FC_LOAD: m_fc = {supervisor, prog_space, !prog_space};
        FC_LOAD_INT: m_fc = 3'b111;
        FC_RESET: m_fc = 3'b000;
        default: ;
      endcase
      case (dbus_ctrl)
        DB_LOAD: begin m_d = (size == SZ_BYTE) ? {2{databus[7:0]}} : databus[15:0]; m_doe = 1; end
        DB_LOAD_HI: begin m_d = databus[31:16]; m_doe = 1; end
        DB_RESET: m_doe = 0;
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if ({adbus_oe, as_n, rw, uds_n, lds_n, fc, dbus_oe} !== {m_oe, m_as, m_rw, m_uds, m_lds, m_fc, m_doe} ||
          (m_oe && adbus !== m_ad) || (m_doe && dbus_o !== m_d)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d", i);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
