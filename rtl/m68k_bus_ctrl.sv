// m68k_bus_ctrl -- register-control multiplexers for the external bus pins.
//
// Each bus output of the core is a register steered by a command from the
// control unit, in the same idle/load/reset style as the internal registers:
//   addr_ctrl  load: address bus <= internal databus[23:0] and drive it;
//              reset: release the address bus (high impedance: adbus_oe = 0);
//              the strobes AS, UDS, LDS and R/W are released with it.
//   as_ctrl    load: assert AS;  reset: negate AS.
//   rw_ctrl    load: R/W = 1 (read);  reset: R/W = 0 (write).
//   uds_ctrl   load: assert UDS and/or LDS from the size and address bit 0
//              (byte at an even address: UDS, odd: LDS; word/long: both);
//              reset: negate both.
//   fc_ctrl    load: function code from the supervisor and prog_space inputs
//              (001 user data, 010 user program, 101 supervisor data,
//              110 supervisor program); load_int: 111 (interrupt
//              acknowledge); reset: 000.
//   dbus_ctrl  load: drive the low word of the internal databus (a byte is
//              copied onto both halves); load_hi: drive its high word (first
//              half of a long); reset: release the data bus.
// All registers change on the rising clock edge; the outputs are the
// register values, so a command issued in a state shows on the pins one
// clock later.  Active-low pins carry an _n suffix.  The commands and the
// high-impedance address bus on reset come from the document; the pin
// encodings follow the 68000 bus (UDS/LDS, FC codes); the separate output
// enables replace three-state pins.
module m68k_bus_ctrl
  import m68k_pkg::*;
(
  input  logic        clk,
  input  logic        rst,          // synchronous, active high
  input  ctrl_t       addr_ctrl,
  input  ctrl_t       as_ctrl,
  input  ctrl_t       rw_ctrl,
  input  ctrl_t       uds_ctrl,
  input  fc_ctrl_t    fc_ctrl,
  input  dbus_ctrl_t  dbus_ctrl,
  input  logic [31:0] databus,
  input  size_t       size,
  input  logic        supervisor,
  input  logic        prog_space,
  output logic [23:0] adbus,
  output logic        adbus_oe,
  output logic        as_n,
  output logic        rw,
  output logic        uds_n,
  output logic        lds_n,
  output logic [2:0]  fc,
  output logic [15:0] dbus_o,
  output logic        dbus_oe
);

  always_ff @(posedge clk) begin
    if (rst) begin
      adbus    <= '0;
      adbus_oe <= 1'b0;
      as_n     <= 1'b1;
      rw       <= 1'b1;
      uds_n    <= 1'b1;
      lds_n    <= 1'b1;
      fc       <= 3'b000;
      dbus_o   <= '0;
      dbus_oe  <= 1'b0;
    end else begin
      unique case (addr_ctrl)
        CTRL_LOAD:  begin adbus <= databus[23:0]; adbus_oe <= 1'b1; end
        CTRL_RESET: adbus_oe <= 1'b0;
        default: ;
      endcase
      unique case (as_ctrl)
        CTRL_LOAD:  as_n <= 1'b0;
        CTRL_RESET: as_n <= 1'b1;
        default: ;
      endcase
      unique case (rw_ctrl)
        CTRL_LOAD:  rw <= 1'b1;
        CTRL_RESET: rw <= 1'b0;
        default: ;
      endcase
      unique case (uds_ctrl)
        CTRL_LOAD: begin
          if (size == SZ_BYTE) begin
            uds_n <= adbus[0];
            lds_n <= !adbus[0];
          end else begin
            uds_n <= 1'b0;
            lds_n <= 1'b0;
          end
        end
        CTRL_RESET: begin uds_n <= 1'b1; lds_n <= 1'b1; end
        default: ;
      endcase
      unique case (fc_ctrl)
        FC_LOAD:     fc <= {supervisor, prog_space, !prog_space};
        FC_LOAD_INT: fc <= 3'b111;
        FC_RESET:    fc <= 3'b000;
        default: ;
      endcase
      unique case (dbus_ctrl)
        DB_LOAD: begin
          dbus_o  <= (size == SZ_BYTE) ? {databus[7:0], databus[7:0]} : databus[15:0];
          dbus_oe <= 1'b1;
        end
        DB_LOAD_HI: begin
          dbus_o  <= databus[31:16];
          dbus_oe <= 1'b1;
        end
        DB_RESET: dbus_oe <= 1'b0;
        default: ;
      endcase
    end
  end

endmodule
