// io_adr_dec: I/O address decoder of the AVR core.
// Combinational. It tells whether an I/O address belongs to a register inside
// the core (SREG, SPH, SPL) or to a device on the external data bus, passes
// the read/write strobes only to the external bus for external addresses, and
// selects the read data: the core register value for internal addresses,
// otherwise the external data bus (which the I/O & interrupt control has
// already multiplexed from RAM or the addressed device).
module io_adr_dec
  import nimbus_pkg::*;
(
  input  logic       io_space,    // the access is in I/O space (not RAM, not a register)
  input  logic [5:0] io_addr,
  input  logic       re,
  input  logic       we,
  input  logic [7:0] int_rdata,   // from io_reg_file
  input  logic [7:0] ext_rdata,   // external data bus in
  output logic       int_sel,
  output logic       int_we,
  output logic       ext_re,
  output logic       ext_we,
  output logic [7:0] rdata
);
  always_comb begin
    int_sel = io_space && (io_addr == IO_SREG || io_addr == IO_SPH || io_addr == IO_SPL);
    int_we  = we && int_sel;
    ext_re  = re && !int_sel;
    ext_we  = we && !int_sel;
    rdata   = int_sel ? int_rdata : ext_rdata;
  end
endmodule
