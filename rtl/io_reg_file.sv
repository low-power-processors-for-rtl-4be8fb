// io_reg_file: the I/O registers that live inside the AVR core: the status
// register SREG (I/O 0x3F) and the 16-bit stack pointer SPH:SPL (0x3E/0x3D).
// Each register can be written from the I/O bus (OUT, ST to data space
// 0x5D..0x5F) or directly by the core's sequencer (flag updates, stack pushes
// and pops). A bus write and a direct write to the same register in one cycle
// does not occur in the core; if it did, the bus write wins. Writes are on the
// rising clock edge, reads are combinational. All registers reset to 0, as on
// the AVR.
module io_reg_file
  import nimbus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  io_addr,
  input  logic        io_we,
  input  logic [7:0]  io_wdata,
  output logic [7:0]  io_rdata,   // value of the addressed internal register (0 if none)
  input  logic        sreg_we,
  input  logic [7:0]  sreg_next,
  input  logic        sp_we,
  input  logic [15:0] sp_next,
  output logic [7:0]  sreg,
  output logic [15:0] sp
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      sp   <= '0;
    end else begin
      if (sreg_we) sreg <= sreg_next;
      if (sp_we)   sp   <= sp_next;
      if (io_we) begin
        unique case (io_addr)
          IO_SREG: sreg     <= io_wdata;
          IO_SPH:  sp[15:8] <= io_wdata;
          IO_SPL:  sp[7:0]  <= io_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (io_addr)
      IO_SREG: io_rdata = sreg;
      IO_SPH:  io_rdata = sp[15:8];
      IO_SPL:  io_rdata = sp[7:0];
      default: io_rdata = '0;
    endcase
  end
endmodule
