// reg_file: the 32 x 8-bit general purpose registers R0..R31 of the AVR core.
// Two combinational read ports (Rd, Rr) and the three pointer pairs X (R27:R26),
// Y (R29:R28) and Z (R31:R30) are always readable. Writes happen on the rising
// clock edge through an 8-bit port and a 16-bit pair port (ADIW/SBIW results
// and pointer post-increment/pre-decrement); the pair port addresses the pair
// starting at register 2*pair_sel. The core never uses both ports on the same
// register in one cycle; if it does, the 8-bit port wins.
// Registers are cleared by reset (the AVR leaves them undefined).
module reg_file (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  rd_addr,
  input  logic [4:0]  rr_addr,
  output logic [7:0]  rd_data,
  output logic [7:0]  rr_data,
  output logic [15:0] x_ptr,
  output logic [15:0] y_ptr,
  output logic [15:0] z_ptr,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [7:0]  wdata,
  input  logic        we_pair,
  input  logic [3:0]  pair_sel,   // register 2*pair_sel and 2*pair_sel+1
  input  logic [15:0] wdata_pair
);
  logic [7:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else begin
      if (we_pair) begin
        regs[{pair_sel, 1'b0}] <= wdata_pair[7:0];
        regs[{pair_sel, 1'b1}] <= wdata_pair[15:8];
      end
      if (we) regs[waddr] <= wdata;
    end
  end

  assign rd_data = regs[rd_addr];
  assign rr_data = regs[rr_addr];
  assign x_ptr   = {regs[27], regs[26]};
  assign y_ptr   = {regs[29], regs[28]};
  assign z_ptr   = {regs[31], regs[30]};
endmodule
