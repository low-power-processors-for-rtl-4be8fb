// tb_reg_file: random test of the 32 x 8 register file against a model
// array. Each clock it may write a byte, write a register pair, or both (the
// byte write must win where they overlap); two random read addresses and
// the X, Y, Z pointers are compared with the model combinationally. A write
// must be visible right after the clock edge that performs it (one cycle).
`timescale 1ns/1ps
module tb_reg_file;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  rd_addr, rr_addr, waddr;
  logic [7:0]  rd_data, rr_data, wdata;
  logic [15:0] x_ptr, y_ptr, z_ptr, wdata_pair;
  logic        we = 0, we_pair = 0;
  logic [3:0]  pair_sel;
  reg_file dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] m [32];
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #200000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (m[i]) m[i] = 0;
    waddr = 0; wdata = 0; pair_sel = 0; wdata_pair = 0; rd_addr = 0; rr_addr = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rd_addr = 5'($urandom); rr_addr = 5'($urandom);
      #1;
      check(rd_data === m[rd_addr] && rr_data === m[rr_addr], $sformatf("read r%0d/r%0d", rd_addr, rr_addr));
      check(x_ptr === {m[27], m[26]} && y_ptr === {m[29], m[28]} && z_ptr === {m[31], m[30]}, "pointers");
      we = ($urandom % 2); waddr = 5'($urandom); wdata = 8'($urandom);
      we_pair = ($urandom % 3 == 0); pair_sel = (i % 5 == 0) ? waddr[4:1] : 4'($urandom);
      wdata_pair = 16'($urandom);
      @(posedge clk);
      if (we_pair) begin m[2*pair_sel] = wdata_pair[7:0]; m[2*pair_sel+1] = wdata_pair[15:8]; end
      if (we) m[waddr] = wdata;
      #1;
      we = 0; we_pair = 0;
      rd_addr = waddr; #1;
      check(rd_data === m[waddr], "write visible one cycle later");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
