// tb_desyn_element: passes a random stream of 8-bit tokens through a
// desyn-element (master and slave latch with semi-decoupled controllers)
// with a 4-phase sender and receiver running at random speeds. The
// receiver must first see the reset value INIT (the element resets full,
// like a register holding its reset value), then every sent token in order
// with none lost or repeated. Data is checked at every rout+ and must stay
// stable until the receiver's aout+. The sender keeps its data stable from
// rin+ to ain+, as the bundled-data protocol requires.
// The matched delay of a real circuit is modelled by a fixed 2 ns between
// setting data and raising rin (delay_line model).
`timescale 1ns/1ps
module tb_desyn_element;
  logic       rst_n = 0, rin = 0, ain, rout, aout = 0, rin_raw = 0;
  logic [7:0] d = 0, q;
  desyn_element #(.W(8), .INIT(8'hA5)) dut (.*);
  delay_line #(.DELAY(2)) u_dly (.a(rin_raw), .z(rin));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #2000000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] sent [$];
  int n_rx = 0;
  initial begin
    wait (rst_n);
    repeat (300) begin
      #($urandom_range(0, 15));
      d = 8'($urandom); sent.push_back(d);
      rin_raw = 1; wait (ain);
      #($urandom_range(1, 15));
      rin_raw = 0; wait (!ain);
    end
  end
  initial begin
    logic [7:0] v, e;
    wait (rst_n);
    forever begin
      wait (rout);
      #0.5 v = q;
      e = (n_rx == 0) ? 8'hA5 : sent.pop_front();
      check(v === e, $sformatf("token %0d: %h exp %h", n_rx, v, e));
      #($urandom_range(1, 25));
      check(q === v, "output stable until acknowledged");
      aout = 1; wait (!rout);
      #($urandom_range(1, 25));
      aout = 0;
      n_rx++;
    end
  end
  initial begin
    #3 rst_n = 1;
    wait (n_rx == 301);
    check(sent.size() == 0, "all tokens delivered");
    $display("tokens=%0d", n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
