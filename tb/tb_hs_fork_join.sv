// tb_hs_fork_join: a 3-way fork feeds three receivers with random
// acknowledge delays, and their requests are recombined by a 3-way join
// whose output is acknowledged by a random-speed receiver. Checks:
//  - every fork output copies the request;
//  - the fork acknowledges (both edges) only when all three acknowledges
//    have arrived;
//  - the join requests (both edges) only when all three requests agree;
//  - every join input acknowledge copies the join's output acknowledge.
// A second join is driven directly with random, protocol-free requests to
// check the hold behaviour of its C-element.
`timescale 1ns/1ps
module tb_hs_fork_join;
  logic       rst_n = 0, rin = 0, ain, jr, ja = 0;
  logic [2:0] fr, fa = 0, ja3;
  hs_fork #(.N(3)) u_fork (.rst_n, .rin, .ain, .rout(fr), .aout(fa));
  hs_join #(.N(3)) u_join (.rst_n, .rin(fa), .ain(ja3), .rout(jr), .aout(ja));

  logic [1:0] xr = 0, xa;
  logic       xo;
  hs_join #(.N(2)) u_j2 (.rst_n, .rin(xr), .ain(xa), .rout(xo), .aout(1'b0));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #2000000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(ain) if (rst_n) check(ain ? &fa : !(|fa), "fork acknowledge waits for all");
  always @(jr)  if (rst_n) check(jr ? &fa : !(|fa), "join request waits for all");
  always @(fr)  check(fr === {3{rin}}, "fork copies request");
  always @(ja3) check(ja3 === {3{ja}}, "join copies acknowledge");

  // three receivers on the fork (their acknowledges are the join's requests)
  for (genvar k = 0; k < 3; k++) begin : g
    initial forever begin
      wait (fr[k]); #($urandom_range(1, 30)); fa[k] = 1;
      wait (!fr[k]); #($urandom_range(1, 30)); fa[k] = 0;
    end
  end
  // receiver on the join
  int n_join = 0;
  initial forever begin
    wait (jr); #($urandom_range(1, 10)); ja = 1;
    wait (!jr); #($urandom_range(1, 10)); ja = 0;
    n_join++;
  end

  initial begin
    logic m;
    #3 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      #($urandom_range(1, 10)); rin = 1; wait (ain);
      #($urandom_range(1, 10)); rin = 0; wait (!ain);
    end
    #100;
    check(n_join == 200, $sformatf("join passed %0d of 200 handshakes", n_join));
    m = 0;
    for (int i = 0; i < 500; i++) begin
      xr = 2'($urandom); #1;
      if (&xr) m = 1; else if (!(|xr)) m = 0;
      check(xo === m, "join C-element holds when inputs differ");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
