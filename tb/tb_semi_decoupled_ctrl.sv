// tb_semi_decoupled_ctrl: drives one semi-decoupled latch controller from
// a sender and a receiver that obey the 4-phase protocol with random
// delays, and checks the controller's order of events:
//  - A+ (ain+, latch closes) only after rin+ and while rout is low;
//  - rout+ only after A+ and while aout is low;
//  - A- (latch opens) only after rin- and aout+ with rout high;
//  - rout- only after A-;
//  - the latch is open exactly while ain is low.
// An empty-reset and a full-reset controller are both run; the full one
// must present a token (rout = 1, latch closed) straight after reset.
// The number of completed handshakes on each side must match.
`timescale 1ns/1ps
module tb_semi_decoupled_ctrl;
  logic rst_n = 0;
  logic [1:0] rin = 0, aout = 0, ain, rout, latch_open;
  semi_decoupled_ctrl #(.FULL(1'b0)) u_e (.rst_n, .rin(rin[0]), .ain(ain[0]), .rout(rout[0]), .aout(aout[0]), .latch_open(latch_open[0]));
  semi_decoupled_ctrl #(.FULL(1'b1)) u_f (.rst_n, .rin(rin[1]), .ain(ain[1]), .rout(rout[1]), .aout(aout[1]), .latch_open(latch_open[1]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #1000000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_in [2] = '{0, 0}, n_out [2] = '{0, 0};
  logic [1:0] rout_q = 2'b10;
  for (genvar k = 0; k < 2; k++) begin : g
    // protocol checks on every controller output change
    always @(ain[k]) if (rst_n) begin
      if (ain[k]) check(rin[k] && !rout_q[k], $sformatf("ctrl %0d: A+ needs rin=1, rout=0 (t=%0t rin=%b rout=%b)", k, $time, rin[k], rout_q[k]));
      else        check(!rin[k] && rout_q[k] && aout[k], $sformatf("ctrl %0d: A- needs rin=0, rout=1, aout=1 (t=%0t rin=%b rout=%b aout=%b)", k, $time, rin[k], rout_q[k], aout[k]));
    end
    always @(rout[k]) if (rst_n) begin
      if (rout[k]) check(ain[k] && !aout[k], $sformatf("ctrl %0d: rout+ needs A=1, aout=0", k));
      else         check(!ain[k], $sformatf("ctrl %0d: rout- needs A=0", k));
    end
    // rout as it was before the current change of A (rout may follow A in
    // the same instant)
    always @(rout[k]) #0.2 rout_q[k] = rout[k];
    always @(latch_open[k]) check(latch_open[k] === !ain[k], "latch open while A low");
    // sender
    initial begin
      wait (rst_n);
      repeat (200) begin
        wait (!ain[k]);
        #($urandom_range(1, 20));
        rin[k] = 1; wait (ain[k]);
        #($urandom_range(1, 20));
        rin[k] = 0; wait (!ain[k]);
        n_in[k]++;
      end
    end
    // receiver
    initial begin
      wait (rst_n);
      forever begin
        wait (rout[k]);
        #($urandom_range(1, 30));
        aout[k] = 1; wait (!rout[k]);
        #($urandom_range(1, 30));
        aout[k] = 0;
        n_out[k]++;
      end
    end
  end

  initial begin
    #1;
    check(rout === 2'b10 && ain === 2'b10 && latch_open === 2'b01, "reset states (empty / full)");
    #5 rst_n = 1;
    wait (n_in[0] == 200 && n_in[1] == 200);
    #200;
    check(n_out[0] == 200, $sformatf("empty controller passed %0d of 200 tokens", n_out[0]));
    check(n_out[1] == 201, $sformatf("full controller passed %0d tokens (200 + initial)", n_out[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
