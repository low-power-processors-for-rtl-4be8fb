// tb_desyn_loop: runs the self-timed loop with a 3 ns matched delay
// (delay_line model), an observer that acknowledges every value after a
// random wait, and a token source that offers tokens at random intervals.
// Checks:
//  - after reset the observer sees 0, then every value once, in order,
//    counting up by one and wrapping from 255 to 0;
//  - exactly one loop cycle per token: the number of observed values is
//    the number of tokens plus the reset value;
//  - the loop stalls while no token is offered (q and the requests stand
//    still for 200 ns);
//  - q is stable from each obs_req+ to the observer's acknowledge.
`timescale 1ns/1ps
module tb_desyn_loop;
  logic       rst_n = 0, req_to_delay, req_from_delay, ext_req = 0, ext_ack, obs_req, obs_ack = 0;
  logic [7:0] q;
  desyn_loop dut (.*);
  delay_line #(.DELAY(3)) u_dly (.a(req_to_delay), .z(req_from_delay));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #200000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // observer
  int n_obs = 0, wraps = 0;
  logic [7:0] prev;
  initial begin
    logic [7:0] v;
    forever begin
      wait (obs_req);
      #0.1 v = q;
      if (n_obs == 0) check(v === 8'h00, "first value is the reset value 0");
      else begin
        check(v === 8'(prev + 1), $sformatf("count %h after %h", v, prev));
        if (v == 0) wraps++;
      end
      prev = v; n_obs++;
      #($urandom_range(1, 8));
      check(q === v, "q stable until acknowledged");
      obs_ack = 1; wait (!obs_req);
      #($urandom_range(1, 8));
      obs_ack = 0;
    end
  end

  int n_tok = 0;
  task automatic token();
    ext_req = 1; wait (ext_ack);
    #($urandom_range(0, 3));
    ext_req = 0; wait (!ext_ack);
    n_tok++;
  endtask

  initial begin
    logic [7:0] hold;
    #1 check(q === 8'h00 && obs_req === 1'b1, "reset: token 0 presented");
    #4 rst_n = 1;
    repeat (300) begin #($urandom_range(0, 10)); token(); end
    // stall: no tokens
    #50 hold = q;
    #200;
    check(q === hold && n_obs == n_tok + 1, "loop stalls without tokens");
    repeat (300) token();
    #100;
    check(n_obs == n_tok + 1, $sformatf("%0d values observed for %0d tokens", n_obs, n_tok));
    check(wraps == 2, $sformatf("wrapped %0d times", wraps));
    $display("tokens=%0d observed=%0d", n_tok, n_obs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
