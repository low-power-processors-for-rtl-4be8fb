// tb_c_element: checks the three C-element variants (symmetric, and the
// two asymmetric elements of the semi-decoupled controller) against their
// set/reset equations. Each variant gets a long random sequence of input
// changes; after every change the output must equal the model
// z' = set | z & ~reset, i.e. change only on set or reset and hold
// otherwise. Reset must force INIT. No clock: outputs are checked 1 ns
// after each change.
`timescale 1ns/1ps
module tb_c_element;
  logic rst_n = 0;
  logic [2:0] a, b, c, z;
  c_element #(.VARIANT(0), .INIT(1'b0)) u0 (.rst_n, .a(a[0]), .b(b[0]), .c(c[0]), .z(z[0]));
  c_element #(.VARIANT(1), .INIT(1'b1)) u1 (.rst_n, .a(a[1]), .b(b[1]), .c(c[1]), .z(z[1]));
  c_element #(.VARIANT(2), .INIT(1'b0)) u2 (.rst_n, .a(a[2]), .b(b[2]), .c(c[2]), .z(z[2]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [2:0] m;
    logic s, r;
    int sets = 0, resets = 0;
    a = '0; b = '0; c = '0;
    #1;
    check(z === 3'b010, "reset values");
    m = 3'b010;
    rst_n = 1;
    #1;
    for (int i = 0; i < 3000; i++) begin
      a = 3'($urandom); b = 3'($urandom); c = 3'($urandom);
      #1;
      for (int v = 0; v < 3; v++) begin
        case (v)
          0: begin s = a[v] & b[v];  r = ~a[v] & ~b[v]; end
          1: begin s = a[v] & ~b[v]; r = ~a[v] & b[v] & c[v]; end
          default: begin s = a[v] & ~b[v]; r = ~a[v]; end
        endcase
        if (s && !m[v]) sets++;
        if (r && m[v]) resets++;
        m[v] = s | (m[v] & ~r);
        check(z[v] === m[v], $sformatf("variant %0d a=%b b=%b c=%b z=%b exp %b", v, a[v], b[v], c[v], z[v], m[v]));
      end
    end
    check(sets > 100 && resets > 100, "outputs both set and reset");
    rst_n = 0; #1;
    check(z === 3'b010, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
