// tb_fp32: checks the single-precision multiplier and adder against real
// arithmetic.  Random normal operands (exponents kept well inside range) must
// give results within two units in the last place of the exact result
// (both units truncate); exact cases (1.5 x 2 = 3, 1 + 2 = 3, x + -x = 0,
// x x 0 = 0) must match bit for bit.
module tb_fp32;
  logic [31:0] a, b, p, s;
  fp32_mul u_mul (.a, .b, .y(p));
  fp32_add u_add (.a, .b, .y(s));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real f2r(logic [31:0] x);
    real m; int e;
    if (x[30:23] == 0) return 0.0;
    m = 1.0 + real'(x[22:0]) / 8388608.0;
    e = int'(x[30:23]) - 127;
    m = m * (2.0 ** e);
    return x[31] ? -m : m;
  endfunction

  function automatic logic [31:0] rnd();
    return {1'($urandom), 8'($urandom_range(100, 154)), 23'($urandom)};
  endfunction

  function automatic bit close(real got, real want);
    real d, m;
    d = got - want; if (d < 0) d = -d;
    m = want < 0 ? -want : want;
    return d <= m * (2.0 ** -22) + 1e-30;
  endfunction

  initial begin
    a = 32'h3FC0_0000; b = 32'h4000_0000; #1;
    check(p == 32'h4040_0000, "1.5 x 2 = 3");
    a = 32'h3F80_0000; b = 32'h4000_0000; #1;
    check(s == 32'h4040_0000, "1 + 2 = 3");
    a = 32'h4123_4567; b = 32'hC123_4567; #1;
    check(s == 32'h0, "x + -x = 0");
    a = 32'h4123_4567; b = 32'h0; #1;
    check(p[30:0] == 0, "x * 0 = 0");
    check(s == a, "x + 0 = x");
    for (int i = 0; i < 2000; i++) begin
      a = rnd(); b = rnd();
      if (i % 4 == 0) b[30:23] = a[30:23] - 8'($urandom_range(0, 3));  // near cancellation
      #1;
      check(close(f2r(p), f2r(a) * f2r(b)), $sformatf("mul %h * %h = %h", a, b, p));
      check(close(f2r(s), f2r(a) + f2r(b)), $sformatf("add %h + %h = %h", a, b, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
