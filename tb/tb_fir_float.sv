// tb_fir_float: loads eight random taps into a floating-point FIR through
// its serial parameter chain (frames built by the testbench), streams
// random samples with random gaps, and compares every output with the
// convolution computed in real arithmetic (tolerance 2^-19 of the sum of
// the terms' magnitudes, the adders truncate).  It checks one output per
// input, one clock later, and that a frame addressed past the last tap
// leaves on psout as a frame for address 0.
module tb_fir_float;
  import zc_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  stream_t din = '0, dout;
  logic psin = 0, psout;
  fir_float #(.NTAPS(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real f2r(logic [31:0] x);
    real m; int e;
    if (x[30:23] == 0) return 0.0;
    e = int'(x[30:23]) - 127;
    m = (1.0 + real'(x[22:0]) / 8388608.0) * (2.0 ** e);
    return x[31] ? -m : m;
  endfunction
  function automatic logic [31:0] rnd();
    return {1'($urandom), 8'($urandom_range(120, 130)), 23'($urandom)};
  endfunction

  task automatic send(input int addr, input logic [31:0] d);
    @(negedge clk); psin = 1;
    repeat (addr) begin @(negedge clk); psin = 0; end
    @(negedge clk); psin = 1;
    for (int i = 31; i >= 0; i--) begin @(negedge clk); psin = d[i]; end
    @(negedge clk); psin = 0;
  endtask

  int out_frames = 0, out_addr = -1;
  logic [31:0] out_data;
  initial forever begin
    @(posedge clk);
    if (!rst && psout) begin
      int z; z = 0;
      @(posedge clk);
      while (!psout) begin z++; @(posedge clk); end
      for (int i = 0; i < 32; i++) begin @(posedge clk); out_data = {out_data[30:0], psout}; end
      out_addr = z; out_frames++;
    end
  end

  logic [31:0] h [N];
  logic [31:0] xs [$];
  int n_out = 0, lat_bad = 0;
  logic in_q = 0;
  always @(posedge clk) begin
    in_q <= din.valid;
    if (!rst && dout.valid != in_q) lat_bad++;
    if (!rst && dout.valid) begin
      real want, mag, t;
      want = 0; mag = 0;
      for (int k = 0; k < N; k++) if (n_out - k >= 0) begin
        t = f2r(h[k]) * f2r(xs[n_out - k]);
        want += t; mag += (t < 0 ? -t : t);
      end
      t = f2r(dout.data) - want; if (t < 0) t = -t;
      check(t <= mag * (2.0 ** -19) + 1e-30, $sformatf("y[%0d] = %g, want %g", n_out, f2r(dout.data), want));
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int k = 0; k < N; k++) begin h[k] = rnd(); send(k, h[k]); end
    repeat (2 * N + 4) @(posedge clk);
    for (int k = 0; k < N; k++) check(dut.h[k] == h[k], $sformatf("tap %0d loaded", k));
    for (int i = 0; i < 100; i++) begin
      logic [31:0] x; x = rnd();
      @(negedge clk); din = '{valid:1, data:x}; xs.push_back(x);
      repeat ($urandom_range(0, 2)) begin @(negedge clk); din = '0; end
    end
    @(negedge clk); din = '0;
    repeat (5) @(posedge clk);
    check(n_out == 100, $sformatf("one output per input (%0d)", n_out));
    check(lat_bad == 0, "output follows input by one clock");
    send(N, 32'h1234_5678);
    repeat (20) @(posedge clk);
    check(out_frames == 1 && out_addr == 0 && out_data == 32'h1234_5678, "frame past the last tap forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
