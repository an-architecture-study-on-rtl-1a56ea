// tb_param_reg: a chain of six parameter registers driven with frames the
// testbench builds itself: start bit, `addr` low bits, data start bit, 32
// data bits MSB first.  For every address it checks that only the addressed
// register changes, that it takes the word, and that `updated` rises exactly
// 2*addr + 34 clocks after the start bit entered the chain (two clocks per
// skipped register plus the 32-bit word).  A frame for address 6 must leave
// the end of the chain as a frame for address 0 carrying the same word.
module tb_param_reg;
  localparam int N = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic sin = 0;
  logic [N:0] ch;
  logic [31:0] val [N];
  logic [N-1:0] upd;
  assign ch[0] = sin;
  for (genvar k = 0; k < N; k++) begin : g
    param_reg #(.RESET_VALUE(32'h1111_0000 + k)) u (.clk, .rst, .sin(ch[k]), .sout(ch[k+1]), .value(val[k]), .updated(upd[k]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic send(input int addr, input logic [31:0] d);
    @(negedge clk); sin = 1;
    repeat (addr) begin @(negedge clk); sin = 0; end
    @(negedge clk); sin = 1;
    for (int i = 31; i >= 0; i--) begin @(negedge clk); sin = d[i]; end
    @(negedge clk); sin = 0;
  endtask

  // decoder at the end of the chain
  int out_frames = 0, out_addr = -1;
  logic [31:0] out_data;
  initial begin
    forever begin
      @(posedge clk);
      if (!rst && ch[N]) begin
        int z; z = 0;
        @(posedge clk);
        while (!ch[N]) begin z++; @(posedge clk); end
        for (int i = 0; i < 32; i++) begin @(posedge clk); out_data = {out_data[30:0], ch[N]}; end
        out_addr = z; out_frames++;
      end
    end
  end

  logic [31:0] expv [N];
  int t_start, t_upd;
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int k = 0; k < N; k++) begin
      expv[k] = 32'h1111_0000 + k;
      check(val[k] == expv[k], "reset value");
    end
    for (int rep = 0; rep < 3; rep++)
    for (int a = 0; a < N; a++) begin
      logic [31:0] d; d = $urandom;
      fork
        begin @(negedge clk); t_start = cyc; end
        send(a, d);
        begin @(posedge upd[a]); t_upd = cyc; end
      join
      repeat (3) @(posedge clk);
      expv[a] = d;
      for (int k = 0; k < N; k++) check(val[k] == expv[k], $sformatf("reg %0d after write to %0d", k, a));
      check(t_upd - t_start == 2 * a + 34, $sformatf("update latency %0d for address %0d", t_upd - t_start, a));
    end
    begin
      logic [31:0] d; d = 32'hCAFE_F00D;
      send(N, d);
      repeat (2 * N + 10) @(posedge clk);
      check(out_frames == 1 && out_addr == 0 && out_data == d, "frame past the chain end arrives as address 0");
      for (int k = 0; k < N; k++) check(val[k] == expv[k], "no register taken by a frame past the end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
