// tb_param_ctrl: drives the parameter controller through its register port
// and decodes its serial output independently.  For several addresses and
// words it checks the frame (start bit, address as a count of low bits,
// data start bit, 32 bits MSB first), its length of 34 + address clocks,
// the busy flag, and that a frame starts only on a rising edge of the start
// bit: writing the address register again with start still set sends
// nothing.
module tb_param_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic reg_wr = 0; logic [1:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata;
  logic sout, busy;
  param_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  int frames = 0, f_addr, f_len;
  logic [31:0] f_data;
  initial forever begin
    @(posedge clk);
    if (!rst && sout) begin
      int z; z = 0;
      @(posedge clk);
      while (!sout && z < 1000) begin z++; @(posedge clk); end
      for (int i = 0; i < 32; i++) begin @(posedge clk); f_data = {f_data[30:0], sout}; end
      f_addr = z; f_len = z + 34; frames++;
    end
  end
  int busy_cycles = 0;
  always @(posedge clk) if (busy) busy_cycles++;

  int addrs [5] = '{0, 1, 5, 17, 100};
  initial begin
    repeat (3) @(posedge clk); rst = 0;
    foreach (addrs[i]) begin
      logic [31:0] d; d = $urandom;
      busy_cycles = 0;
      wr(1, 0);
      wr(0, d);
      wr(1, {1'b1, 31'(addrs[i])});
      repeat (addrs[i] + 45) @(posedge clk);
      check(frames == i + 1, "one frame per start edge");
      check(f_addr == addrs[i], $sformatf("address %0d decoded as %0d", addrs[i], f_addr));
      check(f_data == d, "data word");
      check(busy_cycles == addrs[i] + 34, $sformatf("busy for %0d clocks at address %0d", busy_cycles, addrs[i]));
      @(negedge clk); reg_addr = 2; #1 check(reg_rdata == 0, "idle after the frame");
    end
    // start still set: no new frame
    wr(1, {1'b1, 31'd3});
    repeat (60) @(posedge clk);
    check(frames == 5, "no frame without a rising start edge");
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
