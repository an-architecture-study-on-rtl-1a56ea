// tb_zynq_static_full: one complete operation of the board image with
// every parameter at its default, including the full five-second training
// period (50,000,000 link clocks).  Here the blacktop clock runs at the link
// clock's rate to keep the run short.
//
// After reset the DMA channels are set up and the sixteen taps of both
// filters are loaded over the parameter chain while the links train.  When
// training ends, an external source sends words over link 3; they must
// arrive in order in DMA channel 0's write ring (pass-through) and, inverted
// by the FFT stand-in, in channel 1's ring.  Samples written into channel
// 0's read ring pass FIR 0, loop through link 0, pass FIR 1 and must arrive
// in channel 2's ring as the reference convolution (taps are powers of two
// and samples small integers, so the arithmetic is exact).
module tb_zynq_static_full;
  import zc_pkg::*;
  localparam int LW = $clog2(256) + 1, TAPS = 16;
  localparam int WBASE = 32'h1000, RBASE = 32'h2000, RS = 256;
  localparam int NSRC = 40, NX = 40;

  logic clk = 0, rst = 1, link_rst = 1;
  always #50 clk = ~clk;
  wire link_clk = clk;

  logic reg_wr = 0; logic [7:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata;
  logic [7:0] irq;
  logic wr_req [4], wr_ack [4], wr_data_valid [4], wr_data_ready [4], wr_done [4];
  logic [31:0] wr_addr [4], wr_data [4], rd_addr [4], rd_data [4];
  logic [LW-1:0] wr_len [4], rd_len [4];
  logic rd_req [4], rd_ack [4], rd_data_valid [4], rd_done [4];
  logic [39:0] tx_lanes [4], rx_lanes [4];
  logic bitslip [4];
  stream_t fft_in, fft_out;

  zynq_static dut (.*);

  for (genvar k = 0; k < 4; k++) begin : g_mem
    hp_mem_model #(.LW(LW)) u_mem (
      .clk, .wr_req(wr_req[k]), .wr_addr(wr_addr[k]), .wr_len(wr_len[k]), .wr_ack(wr_ack[k]),
      .wr_data(wr_data[k]), .wr_data_valid(wr_data_valid[k]), .wr_data_ready(wr_data_ready[k]),
      .wr_done(wr_done[k]), .rd_req(rd_req[k]), .rd_addr(rd_addr[k]), .rd_len(rd_len[k]),
      .rd_ack(rd_ack[k]), .rd_data(rd_data[k]), .rd_data_valid(rd_data_valid[k]), .rd_done(rd_done[k]));
  end
  fmc_channel_model #(.SHIFT(4), .INV(4'b0110)) u_ch0 (.link_clk, .tx_lanes(tx_lanes[0]), .bitslip(bitslip[0]), .rx_lanes(rx_lanes[0]));
  fmc_channel_model #(.SHIFT(1), .INV(4'b0001)) u_ch1 (.link_clk, .tx_lanes(tx_lanes[1]), .bitslip(bitslip[1]), .rx_lanes(rx_lanes[1]));
  fmc_channel_model #(.SHIFT(9), .INV(4'b1111)) u_ch2 (.link_clk, .tx_lanes(tx_lanes[2]), .bitslip(bitslip[2]), .rx_lanes(rx_lanes[2]));

  logic [39:0] src_lanes; logic src_rd, src_trn; logic [31:0] src_data = 0; logic src_empty;
  fmc_tx u_src (.link_clk, .link_rst, .train_cmd(1'b0), .fifo_empty(src_empty),
    .fifo_data(src_data), .fifo_rd(src_rd), .lanes(src_lanes), .training(src_trn));
  fmc_channel_model #(.SHIFT(6), .INV(4'b1001)) u_ch3 (.link_clk, .tx_lanes(src_lanes), .bitslip(bitslip[3]), .rx_lanes(rx_lanes[3]));
  int src_sent = 0, src_total = 0;
  always @(posedge link_clk) if (src_rd) begin
    src_sent <= src_sent + 1;
    src_data <= 32'h7000_0000 + src_sent;
  end
  always_comb src_empty = (src_sent >= src_total) || ((src_sent % 4) == 3 && $urandom_range(0, 1) == 0);

  stream_t f1 = '0;
  always @(posedge clk) begin f1 <= fft_in; fft_out <= '{valid: f1.valid, data: ~f1.data}; end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; #1 d = reg_rdata;
  endtask

  function automatic real f2r(logic [31:0] x);
    real m; int e;
    if (x[30:23] == 0) return 0.0;
    e = int'(x[30:23]) - 127;
    m = (1.0 + real'(x[22:0]) / 8388608.0) * (2.0 ** e);
    return x[31] ? -m : m;
  endfunction
  function automatic logic [31:0] int2f(int n);
    int e; if (n == 0) return 0;
    e = 0; while ((n >> e) > 1) e++;
    return {1'b0, 8'(127 + e), 23'((n << (23 - e)) & 32'h7F_FFFF)};
  endfunction

  logic [31:0] h0 [TAPS], h1 [TAPS], xs [NX], v;
  int ncyc = 0;
  always @(posedge clk) ncyc++;

  initial begin
    repeat (3) @(posedge clk); rst = 0; link_rst = 0;
    for (int k = 0; k < 3; k++) begin
      wr(8'(16*k + 1), WBASE); wr(8'(16*k + 2), RS * 4);
      wr(8'(16*k + 5), RBASE); wr(8'(16*k + 6), RS * 4);
      wr(8'(16*k + 0), 1);
    end
    for (int a = 0; a < TAPS; a++) begin
      h0[a] = ($urandom_range(0, 2) == 0) ? 32'h0 : {1'($urandom), 8'(127 - $urandom_range(0, 3)), 23'd0};
      h1[a] = ($urandom_range(0, 2) == 0) ? 32'h0 : {1'($urandom), 8'(127 - $urandom_range(0, 3)), 23'd0};
    end
    for (int a = 0; a < 2 * TAPS; a++) begin
      wr(8'h41, 0);
      wr(8'h40, a < TAPS ? h0[a] : h1[a - TAPS]);
      wr(8'h41, {1'b1, 31'(a)});
      do rd(8'h42, v); while (v[0]);
    end
    wait (!src_trn && !dut.g_fmc[0].u_fmc.training);
    $display("training ended after %0d clocks", ncyc);
    check(ncyc >= 50_000_000, "training lasted five seconds of link clocks");
    repeat (10) @(posedge clk);
    rd(8'h50, v);
    check(v[3:0] == 4'hF, $sformatf("all four links locked (%b)", v[3:0]));
    src_total = NSRC;
    for (int i = 0; i < NX; i++) begin
      xs[i] = int2f($urandom_range(0, 255));
      g_mem[0].u_mem.mem[RBASE / 4 + i] = xs[i];
    end
    wr(8'h07, NX * 4);
    repeat (2000) @(posedge clk);
    rd(8'h09, v); check(v == NSRC * 4, $sformatf("pass-through words in DMA 0 ring (%0d bytes)", v));
    rd(8'h19, v); check(v == NSRC * 4, $sformatf("FFT words in DMA 1 ring (%0d bytes)", v));
    rd(8'h29, v); check(v == NX * 4, $sformatf("filtered words in DMA 2 ring (%0d bytes)", v));
    begin
      int bad; real y1 [NX];
      bad = 0;
      for (int i = 0; i < NSRC; i++) begin
        if (g_mem[0].u_mem.mem[WBASE / 4 + i] != 32'h7000_0000 + i) bad++;
        if (g_mem[1].u_mem.mem[WBASE / 4 + i] != ~(32'h7000_0000 + i)) bad++;
      end
      check(bad == 0, "source words in order on both paths");
      bad = 0;
      for (int n = 0; n < NX; n++) begin
        real s; s = 0;
        for (int k = 0; k < TAPS; k++) if (n >= k) s += f2r(h0[k]) * f2r(xs[n - k]);
        y1[n] = s;
      end
      for (int n = 0; n < NX; n++) begin
        real s; s = 0;
        for (int k = 0; k < TAPS; k++) if (n >= k) s += f2r(h1[k]) * y1[n - k];
        if (f2r(g_mem[2].u_mem.mem[WBASE / 4 + n]) != s) bad++;
      end
      check(bad == 0, $sformatf("two 16-tap filters across link 0 match the reference (%0d bad)", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
