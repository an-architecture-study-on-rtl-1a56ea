// tb_zynq_static: end-to-end test of one board's static image with the
// example blacktop, at reduced sizes (training 1000 link clocks, 32-word DMA
// FIFOs, 8-word bursts, 4-tap filters).
//
// Around the design: a memory model per DMA channel, channel models on the
// FMC lanes (links 0-2 loop back to themselves with bit offsets and
// inverted pairs), an external data source on link 3 (a transmitter with
// its own training period), and a stand-in for the vendor FFT that inverts
// each word two clocks later.  A driver model plays the ARM.
//
// Paths checked word by word:
//   source -> link 3 -> pass-through -> DMA 0 write ring
//   source -> link 3 -> FFT stand-in -> DMA 1 write ring
//   DMA 0 read ring -> FIR 0 -> link 0 -> FIR 1 -> DMA 2 write ring
//   DMA 1 read ring -> link 1 -> DMA 3 write ring
// Mechanisms counted, each must happen at least once: receiver lock on all
// four links, bitslip, tap load over the parameter chain, write-ring wrap,
// read-ring wrap, burst at the cap, write-ring interrupt, write-FIFO drop,
// training restarted by register command.
module tb_zynq_static;
  import zc_pkg::*;
  localparam int MAXB = 8, LW = $clog2(MAXB) + 1, TAPS = 4, TRAIN = 1000;
  localparam int WBASE = 32'h1000, RBASE = 32'h2000, RS = 64;   // ring size, words

  logic clk = 0, link_clk = 0, rst = 1, link_rst = 1;
  always #5  clk = ~clk;
  always #50 link_clk = ~link_clk;

  logic reg_wr = 0; logic [7:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata;
  logic [7:0] irq;
  logic wr_req [4], wr_ack [4], wr_data_valid [4], wr_data_ready [4], wr_done [4];
  logic [31:0] wr_addr [4], wr_data [4], rd_addr [4], rd_data [4];
  logic [LW-1:0] wr_len [4], rd_len [4];
  logic rd_req [4], rd_ack [4], rd_data_valid [4], rd_done [4];
  logic [39:0] tx_lanes [4], rx_lanes [4];
  logic bitslip [4];
  stream_t fft_in, fft_out;

  zynq_static #(.DMA_FIFO_DEPTH(32), .MAX_BURST(MAXB), .TRAIN_CYCLES(TRAIN), .FIR_TAPS(TAPS)) dut (.*);

  for (genvar k = 0; k < 4; k++) begin : g_mem
    hp_mem_model #(.LW(LW)) u_mem (
      .clk, .wr_req(wr_req[k]), .wr_addr(wr_addr[k]), .wr_len(wr_len[k]), .wr_ack(wr_ack[k]),
      .wr_data(wr_data[k]), .wr_data_valid(wr_data_valid[k]), .wr_data_ready(wr_data_ready[k]),
      .wr_done(wr_done[k]), .rd_req(rd_req[k]), .rd_addr(rd_addr[k]), .rd_len(rd_len[k]),
      .rd_ack(rd_ack[k]), .rd_data(rd_data[k]), .rd_data_valid(rd_data_valid[k]), .rd_done(rd_done[k]));
  end
  fmc_channel_model #(.SHIFT(2), .INV(4'b0011)) u_ch0 (.link_clk, .tx_lanes(tx_lanes[0]), .bitslip(bitslip[0]), .rx_lanes(rx_lanes[0]));
  fmc_channel_model #(.SHIFT(5), .INV(4'b1000)) u_ch1 (.link_clk, .tx_lanes(tx_lanes[1]), .bitslip(bitslip[1]), .rx_lanes(rx_lanes[1]));
  fmc_channel_model #(.SHIFT(0), .INV(4'b0000)) u_ch2 (.link_clk, .tx_lanes(tx_lanes[2]), .bitslip(bitslip[2]), .rx_lanes(rx_lanes[2]));

  // external data source on link 3
  logic [39:0] src_lanes; logic src_rd, src_trn; logic [31:0] src_data = 0; logic src_empty = 1;
  fmc_tx #(.TRAIN_CYCLES(TRAIN)) u_src (.link_clk, .link_rst, .train_cmd(1'b0), .fifo_empty(src_empty),
    .fifo_data(src_data), .fifo_rd(src_rd), .lanes(src_lanes), .training(src_trn));
  fmc_channel_model #(.SHIFT(7), .INV(4'b0101)) u_ch3 (.link_clk, .tx_lanes(src_lanes), .bitslip(bitslip[3]), .rx_lanes(rx_lanes[3]));
  int src_sent = 0, src_total = 0;
  always @(posedge link_clk) begin
    if (src_rd) begin
      src_sent <= src_sent + 1;
      src_data <= 32'h7000_0000 + src_sent;   // read data one clock after the pop
    end
  end
  always_comb src_empty = (src_sent >= src_total);

  // FFT stand-in: inverted word, two clocks later
  stream_t f1 = '0;
  always @(posedge clk) begin f1 <= fft_in; fft_out <= '{valid: f1.valid, data: ~f1.data}; end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit port_busy = 0;
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    while (port_busy) @(negedge clk);
    port_busy = 1; reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0; port_busy = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    while (port_busy) @(negedge clk);
    port_busy = 1; reg_addr = a; #1 d = reg_rdata; port_busy = 0;
  endtask

  // mechanism counters
  int n_bitslip = 0, n_cap = 0, n_wwrap = 0, n_rwrap = 0, n_irq = 0, n_param = 0, n_drop = 0, n_retrain = 0;
  always @(posedge clk) for (int k = 0; k < 4; k++) begin
    if (wr_req[k] && wr_ack[k] && wr_len[k] == MAXB) n_cap++;
    if (wr_req[k] && wr_ack[k] && (wr_addr[k] - WBASE) / 4 + wr_len[k] == RS) n_wwrap++;
    if (rd_req[k] && rd_ack[k] && (rd_addr[k] - RBASE) / 4 + rd_len[k] == RS) n_rwrap++;
  end
  always @(posedge link_clk) for (int k = 0; k < 4; k++) if (bitslip[k]) n_bitslip++;
  logic irq0_q = 0;
  always @(posedge clk) begin irq0_q <= irq[0]; if (irq[0] && !irq0_q) n_irq++; end

  // ARM driver: copy words out of channel k's write ring
  logic [31:0] got [4][$];
  int rp [4] = '{0, 0, 0, 0};
  task automatic drain(input int k);
    logic [31:0] v; int n;
    rd(8'(16*k + 9), v); n = v / 4;
    if (n > 0) begin
      for (int i = 0; i < n; i++) begin
        got[k].push_back(g_mem_word(k, WBASE / 4 + rp[k]));
        rp[k] = (rp[k] + 1) % RS;
      end
      wr(8'(16*k + 3), n * 4);
    end
  endtask
  function automatic logic [31:0] g_mem_word(int k, int i);
    case (k)
      0: return g_mem[0].u_mem.mem[i];
      1: return g_mem[1].u_mem.mem[i];
      2: return g_mem[2].u_mem.mem[i];
      default: return g_mem[3].u_mem.mem[i];
    endcase
  endfunction
  task automatic put_word(int k, int i, logic [31:0] d);
    case (k)
      0: g_mem[0].u_mem.mem[i] = d;
      default: g_mem[1].u_mem.mem[i] = d;
    endcase
  endtask
  // ARM driver: put words into channel k's read ring, a few at a time
  int wp [4] = '{0, 0, 0, 0};
  task automatic feed(input int k, input logic [31:0] d [$]);
    int i; i = 0;
    while (i < d.size()) begin
      logic [31:0] v; int n;
      rd(8'(16*k + 11), v);
      n = RS - v / 4; if (n > 4) n = 4; if (n > d.size() - i) n = d.size() - i;
      for (int j = 0; j < n; j++) begin
        put_word(k, RBASE / 4 + wp[k], d[i]); wp[k] = (wp[k] + 1) % RS; i++;
      end
      if (n > 0) wr(8'(16*k + 7), n * 4);
      repeat (120) @(posedge clk);
    end
  endtask

  function automatic real f2r(logic [31:0] x);
    real m; int e;
    if (x[30:23] == 0) return 0.0;
    e = int'(x[30:23]) - 127;
    m = (1.0 + real'(x[22:0]) / 8388608.0) * (2.0 ** e);
    return x[31] ? -m : m;
  endfunction
  function automatic logic [31:0] int2f(int n);   // small non-negative integers
    int e; if (n == 0) return 0;
    e = 0; while ((n >> e) > 1) e++;
    return {1'b0, 8'(127 + e), 23'((n << (23 - e)) & 32'h7F_FFFF)};
  endfunction

  localparam int NSRC = 150, NFIR = 100, NX = 100;
  logic [31:0] h0 [TAPS] = '{32'h3F80_0000, 32'h3F00_0000, 32'h3E80_0000, 32'hBF00_0000}; // 1, .5, .25, -.5
  logic [31:0] h1 [TAPS] = '{32'h3F00_0000, 32'h3F80_0000, 32'h0000_0000, 32'h3E80_0000}; // .5, 1, 0, .25
  logic [31:0] xs [$], xwords [$];
  logic [31:0] v;

  initial begin
    repeat (3) @(posedge link_clk); rst = 0; link_rst = 0;
    for (int k = 0; k < 4; k++) begin
      wr(8'(16*k + 1), WBASE); wr(8'(16*k + 2), RS * 4);
      wr(8'(16*k + 5), RBASE); wr(8'(16*k + 6), RS * 4);
      wr(8'(16*k + 0), 1);
    end
    // taps over the parameter chain: FIR 0 at addresses 0..3, FIR 1 at 4..7
    for (int a = 0; a < 2 * TAPS; a++) begin
      wr(8'h41, 0);
      wr(8'h40, a < TAPS ? h0[a] : h1[a - TAPS]);
      wr(8'h41, {1'b1, 31'(a)});
      do rd(8'h42, v); while (v[0]);
      n_param++;
    end
    repeat (60) @(posedge clk);
    for (int a = 0; a < TAPS; a++) begin
      check(dut.u_bt.u_fir0.h[a] == h0[a], "FIR 0 tap loaded");
      check(dut.u_bt.u_fir1.h[a] == h1[a], "FIR 1 tap loaded");
    end
    // wait for the training periods to end; all four receivers must have locked
    wait (!dut.g_fmc[0].u_fmc.training && !src_trn);
    repeat (10) @(posedge clk);
    rd(8'h50, v);
    check(v[3:0] == 4'hF, $sformatf("all four links locked (%b)", v[3:0]));
    wr(8'h04, 1000);                             // ch 0 write-ring irq at min(250, 4) words
    for (int i = 0; i < NX; i++) xs.push_back(int2f($urandom_range(0, 200)));
    for (int i = 0; i < NFIR; i++) xwords.push_back(32'h9000_0000 + i);
    src_total = NSRC;
    fork
      feed(0, xs);
      feed(1, xwords);
      begin
        int guard; guard = 0;
        while ((got[0].size() < NSRC || got[1].size() < NSRC || got[2].size() < NX ||
                got[3].size() < NFIR) && guard < 4000) begin
          for (int k = 0; k < 4; k++) drain(k);
          repeat (20) @(posedge clk);
          guard++;
        end
      end
    join
    // source -> pass-through and FFT paths
    check(got[0].size() == NSRC && got[1].size() == NSRC, $sformatf("source words in DMA 0/1 rings (%0d, %0d)", got[0].size(), got[1].size()));
    begin
      int bad0 = 0, bad1 = 0;
      for (int i = 0; i < got[0].size(); i++) if (got[0][i] != 32'h7000_0000 + i) bad0++;
      for (int i = 0; i < got[1].size(); i++) if (got[1][i] != ~(32'h7000_0000 + i)) bad1++;
      check(bad0 == 0, "pass-through path in order");
      check(bad1 == 0, "FFT path in order");
    end
    // FIR -> link -> FIR
    check(got[2].size() == NX, $sformatf("filtered words (%0d)", got[2].size()));
    begin
      real y1 [$]; int bad; bad = 0;
      for (int n = 0; n < NX; n++) begin
        real s; s = 0;
        for (int k = 0; k < TAPS; k++) if (n >= k) s += f2r(h0[k]) * f2r(xs[n - k]);
        y1.push_back(s);
      end
      for (int n = 0; n < got[2].size(); n++) begin
        real s; s = 0;
        for (int k = 0; k < TAPS; k++) if (n >= k) s += f2r(h1[k]) * y1[n - k];
        if (f2r(got[2][n]) != s) begin bad++; if (bad < 4) $display("y[%0d]=%g want %g", n, f2r(got[2][n]), s); end
      end
      check(bad == 0, "two FIR filters across link 0 match the reference");
    end
    // xwords link
    begin
      int bad; bad = 0;
      for (int i = 0; i < got[3].size(); i++) if (got[3][i] != 32'h9000_0000 + i) bad++;
      check(got[3].size() == NFIR && bad == 0, "DMA 1 -> link 1 -> DMA 3 in order");
    end
    check(n_irq > 0, "write-ring interrupt raised");

    // drop: channel 1's write FIFO overflows while the channel is disabled
    wr(8'h10, 0);
    src_total = NSRC + 60;
    repeat (60 * 12 + 200) @(posedge clk);
    rd(8'h1E, v); n_drop = v;
    check(v == 60 - 32, $sformatf("DMA 1 dropped the words beyond its FIFO (%0d)", v));
    // re-enabled, the full FIFO leaves in bursts at the cap
    wr(8'h10, 1);
    repeat (300) @(posedge clk);
    drain(1);
    check(got[1].size() == NSRC + 32, $sformatf("the 32 held words delivered (%0d)", got[1].size() - NSRC));

    // training restarted by command on link 1: receiver searches and locks again
    wr(8'h50, 32'h0000_0022);
    repeat (40) @(posedge clk);
    if (dut.g_fmc[1].u_fmc.training) n_retrain++;
    wait (!dut.g_fmc[1].u_fmc.training);
    repeat (10) @(posedge clk);
    rd(8'h50, v);
    check(v[1], "link 1 locked again after commanded training");

    check(n_bitslip > 0, "bitslip happened");
    check(n_param == 2 * TAPS, "parameter writes");
    check(n_cap > 0, "burst at the cap");
    check(n_wwrap > 0, "write ring wrapped");
    check(n_rwrap > 0, "read ring wrapped");
    check(n_drop > 0, "write-FIFO drop");
    check(n_retrain > 0, "training on command");
    $display("mechanisms: bitslip=%0d param=%0d cap=%0d wwrap=%0d rwrap=%0d irq=%0d drop=%0d retrain=%0d",
             n_bitslip, n_param, n_cap, n_wwrap, n_rwrap, n_irq, n_drop, n_retrain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
