// tb_cluster_fir: two boards of the cluster running the filter stage of the
// FM receiver flow, with the filtering split across boards: samples that
// software on board A puts in its DMA channel 0 read ring pass FIR 0 on
// board A, cross the FMC link 0 cable to board B, pass FIR 1 there and land
// in board B's DMA channel 2 write ring, where software would pick them up.
// This is the pattern of a filter chain split over two boards.
//
// Reduced sizes: training 1000 link clocks, 32-word DMA FIFOs, 8-word
// bursts, 4-tap filters.  The two cables between the boards have their own
// bit offsets and inverted pairs; links 1-3 of each board loop back to
// themselves.  The blacktop clock runs at twice the link clock.  Taps are
// powers of two and samples small integers, so the expected output is
// exact.  Checks: all links of both boards lock, board A fetches every
// sample, board B receives them without drops, and each output equals the
// two-stage convolution.
module tb_cluster_fir;
  import zc_pkg::*;
  localparam int MB = 8, LW = $clog2(MB) + 1, TAPS = 4, TRAIN = 1000;
  localparam int WBASE = 32'h400, RBASE = 32'h800, RS = 64, NX = 48;

  logic clk = 0, link_clk = 0, rst = 1, link_rst = 1;
  always #5 clk = ~clk;
  always #10 link_clk = ~link_clk;

  logic reg_wr [2];
  logic [7:0] reg_addr [2];
  logic [31:0] reg_wdata [2], reg_rdata [2];
  logic [39:0] tx [2][4], rx [2][4];
  logic slip [2][4];

  for (genvar b = 0; b < 2; b++) begin : g_board
    logic [7:0] irq;
    logic wr_req [4], wr_ack [4], wr_data_valid [4], wr_data_ready [4], wr_done [4];
    logic [31:0] wr_addr [4], wr_data [4], rd_addr [4], rd_data [4];
    logic [LW-1:0] wr_len [4], rd_len [4];
    logic rd_req [4], rd_ack [4], rd_data_valid [4], rd_done [4];
    logic [39:0] tx_lanes [4], rx_lanes [4];
    logic bitslip [4];
    stream_t fft_in, fft_out;
    assign fft_out = '0;
    for (genvar k = 0; k < 4; k++) begin : g_l
      assign tx[b][k] = tx_lanes[k];
      assign rx_lanes[k] = rx[b][k];
      assign slip[b][k] = bitslip[k];
    end
    zynq_static #(.DMA_FIFO_DEPTH(32), .MAX_BURST(MB), .LINK_FIFO_DEPTH(16),
                  .TRAIN_CYCLES(TRAIN), .FIR_TAPS(TAPS)) dut (
      .clk, .rst, .link_clk, .link_rst,
      .reg_wr(reg_wr[b]), .reg_addr(reg_addr[b]), .reg_wdata(reg_wdata[b]), .reg_rdata(reg_rdata[b]),
      .irq, .wr_req, .wr_addr, .wr_len, .wr_ack, .wr_data, .wr_data_valid, .wr_data_ready, .wr_done,
      .rd_req, .rd_addr, .rd_len, .rd_ack, .rd_data, .rd_data_valid, .rd_done,
      .tx_lanes, .rx_lanes, .bitslip, .fft_in, .fft_out);
    for (genvar k = 0; k < 4; k++) begin : g_mem
      hp_mem_model #(.LW(LW)) u_mem (
        .clk, .wr_req(wr_req[k]), .wr_addr(wr_addr[k]), .wr_len(wr_len[k]), .wr_ack(wr_ack[k]),
        .wr_data(wr_data[k]), .wr_data_valid(wr_data_valid[k]), .wr_data_ready(wr_data_ready[k]),
        .wr_done(wr_done[k]), .rd_req(rd_req[k]), .rd_addr(rd_addr[k]), .rd_len(rd_len[k]),
        .rd_ack(rd_ack[k]), .rd_data(rd_data[k]), .rd_data_valid(rd_data_valid[k]), .rd_done(rd_done[k]));
    end
  end

  // cables between the boards on link 0 (A = board 0, B = board 1)
  fmc_channel_model #(.SHIFT(3), .INV(4'b1010)) u_ab (.link_clk, .tx_lanes(tx[0][0]), .bitslip(slip[1][0]), .rx_lanes(rx[1][0]));
  fmc_channel_model #(.SHIFT(8), .INV(4'b0100)) u_ba (.link_clk, .tx_lanes(tx[1][0]), .bitslip(slip[0][0]), .rx_lanes(rx[0][0]));
  // links 1-3 loop back on each board
  for (genvar b = 0; b < 2; b++) begin : g_loop
    for (genvar k = 1; k < 4; k++) begin : g_k
      fmc_channel_model #(.SHIFT(k + 2 * b), .INV(4'(k * 3 + b))) u_lb (
        .link_clk, .tx_lanes(tx[b][k]), .bitslip(slip[b][k]), .rx_lanes(rx[b][k]));
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input int b, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr[b] = 1; reg_addr[b] = a; reg_wdata[b] = d;
    @(negedge clk); reg_wr[b] = 0;
  endtask
  task automatic rd(input int b, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr[b] = a; #1 d = reg_rdata[b];
  endtask
  task automatic set_param(input int b, input int a, input logic [31:0] d);
    logic [31:0] v;
    wr(b, 8'h41, 0);
    wr(b, 8'h40, d);
    wr(b, 8'h41, {1'b1, 31'(a)});
    do rd(b, 8'h42, v); while (v[0]);
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
  function automatic logic [31:0] ptap();
    return {1'($urandom), 8'(127 - $urandom_range(0, 3)), 23'd0};
  endfunction

  logic [31:0] hA [TAPS], hB [TAPS], xs [NX], v;

  initial begin
    for (int b = 0; b < 2; b++) begin reg_wr[b] = 0; reg_addr[b] = 0; reg_wdata[b] = 0; end
    repeat (4) @(posedge link_clk); rst = 0; link_rst = 0;
    // board A: read ring of channel 0 feeds FIR 0; board B: channel 2 write ring takes FIR 1
    wr(0, 8'h05, RBASE); wr(0, 8'h06, RS * 4); wr(0, 8'h00, 1);
    wr(1, 8'h21, WBASE); wr(1, 8'h22, RS * 4); wr(1, 8'h20, 1);
    for (int k = 0; k < TAPS; k++) begin hA[k] = ptap(); hB[k] = ptap(); end
    for (int k = 0; k < TAPS; k++) set_param(0, k, hA[k]);          // A: FIR 0
    for (int k = 0; k < TAPS; k++) set_param(1, TAPS + k, hB[k]);   // B: FIR 1
    repeat (2 * TRAIN + 100) @(posedge link_clk);
    rd(0, 8'h50, v); check(v[3:0] == 4'hF, $sformatf("board A links locked (%b)", v[3:0]));
    rd(1, 8'h50, v); check(v[3:0] == 4'hF, $sformatf("board B links locked (%b)", v[3:0]));
    for (int i = 0; i < NX; i++) begin
      xs[i] = int2f($urandom_range(0, 255));
      g_board[0].g_mem[0].u_mem.mem[RBASE / 4 + i] = xs[i];
    end
    wr(0, 8'h07, NX * 4);   // software on A reports the copy into its read ring
    repeat (3000) @(posedge clk);
    rd(0, 8'h0B, v); check(v == 0, $sformatf("board A fetched every sample (%0d bytes left)", v));
    rd(1, 8'h29, v); check(v == NX * 4, $sformatf("board B ring holds every filtered sample (%0d bytes)", v));
    rd(1, 8'h55, v); check(v == 0, "no receive drops on board B link 0");
    begin
      int bad; real y1 [NX];
      bad = 0;
      for (int n = 0; n < NX; n++) begin
        real s; s = 0;
        for (int k = 0; k < TAPS; k++) if (n >= k) s += f2r(hA[k]) * f2r(xs[n - k]);
        y1[n] = s;
      end
      for (int n = 0; n < NX; n++) begin
        real s; s = 0;
        for (int k = 0; k < TAPS; k++) if (n >= k) s += f2r(hB[k]) * y1[n - k];
        if (f2r(g_board[1].g_mem[2].u_mem.mem[WBASE / 4 + n]) != s) bad++;
      end
      check(bad == 0, $sformatf("filter split over two boards matches the reference (%0d bad)", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
