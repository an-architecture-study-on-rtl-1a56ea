// tb_dma_channel: self-checking test of one DMA channel against a memory
// model.
//
// Small FIFOs (32 words) and a short burst cap (8 words) make every burst
// limit matter.  The test streams a counting sequence in on bt_in while a
// software model plays the ARM driver: it polls WBUF_FILL, copies words out
// of the write ring, checks them and reports them with WBUF_DONE.  At the
// same time it fills the read ring, reports with RBUF_DONE, and checks the
// words arriving on bt_out.  Both rings wrap several times.  It also checks
// that no burst crosses a ring end or exceeds the cap, that bursts limited
// by each of the three factors occur, both interrupt thresholds
// (min(request, size/16)), FIFO overflow drops, and the soft reset.
module tb_dma_channel;
  import zc_pkg::*;
  localparam int DEPTH = 32, MAXB = 8, LW = $clog2(MAXB) + 1;
  localparam int WBASE = 32'h1000, WSIZE = 64, RBASE = 32'h2000, RSIZE = 48; // sizes in words
  localparam int NW = 300, NR = 200;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic reg_wr = 0; logic [3:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata;
  logic irq_wbuf, irq_rbuf;
  stream_t bt_in = '0, bt_out;
  logic wr_req, wr_ack, wr_data_valid, wr_data_ready, wr_done;
  logic [31:0] wr_addr, wr_data; logic [LW-1:0] wr_len;
  logic rd_req, rd_ack, rd_data_valid, rd_done;
  logic [31:0] rd_addr, rd_data; logic [LW-1:0] rd_len;

  dma_channel #(.FIFO_DEPTH(DEPTH), .MAX_BURST(MAXB)) dut (.*);
  hp_mem_model #(.LW(LW)) u_mem (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the register port is shared by concurrent driver threads
  bit port_busy = 0;
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    while (port_busy) @(negedge clk);
    port_busy = 1; reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0; port_busy = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    while (port_busy) @(negedge clk);
    port_busy = 1; reg_addr = a; #1 d = reg_rdata; port_busy = 0;
  endtask

  // burst monitor
  int n_full = 0, n_end = 0, n_short = 0, bad_burst = 0;
  always @(posedge clk) if (!rst && wr_req && wr_ack) begin
    int off; off = (wr_addr - WBASE) / 4;
    if (off + wr_len > WSIZE || wr_len > MAXB || wr_len == 0) bad_burst++;
    if (wr_len == MAXB) n_full++;
    else if (off + wr_len == WSIZE) n_end++;
    else n_short++;
  end
  always @(posedge clk) if (!rst && rd_req && rd_ack) begin
    int off; off = (rd_addr - RBASE) / 4;
    if (off + rd_len > RSIZE || rd_len > MAXB || rd_len == 0) bad_burst++;
  end

  // blacktop output collector
  int rx_n = 0, rx_bad = 0;
  always @(posedge clk) if (!rst && bt_out.valid) begin
    if (bt_out.data != 32'hA000_0000 + rx_n) begin rx_bad++; if (rx_bad < 4) $display("rx %0d got %h", rx_n, bt_out.data); end
    rx_n++;
  end

  logic [31:0] v;
  int arm_rp = 0, arm_wp = 0, got = 0, sent = 0, werr = 0;

  initial begin
    repeat (5) @(posedge clk); rst = 0;
    wr(1, WBASE); wr(2, WSIZE*4); wr(5, RBASE); wr(6, RSIZE*4);

    // write-ring interrupt: ask for 1000 bytes -> threshold min(250, 64/16) = 4 words
    wr(4, 1000);
    wr(0, 1);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); bt_in = '{valid:1, data:32'hB000_0000 + sent}; sent++;
      @(negedge clk); bt_in = '0;
    end
    repeat (60) @(posedge clk);
    check(!irq_wbuf, "write-ring irq must stay low below threshold");
    @(negedge clk); bt_in = '{valid:1, data:32'hB000_0000 + sent}; sent++;
    @(negedge clk); bt_in = '0;
    repeat (60) @(posedge clk);
    check(irq_wbuf, "write-ring irq at 4 valid words");
    rd(9, v); check(v == 16, "WBUF_FILL = 16 bytes");
    wr(4, 0);
    check(!irq_wbuf, "write-ring irq cleared by rewrite");

    fork
      // producer into bt_in
      begin
        while (sent < NW) begin
          @(negedge clk);
          if ($urandom_range(0, 2) == 0) begin
            bt_in = '{valid:1, data:32'hB000_0000 + sent}; sent++;
          end else bt_in = '0;
        end
        @(negedge clk); bt_in = '0;
      end
      // ARM reading the write ring
      begin
        while (got < NW) begin
          int n;
          rd(9, v); n = v / 4;
          if (n > 0) begin
            n = $urandom_range(1, n);
            for (int i = 0; i < n; i++) begin
              if (u_mem.mem[WBASE/4 + arm_rp] != 32'hB000_0000 + got) begin werr++; if (werr < 4) $display("w %0d got %h", got, u_mem.mem[WBASE/4 + arm_rp]); end
              arm_rp = (arm_rp + 1) % WSIZE; got++;
            end
            wr(3, n * 4);
          end
          repeat ($urandom_range(0, 20)) @(posedge clk);
        end
      end
      // ARM writing the read ring
      begin
        int put = 0;
        while (put < NR) begin
          int fill, n;
          rd(11, v); fill = v / 4;
          n = RSIZE - fill; if (n > NR - put) n = NR - put;
          if (n > 0) begin
            n = $urandom_range(1, n);
            for (int i = 0; i < n; i++) begin
              u_mem.mem[RBASE/4 + arm_wp] = 32'hA000_0000 + put;
              arm_wp = (arm_wp + 1) % RSIZE; put++;
            end
            wr(7, n * 4);
          end
          repeat ($urandom_range(0, 30)) @(posedge clk);
        end
      end
    join
    repeat (100) @(posedge clk);
    check(werr == 0, $sformatf("write-ring data in order (%0d errors)", werr));
    check(got == NW, "all written words read back");
    check(rx_n == NR && rx_bad == 0, $sformatf("read path delivered %0d/%0d words, %0d wrong", rx_n, NR, rx_bad));
    check(bad_burst == 0, "no burst crosses a ring end or exceeds the cap");
    check(n_full > 0, "bursts limited by the burst cap");
    check(n_end > 0, "bursts limited by the ring end");
    check(n_short > 0, "bursts limited by FIFO data or ring space");
    rd(14, v); check(v == 0, "no drops at a third of full rate");

    // read-ring interrupt: fill the ring while disabled, ask for 8 bytes -> min(2, 48/16) = 2
    wr(0, 0);
    for (int i = 0; i < RSIZE; i++) begin
      u_mem.mem[RBASE/4 + arm_wp] = 32'hA000_0000 + NR + i; arm_wp = (arm_wp + 1) % RSIZE;
    end
    wr(7, RSIZE * 4);
    wr(8, 8);
    repeat (30) @(posedge clk);
    check(!irq_rbuf, "read-ring irq low while ring is full");
    wr(0, 1);
    repeat (200) @(posedge clk);
    check(irq_rbuf, "read-ring irq once space is free");
    check(rx_n == NR + RSIZE && rx_bad == 0, "full read ring drained in order");

    // overflow: disabled channel, 40 words into a 32-word FIFO
    wr(0, 0);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); bt_in = '{valid:1, data:32'hC000_0000 + i};
    end
    @(negedge clk); bt_in = '0;
    rd(14, v); check(v == 8, $sformatf("8 words dropped at the full write FIFO (got %0d)", v));

    // soft reset
    wr(0, 2);
    rd(9, v); check(v == 0, "soft reset clears WBUF_FILL");
    rd(14, v); check(v == 0, "soft reset clears the drop count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
