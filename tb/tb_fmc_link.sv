// tb_fmc_link: two FMC links, A and B, wired to each other through channel
// models.  The A->B path starts 7 bits off and inverts lanes 1 and 3; the
// B->A path is aligned.  Checks: both receivers lock during the training
// period, within the 160 combinations, on the right shift and inversion
// mask; words then cross in order at one word per link clock (ten blacktop
// clocks here); a burst faster than the link overflows the transmit FIFO
// and is counted; a training command with a realign request makes B search
// and lock again, after which data flows again.
module tb_fmc_link;
  import zc_pkg::*;
  localparam int TRAIN = 400;

  logic clk = 0, link_clk = 0, rst = 1, link_rst = 1;
  always #5  clk = ~clk;
  always #50 link_clk = ~link_clk;

  stream_t a_in = '0, b_in = '0, a_out, b_out;
  logic a_tc = 0, b_tc = 0, a_ra = 0, b_ra = 0;
  logic a_lock, b_lock, a_trn, b_trn, a_slip, b_slip;
  logic [31:0] a_txd, a_rxd, b_txd, b_rxd;
  logic [39:0] a_tx, b_tx, a_rx, b_rx;

  fmc_link #(.TRAIN_CYCLES(TRAIN)) u_a (
    .clk, .rst, .link_clk, .link_rst, .bt_in(a_in), .bt_out(a_out),
    .train_cmd(a_tc), .realign(a_ra), .locked(a_lock), .training(a_trn),
    .tx_drops(a_txd), .rx_drops(a_rxd), .tx_lanes(a_tx), .rx_lanes(a_rx), .bitslip(a_slip));
  fmc_link #(.TRAIN_CYCLES(TRAIN)) u_b (
    .clk, .rst, .link_clk, .link_rst, .bt_in(b_in), .bt_out(b_out),
    .train_cmd(b_tc), .realign(b_ra), .locked(b_lock), .training(b_trn),
    .tx_drops(b_txd), .rx_drops(b_rxd), .tx_lanes(b_tx), .rx_lanes(b_rx), .bitslip(b_slip));
  fmc_channel_model #(.SHIFT(7), .INV(4'b1010)) u_ab (.link_clk, .tx_lanes(a_tx), .bitslip(b_slip), .rx_lanes(b_rx));
  fmc_channel_model #(.SHIFT(0), .INV(4'b0000)) u_ba (.link_clk, .tx_lanes(b_tx), .bitslip(a_slip), .rx_lanes(a_rx));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // receive monitor at B
  int rx_n = 0, rx_bad = 0;
  time t_first, t_last;
  int expect_base = 0;
  always @(posedge clk) if (!rst && b_out.valid) begin
    if (b_out.data != 32'h5000_0000 + rx_n) rx_bad++;
    if (rx_n == 0) t_first = $time;
    t_last = $time;
    rx_n++;
  end
  int a_rx_n = 0;
  always @(posedge clk) if (!rst && a_out.valid) begin
    if (a_out.data != 32'h6000_0000 + a_rx_n) rx_bad++;
    a_rx_n++;
  end

  task automatic send_a(input int n, input int gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); a_in = '{valid:1, data:32'h5000_0000 + sent_a}; sent_a++;
      repeat (gap) begin @(negedge clk); a_in = '0; end
    end
    @(negedge clk); a_in = '0;
  endtask
  int sent_a = 0;

  int lock_cycle;
  initial begin
    repeat (3) @(posedge link_clk); rst = 0; link_rst = 0;
    // both receivers must lock while training is still being sent
    lock_cycle = 0;
    while (!(a_lock && b_lock) && lock_cycle < TRAIN) begin @(posedge link_clk); lock_cycle++; end
    check(a_lock && b_lock, "both receivers lock during training");
    check(u_b.u_rx.tries < 160, $sformatf("B found the combination within 160 tries (%0d)", u_b.u_rx.tries));
    check(u_b.u_rx.inv_mask == 4'b1010, "B undid the inverted lanes");
    check(u_ab.shift == 0, "B slipped to the word boundary");
    check(u_ab.slips == 3, $sformatf("B slipped 3 bits (%0d)", u_ab.slips));
    check(u_a.u_rx.tries == 0 && u_ba.slips == 0, "aligned path locks on the first combination");
    wait (!u_a.training);
    repeat (5) @(posedge link_clk);

    // paced traffic both ways
    fork
      send_a(100, 12);
      for (int i = 0; i < 50; i++) begin
        @(negedge clk); b_in = '{valid:1, data:32'h6000_0000 + i};
        repeat (15) begin @(negedge clk); b_in = '0; end
      end
    join
    repeat (100) @(posedge clk);
    check(rx_n == 100 && rx_bad == 0, $sformatf("A->B delivered %0d/100, %0d bad", rx_n, rx_bad));
    check(a_rx_n == 50, $sformatf("B->A delivered %0d/50", a_rx_n));
    check(a_txd == 0 && b_txd == 0, "no drops at paced rate");

    // rate: 16 words at full blacktop rate fill the FIFO, leave one per link clock
    rx_n = 0; sent_a = 0;
    send_a(16, 0);
    repeat (400) @(posedge clk);
    check(rx_n == 16 && rx_bad == 0, "16-word burst delivered");
    check((t_last - t_first) / 100 == 15, $sformatf("one word per link clock (%0t over 15 words)", t_last - t_first));

    // overflow: 40 words at once into the 16-word transmit FIFO
    rx_n = 0; sent_a = 0;
    send_a(40, 0);
    repeat (800) @(posedge clk);
    check(a_txd > 0, $sformatf("transmit FIFO overflow counted (%0d)", a_txd));
    check(rx_n + a_txd == 40, "words delivered plus words dropped = words sent");

    // retrain on command: A sends training again, B searches again
    @(negedge clk); a_tc = 1; b_ra = 1; @(negedge clk); a_tc = 0; b_ra = 0;
    repeat (8) @(posedge link_clk);
    check(!b_lock, "B dropped lock on realign");
    check(u_a.training, "A is training on command");
    lock_cycle = 0;
    while (!b_lock && lock_cycle < TRAIN) begin @(posedge link_clk); lock_cycle++; end
    check(b_lock, "B locked again during the commanded training");
    wait (!u_a.training);
    repeat (5) @(posedge link_clk);
    rx_n = 0; rx_bad = 0; sent_a = 0;
    send_a(20, 10);
    repeat (300) @(posedge clk);
    check(rx_n == 20 && rx_bad == 0, "data flows after retraining");

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
