// fmc_link: one bidirectional FMC link of the static image, from blacktop
// ports to the serializer/deserializer lane words.
//
// Transmit: words on bt_in (blacktop clock, valid-qualified) enter a
// dual-clock FIFO and leave through fmc_tx at one 33-bit word per 10 MHz
// link clock, 320 Mb/s of payload.  Receive: fmc_rx aligns to the far end's
// training sequence; once locked, valid words cross a second dual-clock FIFO
// and appear on bt_out in the blacktop clock, one per clock while the FIFO
// holds data.  train_cmd and realign are one-clock pulses in the blacktop
// clock, carried into the link clock by toggle synchronisers; locked is
// brought back by a two-flop synchroniser.  Words that find a FIFO full
// are dropped and counted.  The 10:1 serializers and deserializers
// themselves are vendor cores outside this module: tx_lanes goes to them,
// rx_lanes and bitslip come from and go to them.
// The 10 MHz FIFO interface, the 33-bit word and training on command
// follow the document; the synchronisers, FIFO depth and drop counting are
// this design's choice.
module fmc_link
  import zc_pkg::*;
#(
  parameter int unsigned TRAIN_CYCLES = 50_000_000,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned SETTLE       = 4,
  parameter int unsigned MATCH_N      = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 link_clk,
  input  logic                 link_rst,
  input  stream_t              bt_in,
  output stream_t              bt_out,
  input  logic                 train_cmd,
  input  logic                 realign,
  output logic                 locked,
  output logic                 training,
  output logic [31:0]          tx_drops,
  output logic [31:0]          rx_drops,
  output logic [LINK_BITS-1:0] tx_lanes,
  input  logic [LINK_BITS-1:0] rx_lanes,
  output logic                 bitslip
);
  // control pulses into the link clock domain
  logic tcmd_t, rel_t;
  logic [2:0] tcmd_s, rel_s;
  logic tcmd_l, rel_l;
  always_ff @(posedge clk) begin
    if (rst) begin tcmd_t <= 1'b0; rel_t <= 1'b0; end
    else begin
      if (train_cmd) tcmd_t <= ~tcmd_t;
      if (realign)   rel_t  <= ~rel_t;
    end
  end
  always_ff @(posedge link_clk) begin
    if (link_rst) begin tcmd_s <= '0; rel_s <= '0; end
    else begin
      tcmd_s <= {tcmd_s[1:0], tcmd_t};
      rel_s  <= {rel_s[1:0], rel_t};
    end
  end
  assign tcmd_l = tcmd_s[2] ^ tcmd_s[1];
  assign rel_l  = rel_s[2] ^ rel_s[1];

  // transmit
  logic        txf_full, txf_empty, txf_rd;
  logic [32:0] txf_data;
  async_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH)) u_txfifo (
    .wr_clk(clk), .wr_rst(rst), .wr_en(bt_in.valid), .wr_data(bt_in),
    .full(txf_full), .overflows(tx_drops),
    .rd_clk(link_clk), .rd_rst(link_rst), .rd_en(txf_rd), .rd_data(txf_data),
    .empty(txf_empty)
  );
  fmc_tx #(.TRAIN_CYCLES(TRAIN_CYCLES)) u_tx (
    .link_clk, .link_rst, .train_cmd(tcmd_l),
    .fifo_empty(txf_empty), .fifo_data(txf_data[31:0]), .fifo_rd(txf_rd),
    .lanes(tx_lanes), .training
  );

  // receive
  stream_t     rx_word;
  logic        rx_locked;
  logic [LANES-1:0] inv_mask;
  logic [3:0]  shift;
  logic [15:0] tries;
  fmc_rx #(.SETTLE(SETTLE), .MATCH_N(MATCH_N)) u_rx (
    .link_clk, .link_rst, .realign(rel_l), .lanes(rx_lanes), .bitslip,
    .locked(rx_locked), .word_out(rx_word), .inv_mask, .shift, .tries
  );

  logic        rxf_full, rxf_empty, rxf_pend;
  logic [32:0] rxf_data;
  async_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH)) u_rxfifo (
    .wr_clk(link_clk), .wr_rst(link_rst), .wr_en(rx_word.valid), .wr_data(rx_word),
    .full(rxf_full), .overflows(rx_drops),
    .rd_clk(clk), .rd_rst(rst), .rd_en(!rxf_empty), .rd_data(rxf_data),
    .empty(rxf_empty)
  );

  logic [1:0] lock_s;
  always_ff @(posedge clk) begin
    if (rst) begin
      rxf_pend <= 1'b0;
      bt_out   <= '0;
      lock_s   <= '0;
    end else begin
      rxf_pend     <= !rxf_empty;
      bt_out.valid <= rxf_pend;
      bt_out.data  <= rxf_data[31:0];
      lock_s       <= {lock_s[0], rx_locked};
    end
  end
  assign locked = lock_s[1];
endmodule
