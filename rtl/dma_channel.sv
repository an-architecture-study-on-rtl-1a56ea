// dma_channel: one bidirectional DMA channel between two blacktop ports and
// a pair of circular buffers in DDR memory.
//
// Blacktop -> ARM: words on bt_in (valid-qualified, no back-pressure) enter
// the write FIFO; the control logic moves them in bursts into the write ring
// through the high-performance master port.  A word that finds the FIFO full
// is dropped and counted.  ARM -> blacktop: the control logic fetches what
// the ARM has put in the read ring into the read FIFO, which drains onto
// bt_out one word per clock whenever it holds data.  The ARM configures the
// channel through the register port (map in dma_regs) and gets two
// interrupts, one per ring.
//
// Timing: a word on bt_in can appear on wr_data two clocks later at the
// earliest; a word delivered on rd_data_valid appears on bt_out the next
// clock.  Structure follows the document's single-channel block diagram;
// FIFO depths and the burst cap are this design's choice.
module dma_channel
  import zc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MAX_BURST  = 256,
  localparam int unsigned LW        = $clog2(MAX_BURST) + 1
) (
  input  logic          clk,
  input  logic          rst,
  // ARM register port
  input  logic          reg_wr,
  input  logic [3:0]    reg_addr,
  input  logic [31:0]   reg_wdata,
  output logic [31:0]   reg_rdata,
  output logic          irq_wbuf,
  output logic          irq_rbuf,
  // blacktop
  input  stream_t       bt_in,
  output stream_t       bt_out,
  // HP master: write channel
  output logic          wr_req,
  output logic [31:0]   wr_addr,
  output logic [LW-1:0] wr_len,
  input  logic          wr_ack,
  output logic [31:0]   wr_data,
  output logic          wr_data_valid,
  input  logic          wr_data_ready,
  input  logic          wr_done,
  // HP master: read channel
  output logic          rd_req,
  output logic [31:0]   rd_addr,
  output logic [LW-1:0] rd_len,
  input  logic          rd_ack,
  input  logic [31:0]   rd_data,
  input  logic          rd_data_valid,
  input  logic          rd_done
);
  localparam int unsigned FW = $clog2(FIFO_DEPTH) + 1;

  logic        enable, soft_rst;
  logic [31:0] wbuf_base, rbuf_base;
  logic [29:0] wbuf_size, rbuf_size, done_words, irq_words;
  logic        wbuf_done_stb, rbuf_done_stb, wirq_stb, rirq_stb;
  logic [29:0] wbuf_fill, wbuf_ptr, rbuf_fill, rbuf_ptr;
  logic [31:0] drops, rdrops;
  logic [FW-1:0] wcount, rcount;
  logic        wpop, wfull, wempty, rfull, rempty;
  logic [31:0] rhead;
  logic        fifo_rst;

  assign fifo_rst = rst || soft_rst;

  dma_regs u_regs (
    .clk, .rst, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .enable, .soft_rst, .wbuf_base, .wbuf_size, .rbuf_base, .rbuf_size,
    .wbuf_done_stb, .rbuf_done_stb, .done_words, .wirq_stb, .rirq_stb, .irq_words,
    .wbuf_fill, .wbuf_ptr, .rbuf_fill, .rbuf_ptr,
    .wirq(irq_wbuf), .rirq(irq_rbuf), .drops
  );

  dma_ctrl #(.MAX_BURST(MAX_BURST), .FIFO_DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk, .rst, .enable, .soft_rst, .wbuf_base, .wbuf_size, .rbuf_base, .rbuf_size,
    .wbuf_done_stb, .rbuf_done_stb, .done_words, .wirq_stb, .rirq_stb, .irq_words,
    .wbuf_fill, .wbuf_ptr, .rbuf_fill, .rbuf_ptr, .wirq(irq_wbuf), .rirq(irq_rbuf),
    .wfifo_count(wcount), .wfifo_pop(wpop), .rfifo_count(rcount),
    .wr_req, .wr_addr, .wr_len, .wr_ack, .wr_data_valid, .wr_data_ready, .wr_done,
    .rd_req, .rd_addr, .rd_len, .rd_ack, .rd_done
  );

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_wfifo (
    .clk, .rst(fifo_rst), .wr_en(bt_in.valid), .wr_data(bt_in.data),
    .rd_en(wpop), .rd_data(wr_data), .count(wcount), .full(wfull), .empty(wempty),
    .overflows(drops)
  );

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_rfifo (
    .clk, .rst(fifo_rst), .wr_en(rd_data_valid), .wr_data(rd_data),
    .rd_en(!rempty), .rd_data(rhead), .count(rcount), .full(rfull), .empty(rempty),
    .overflows(rdrops)
  );

  always_ff @(posedge clk) begin
    if (rst) bt_out <= '0;
    else begin
      bt_out.valid <= !rempty;
      bt_out.data  <= rhead;
    end
  end

  // room for every fetched word was reserved before the burst was issued
  a_rroom: assert property (@(posedge clk) disable iff (rst) rd_data_valid |-> !rfull);
endmodule
