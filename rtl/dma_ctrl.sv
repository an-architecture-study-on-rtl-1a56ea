// dma_ctrl: control logic of one DMA channel, master of the high-performance
// AXI port.
//
// It keeps, in 32-bit words, how much valid data the write ring holds for
// the ARM (wbuf_fill) and how much data the ARM has put into the read ring
// that the PL has not yet fetched (rbuf_fill), plus the PL's own offset in
// each ring.  A write burst (write FIFO -> write ring) is sized as the
// smallest of the empty space in the ring, the space left before the ring's
// end, and the words waiting in the write FIFO; a read burst (read ring ->
// read FIFO) as the smallest of the valid data in the ring, the space left
// before the ring's end, and the free room in the read FIFO.  Both are also
// capped at MAX_BURST, the longest burst the master port takes.  One burst
// per direction is in flight at a time; the offsets and fills move when the
// master reports the burst done.
//
// Interrupts: the ARM arms one by writing a byte count N.  The write-ring
// interrupt rises once the valid data reaches min(N, size/16); the read-ring
// interrupt once the empty space reaches min(N, size/16).  It stays high
// until the ARM writes that count register again (0 disarms).
//
// Master port (a simplified form of the vendor IP's command/data
// interface): a command is held on *_req/_addr/_len until *_ack; write data
// leaves as a valid/ready stream, straight from the FIFO head; read data
// arrives on rd_data_valid without back-pressure (room was reserved);
// *_done pulses when the burst has completed.
//
// The three-way minimum, the 1/16 rule and the PL as bus master follow the
// document.  The MAX_BURST cap, word units and the command interface are
// this design's choice.
module dma_ctrl #(
  parameter int unsigned MAX_BURST  = 256,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned FW        = $clog2(FIFO_DEPTH) + 1,
  localparam int unsigned LW        = $clog2(MAX_BURST) + 1
) (
  input  logic          clk,
  input  logic          rst,
  // configuration
  input  logic          enable,
  input  logic          soft_rst,
  input  logic [31:0]   wbuf_base,
  input  logic [29:0]   wbuf_size,
  input  logic [31:0]   rbuf_base,
  input  logic [29:0]   rbuf_size,
  input  logic          wbuf_done_stb,
  input  logic          rbuf_done_stb,
  input  logic [29:0]   done_words,
  input  logic          wirq_stb,
  input  logic          rirq_stb,
  input  logic [29:0]   irq_words,
  // status
  output logic [29:0]   wbuf_fill,
  output logic [29:0]   wbuf_ptr,
  output logic [29:0]   rbuf_fill,
  output logic [29:0]   rbuf_ptr,
  output logic          wirq,
  output logic          rirq,
  // FIFOs
  input  logic [FW-1:0] wfifo_count,
  output logic          wfifo_pop,
  input  logic [FW-1:0] rfifo_count,
  // master: write channel
  output logic          wr_req,
  output logic [31:0]   wr_addr,
  output logic [LW-1:0] wr_len,
  input  logic          wr_ack,
  output logic          wr_data_valid,
  input  logic          wr_data_ready,
  input  logic          wr_done,
  // master: read channel
  output logic          rd_req,
  output logic [31:0]   rd_addr,
  output logic [LW-1:0] rd_len,
  input  logic          rd_ack,
  input  logic          rd_done
);
  typedef enum logic [1:0] {B_IDLE, B_CMD, B_DATA, B_WAIT} bstate_e;
  bstate_e wst, rst_q;

  function automatic logic [29:0] min30(logic [29:0] a, logic [29:0] b);
    return (a < b) ? a : b;
  endfunction

  // burst sizing
  logic [29:0] w_empty, w_to_end, w_len_c, r_to_end, r_free, r_len_c;
  always_comb begin
    w_empty  = wbuf_size - wbuf_fill;
    w_to_end = wbuf_size - wbuf_ptr;
    w_len_c  = min30(min30(w_empty, w_to_end), min30(30'(wfifo_count), 30'(MAX_BURST)));
    r_to_end = rbuf_size - rbuf_ptr;
    r_free   = 30'(FIFO_DEPTH) - 30'(rfifo_count);
    r_len_c  = min30(min30(rbuf_fill, r_to_end), min30(r_free, 30'(MAX_BURST)));
  end

  logic [LW-1:0] w_beats;   // beats still to send in the current write burst
  logic          w_fin, r_fin;
  logic [29:0]   w_thr, r_thr;
  logic          w_arm, r_arm;

  assign wr_data_valid = (wst == B_DATA);
  assign wfifo_pop     = wr_data_valid && wr_data_ready;
  assign w_fin         = (wst == B_WAIT) && wr_done;
  assign r_fin         = (rst_q == B_WAIT) && rd_done;
  assign wr_req        = (wst == B_CMD);
  assign rd_req        = (rst_q == B_CMD);

  // write engine
  always_ff @(posedge clk) begin
    if (rst || soft_rst) begin
      wst     <= B_IDLE;
      wr_addr <= '0;
      wr_len  <= '0;
      w_beats <= '0;
    end else begin
      unique case (wst)
        B_IDLE: if (enable && w_len_c != '0) begin
          wr_addr <= wbuf_base + {wbuf_ptr, 2'b00};
          wr_len  <= LW'(w_len_c);
          w_beats <= LW'(w_len_c);
          wst     <= B_CMD;
        end
        B_CMD:  if (wr_ack) wst <= B_DATA;
        B_DATA: if (wfifo_pop) begin
          w_beats <= w_beats - 1'b1;
          if (w_beats == LW'(1)) wst <= B_WAIT;
        end
        B_WAIT: if (wr_done) wst <= B_IDLE;
        default: wst <= B_IDLE;
      endcase
    end
  end

  // read engine
  always_ff @(posedge clk) begin
    if (rst || soft_rst) begin
      rst_q   <= B_IDLE;
      rd_addr <= '0;
      rd_len  <= '0;
    end else begin
      unique case (rst_q)
        B_IDLE: if (enable && r_len_c != '0) begin
          rd_addr <= rbuf_base + {rbuf_ptr, 2'b00};
          rd_len  <= LW'(r_len_c);
          rst_q   <= B_CMD;
        end
        B_CMD:  if (rd_ack) rst_q <= B_WAIT;
        B_WAIT: if (rd_done) rst_q <= B_IDLE;
        default: rst_q <= B_IDLE;
      endcase
    end
  end

  // ring bookkeeping and interrupts
  logic [29:0] wptr_n, rptr_n;
  always_comb begin
    wptr_n = wbuf_ptr + 30'(wr_len);
    if (wptr_n >= wbuf_size) wptr_n = '0;
    rptr_n = rbuf_ptr + 30'(rd_len);
    if (rptr_n >= rbuf_size) rptr_n = '0;
  end

  always_ff @(posedge clk) begin
    if (rst || soft_rst) begin
      wbuf_fill <= '0;
      wbuf_ptr  <= '0;
      rbuf_fill <= '0;
      rbuf_ptr  <= '0;
      wirq      <= 1'b0;
      rirq      <= 1'b0;
      w_arm     <= 1'b0;
      r_arm     <= 1'b0;
      w_thr     <= '0;
      r_thr     <= '0;
    end else begin
      wbuf_fill <= wbuf_fill + (w_fin ? 30'(wr_len) : 30'd0)
                             - (wbuf_done_stb ? done_words : 30'd0);
      rbuf_fill <= rbuf_fill + (rbuf_done_stb ? done_words : 30'd0)
                             - (r_fin ? 30'(rd_len) : 30'd0);
      if (w_fin) wbuf_ptr <= wptr_n;
      if (r_fin) rbuf_ptr <= rptr_n;

      if (wirq_stb) begin
        wirq  <= 1'b0;
        w_arm <= (irq_words != '0);
        w_thr <= min30(irq_words, wbuf_size >> 4);
      end else if (w_arm && wbuf_fill >= w_thr) begin
        wirq  <= 1'b1;
        w_arm <= 1'b0;
      end
      if (rirq_stb) begin
        rirq  <= 1'b0;
        r_arm <= (irq_words != '0);
        r_thr <= min30(irq_words, rbuf_size >> 4);
      end else if (r_arm && (rbuf_size - rbuf_fill) >= r_thr) begin
        rirq  <= 1'b1;
        r_arm <= 1'b0;
      end
    end
  end

  // rules of the rings and of the master port
  a_wfill: assert property (@(posedge clk) disable iff (rst) wbuf_fill <= wbuf_size || !enable);
  a_rfill: assert property (@(posedge clk) disable iff (rst) rbuf_fill <= rbuf_size || !enable);
  a_wlen:  assert property (@(posedge clk) disable iff (rst) wr_req |-> wr_len != '0);
  a_rlen:  assert property (@(posedge clk) disable iff (rst) rd_req |-> rd_len != '0);
  a_wcmd:  assert property (@(posedge clk) disable iff (rst || soft_rst) wr_req && !wr_ack |=> wr_req && $stable(wr_addr));
endmodule
