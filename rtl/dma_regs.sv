// dma_regs: the memory-mapped "circular buffer registers" of one DMA
// channel, written and read by the ARM through general-purpose AXI.
//
// The write buffer is the DDR ring the PL fills and the ARM reads; the read
// buffer is the ring the ARM fills and the PL reads.  The ARM gives each
// ring's physical byte address and size, and after every copy tells the PL
// how many bytes it took from, or put into, a ring.  It can ask for an
// interrupt once a number of bytes is available.  All byte counts must be
// multiples of four; the control logic works in 32-bit words.
//
// Word-addressed map (byte offset = 4 x index):
//   0 CTRL       rw  bit0 enable, bit1 reset (write 1: one-cycle pulse)
//   1 WBUF_BASE  rw  physical byte address of the write ring
//   2 WBUF_SIZE  rw  size of the write ring, bytes
//   3 WBUF_DONE  wo  bytes the ARM has just read from the write ring
//   4 WBUF_IRQ   rw  interrupt when this many bytes are valid (0: off)
//   5 RBUF_BASE  rw  physical byte address of the read ring
//   6 RBUF_SIZE  rw  size of the read ring, bytes
//   7 RBUF_DONE  wo  bytes the ARM has just written into the read ring
//   8 RBUF_IRQ   rw  interrupt when this many bytes are free (0: off)
//   9 WBUF_FILL  ro  bytes valid in the write ring
//  10 WBUF_PTR   ro  PL write offset in the write ring, bytes
//  11 RBUF_FILL  ro  bytes in the read ring not yet read by the PL
//  12 RBUF_PTR   ro  PL read offset in the read ring, bytes
//  13 STATUS     ro  bit0 write-ring irq, bit1 read-ring irq
//  14 DROPS      ro  words dropped at the full write FIFO
// Writes take effect on the clock edge; reads are combinational.  That the
// PL holds these registers and is told of every copy follows the document;
// the layout and the byte units are this design's choice.
module dma_regs (
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_wr,
  input  logic [3:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // configuration to the control logic, in words except the base addresses
  output logic        enable,
  output logic        soft_rst,
  output logic [31:0] wbuf_base,
  output logic [29:0] wbuf_size,
  output logic [31:0] rbuf_base,
  output logic [29:0] rbuf_size,
  output logic        wbuf_done_stb,
  output logic        rbuf_done_stb,
  output logic [29:0] done_words,
  output logic        wirq_stb,
  output logic        rirq_stb,
  output logic [29:0] irq_words,
  // status from the control logic
  input  logic [29:0] wbuf_fill,
  input  logic [29:0] wbuf_ptr,
  input  logic [29:0] rbuf_fill,
  input  logic [29:0] rbuf_ptr,
  input  logic        wirq,
  input  logic        rirq,
  input  logic [31:0] drops
);
  logic [31:0] wsize_b, rsize_b, wirq_b, rirq_b;

  assign wbuf_size     = wsize_b[31:2];
  assign rbuf_size     = rsize_b[31:2];
  assign done_words    = reg_wdata[31:2];
  assign irq_words     = reg_wdata[31:2];
  assign wbuf_done_stb = reg_wr && reg_addr == 4'd3;
  assign rbuf_done_stb = reg_wr && reg_addr == 4'd7;
  assign wirq_stb      = reg_wr && reg_addr == 4'd4;
  assign rirq_stb      = reg_wr && reg_addr == 4'd8;

  always_ff @(posedge clk) begin
    if (rst) begin
      enable    <= 1'b0;
      soft_rst  <= 1'b0;
      wbuf_base <= '0;
      wsize_b   <= '0;
      rbuf_base <= '0;
      rsize_b   <= '0;
      wirq_b    <= '0;
      rirq_b    <= '0;
    end else begin
      soft_rst <= 1'b0;
      if (reg_wr) begin
        unique case (reg_addr)
          4'd0: begin enable <= reg_wdata[0]; soft_rst <= reg_wdata[1]; end
          4'd1: wbuf_base <= reg_wdata;
          4'd2: wsize_b   <= reg_wdata;
          4'd4: wirq_b    <= reg_wdata;
          4'd5: rbuf_base <= reg_wdata;
          4'd6: rsize_b   <= reg_wdata;
          4'd8: rirq_b    <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      4'd0:    reg_rdata = {31'd0, enable};
      4'd1:    reg_rdata = wbuf_base;
      4'd2:    reg_rdata = wsize_b;
      4'd4:    reg_rdata = wirq_b;
      4'd5:    reg_rdata = rbuf_base;
      4'd6:    reg_rdata = rsize_b;
      4'd8:    reg_rdata = rirq_b;
      4'd9:    reg_rdata = {wbuf_fill, 2'b00};
      4'd10:   reg_rdata = {wbuf_ptr, 2'b00};
      4'd11:   reg_rdata = {rbuf_fill, 2'b00};
      4'd12:   reg_rdata = {rbuf_ptr, 2'b00};
      4'd13:   reg_rdata = {30'd0, rirq, wirq};
      4'd14:   reg_rdata = drops;
      default: reg_rdata = '0;
    endcase
  end
endmodule
