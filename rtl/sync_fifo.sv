// sync_fifo: single-clock FIFO used as the DMA write FIFO (blacktop -> DDR)
// and read FIFO (DDR -> blacktop).
//
// A RAM array of DEPTH words with binary read/write pointers one bit wider
// than the address, so full and empty are told apart.  wr_en on a full FIFO
// is ignored and counted in `overflows`, because blacktop streams have no
// back-pressure and any dropping happens here, in the FPGA.  rd_en on an
// empty FIFO is ignored.  The FIFO is first-word-fall-through: rd_data
// always shows the oldest word, and rd_en removes it.  `count` is the number of words held; it lets the DMA
// control logic size a burst to the data waiting.  The document names the
// two FIFOs but gives no depth; 512 words (one 18 Kb block RAM at 36 bits)
// is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic [AW:0]      count,
  output logic             full,
  output logic             empty,
  output logic [31:0]      overflows
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign count = wp - rp;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
      overflows <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (wr_en && full)  overflows <= overflows + 1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
