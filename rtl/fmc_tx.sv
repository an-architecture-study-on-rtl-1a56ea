// fmc_tx: transmit side of one FMC link, in the 10 MHz link clock domain.
//
// Every link clock it hands forty bits to the four 10:1 serializers (one
// ten-bit slice per lane).  Normally that is the next word from the link
// FIFO, packed with its valid bit (zc_pkg::link_pack), or an all-zero idle
// word when the FIFO is empty.  For TRAIN_CYCLES link clocks after reset, and
// again for TRAIN_CYCLES after each train_cmd pulse, it sends the training
// word instead, so that the far receiver can find the bit shift and lane
// inversions.  The FIFO read data is registered, so a word popped in the
// clock before training starts is still sent.  lanes is registered.
//
// The document gives the five-second training after reset or on command,
// the 10 MHz word clock and the 32-bit interface; TRAIN_CYCLES defaults to
// 5 s x 10 MHz.  The training pattern, the lane mapping and the idle word
// are this design's choice (see zc_pkg).
module fmc_tx
  import zc_pkg::*;
#(
  parameter int unsigned TRAIN_CYCLES = 50_000_000
) (
  input  logic                 link_clk,
  input  logic                 link_rst,
  input  logic                 train_cmd,
  // link FIFO read side
  input  logic                 fifo_empty,
  input  logic [31:0]          fifo_data,
  output logic                 fifo_rd,
  // to the serializers
  output logic [LINK_BITS-1:0] lanes,
  output logic                 training
);
  logic [$clog2(TRAIN_CYCLES+1)-1:0] tcnt;
  logic pend;

  assign training = (tcnt != '0);
  assign fifo_rd  = !fifo_empty && !training;

  always_ff @(posedge link_clk) begin
    if (link_rst) begin
      tcnt  <= $bits(tcnt)'(TRAIN_CYCLES);
      pend  <= 1'b0;
      lanes <= '0;
    end else begin
      if (train_cmd)     tcnt <= $bits(tcnt)'(TRAIN_CYCLES);
      else if (training) tcnt <= tcnt - 1'b1;
      pend <= fifo_rd;
      if (pend)          lanes <= link_pack('{valid: 1'b1, data: fifo_data});
      else if (training) lanes <= TRAIN_WORD;
      else               lanes <= '0;
    end
  end
endmodule
