// fmc_rx: receive side of one FMC link, in the 10 MHz link clock domain.
//
// The deserializers start at an arbitrary bit offset, and the breakout board
// inverts some of the differential pairs.  After reset (or a realign pulse)
// the receiver searches: it XORs each lane's ten bits with that lane's
// inversion bit, waits SETTLE clocks, and needs MATCH_N consecutive training
// words to accept the combination.  On any mismatch it moves to the next
// combination: the four-bit inversion mask counts up, and each time it wraps
// a bitslip pulse shifts all four deserializers by one bit.  10 shifts x 16
// masks = 160 combinations; a rejected combination costs SETTLE+1 link
// clocks, so lock comes at worst after 160 x (SETTLE+1) + MATCH_N link
// clocks (808 with the defaults, 81 us at 10 MHz).  Once locked it decodes every word
// (zc_pkg::link_unpack) and presents it on word_out; training and idle words
// carry valid = 0.  `tries` counts combinations tried since the last search
// began.
//
// The exhaustive search over shifts and inversions against a known training
// sequence follows the document; SETTLE, MATCH_N and the order of the search
// are this design's choice.
module fmc_rx
  import zc_pkg::*;
#(
  parameter int unsigned SETTLE  = 4,
  parameter int unsigned MATCH_N = 8
) (
  input  logic                 link_clk,
  input  logic                 link_rst,
  input  logic                 realign,
  input  logic [LINK_BITS-1:0] lanes,
  output logic                 bitslip,
  output logic                 locked,
  output stream_t              word_out,
  output logic [LANES-1:0]     inv_mask,
  output logic [3:0]           shift,
  output logic [15:0]          tries
);
  logic [LINK_BITS-1:0] fixed;
  logic [$clog2(SETTLE+MATCH_N+1)-1:0] cnt;

  always_comb begin
    for (int l = 0; l < LANES; l++)
      fixed[l*SER_RATIO +: SER_RATIO] = lanes[l*SER_RATIO +: SER_RATIO] ^ {SER_RATIO{inv_mask[l]}};
  end

  always_ff @(posedge link_clk) begin
    if (link_rst || realign) begin
      locked   <= 1'b0;
      inv_mask <= '0;
      shift    <= '0;
      cnt      <= '0;
      bitslip  <= 1'b0;
      tries    <= '0;
      word_out <= '0;
    end else begin
      bitslip  <= 1'b0;
      word_out <= '0;
      if (locked) begin
        word_out <= link_unpack(fixed);
      end else if (cnt < $bits(cnt)'(SETTLE)) begin
        cnt <= cnt + 1'b1;
      end else if (fixed == TRAIN_WORD) begin
        if (cnt == $bits(cnt)'(SETTLE + MATCH_N - 1)) locked <= 1'b1;
        else cnt <= cnt + 1'b1;
      end else begin
        cnt      <= '0;
        tries    <= tries + 1'b1;
        inv_mask <= inv_mask + 1'b1;
        if (inv_mask == '1) begin
          bitslip <= 1'b1;
          shift   <= (shift == 4'(SER_RATIO - 1)) ? 4'd0 : shift + 1'b1;
        end
      end
    end
  end
endmodule
