// fmc_channel_model: behavioural model of one one-way FMC link's physical
// path, testbench only: four 10:1 serializers, the cable pairs (some
// inverted by the breakout board) and four deserializers.
//
// Each link clock the forty-bit word from the transmitter is appended to
// each lane's bit stream (bit 0 first).  The deserializer output for a lane
// is ten consecutive bits of that stream starting SHIFT bits into the
// previous word, XORed with the lane's INV bit.  A bitslip pulse moves the
// start by one bit.  SHIFT = 0 with INV = 0 delivers each word one link
// clock late, unchanged.
module fmc_channel_model #(
  parameter int unsigned SHIFT = 3,
  parameter logic [3:0]  INV   = 4'b0101
) (
  input  logic        link_clk,
  input  logic [39:0] tx_lanes,
  input  logic        bitslip,
  output logic [39:0] rx_lanes
);
  logic [39:0] prev = '0;
  int unsigned shift = SHIFT;
  int unsigned slips = 0;

  always @(posedge link_clk) begin
    prev <= tx_lanes;
    if (bitslip) begin
      shift = (shift + 1) % 10;
      slips++;
    end
  end

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      logic [19:0] s;
      s = {tx_lanes[l*10 +: 10], prev[l*10 +: 10]};
      rx_lanes[l*10 +: 10] = s[shift +: 10] ^ {10{INV[l]}};
    end
  end
endmodule
