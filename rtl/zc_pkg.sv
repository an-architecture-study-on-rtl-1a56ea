// zc_pkg: types and constants shared by the Zynq cluster static image.
//
// A blacktop port carries one 32-bit word plus a valid bit per clock, with no
// back-pressure: a single float, or one complex 16-bit integer sample.  The
// FMC link sends such a 33-bit word every link clock over four serial lanes,
// ten bits per lane per word (10:1 serialisation, 100 MHz bit rate against a
// 10 MHz word clock).  Forty lane bits hold the 33-bit word; bits 39..33 are
// zero in data words.  The training word repeats one 10-bit pattern on every
// lane; the pattern has three ones, so no rotation of it and no rotation of
// its inverse equals it, and only the correct bit shift with the correct
// inversion mask decodes it.  The pattern and the lane mapping are this
// design's choice; the document gives neither.
package zc_pkg;

  typedef struct packed {
    logic        valid;
    logic [31:0] data;
  } stream_t;

  localparam int unsigned LANES     = 4;   // differential pairs per one-way link
  localparam int unsigned SER_RATIO = 10;  // 100 MHz bit clock / 10 MHz word clock
  localparam int unsigned LINK_BITS = LANES * SER_RATIO;

  localparam logic [SER_RATIO-1:0] TRAIN_LANE = 10'b00000_10011;
  localparam logic [LINK_BITS-1:0] TRAIN_WORD = {LANES{TRAIN_LANE}};

  // Map a stream word onto the forty lane bits and back.
  function automatic logic [LINK_BITS-1:0] link_pack(stream_t w);
    return {{(LINK_BITS-33){1'b0}}, w.valid, w.data};
  endfunction

  function automatic stream_t link_unpack(logic [LINK_BITS-1:0] b);
    stream_t w;
    w.valid = b[32];
    w.data  = b[31:0];
    return w;
  endfunction

endpackage
