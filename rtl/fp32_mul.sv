// fp32_mul: combinational IEEE-754 single-precision multiplier for the FIR
// filter.
//
// The 24-bit significands (hidden one restored) are multiplied to 48 bits;
// the product is normalised by at most one place and truncated to 23
// fraction bits (round toward zero).  Denormal inputs count as zero and
// results too small for a normal number flush to signed zero; an input with
// the all-ones exponent, or an exponent overflow, gives a signed infinity.
// NaN is not propagated.  These simplifications are this design's own: the
// document says only that the FIR filters work in floating point.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] p;
  logic [9:0]  e;     // signed, biased
  logic [22:0] f;

  always_comb begin
    ea = a[30:23];
    eb = b[30:23];
    s  = a[31] ^ b[31];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    if (p[47]) begin
      f = p[46:24];
      e = 10'(ea) + 10'(eb) - 10'd126;
    end else begin
      f = p[45:23];
      e = 10'(ea) + 10'(eb) - 10'd127;
    end
    if (ea == 8'hFF || eb == 8'hFF)      y = {s, 8'hFF, 23'd0};
    else if (ea == 8'd0 || eb == 8'd0)   y = {s, 31'd0};
    else if ($signed(e) <= 0)            y = {s, 31'd0};
    else if ($signed(e) >= 255)          y = {s, 8'hFF, 23'd0};
    else                                 y = {s, e[7:0], f};
  end
endmodule
