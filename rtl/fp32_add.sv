// fp32_add: combinational IEEE-754 single-precision adder for the FIR
// filter.
//
// The operand of larger magnitude sets the exponent; the other significand
// is shifted right to align, keeping three extra low bits and a sticky bit.
// Equal signs add (a carry renormalises by one place); opposite signs
// subtract and the result is renormalised with a leading-zero count.  The
// result is truncated to 23 fraction bits (round toward zero).  Denormals
// count as zero, underflow flushes to zero, overflow or an all-ones input
// exponent gives infinity; NaN is not propagated.  These simplifications
// are this design's own choice.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [31:0] x, z;            // |x| >= |z|
  logic [7:0]  ex, ez, d;
  logic [27:0] mx, mz, sum;     // 1 carry + 24 significand + 3 guard bits
  logic [9:0]  e;
  logic [4:0]  lz;
  logic        sticky, found;

  always_comb begin
    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    ex = x[30:23];
    ez = z[30:23];
    d  = ex - ez;
    mx = {1'b0, (ex != 0), x[22:0], 3'b000};
    mz = {1'b0, (ez != 0), z[22:0], 3'b000};
    if (ez == 8'd0) mz = '0;
    sticky = 1'b0;
    if (d >= 8'd27) begin
      sticky = (mz != 0);
      mz = '0;
    end else begin
      for (int i = 0; i < 27; i++)
        if (i < int'(d) && mz[i]) sticky = 1'b1;
      mz = mz >> d;
    end
    mz[0] = mz[0] | sticky;
    if (x[31] == z[31]) sum = mx + mz;
    else                sum = mx - mz;

    e  = 10'(ex);
    lz = '0;
    found = 1'b0;
    y  = '0;
    if (ex == 8'hFF) begin
      y = {x[31], 8'hFF, 23'd0};
    end else if (ex == 8'd0) begin
      y = '0;                              // both operands zero or denormal
    end else if (sum == '0) begin
      y = '0;
    end else if (sum[27]) begin
      e = e + 10'd1;
      y = (e >= 10'd255) ? {x[31], 8'hFF, 23'd0} : {x[31], e[7:0], sum[26:4]};
    end else begin
      found = 1'b0;
      for (int i = 26; i >= 0; i--)
        if (!found && sum[i]) begin
          lz    = 5'(26 - i);
          found = 1'b1;
        end
      sum = sum << lz;
      if ($signed(e) - $signed({5'd0, lz}) <= 0) y = {x[31], 31'd0};
      else begin
        e = e - 10'(lz);
        y = {x[31], e[7:0], sum[25:3]};
      end
    end
  end
endmodule
