// fir_float: real single-precision floating-point FIR filter, a blacktop
// module.
//
// y[n] = sum_{k=0}^{NTAPS-1} h[k] * x[n-k], computed in transposed form: each
// input word x updates every partial sum at once, acc[k] <= x*h[k] +
// acc[k+1], and the output is x*h[0] + acc[1].  Only valid input words
// advance the filter; one output word leaves for every input word, one
// clock later.  Samples and taps are IEEE-754 single-precision words on a
// 32-bit blacktop port (complex data is split into I and Q streams and
// filtered by two instances).
//
// The NTAPS taps are parameter registers on the serial parameter chain
// (param_reg), daisy-chained inside the module from psin to psout: tap 0 is
// nearest psin.  Taps reset to zero.
//
// The document gives the filter's role (real floating-point FIR, used as a
// low-pass filter) and that parameterisable modules put their registers on
// the chain.  The tap count, the transposed structure and the simplified
// arithmetic of fp32_mul/fp32_add are this design's choice.
module fir_float
  import zc_pkg::*;
#(
  parameter int unsigned NTAPS = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  stream_t din,
  output stream_t dout,
  input  logic    psin,
  output logic    psout
);
  logic [31:0] h    [NTAPS];
  logic [31:0] prod [NTAPS];
  logic [31:0] sum  [NTAPS];
  logic [31:0] acc  [NTAPS];     // acc[0] unused; acc[k] holds the partial sum for tap k
  logic [NTAPS:0] chain;
  logic [NTAPS-1:0] upd;

  assign chain[0] = psin;
  assign psout    = chain[NTAPS];

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    param_reg u_h (
      .clk, .rst, .sin(chain[k]), .sout(chain[k+1]), .value(h[k]), .updated(upd[k])
    );
    fp32_mul u_mul (.a(din.data), .b(h[k]), .y(prod[k]));
    if (k < NTAPS - 1) begin : g_add
      fp32_add u_add (.a(prod[k]), .b(acc[k+1]), .y(sum[k]));
    end else begin : g_last
      assign sum[k] = prod[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) acc[k] <= '0;
      dout <= '0;
    end else begin
      dout.valid <= din.valid;
      if (din.valid) begin
        dout.data <= sum[0];
        for (int k = 1; k < NTAPS; k++) acc[k] <= sum[k];
      end
    end
  end
endmodule
