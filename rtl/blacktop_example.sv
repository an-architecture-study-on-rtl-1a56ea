// blacktop_example: one configuration of the reconfigurable blacktop region,
// as the placement tool would stitch it from the module library.
//
// Eight input and eight output ports: dma_in/dma_out to and from the four
// DMA channels, fmc_in/fmc_out from and to the four FMC links.  This image
// carries the front of the FM-tuner flow and a hardware cross-link:
//   fmc_in[3] (external data source) -> register stage -> dma_out[0]
//                                       (the pass-through to software)
//   fmc_in[3] -> fft_in; fft_out -> dma_out[1]   (vendor FFT, outside)
//   dma_in[0] -> fir_float -> fmc_out[0]         (software to FIR, on to a
//                                                 neighbouring board)
//   fmc_in[0] -> fir_float -> dma_out[2]         (FIR on data arriving from
//                                                 a neighbour, to software)
//   dma_in[1] -> fmc_out[1], fmc_in[1] -> dma_out[3],
//   dma_in[2] -> fmc_out[2], dma_in[3] -> fmc_out[3]  (cross links)
// fmc_in[2] is not used by this image.  Every path has one register stage
// (the FIR's output register on the filtered paths).  The parameter chain
// runs psin -> FIR 0 taps -> FIR 1 taps -> psout.
//
// The port count, the port format and the module kinds follow the document;
// which port feeds which module here is this design's example.
module blacktop_example
  import zc_pkg::*;
#(
  parameter int unsigned FIR_TAPS = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  stream_t dma_in  [4],
  input  stream_t fmc_in  [4],
  output stream_t dma_out [4],
  output stream_t fmc_out [4],
  output stream_t fft_in,
  input  stream_t fft_out,
  input  logic    psin,
  output logic    psout
);
  logic    pmid;
  stream_t fir0_out, fir1_out;

  fir_float #(.NTAPS(FIR_TAPS)) u_fir0 (
    .clk, .rst, .din(dma_in[0]), .dout(fir0_out), .psin, .psout(pmid)
  );
  fir_float #(.NTAPS(FIR_TAPS)) u_fir1 (
    .clk, .rst, .din(fmc_in[0]), .dout(fir1_out), .psin(pmid), .psout
  );

  assign fft_in     = fmc_in[3];
  assign fmc_out[0] = fir0_out;
  assign dma_out[2] = fir1_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      dma_out[0] <= '0;
      dma_out[1] <= '0;
      dma_out[3] <= '0;
      fmc_out[1] <= '0;
      fmc_out[2] <= '0;
      fmc_out[3] <= '0;
    end else begin
      dma_out[0] <= fmc_in[3];
      dma_out[1] <= fft_out;
      dma_out[3] <= fmc_in[1];
      fmc_out[1] <= dma_in[1];
      fmc_out[2] <= dma_in[2];
      fmc_out[3] <= dma_in[3];
    end
  end
endmodule
