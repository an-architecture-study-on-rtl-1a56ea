// tb_blacktop_example: checks the example blacktop's wiring and its filters.
// Distinct words on every input port must appear on the right output ports
// one clock later; the FFT ports must carry the source stream straight
// through.  With tap 0 of the first filter set to 1.0 and tap 0 of the
// second to 2.0 over the parameter chain (addresses 0 and TAPS), the two
// filtered paths must give x and 2x, one clock after the input.
module tb_blacktop_example;
  import zc_pkg::*;
  localparam int TAPS = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  stream_t dma_in [4], fmc_in [4], dma_out [4], fmc_out [4], fft_in, fft_out;
  logic psin = 0, psout;
  blacktop_example #(.FIR_TAPS(TAPS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send(input int addr, input logic [31:0] d);
    @(negedge clk); psin = 1;
    repeat (addr) begin @(negedge clk); psin = 0; end
    @(negedge clk); psin = 1;
    for (int i = 31; i >= 0; i--) begin @(negedge clk); psin = d[i]; end
    @(negedge clk); psin = 0;
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin dma_in[k] = '0; fmc_in[k] = '0; end
    fft_out = '0;
    repeat (3) @(posedge clk); rst = 0;
    send(0, 32'h3F80_0000);          // FIR 0 tap 0 = 1.0
    send(TAPS, 32'h4000_0000);       // FIR 1 tap 0 = 2.0
    repeat (20) @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      logic [31:0] x0, x1;
      x0 = {1'b0, 8'(120 + t % 8), 23'($urandom)};
      x1 = {1'b0, 8'(118 + t % 8), 23'($urandom)};
      @(negedge clk);
      dma_in[0] = '{1, x0};           fmc_in[0] = '{1, x1};
      dma_in[1] = '{1, 32'hD100 + t}; fmc_in[1] = '{1, 32'hF100 + t};
      dma_in[2] = '{1, 32'hD200 + t}; fmc_in[2] = '{1, 32'hF200 + t};
      dma_in[3] = '{1, 32'hD300 + t}; fmc_in[3] = '{1, 32'hF300 + t};
      fft_out = '{1, 32'hFF00 + t};
      #1 check(fft_in == fmc_in[3], "source stream on the FFT input");
      @(negedge clk);
      check(dma_out[0] == stream_t'{1, 32'hF300 + t}, "pass-through to DMA 0");
      check(dma_out[1] == stream_t'{1, 32'hFF00 + t}, "FFT result to DMA 1");
      check(dma_out[3] == stream_t'{1, 32'hF100 + t}, "link 1 to DMA 3");
      check(fmc_out[1] == stream_t'{1, 32'hD100 + t}, "DMA 1 to link 1");
      check(fmc_out[2] == stream_t'{1, 32'hD200 + t}, "DMA 2 to link 2");
      check(fmc_out[3] == stream_t'{1, 32'hD300 + t}, "DMA 3 to link 3");
      check(fmc_out[0] == stream_t'{1, x0}, "FIR 0 with tap 1.0 gives x");
      check(dma_out[2] == stream_t'{1, {x1[31], x1[30:23] + 8'd1, x1[22:0]}}, "FIR 1 with tap 2.0 gives 2x");
      for (int k = 0; k < 4; k++) begin dma_in[k] = '0; fmc_in[k] = '0; end
      fft_out = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
