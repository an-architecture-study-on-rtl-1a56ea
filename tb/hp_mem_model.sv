// hp_mem_model: behavioural model of the DDR memory behind the Zynq's
// high-performance AXI port and the vendor master IP, as seen from one DMA
// channel's command/data interface.  Testbench only.
//
// A command is acknowledged after a random 0-3 clock delay.  Write data is
// taken with a random ready; wr_done follows the last beat after 1-4 clocks.
// Read data is delivered with random gaps; wr_done/rd_done pulse when the
// burst is complete.  Memory is MEM_WORDS 32-bit words at byte address
// 4*index, open to the testbench as `mem`.  It counts bursts and the longest
// burst seen in each direction.
module hp_mem_model #(
  parameter int unsigned MEM_WORDS = 4096,
  parameter int unsigned LW        = 9
) (
  input  logic          clk,
  input  logic          wr_req,
  input  logic [31:0]   wr_addr,
  input  logic [LW-1:0] wr_len,
  output logic          wr_ack,
  input  logic [31:0]   wr_data,
  input  logic          wr_data_valid,
  output logic          wr_data_ready,
  output logic          wr_done,
  input  logic          rd_req,
  input  logic [31:0]   rd_addr,
  input  logic [LW-1:0] rd_len,
  output logic          rd_ack,
  output logic [31:0]   rd_data,
  output logic          rd_data_valid,
  output logic          rd_done
);
  logic [31:0] mem [MEM_WORDS];
  int unsigned wr_bursts = 0, rd_bursts = 0, wr_max = 0, rd_max = 0;

  initial begin
    wr_ack = 0; wr_data_ready = 0; wr_done = 0;
    for (int i = 0; i < MEM_WORDS; i++) mem[i] = 32'hDEAD_0000 + i;
  end
  initial begin
    rd_ack = 0; rd_data_valid = 0; rd_done = 0; rd_data = 0;
  end

  // All model outputs change on the falling edge, so the design samples
  // them, and the model judges a handshake, with values that are stable
  // until the next rising edge.

  // write channel
  always begin
    int unsigned a, n;
    @(negedge clk);
    if (wr_req) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      a = wr_addr >> 2; n = wr_len;
      wr_bursts++; if (n > wr_max) wr_max = n;
      wr_ack = 1; @(negedge clk); wr_ack = 0;
      while (n > 0) begin
        wr_data_ready = ($urandom_range(0, 3) != 0);
        if (wr_data_ready && wr_data_valid) begin
          mem[a % MEM_WORDS] = wr_data;
          a++; n--;
        end
        @(negedge clk);
      end
      wr_data_ready = 0;
      repeat ($urandom_range(1, 4)) @(negedge clk);
      wr_done = 1; @(negedge clk); wr_done = 0;
    end
  end

  // read channel
  always begin
    int unsigned a, n;
    @(negedge clk);
    if (rd_req) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      a = rd_addr >> 2; n = rd_len;
      rd_bursts++; if (n > rd_max) rd_max = n;
      rd_ack = 1; @(negedge clk); rd_ack = 0;
      while (n > 0) begin
        if ($urandom_range(0, 3) != 0) begin
          rd_data = mem[a % MEM_WORDS]; rd_data_valid = 1;
          a++; n--;
        end else rd_data_valid = 0;
        @(negedge clk);
      end
      rd_data_valid = 0;
      repeat ($urandom_range(1, 3)) @(negedge clk);
      rd_done = 1; @(negedge clk); rd_done = 0;
    end
  end
endmodule
