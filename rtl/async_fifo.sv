// async_fifo: dual-clock FIFO between the blacktop clock and the 10 MHz FMC
// link clock.
//
// Gray-coded pointers cross the clock boundary through two-flop
// synchronisers; full is judged in the write domain and empty in the read
// domain, each against a pointer that may lag, so both are conservative.  A
// write to a full FIFO is dropped and counted (blacktop ports have no
// back-pressure).  Read data is registered: rd_data is valid the cycle after
// rd_en.  Each side has its own reset.  The document states only that each
// link's 32-bit parallel interface is attached to a FIFO clocked at 10 MHz;
// the structure and the 16-word depth are this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic [31:0]      overflows,
  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflows <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
      if (wr_en && full) overflows <= overflows + 1;
    end
  end

  // read side
  assign empty = (rgray == wgray_r2);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  always_ff @(posedge rd_clk) begin
    if (rd_en && !empty) rd_data <= mem[rbin[AW-1:0]];
  end
endmodule
