// zynq_static: the programmable-logic image of one board of the four-board
// Zynq cluster, with an example blacktop configuration loaded.
//
// The static part surrounds a reconfigurable blacktop region with eight
// 33-bit ports (32-bit word + valid, no back-pressure): four bidirectional
// DMA channels to the ARM's DDR memory and four bidirectional FMC links to
// the other boards (three for a fully connected four-board cluster, one
// spare for an external data source).  A serial parameter controller lets
// the ARM set registers inside blacktop modules.  blacktop_example stands in
// for one image built by the placement tool.
//
// ARM register port (general-purpose AXI side; a plain single-cycle
// write / combinational read bus standing in for the vendor's register IP),
// word address reg_addr[7:0]:
//   0x00-0x0F  DMA channel 0 registers (map in dma_regs), 0x10-0x1F ch 1,
//   0x20-0x2F  ch 2, 0x30-0x3F ch 3
//   0x40-0x42  parameter controller (map in param_ctrl)
//   0x50       FMC control: write bits 3..0 = start training on link k,
//              bits 7..4 = restart alignment search on link k;
//              read bits 3..0 = link k receiver locked
//   0x51-0x54  FMC link k transmit drops, 0x55-0x58 receive drops (read)
// Interrupts: irq[2k] = DMA channel k write ring, irq[2k+1] = read ring.
// High-performance AXI side: per channel the command/data master interface
// of dma_ctrl, brought out as arrays for the vendor master IP.  FMC side:
// per link the forty-bit lane word to the 10:1 serializers, the forty-bit
// word from the deserializers, and their bitslip strobe.  The FFT of the
// example image is a vendor core; its stream ports are brought out.
//
// Clocks: clk drives the DMA, the parameter chain and the blacktop;
// link_clk (10 MHz) drives the FMC transmit and receive logic.  Each has its
// own synchronous reset.
module zynq_static
  import zc_pkg::*;
#(
  parameter int unsigned DMA_FIFO_DEPTH = 512,
  parameter int unsigned MAX_BURST      = 256,
  parameter int unsigned LINK_FIFO_DEPTH = 16,
  parameter int unsigned TRAIN_CYCLES   = 50_000_000,
  parameter int unsigned FIR_TAPS       = 16,
  localparam int unsigned LW            = $clog2(MAX_BURST) + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 link_clk,
  input  logic                 link_rst,
  // ARM register port and interrupts
  input  logic                 reg_wr,
  input  logic [7:0]           reg_addr,
  input  logic [31:0]          reg_wdata,
  output logic [31:0]          reg_rdata,
  output logic [7:0]           irq,
  // high-performance AXI master, one per DMA channel
  output logic                 wr_req        [4],
  output logic [31:0]          wr_addr       [4],
  output logic [LW-1:0]        wr_len        [4],
  input  logic                 wr_ack        [4],
  output logic [31:0]          wr_data       [4],
  output logic                 wr_data_valid [4],
  input  logic                 wr_data_ready [4],
  input  logic                 wr_done       [4],
  output logic                 rd_req        [4],
  output logic [31:0]          rd_addr       [4],
  output logic [LW-1:0]        rd_len        [4],
  input  logic                 rd_ack        [4],
  input  logic [31:0]          rd_data       [4],
  input  logic                 rd_data_valid [4],
  input  logic                 rd_done       [4],
  // FMC lanes
  output logic [LINK_BITS-1:0] tx_lanes      [4],
  input  logic [LINK_BITS-1:0] rx_lanes      [4],
  output logic                 bitslip       [4],
  // vendor FFT in the example image
  output stream_t              fft_in,
  input  stream_t              fft_out
);
  stream_t dma_in [4], dma_out [4], fmc_in [4], fmc_out [4];
  logic [31:0] dma_rdata [4];
  logic [31:0] pc_rdata;
  logic        ps_out, ps_ret, ps_busy;
  logic [3:0]  locked, training;
  logic [31:0] tx_drops [4], rx_drops [4];
  logic        unit_pc, unit_fmc;
  logic [3:0]  train_cmd, realign;

  assign unit_pc  = (reg_addr[7:4] == 4'h4);
  assign unit_fmc = (reg_addr[7:4] == 4'h5);
  assign train_cmd = (reg_wr && unit_fmc && reg_addr[3:0] == 4'd0) ? reg_wdata[3:0] : 4'd0;
  assign realign   = (reg_wr && unit_fmc && reg_addr[3:0] == 4'd0) ? reg_wdata[7:4] : 4'd0;

  for (genvar k = 0; k < 4; k++) begin : g_dma
    dma_channel #(.FIFO_DEPTH(DMA_FIFO_DEPTH), .MAX_BURST(MAX_BURST)) u_dma (
      .clk, .rst,
      .reg_wr(reg_wr && reg_addr[7:4] == 4'(k)), .reg_addr(reg_addr[3:0]),
      .reg_wdata, .reg_rdata(dma_rdata[k]),
      .irq_wbuf(irq[2*k]), .irq_rbuf(irq[2*k+1]),
      .bt_in(dma_out[k]), .bt_out(dma_in[k]),
      .wr_req(wr_req[k]), .wr_addr(wr_addr[k]), .wr_len(wr_len[k]), .wr_ack(wr_ack[k]),
      .wr_data(wr_data[k]), .wr_data_valid(wr_data_valid[k]),
      .wr_data_ready(wr_data_ready[k]), .wr_done(wr_done[k]),
      .rd_req(rd_req[k]), .rd_addr(rd_addr[k]), .rd_len(rd_len[k]), .rd_ack(rd_ack[k]),
      .rd_data(rd_data[k]), .rd_data_valid(rd_data_valid[k]), .rd_done(rd_done[k])
    );
  end

  for (genvar k = 0; k < 4; k++) begin : g_fmc
    fmc_link #(.TRAIN_CYCLES(TRAIN_CYCLES), .FIFO_DEPTH(LINK_FIFO_DEPTH)) u_fmc (
      .clk, .rst, .link_clk, .link_rst,
      .bt_in(fmc_out[k]), .bt_out(fmc_in[k]),
      .train_cmd(train_cmd[k]), .realign(realign[k]),
      .locked(locked[k]), .training(training[k]),
      .tx_drops(tx_drops[k]), .rx_drops(rx_drops[k]),
      .tx_lanes(tx_lanes[k]), .rx_lanes(rx_lanes[k]), .bitslip(bitslip[k])
    );
  end

  param_ctrl u_pctrl (
    .clk, .rst, .reg_wr(reg_wr && unit_pc), .reg_addr(reg_addr[1:0]),
    .reg_wdata, .reg_rdata(pc_rdata), .sout(ps_out), .busy(ps_busy)
  );

  blacktop_example #(.FIR_TAPS(FIR_TAPS)) u_bt (
    .clk, .rst, .dma_in, .fmc_in, .dma_out, .fmc_out, .fft_in, .fft_out,
    .psin(ps_out), .psout(ps_ret)
  );

  always_comb begin
    reg_rdata = '0;
    if (reg_addr[7:6] == 2'b00) reg_rdata = dma_rdata[reg_addr[5:4]];
    else if (unit_pc)           reg_rdata = pc_rdata;
    else if (unit_fmc) begin
      if (reg_addr[3:0] == 4'd0)      reg_rdata = {28'd0, locked};
      else if (reg_addr[3:0] <= 4'd4) reg_rdata = tx_drops[2'(reg_addr[3:0] - 4'd1)];
      else if (reg_addr[3:0] <= 4'd8) reg_rdata = rx_drops[2'(reg_addr[3:0] - 4'd5)];
    end
  end
endmodule
