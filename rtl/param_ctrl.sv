// param_ctrl: bridge from two ARM-visible registers to the serial
// parameter chain (see param_reg for the frame format).
//
// Register 0 holds the 32-bit data word; register 1 holds the 31-bit chain
// address in bits 30..0 and the start bit in bit 31.  A rising edge on the
// start bit begins a frame, so setting a parameter takes three writes: clear
// start, write data, write address with start set.  The frame is one start
// bit, `addr` low bits, a data start bit and 32 data bits MSB first: 34+addr
// clocks, one bit per clock on `sout`.  `busy` is high while a frame is sent;
// a rising start edge while busy is ignored.  Registers 0 and 1 read back
// what was written; register 2 returns busy in bit 0.
//
// The register bus is a plain single-cycle write/read port, standing in for
// the memory-mapped registers that the vendor's general-purpose AXI IP
// presents; that adaptation is this design's choice.
module param_ctrl (
  input  logic        clk,
  input  logic        rst,
  // register port
  input  logic        reg_wr,
  input  logic [1:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // serial chain
  output logic        sout,
  output logic        busy
);
  typedef enum logic [2:0] {IDLE, ADDR, DSTART, DATA, GAP} state_e;
  state_e      state;
  logic [31:0] data_r;
  logic [30:0] addr_r;
  logic        start_r, start_q;
  logic [30:0] cnt;
  logic [31:0] shreg;

  always_comb begin
    unique case (reg_addr)
      2'd0:    reg_rdata = data_r;
      2'd1:    reg_rdata = {start_r, addr_r};
      2'd2:    reg_rdata = {31'd0, busy};
      default: reg_rdata = '0;
    endcase
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      data_r  <= '0;
      addr_r  <= '0;
      start_r <= 1'b0;
      start_q <= 1'b0;
      state   <= IDLE;
      sout    <= 1'b0;
      cnt     <= '0;
      shreg   <= '0;
    end else begin
      if (reg_wr && reg_addr == 2'd0) data_r <= reg_wdata;
      if (reg_wr && reg_addr == 2'd1) {start_r, addr_r} <= reg_wdata;
      start_q <= start_r;
      unique case (state)
        IDLE: begin
          sout <= 1'b0;
          if (start_r && !start_q) begin
            sout  <= 1'b1;           // start bit
            shreg <= data_r;
            cnt   <= addr_r;
            state <= (addr_r == '0) ? DSTART : ADDR;
          end
        end
        ADDR: begin                  // one low bit per register skipped
          sout <= 1'b0;
          cnt  <= cnt - 1'b1;
          if (cnt == 31'd1) state <= DSTART;
        end
        DSTART: begin
          sout  <= 1'b1;
          cnt   <= 31'd32;
          state <= DATA;
        end
        DATA: begin
          sout  <= shreg[31];
          shreg <= {shreg[30:0], 1'b0};
          cnt   <= cnt - 1'b1;
          if (cnt == 31'd1) state <= GAP;
        end
        GAP: begin                   // one idle low clock after the data word
          sout  <= 1'b0;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
