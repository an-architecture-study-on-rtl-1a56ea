// param_reg: one link of the daisy-chained single-wire parameter bus.
//
// Protocol (serial, one bit per clock, line low when idle): a start bit
// (high), then one low bit for every register to be skipped, then a data
// start bit (high), then the 32-bit data word, MSB first.  A register that
// sees a start bit followed by a low bit is not addressed: it removes that
// one low bit and forwards the start bit and the rest of the frame, so the
// next register sees the address one smaller.  A register that sees a start
// bit followed directly by the data start bit is the addressed one: it
// shifts in the next 32 bits, loads them into `value` and pulses `updated`;
// it forwards nothing of that frame.  A register therefore needs no address
// adder and no position number.
//
// Timing: sout is registered.  A frame passing through is delayed by two
// clocks at its start bit and arrives one bit shorter; `updated` rises one
// clock after the last data bit.  Frame format and the strip-and-forward
// rule follow the document; MSB-first data order and the reset value are
// this design's choice.
module param_reg #(
  parameter logic [31:0] RESET_VALUE = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sin,
  output logic        sout,
  output logic [31:0] value,
  output logic        updated
);
  typedef enum logic [1:0] {IDLE, CHECK, PASS, CAPTURE} state_e;
  state_e      state;
  logic        seen_dstart;   // PASS: data start bit already forwarded
  logic [5:0]  cnt;
  logic [31:0] shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      sout        <= 1'b0;
      value       <= RESET_VALUE;
      updated     <= 1'b0;
      seen_dstart <= 1'b0;
      cnt         <= '0;
      shreg       <= '0;
    end else begin
      updated <= 1'b0;
      unique case (state)
        IDLE: begin
          sout <= 1'b0;
          if (sin) state <= CHECK;
        end
        CHECK: begin
          if (sin) begin            // data start bit: this register is addressed
            sout  <= 1'b0;
            cnt   <= '0;
            state <= CAPTURE;
          end else begin            // strip this skip bit, forward a start bit
            sout        <= 1'b1;
            seen_dstart <= 1'b0;
            cnt         <= '0;
            state       <= PASS;
          end
        end
        PASS: begin
          sout <= sin;
          if (!seen_dstart) begin
            if (sin) seen_dstart <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'd31) state <= IDLE;
          end
        end
        CAPTURE: begin
          sout  <= 1'b0;
          shreg <= {shreg[30:0], sin};
          cnt   <= cnt + 1'b1;
          if (cnt == 6'd31) begin
            value   <= {shreg[30:0], sin};
            updated <= 1'b1;
            state   <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
