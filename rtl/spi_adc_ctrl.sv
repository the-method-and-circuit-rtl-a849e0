// SPI read controller for the 12-bit A/D converter module.
//
// Each `start` pulse performs one conversion on an AD7476A-type converter
// (the converter of a 12-bit Pmod A/D module). Lowering `cs_n` starts the
// conversion and puts the first of four leading zeros on `sdata`; each
// falling edge of `sclk` (idle high) moves the converter to the next bit, so
// the 16-bit frame is four zeros followed by the 12 data bits, most
// significant first. The controller samples `sdata` at the end of every
// SCLK high phase, just before the falling edge that replaces the bit, and
// returns the low 12 bits of the frame on `data` with a one-cycle `done`.
//
// The source names only an SPI transmission from a digitally controlled A/D
// converter; the 12-bit width matches its D/A side, and frame format and
// timing come from the converter's data sheet. The handshake is this
// design's own.
//
// Timing: SCLK half period HALF_CYCLES clock cycles (default 4, 12.5 MHz).
// `done` pulses 32*HALF_CYCLES+1 cycles after `start`, then `busy` stays high
// for another 2*HALF_CYCLES cycles of quiet time with `cs_n` high. `start`
// while busy is ignored.
module spi_adc_ctrl
  import cnn_tester_pkg::*;
#(
  parameter int unsigned HALF_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] data,
  output logic              cs_n,
  output logic              sclk,
  input  logic              sdata
);
  localparam int unsigned FRAME_BITS = 16;
  localparam int unsigned HW = (HALF_CYCLES > 1) ? $clog2(HALF_CYCLES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_HIGH, S_LOW, S_QUIET} adc_state_e;

  adc_state_e                    state;
  logic [DATA_W-1:0]             shreg;      // leading zeros shift out the top
  logic [$clog2(FRAME_BITS)-1:0] nbit;
  logic [HW-1:0]                 hcnt;
  logic                          quiet_half;  // first or second quiet half period
  logic                          half_done;

  assign half_done = (hcnt == HW'(HALF_CYCLES - 1));
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      shreg      <= '0;
      nbit       <= '0;
      hcnt       <= '0;
      quiet_half <= 1'b0;
      cs_n       <= 1'b1;
      sclk       <= 1'b1;
      data       <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      hcnt <= half_done ? '0 : hcnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          hcnt <= '0;
          if (start) begin
            cs_n  <= 1'b0;
            nbit  <= '0;
            state <= S_HIGH;
          end
        end
        S_HIGH: if (half_done) begin
          shreg <= {shreg[DATA_W-2:0], sdata};
          sclk  <= 1'b0;
          state <= S_LOW;
        end
        S_LOW: if (half_done) begin
          sclk <= 1'b1;
          if (nbit == 4'(FRAME_BITS - 1)) begin
            cs_n       <= 1'b1;
            data       <= shreg;
            done       <= 1'b1;
            quiet_half <= 1'b0;
            state      <= S_QUIET;
          end else begin
            nbit  <= nbit + 1'b1;
            state <= S_HIGH;
          end
        end
        S_QUIET: if (half_done) begin
          quiet_half <= 1'b1;
          if (quiet_half) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) $fell(sclk) |-> !cs_n)
    else $error("SCLK falling edge outside an ADC frame");
endmodule
