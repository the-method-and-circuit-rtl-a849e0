// SPI write controller for the 12-bit D/A converter module.
//
// Each `start` pulse sends one 12-bit code to a DAC121S101-type converter (the
// converter of a 12-bit Pmod D/A module). The frame is 16 bits, most
// significant first: two don't-care zeros, two power-down bits (00 = normal
// operation) and the 12 data bits. SYNC (`sync_n`) goes low for the frame,
// `sclk` idles high, `din` changes while `sclk` is high and the converter
// samples it on each falling edge; the output is updated after the 16th bit.
//
// The source names only an SPI transmission to a digitally controlled 12-bit
// D/A converter; frame format and timing come from that converter's data
// sheet, and the handshake (`start` / `busy` / `done`) is this design's.
//
// Timing: each SCLK half period lasts HALF_CYCLES clock cycles (default 4,
// 12.5 MHz SCLK from 100 MHz). `done` pulses for one cycle 33*HALF_CYCLES+1
// cycles after `start`; `busy` is high from the cycle after `start` until
// `done`. `start` while busy is ignored. `data` is captured at `start`.
module spi_dac_ctrl
  import cnn_tester_pkg::*;
#(
  parameter int unsigned HALF_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [DATA_W-1:0] data,
  output logic              busy,
  output logic              done,
  output logic              sync_n,
  output logic              sclk,
  output logic              din
);
  localparam int unsigned FRAME_BITS = 16;
  localparam int unsigned HW = (HALF_CYCLES > 1) ? $clog2(HALF_CYCLES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_HIGH, S_LOW, S_END} dac_state_e;

  dac_state_e                state;
  logic [FRAME_BITS-1:0]     shreg;
  logic [$clog2(FRAME_BITS)-1:0] nbit;
  logic [HW-1:0]             hcnt;
  logic                      half_done;

  assign half_done = (hcnt == HW'(HALF_CYCLES - 1));
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      shreg  <= '0;
      nbit   <= '0;
      hcnt   <= '0;
      sync_n <= 1'b1;
      sclk   <= 1'b1;
      din    <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      hcnt <= half_done ? '0 : hcnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          hcnt <= '0;
          if (start) begin
            shreg  <= {2'b00, 2'b00, data};
            din    <= 1'b0;            // first don't-care bit
            nbit   <= '0;
            sync_n <= 1'b0;
            state  <= S_HIGH;
          end
        end
        S_HIGH: if (half_done) begin
          sclk  <= 1'b0;               // converter samples din here
          state <= S_LOW;
        end
        S_LOW: if (half_done) begin
          sclk <= 1'b1;
          if (nbit == 4'(FRAME_BITS - 1)) begin
            state <= S_END;
          end else begin
            nbit  <= nbit + 1'b1;
            shreg <= shreg << 1;
            din   <= shreg[FRAME_BITS-2];
            state <= S_HIGH;
          end
        end
        S_END: if (half_done) begin
          sync_n <= 1'b1;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // SYNC must stay low for a whole frame: no falling SCLK edge outside it
  assert property (@(posedge clk) disable iff (rst) $fell(sclk) |-> !sync_n)
    else $error("SCLK falling edge outside a DAC frame");
endmodule
