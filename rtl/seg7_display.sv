// Four-digit multiplexed 7-segment display driver.
//
// Shows the 16-bit `value` as four hexadecimal digits on a display whose
// digits share the segment lines and are enabled one at a time through their
// anodes (as on the four-digit display of the FPGA board). A free-running
// counter steps the active digit every REFRESH_CYCLES clock cycles; at the
// 100 MHz default of 100,000 cycles each digit is lit for 1 ms, a full
// refresh every 4 ms, fast enough to look steady.
//
// Outputs are active low: `an[i]` enables digit i (digit 0 = least
// significant nibble), `seg` = {g,f,e,d,c,b,a}, `dp` is kept dark.
// The hexadecimal format is the source's; the scan rate and polarities are
// this design's choices for a common-anode display.
module seg7_display
  import cnn_tester_pkg::*;
#(
  parameter int unsigned REFRESH_CYCLES = 100_000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DISP_W-1:0] value,
  output logic [3:0]        an,
  output logic [6:0]        seg,
  output logic              dp
);
  localparam int unsigned CW = (REFRESH_CYCLES > 1) ? $clog2(REFRESH_CYCLES) : 1;

  logic [CW-1:0] cnt;
  logic [1:0]    digit;
  logic [3:0]    nibble;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
    end else if (cnt == CW'(REFRESH_CYCLES - 1)) begin
      cnt   <= '0;
      digit <= digit + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    nibble = value[4*digit +: 4];
    seg    = hex_to_seg(nibble);
    an     = ~(4'b0001 << digit);
    dp     = 1'b1;
  end
endmodule
